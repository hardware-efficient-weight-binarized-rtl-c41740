// pe8: 8-to-3 priority encoder.
//
// Q is the index of the highest set input among D7..D1. D0 is not looked at:
// Q = 0 means "no input set" (or only D0 set), which is why every layer size
// is 2^k - 1 and index 0 never names a neuron. Purely combinational.
// The truth table is the published one; the case-style coding is this
// implementation's.
module pe8 (
  input  logic [7:0] d,
  output logic [2:0] q
);
  always_comb begin
    unique casez (d[7:1])
      7'b1??????: q = 3'd7;
      7'b01?????: q = 3'd6;
      7'b001????: q = 3'd5;
      7'b0001???: q = 3'd4;
      7'b00001??: q = 3'd3;
      7'b000001?: q = 3'd2;
      7'b0000001: q = 3'd1;
      default:    q = 3'd0;
    endcase
  end
endmodule
