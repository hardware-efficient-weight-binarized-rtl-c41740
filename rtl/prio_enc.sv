// prio_enc: generic W-to-log2(W) priority encoder (W a power of two).
//
// q is the index of the highest set bit of d, bits W-1..1; bit 0 is ignored so
// that q = 0 means "nothing set", as for every encoder of this design. Used as
// the group-level encoder of pe_tree (a PE4 for a 32-input encoder).
// Combinational. The loop coding is this implementation's choice.
module prio_enc #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0]                   d,
  output logic [(W > 1 ? $clog2(W) : 1)-1:0] q
);
  localparam int unsigned QW = (W > 1) ? $clog2(W) : 1;
  always_comb begin
    q = '0;
    for (int unsigned i = 1; i < W; i++)
      if (d[i]) q = QW'(i);
  end
endmodule
