// acc_neuron: integrate-and-fire neuron of the input layer.
//
// Pixels arrive one at a time in sign-magnitude form. The pixel's sign bit is
// XNORed with the neuron's weight bit (1 = +1, 0 = -1); the result, placed in
// front of the magnitude bits, is the sign-magnitude product pixel * weight,
// which the accumulator adds (sign 0) or subtracts (sign 1). With fire high the
// accumulator is compared with the threshold; above it a spike is emitted and
// the accumulator is reset to zero. clear zeroes accumulator and spike.
//
// Timing: one pixel per clock with add high; spike is registered at fire.
// Priority: clear, fire, add. The accumulator saturates at its ACC_W-bit two's
// complement limits. XNOR, concatenation, accumulator and threshold comparison
// follow the published input neuron; widths, saturation and clear are this
// design's own.
module acc_neuron #(
  parameter int unsigned PIX_W = 8,
  parameter int unsigned ACC_W = 20
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    add,
  input  logic                    sign,                 // pixel sign, 1 = negative
  input  logic [PIX_W-2:0]        mag,                  // pixel magnitude
  input  logic                    w,                    // weight bit
  input  logic                    fire,
  input  logic                    th_we,
  input  logic signed [ACC_W-1:0] th_data,
  output logic                    spike,
  output logic signed [ACC_W-1:0] acc
);
  localparam logic signed [ACC_W:0] MAXV = (ACC_W+1)'({1'b0, {(ACC_W-1){1'b1}}});
  localparam logic signed [ACC_W:0] MINV = -MAXV - 1;

  logic signed [ACC_W-1:0] th;
  logic                    neg;        // XNOR of sign and weight: sign of the product
  logic signed [ACC_W:0]   sum;
  logic                    above;

  assign neg   = ~(sign ^ w);
  assign sum   = neg ? ((ACC_W+1)'(acc) - (ACC_W+1)'(mag)) : ((ACC_W+1)'(acc) + (ACC_W+1)'(mag));
  assign above = (acc > th);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      spike <= 1'b0;
      th    <= MAXV[ACC_W-1:0];
    end else begin
      if (th_we) th <= th_data;
      if (clear) begin
        acc   <= '0;
        spike <= 1'b0;
      end else if (fire) begin
        spike <= above;
        if (above) acc <= '0;
      end else if (add) begin
        if      (sum > MAXV) acc <= MAXV[ACC_W-1:0];
        else if (sum < MINV) acc <= MINV[ACC_W-1:0];
        else                 acc <= sum[ACC_W-1:0];
      end
    end
  end

endmodule
