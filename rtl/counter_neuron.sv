// counter_neuron: integrate-and-fire neuron of a fully connected layer.
//
// The membrane potential is an up/down counter. For every active presynaptic
// neuron the layer presents that synapse's weight bit w with inc high: w = 1
// counts up (+1), w = 0 counts down (-1), so a one-bit weight gives both
// excitatory and inhibitory synapses without sign extension. With fire high
// the potential is compared with the neuron's threshold; if it is greater a
// spike is emitted and the counter is reset to zero, otherwise it keeps its
// value into the next time step. clear zeroes potential and spike (start of an
// image). The threshold is a register loaded through th_we/th_data.
//
// Timing: one clock per operation; spike is registered and holds from one fire
// to the next. Priority: clear, then fire, then inc. The counter saturates at
// the limits of its CNT_W-bit two's complement range. Counter, threshold,
// greater-than comparison and reset on firing follow the published neuron; the
// widths, the saturation and the clear input are this design's own.
module counter_neuron #(
  parameter int unsigned CNT_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    inc,
  input  logic                    w,
  input  logic                    fire,
  input  logic                    th_we,
  input  logic signed [CNT_W-1:0] th_data,
  output logic                    spike,
  output logic signed [CNT_W-1:0] pot
);
  localparam logic signed [CNT_W-1:0] MAXV = {1'b0, {(CNT_W-1){1'b1}}};
  localparam logic signed [CNT_W-1:0] MINV = {1'b1, {(CNT_W-1){1'b0}}};

  logic signed [CNT_W-1:0] th;
  logic                    above;

  assign above = (pot > th);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pot   <= '0;
      spike <= 1'b0;
      th    <= MAXV;
    end else begin
      if (th_we) th <= th_data;
      if (clear) begin
        pot   <= '0;
        spike <= 1'b0;
      end else if (fire) begin
        spike <= above;
        if (above) pot <= '0;
      end else if (inc) begin
        if (w && pot != MAXV)       pot <= pot + 1'b1;
        else if (!w && pot != MINV) pot <= pot - 1'b1;
      end
    end
  end

endmodule
