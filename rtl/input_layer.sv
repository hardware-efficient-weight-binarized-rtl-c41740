// input_layer: first layer of the network, fed with real pixel values.
//
// Pixels arrive one per clock as (index, sign-magnitude value) on a
// valid/ready stream. The index addresses a row of the binary weight RAM that
// all N_OUT neurons share; every acc_neuron XNORs the pixel sign with its
// weight bit and adds or subtracts the magnitude. A token with pix_end high
// closes the time step: the neurons compare their accumulators with their
// thresholds, fire and reset, and the N_OUT-bit spike vector is offered on
// out_valid/out_ready. The same image is presented again for every time step,
// so a neuron's firing rate follows its weighted input.
//
// Interface: pix_idx runs 1..N_IN (0 is reserved, as at every encoder);
// pix_ready is high while the layer integrates. clear zeroes all accumulators
// and must be given while no time step is in progress. w_* writes weight row j (pixel j),
// th_* one neuron's threshold.
//
// Timing: a pixel accepted on cycle t is accumulated at the end of t + 1; the
// spike vector is valid two clocks after the end token. Weight RAM, XNOR,
// accumulators and comparators follow the published input layer; the stream
// format and configuration ports are this design's own.
module input_layer #(
  parameter int unsigned N_IN  = 784,
  parameter int unsigned N_OUT = 1023,
  parameter int unsigned PIX_W = 8,
  parameter int unsigned ACC_W = 20,
  parameter int unsigned AW    = $clog2(N_IN + 1),
  parameter int unsigned NW    = (N_OUT > 1) ? $clog2(N_OUT) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  // pixel stream
  input  logic                    pix_valid,
  output logic                    pix_ready,
  input  logic                    pix_end,
  input  logic [AW-1:0]           pix_idx,
  input  logic [PIX_W-1:0]        pix_val,
  // output spike vector
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [N_OUT-1:0]        out_spikes,
  // configuration
  input  logic                    w_we,
  input  logic [AW-1:0]           w_addr,
  input  logic [N_OUT-1:0]        w_data,
  input  logic                    th_we,
  input  logic [NW-1:0]           th_idx,
  input  logic signed [ACC_W-1:0] th_data
);
  import wbsnn_pkg::*;

  layer_state_e state;

  logic             take_pix;
  logic             rd_v;
  logic             sign_q;
  logic [PIX_W-2:0] mag_q;
  logic [N_OUT-1:0] row;
  logic             fire;

  assign pix_ready = (state == L_INTEG);
  assign take_pix  = pix_valid && pix_ready && !pix_end;
  assign fire      = (state == L_FIRE);
  assign out_valid = (state == L_OUT);

  weight_ram #(.DEPTH(N_IN), .NW(N_OUT), .AW(AW)) u_ram (
    .clk,
    .re    (take_pix),
    .raddr (pix_idx),
    .rdata (row),
    .we    (w_we),
    .waddr (w_addr),
    .wdata (w_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= L_INTEG;
      rd_v   <= 1'b0;
      sign_q <= 1'b0;
      mag_q  <= '0;
    end else begin
      rd_v <= take_pix;
      if (take_pix) begin
        sign_q <= pix_val[PIX_W-1];
        mag_q  <= pix_val[PIX_W-2:0];
      end
      unique case (state)
        L_INTEG: if (pix_valid && pix_end) state <= L_FIRE;
        L_FIRE:                            state <= L_OUT;
        L_OUT:   if (out_ready)            state <= L_INTEG;
        default:                           state <= L_INTEG;
      endcase
    end
  end

  for (genvar k = 0; k < N_OUT; k++) begin : g_neuron
    acc_neuron #(.PIX_W(PIX_W), .ACC_W(ACC_W)) u_n (
      .clk, .rst_n,
      .clear   (clear),
      .add     (rd_v),
      .sign    (sign_q),
      .mag     (mag_q),
      .w       (row[k]),
      .fire    (fire),
      .th_we   (th_we && th_idx == NW'(k)),
      .th_data (th_data),
      .spike   (out_spikes[k]),
      .acc     ()
    );
  end

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
                out_valid && !out_ready |=> out_valid && $stable(out_spikes));

endmodule
