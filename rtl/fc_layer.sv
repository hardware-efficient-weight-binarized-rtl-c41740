// fc_layer: fully connected spiking layer with binary weights.
//
// One time step works as follows. The N_IN-bit spike vector of the previous
// layer is loaded into a PE&PRI unit (pe_pri), which lists the indices of the
// neurons that spiked, one per clock. Each index is the address of a row of
// the weight RAM that all N_OUT neurons share; neuron k takes bit k of the row
// and its up/down counter counts up for a 1 and down for a 0. Silent inputs
// cost no cycle at all. When the PE reports index 0 (nothing left) every
// neuron compares its counter with its threshold, fires if it is greater and
// resets; the resulting N_OUT-bit spike vector is offered downstream.
//
// Interface: in_valid/in_ready and out_valid/out_ready are valid/ready
// handshakes carrying one spike vector per time step; bit j-1 of in_spikes is
// presynaptic neuron j (index 0 is reserved). clear zeroes all potentials
// (start of an image) and must be given while the layer is idle. w_* writes
// one weight row (row j = presynaptic neuron j), th_* one neuron's threshold.
//
// Timing: with k active inputs, out_valid rises k + 3 clocks after the input
// handshake (k cycles of integration, one to find the list empty, one to fire,
// then the output). The PE&PRI, shared-address RAM and counter neurons follow
// the published layer; the handshakes and configuration ports are this
// design's own.
module fc_layer #(
  parameter int unsigned N_IN  = 1023,
  parameter int unsigned N_OUT = 1023,
  parameter int unsigned CNT_W = 16,
  parameter int unsigned AW    = $clog2(N_IN + 1),
  parameter int unsigned NW    = (N_OUT > 1) ? $clog2(N_OUT) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  // input spike vector
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [N_IN-1:0]         in_spikes,
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
  input  logic signed [CNT_W-1:0] th_data
);
  localparam int unsigned IW = ((N_IN + 1) <= 16) ? 4 : $clog2(N_IN + 1);

  import wbsnn_pkg::*;

  layer_state_e state;

  logic [IW-1:0]    idx;
  logic             pending;
  logic             pe_load;
  logic             rd_v;          // weight row valid on rdata this cycle
  logic [N_OUT-1:0] row;
  logic             fire;

  assign in_ready  = (state == L_IDLE);
  assign pe_load   = in_valid && in_ready;
  assign fire      = (state == L_FIRE);
  assign out_valid = (state == L_OUT);

  pe_pri #(.W(N_IN + 1)) u_pepri (
    .clk, .rst_n,
    .load    (pe_load),
    .din     ({in_spikes, 1'b0}),
    .adv     (state == L_INTEG),
    .idx,
    .pending
  );

  weight_ram #(.DEPTH(N_IN), .NW(N_OUT), .AW(AW)) u_ram (
    .clk,
    .re    (state == L_INTEG && pending),
    .raddr (AW'(idx)),
    .rdata (row),
    .we    (w_we),
    .waddr (w_addr),
    .wdata (w_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= L_IDLE;
      rd_v  <= 1'b0;
    end else begin
      rd_v <= (state == L_INTEG) && pending;
      unique case (state)
        L_IDLE:  if (in_valid)      state <= L_INTEG;
        L_INTEG: if (!pending)      state <= L_FIRE;
        L_FIRE:                     state <= L_OUT;
        L_OUT:   if (out_ready)     state <= L_IDLE;
        default:                    state <= L_IDLE;
      endcase
    end
  end

  for (genvar k = 0; k < N_OUT; k++) begin : g_neuron
    counter_neuron #(.CNT_W(CNT_W)) u_n (
      .clk, .rst_n,
      .clear   (clear),
      .inc     (rd_v),
      .w       (row[k]),
      .fire    (fire),
      .th_we   (th_we && th_idx == NW'(k)),
      .th_data (th_data),
      .spike   (out_spikes[k]),
      .pot     ()
    );
  end

  // Handshake rules
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
                out_valid && !out_ready |=> out_valid && $stable(out_spikes));
  a_clear_idle: assert property (@(posedge clk) disable iff (!rst_n)
                clear |-> state == L_IDLE);

endmodule
