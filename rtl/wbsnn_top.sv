// wbsnn_top: weight-binarized spiking multilayer perceptron, 784-1023-1023-10.
//
// An image is classified over T_STEPS time steps. In each step the pixel_scan
// buffer sends the image (by default only its non-zero pixels) to the
// input_layer, whose accumulator neurons turn pixel * binary weight sums into
// spikes. Two fc_layers follow: each lists the active neurons of the previous
// layer with a priority encoder, reads one weight row per active neuron and
// counts every neuron's potential up or down. The layers are joined by
// valid/ready handshakes, so different layers work on different time steps at
// once. The output layer's spikes are counted per class over all steps; the
// class with the most spikes (lowest index on a tie) is the result.
//
// Use: load the image (img_*), the weight rows (w1_*, w2_*, w3_*) and the
// thresholds (th1_*, th2_*, th3_*), then pulse start while busy is low. All
// potentials and spike counts are cleared, T_STEPS passes run, and done pulses
// for one clock with spike_count and class_idx valid until the next start.
// Row j of a weight memory belongs to presynaptic neuron (or pixel) j, j >= 1.
//
// The network shape, binary weights, priority-encoded layers, counter and
// accumulator neurons follow the published design. The number of time steps,
// the widths, the handshakes, the rate-coded readout and the configuration
// ports are this design's own choices.
module wbsnn_top #(
  parameter int unsigned N_IN       = wbsnn_pkg::N_PIX,
  parameter int unsigned N_H1       = wbsnn_pkg::N_HID,
  parameter int unsigned N_H2       = wbsnn_pkg::N_HID,
  parameter int unsigned N_OUT      = wbsnn_pkg::N_CLASS,
  parameter int unsigned P_W        = wbsnn_pkg::PIX_W,
  parameter int unsigned A_W        = wbsnn_pkg::ACC_W,
  parameter int unsigned C_W        = wbsnn_pkg::CNT_W,
  parameter int unsigned T          = wbsnn_pkg::T_STEPS,
  parameter bit          SKIP_ZEROS = 1'b1,
  // derived widths
  parameter int unsigned A0W = $clog2(N_IN + 1),
  parameter int unsigned A1W = $clog2(N_H1 + 1),
  parameter int unsigned A2W = $clog2(N_H2 + 1),
  parameter int unsigned I1W = $clog2(N_H1),
  parameter int unsigned I2W = $clog2(N_H2),
  parameter int unsigned I3W = (N_OUT > 1) ? $clog2(N_OUT) : 1,
  parameter int unsigned SCW = $clog2(T + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // image buffer
  input  logic                  img_we,
  input  logic [A0W-1:0]        img_addr,
  input  logic [P_W-1:0]        img_data,
  // input layer: weights (row = pixel) and thresholds
  input  logic                  w1_we,
  input  logic [A0W-1:0]        w1_addr,
  input  logic [N_H1-1:0]       w1_data,
  input  logic                  th1_we,
  input  logic [I1W-1:0]        th1_idx,
  input  logic signed [A_W-1:0] th1_data,
  // hidden layer 2
  input  logic                  w2_we,
  input  logic [A1W-1:0]        w2_addr,
  input  logic [N_H2-1:0]       w2_data,
  input  logic                  th2_we,
  input  logic [I2W-1:0]        th2_idx,
  input  logic signed [C_W-1:0] th2_data,
  // output layer
  input  logic                  w3_we,
  input  logic [A2W-1:0]        w3_addr,
  input  logic [N_OUT-1:0]      w3_data,
  input  logic                  th3_we,
  input  logic [I3W-1:0]        th3_idx,
  input  logic signed [C_W-1:0] th3_data,
  // inference control and result
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  output logic [SCW-1:0]        spike_count [N_OUT],
  output logic [I3W-1:0]        class_idx
);
  typedef enum logic [1:0] {C_IDLE, C_CLEAR, C_RUN, C_DECIDE} ctrl_e;

  ctrl_e         cstate;
  logic          clear;
  logic [SCW-1:0] passes, steps_out;

  // layer links
  logic             pass_start, scan_busy;
  logic             pix_valid, pix_ready, pix_end;
  logic [A0W-1:0]   pix_idx;
  logic [P_W-1:0]   pix_val;
  logic             s1_valid, s1_ready, s2_valid, s2_ready, s3_valid;
  logic [N_H1-1:0]  s1;
  logic [N_H2-1:0]  s2;
  logic [N_OUT-1:0] s3;

  assign clear      = (cstate == C_CLEAR);
  assign busy       = (cstate != C_IDLE);
  assign pass_start = (cstate == C_RUN) && !scan_busy && (passes != SCW'(T));

  pixel_scan #(.N_PIX(N_IN), .PIX_W(P_W), .SKIP_ZEROS(SKIP_ZEROS), .AW(A0W)) u_scan (
    .clk, .rst_n,
    .img_we, .img_addr, .img_data,
    .pass_start, .busy (scan_busy),
    .pix_valid, .pix_ready, .pix_end, .pix_idx, .pix_val
  );

  input_layer #(.N_IN(N_IN), .N_OUT(N_H1), .PIX_W(P_W), .ACC_W(A_W), .AW(A0W), .NW(I1W)) u_l1 (
    .clk, .rst_n, .clear,
    .pix_valid, .pix_ready, .pix_end, .pix_idx, .pix_val,
    .out_valid (s1_valid), .out_ready (s1_ready), .out_spikes (s1),
    .w_we (w1_we), .w_addr (w1_addr), .w_data (w1_data),
    .th_we (th1_we), .th_idx (th1_idx), .th_data (th1_data)
  );

  fc_layer #(.N_IN(N_H1), .N_OUT(N_H2), .CNT_W(C_W), .AW(A1W), .NW(I2W)) u_l2 (
    .clk, .rst_n, .clear,
    .in_valid (s1_valid), .in_ready (s1_ready), .in_spikes (s1),
    .out_valid (s2_valid), .out_ready (s2_ready), .out_spikes (s2),
    .w_we (w2_we), .w_addr (w2_addr), .w_data (w2_data),
    .th_we (th2_we), .th_idx (th2_idx), .th_data (th2_data)
  );

  fc_layer #(.N_IN(N_H2), .N_OUT(N_OUT), .CNT_W(C_W), .AW(A2W), .NW(I3W)) u_l3 (
    .clk, .rst_n, .clear,
    .in_valid (s2_valid), .in_ready (s2_ready), .in_spikes (s2),
    .out_valid (s3_valid), .out_ready (1'b1), .out_spikes (s3),
    .w_we (w3_we), .w_addr (w3_addr), .w_data (w3_data),
    .th_we (th3_we), .th_idx (th3_idx), .th_data (th3_data)
  );

  // Controller and rate-coded readout
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cstate    <= C_IDLE;
      passes    <= '0;
      steps_out <= '0;
      done      <= 1'b0;
      class_idx <= '0;
      for (int k = 0; k < N_OUT; k++) spike_count[k] <= '0;
    end else begin
      done <= 1'b0;
      unique case (cstate)
        C_IDLE: if (start) cstate <= C_CLEAR;
        C_CLEAR: begin
          passes    <= '0;
          steps_out <= '0;
          for (int k = 0; k < N_OUT; k++) spike_count[k] <= '0;
          cstate    <= C_RUN;
        end
        C_RUN: begin
          if (pass_start) passes <= passes + 1'b1;
          if (s3_valid) begin
            for (int k = 0; k < N_OUT; k++)
              if (s3[k]) spike_count[k] <= spike_count[k] + 1'b1;
            steps_out <= steps_out + 1'b1;
            if (steps_out == SCW'(T - 1)) cstate <= C_DECIDE;
          end
        end
        C_DECIDE: begin
          logic [I3W-1:0] best;
          best = '0;
          for (int k = 1; k < N_OUT; k++)
            if (spike_count[k] > spike_count[best]) best = I3W'(k);
          class_idx <= best;
          done      <= 1'b1;
          cstate    <= C_IDLE;
        end
        default: cstate <= C_IDLE;
      endcase
    end
  end

endmodule
