// wbsnn_full_tb: end-to-end test of the spiking MLP at its default size
// (784-1023-1023-10, 16 time steps, zero pixels skipped): three images. It
// then runs the smaller networks 784-255-255-10, 784-127-127-10 and
// 784-63-63-10 on the same default-size hardware, one image each.
//
// Each image is random (about 19% non-zero pixels, a tenth of them
// negative; one image is all zero). Binary weights and thresholds are random
// and identical for every top instance. The testbench holds its own model of
// the network: per time step every input neuron adds +|p| or -|p| per non-zero
// pixel (XNOR of pixel sign and weight chooses), every layer-2 and output
// neuron adds +1 or -1 per spiking input, a neuron fires when its potential
// exceeds its threshold and is then reset to 0, and the class is the output
// neuron with most spikes (lowest index on a tie). Spike counts and class are
// compared with the model. It also counts how often each mechanism happened
// (zero pixels skipped, spikes in each layer, inhibitory updates, negative
// potentials, potential carried over a time step, an empty spike vector,
// back-pressure between layers) and fails a mechanism that never happened.
module wbsnn_full_tb;
  localparam int N_IN = 784, N_H1 = 1023, N_H2 = 1023, N_OUT = 10;
  localparam int P_W = 8, A_W = 20, C_W = 16, T = 16;
  localparam int A0W = $clog2(N_IN + 1), A1W = $clog2(N_H1 + 1), A2W = $clog2(N_H2 + 1);
  localparam int NDUT = 1, NCFG = 4, HACT [4] = '{1023, 255, 127, 63}, NIMG [4] = '{3, 1, 1, 1}, DENS = 19, WATCHDOG = 400000;
  localparam int TH1_LO = 200, TH1_HI = 1200, TH2_HI = 12, TH3_HI = 40, W3P = 50;
  // hidden neurons at or above HACT[c] get a threshold they cannot exceed,
  // which runs a smaller network on the same hardware
  localparam int I3W = (N_OUT > 1) ? $clog2(N_OUT) : 1;
  localparam int SCW = $clog2(T + 1);

  logic clk = 0, rst_n = 0;
  logic img_we = 0;
  logic [A0W-1:0] img_addr = '0;
  logic [P_W-1:0] img_data = '0;
  logic w1_we = 0, w2_we = 0, w3_we = 0, th1_we = 0, th2_we = 0, th3_we = 0;
  logic [A0W-1:0] w1_addr = '0;
  logic [A1W-1:0] w2_addr = '0;
  logic [A2W-1:0] w3_addr = '0;
  logic [N_H1-1:0] w1_data = '0;
  logic [N_H2-1:0] w2_data = '0;
  logic [N_OUT-1:0] w3_data = '0;
  logic [$clog2(N_H1)-1:0] th1_idx = '0;
  logic [$clog2(N_H2)-1:0] th2_idx = '0;
  logic [I3W-1:0] th3_idx = '0;
  logic signed [A_W-1:0] th1_data = '0;
  logic signed [C_W-1:0] th2_data = '0, th3_data = '0;
  logic start = 0;
  logic busy [NDUT], done [NDUT];
  logic [SCW-1:0] spike_count [NDUT][N_OUT];
  logic [I3W-1:0] class_idx [NDUT];

  wbsnn_top dut0 (
    .clk, .rst_n, .img_we, .img_addr, .img_data,
    .w1_we, .w1_addr, .w1_data, .th1_we, .th1_idx, .th1_data,
    .w2_we, .w2_addr, .w2_data, .th2_we, .th2_idx, .th2_data,
    .w3_we, .w3_addr, .w3_data, .th3_we, .th3_idx, .th3_data,
    .start, .busy(busy[0]), .done(done[0]), .spike_count(spike_count[0]), .class_idx(class_idx[0]));

  always #5 clk = ~clk;

  // configuration and model state
  logic [N_H1-1:0]  w1 [1:N_IN];
  logic [N_H2-1:0]  w2 [1:N_H1];
  logic [N_OUT-1:0] w3 [1:N_H2];
  int th1 [N_H1], th2 [N_H2], th3 [N_OUT];
  logic [P_W-1:0] img [1:N_IN];
  int acc1 [N_H1], pot2 [N_H2], pot3 [N_OUT];
  int m_count [N_OUT];
  int m_class;

  int checks = 0, failures = 0;
  int n_zero_skip = 0, n_sp1 = 0, n_sp2 = 0, n_sp3 = 0, n_inhib = 0, n_neg = 0;
  int n_carry = 0, n_empty = 0, n_stall = 0;
  longint cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (dut0.u_l1.out_valid && !dut0.u_l2.in_ready) n_stall++;
    if (dut0.u_l2.out_valid && !dut0.u_l3.in_ready) n_stall++;
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", m); end
  endtask

  task automatic run_model();
    logic [N_H1-1:0] s1;
    logic [N_H2-1:0] s2;
    for (int j = 0; j < N_H1; j++) acc1[j] = 0;
    for (int j = 0; j < N_H2; j++) pot2[j] = 0;
    for (int j = 0; j < N_OUT; j++) begin pot3[j] = 0; m_count[j] = 0; end
    for (int t = 0; t < T; t++) begin
      for (int j = 0; j < N_H1; j++) begin
        for (int p = 1; p <= N_IN; p++)
          if (img[p][P_W-2:0] != 0) begin
            if (img[p][P_W-1] == w1[p][j]) acc1[j] -= int'(img[p][P_W-2:0]);
            else                            acc1[j] += int'(img[p][P_W-2:0]);
          end
        s1[j] = (acc1[j] > th1[j]);
        if (s1[j]) begin acc1[j] = 0; n_sp1++; end
        else if (acc1[j] != 0) n_carry++;
      end
      if (s1 == '0) n_empty++;
      for (int o = 0; o < N_H2; o++) begin
        for (int j = 1; j <= N_H1; j++)
          if (s1[j-1]) begin
            if (w2[j][o]) pot2[o]++; else begin pot2[o]--; n_inhib++; end
          end
        if (pot2[o] < 0) n_neg++;
        s2[o] = (pot2[o] > th2[o]);
        if (s2[o]) begin pot2[o] = 0; n_sp2++; end
      end
      if (s2 == '0) n_empty++;
      for (int o = 0; o < N_OUT; o++) begin
        for (int j = 1; j <= N_H2; j++)
          if (s2[j-1]) begin
            if (w3[j][o]) pot3[o]++; else begin pot3[o]--; n_inhib++; end
          end
        if (pot3[o] < 0) n_neg++;
        if (pot3[o] > th3[o]) begin pot3[o] = 0; m_count[o]++; n_sp3++; end
      end
    end
    m_class = 0;
    for (int o = 1; o < N_OUT; o++) if (m_count[o] > m_count[m_class]) m_class = o;
  endtask

  task automatic configure(int hact);
    for (int r = 1; r <= N_IN; r++) begin
      for (int c = 0; c < N_H1; c++) w1[r][c] = $urandom_range(1, 0);
      @(negedge clk); w1_we = 1; w1_addr = A0W'(r); w1_data = w1[r];
    end
    @(negedge clk); w1_we = 0;
    for (int r = 1; r <= N_H1; r++) begin
      for (int c = 0; c < N_H2; c++) w2[r][c] = $urandom_range(1, 0);
      @(negedge clk); w2_we = 1; w2_addr = A1W'(r); w2_data = w2[r];
    end
    @(negedge clk); w2_we = 0;
    for (int r = 1; r <= N_H2; r++) begin
      for (int c = 0; c < N_OUT; c++) w3[r][c] = ($urandom_range(99, 0) < W3P);
      @(negedge clk); w3_we = 1; w3_addr = A2W'(r); w3_data = w3[r];
    end
    @(negedge clk); w3_we = 0;
    for (int j = 0; j < N_H1; j++) begin
      th1[j] = (j < hact) ? $urandom_range(TH1_HI, TH1_LO) : (1 << (A_W - 1)) - 1;
      @(negedge clk); th1_we = 1; th1_idx = $bits(th1_idx)'(j); th1_data = A_W'(th1[j]);
    end
    @(negedge clk); th1_we = 0;
    for (int j = 0; j < N_H2; j++) begin
      th2[j] = (j < hact) ? $urandom_range(TH2_HI, 0) : (1 << (C_W - 1)) - 1;
      @(negedge clk); th2_we = 1; th2_idx = $bits(th2_idx)'(j); th2_data = C_W'(th2[j]);
    end
    @(negedge clk); th2_we = 0;
    for (int j = 0; j < N_OUT; j++) begin
      th3[j] = $urandom_range(TH3_HI, 0);
      @(negedge clk); th3_we = 1; th3_idx = I3W'(j); th3_data = C_W'(th3[j]);
    end
    @(negedge clk); th3_we = 0;
  endtask

  task automatic load_image(bit all_zero);
    int nz;
    nz = 0;
    for (int p = 1; p <= N_IN; p++) begin
      if (!all_zero && $urandom_range(99, 0) < DENS) begin
        img[p] = {($urandom_range(9, 0) == 0), 7'($urandom_range(127, 1))};
        nz++;
      end else img[p] = '0;
      @(negedge clk); img_we = 1; img_addr = A0W'(p); img_data = img[p];
    end
    @(negedge clk); img_we = 0;
    n_zero_skip += T * (N_IN - nz);
  endtask

  task automatic infer(int n);
    longint t0;
    bit seen [NDUT];
    run_model();
    @(negedge clk); start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    for (int d = 0; d < NDUT; d++) seen[d] = 0;
    while (1) begin
      bit all;
      all = 1;
      for (int d = 0; d < NDUT; d++) begin
        if (done[d] && !seen[d]) begin
          seen[d] = 1;
          for (int o = 0; o < N_OUT; o++)
            chk(int'(spike_count[d][o]) == m_count[o],
                $sformatf("image %0d top %0d class %0d spikes %0d exp %0d", n, d, o, spike_count[d][o], m_count[o]));
          chk(int'(class_idx[d]) == m_class, $sformatf("image %0d top %0d class %0d exp %0d", n, d, class_idx[d], m_class));
        end
        all &= seen[d];
      end
      if (all) break;
      @(negedge clk);
    end
    $display("image %0d: class %0d, %0d cycles", n, m_class, cyc - t0);
    @(negedge clk);
    for (int d = 0; d < NDUT; d++) chk(!busy[d], "idle after done");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NCFG; c++) begin
      $display("network %0d-%0d-%0d-%0d", N_IN, HACT[c], HACT[c], N_OUT);
      configure(HACT[c]);
      for (int n = 0; n < NIMG[c]; n++) begin
        load_image(c == 0 && n == 1);
        infer(n);
      end
    end
    $display("mechanisms: zero-pixels-skipped=%0d L1-spikes=%0d L2-spikes=%0d out-spikes=%0d inhibitory=%0d negative=%0d carried=%0d empty-vectors=%0d back-pressure=%0d",
             n_zero_skip, n_sp1, n_sp2, n_sp3, n_inhib, n_neg, n_carry, n_empty, n_stall);
    chk(n_zero_skip > 0, "zero pixels skipped");
    chk(n_sp1 > 0, "input-layer spikes");
    chk(n_sp2 > 0, "hidden-layer spikes");
    chk(n_sp3 > 0, "output spikes");
    chk(n_inhib > 0, "inhibitory (count-down) updates");
    chk(n_neg > 0, "negative potentials");
    chk(n_carry > 0, "potential carried across a time step");
    chk(n_empty > 0, "empty spike vector");
    chk(n_stall > 0, "back-pressure between layers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
