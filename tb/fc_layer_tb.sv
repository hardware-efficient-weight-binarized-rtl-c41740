// fc_layer_tb: a 30-input, 7-neuron fully connected layer with random binary
// weights and thresholds. For several images (each starting with clear) it
// sends time steps of random spike vectors of varying density, including empty
// ones, takes the outputs with random back-pressure and compares every output
// spike vector with a model: potential += (+1 for weight 1, -1 for weight 0)
// per active input, spike when potential > threshold, reset to 0 on a spike.
// It also checks the latency: out_valid k + 3 clocks after the input
// handshake, k being the number of active inputs.
module fc_layer_tb;
  localparam int NI = 30, NO = 7, CW = 8, AW = 5, NW = 3;
  logic clk = 0, rst_n = 0, clear = 0;
  logic in_valid = 0, in_ready;
  logic [NI-1:0] in_spikes = '0;
  logic out_valid, out_ready = 0;
  logic [NO-1:0] out_spikes;
  logic w_we = 0, th_we = 0;
  logic [AW-1:0] w_addr = '0;
  logic [NO-1:0] w_data = '0;
  logic [NW-1:0] th_idx = '0;
  logic signed [CW-1:0] th_data = '0;

  logic [NO-1:0] wmem [1:NI];
  int th [NO];
  int pot [NO];
  int checks = 0, failures = 0;
  int n_spikes = 0, n_down = 0, n_empty = 0, n_stall = 0;

  fc_layer #(.N_IN(NI), .N_OUT(NO), .CNT_W(CW), .AW(AW), .NW(NW)) dut (
    .clk, .rst_n, .clear, .in_valid, .in_ready, .in_spikes, .out_valid, .out_ready, .out_spikes,
    .w_we, .w_addr, .w_data, .th_we, .th_idx, .th_data);

  always #5 clk = ~clk;

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", m); end
  endtask

  task automatic step(logic [NI-1:0] s);
    int k, lat;
    logic [NO-1:0] exp_sp;
    k = $countones(s);
    if (k == 0) n_empty++;
    // model
    for (int o = 0; o < NO; o++) begin
      for (int j = 1; j <= NI; j++)
        if (s[j-1]) begin
          if (wmem[j][o]) pot[o]++; else begin pot[o]--; n_down++; end
        end
      exp_sp[o] = (pot[o] > th[o]);
      if (exp_sp[o]) begin pot[o] = 0; n_spikes++; end
    end
    // drive
    @(negedge clk);
    chk(in_ready, "ready when idle");
    in_valid = 1; in_spikes = s;
    @(negedge clk);
    in_valid = 0; in_spikes = '0;
    lat = 1;
    while (!out_valid) begin @(negedge clk); lat++; end
    chk(lat == k + 3, $sformatf("latency %0d for %0d inputs", lat, k));
    out_ready = 0;
    while ($urandom_range(2, 0) == 0) begin
      n_stall++;
      @(negedge clk);
      chk(out_valid && !in_ready, "output held under back-pressure");
    end
    out_ready = 1;
    chk(out_spikes == exp_sp, $sformatf("spikes %b exp %b", out_spikes, exp_sp));
    @(negedge clk);
    out_ready = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int j = 1; j <= NI; j++) begin
      @(negedge clk); w_we = 1; w_addr = AW'(j); w_data = NO'($urandom()); wmem[j] = w_data;
    end
    @(negedge clk); w_we = 0;
    for (int o = 0; o < NO; o++) begin
      @(negedge clk); th_we = 1; th_idx = NW'(o); th_data = CW'($urandom_range(6, 0) - 1); th[o] = int'(th_data);
    end
    @(negedge clk); th_we = 0;
    for (int img = 0; img < 12; img++) begin
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      for (int o = 0; o < NO; o++) pot[o] = 0;
      for (int t = 0; t < 10; t++) begin
        logic [NI-1:0] s;
        s = NI'($urandom());
        for (int d = 0; d < (t + img) % 4; d++) s &= NI'($urandom());
        if (t == 3) s = '0;
        step(s);
      end
    end
    chk(n_spikes > 0 && n_down > 0 && n_empty > 0 && n_stall > 0,
        $sformatf("coverage spikes=%0d down=%0d empty=%0d stall=%0d", n_spikes, n_down, n_empty, n_stall));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
