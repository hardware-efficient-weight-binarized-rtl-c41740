// input_layer_tb: a 24-pixel, 5-neuron input layer with random binary weights
// and thresholds. Each time step streams a random subset of pixels in random
// order (signed sign-magnitude values, with random gaps in pix_valid), then an
// end token; the output spike vector is compared with a model in which each
// neuron adds +|p| when XNOR(sign, weight) = 0 and -|p| otherwise, fires when
// its accumulator exceeds its threshold and then resets. Checks that the
// spikes appear two clocks after the end token and that the layer refuses
// pixels while it holds an untaken output.
module input_layer_tb;
  localparam int NI = 24, NO = 5, PW = 8, ACW = 14, AW = 5, NW = 3;
  logic clk = 0, rst_n = 0, clear = 0;
  logic pix_valid = 0, pix_ready, pix_end = 0;
  logic [AW-1:0] pix_idx = '0;
  logic [PW-1:0] pix_val = '0;
  logic out_valid, out_ready = 0;
  logic [NO-1:0] out_spikes;
  logic w_we = 0, th_we = 0;
  logic [AW-1:0] w_addr = '0;
  logic [NO-1:0] w_data = '0;
  logic [NW-1:0] th_idx = '0;
  logic signed [ACW-1:0] th_data = '0;

  logic [NO-1:0] wmem [1:NI];
  int th [NO];
  int acc [NO];
  int checks = 0, failures = 0;
  int n_spikes = 0, n_neg = 0, n_stall = 0;

  input_layer #(.N_IN(NI), .N_OUT(NO), .PIX_W(PW), .ACC_W(ACW), .AW(AW), .NW(NW)) dut (
    .clk, .rst_n, .clear, .pix_valid, .pix_ready, .pix_end, .pix_idx, .pix_val,
    .out_valid, .out_ready, .out_spikes, .w_we, .w_addr, .w_data, .th_we, .th_idx, .th_data);

  always #5 clk = ~clk;

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", m); end
  endtask

  task automatic step(int img_seed);
    logic [NO-1:0] exp_sp;
    int lat;
    for (int j = 1; j <= NI; j++) begin
      if ($urandom_range(99, 0) < 60) begin
        logic [PW-1:0] p;
        p = PW'($urandom());
        for (int o = 0; o < NO; o++)
          if (p[PW-1] == wmem[j][o]) begin acc[o] -= int'(p[PW-2:0]); n_neg++; end
          else acc[o] += int'(p[PW-2:0]);
        while ($urandom_range(3, 0) == 0) begin pix_valid = 0; @(negedge clk); end
        pix_valid = 1; pix_end = 0; pix_idx = AW'(j); pix_val = p;
        #1 chk(pix_ready, "ready while integrating");
        @(negedge clk);
      end
    end
    for (int o = 0; o < NO; o++) begin
      exp_sp[o] = (acc[o] > th[o]);
      if (exp_sp[o]) begin acc[o] = 0; n_spikes++; end
    end
    pix_valid = 1; pix_end = 1; pix_idx = '0; pix_val = '0;
    @(negedge clk);
    pix_valid = 0; pix_end = 0;
    lat = 1;
    while (!out_valid) begin @(negedge clk); lat++; end
    chk(lat == 2, $sformatf("spikes %0d clocks after end token", lat));
    while ($urandom_range(2, 0) == 0) begin
      n_stall++;
      chk(!pix_ready, "no pixels taken while output held");
      @(negedge clk);
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
      @(negedge clk); th_we = 1; th_idx = NW'(o); th_data = ACW'($urandom_range(300, 0)); th[o] = int'(th_data);
    end
    @(negedge clk); th_we = 0;
    for (int img = 0; img < 10; img++) begin
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      for (int o = 0; o < NO; o++) acc[o] = 0;
      for (int t = 0; t < 8; t++) step(img);
    end
    chk(n_spikes > 0 && n_neg > 0 && n_stall > 0,
        $sformatf("coverage spikes=%0d neg=%0d stall=%0d", n_spikes, n_neg, n_stall));
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
