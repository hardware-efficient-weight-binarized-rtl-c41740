// pe_pri_tb: checks that the PE&PRI unit lists every set bit exactly once,
// highest index first, one index per clock, and then shows index 0. Vectors
// are random (W = 40, padded to 64 inside). Also checks that idx holds while
// adv is low and that a new load replaces unfinished work.
module pe_pri_tb;
  localparam int W = 40;
  logic         clk = 0, rst_n = 0;
  logic         load = 0, adv = 0;
  logic [W-1:0] din = '0;
  logic [5:0]   idx;
  logic         pending;
  int checks = 0, failures = 0;

  pe_pri #(.W(W)) dut (.clk, .rst_n, .load, .din, .adv, .idx, .pending);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic run_vector(logic [W-1:0] v, bit stall);
    int exp_list[$];
    int cycles;
    for (int i = W - 1; i >= 1; i--) if (v[i]) exp_list.push_back(i);
    @(negedge clk); din = v; load = 1; adv = 0;
    @(negedge clk); load = 0;
    cycles = 0;
    foreach (exp_list[n]) begin
      if (stall && (n % 3 == 1)) begin
        adv = 0;
        @(negedge clk);
        chk(int'(idx) == exp_list[n], "hold while adv low");
      end
      adv = 1;
      chk(pending && int'(idx) == exp_list[n], $sformatf("idx %0d exp %0d", idx, exp_list[n]));
      @(negedge clk); cycles++;
    end
    chk(!pending && idx == 0, "empty after list");
    chk(cycles == exp_list.size(), "one index per clock");
    adv = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(!pending, "empty after reset");
    run_vector('0, 0);
    run_vector(W'(1), 0);               // only bit 0: nothing to list
    run_vector({1'b1, {(W-1){1'b0}}}, 0);
    run_vector('1, 1);
    for (int n = 0; n < 200; n++)
      run_vector({$urandom(), $urandom()} & {$urandom(), $urandom()}, n % 2 == 1);
    // reload while busy
    @(negedge clk); din = W'(40'hF0_0000_000F); load = 1;
    @(negedge clk); load = 0; adv = 1;
    @(negedge clk); din = W'(40'h00_0000_0100); load = 1;
    @(negedge clk); load = 0;
    chk(int'(idx) == 8, "reload replaces pending set");
    @(negedge clk);
    chk(!pending, "reloaded set finished");
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
