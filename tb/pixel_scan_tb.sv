// pixel_scan_tb: loads random images (with many zero pixels, including
// "negative zero") into two image buffers, one that skips zero pixels and one
// that sends all of them, runs passes with random back-pressure and checks the
// streams: the skipping buffer sends exactly the non-zero pixels, highest
// index first; the other sends pixels 1..N in order; both end with one end
// token. With ready held high a pass of k pixels takes k + 1 clocks.
module pixel_scan_tb;
  localparam int N = 50, PW = 8, AW = 6;
  logic clk = 0, rst_n = 0;
  logic img_we = 0;
  logic [AW-1:0] img_addr = '0;
  logic [PW-1:0] img_data = '0;
  logic start_s = 0, start_a = 0;
  logic busy_s, busy_a;
  logic v_s, v_a, e_s, e_a;
  logic rdy_s = 0, rdy_a = 0;
  logic [AW-1:0] i_s, i_a;
  logic [PW-1:0] p_s, p_a;
  logic [PW-1:0] img [1:N];
  int checks = 0, failures = 0;

  pixel_scan #(.N_PIX(N), .PIX_W(PW), .SKIP_ZEROS(1'b1), .AW(AW)) dut_s (
    .clk, .rst_n, .img_we, .img_addr, .img_data, .pass_start(start_s), .busy(busy_s),
    .pix_valid(v_s), .pix_ready(rdy_s), .pix_end(e_s), .pix_idx(i_s), .pix_val(p_s));
  pixel_scan #(.N_PIX(N), .PIX_W(PW), .SKIP_ZEROS(1'b0), .AW(AW)) dut_a (
    .clk, .rst_n, .img_we, .img_addr, .img_data, .pass_start(start_a), .busy(busy_a),
    .pix_valid(v_a), .pix_ready(rdy_a), .pix_end(e_a), .pix_idx(i_a), .pix_val(p_a));

  always #5 clk = ~clk;

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", m); end
  endtask

  task automatic load_image(int density);
    for (int j = 1; j <= N; j++) begin
      @(negedge clk);
      img_we = 1; img_addr = AW'(j);
      if ($urandom_range(99, 0) < density) img_data = PW'($urandom_range(255, 1));
      else img_data = ($urandom_range(1, 0) != 0) ? 8'h80 : 8'h00;  // +0 or -0
      if (img_data[PW-2:0] == 0) img_data = img_data & 8'h80;
      img[j] = img_data;
    end
    @(negedge clk); img_we = 0;
  endtask

  // one pass through the skipping buffer
  task automatic pass_skip(bit bp);
    int exp_idx[$];
    int cyc, got;
    for (int j = N; j >= 1; j--) if (img[j][PW-2:0] != 0) exp_idx.push_back(j);
    @(negedge clk); start_s = 1;
    @(negedge clk); start_s = 0;
    cyc = 0; got = 0;
    forever begin
      rdy_s = bp ? ($urandom_range(2, 0) != 0) : 1'b1;
      #1;
      chk(v_s, "skip: valid during pass");
      if (rdy_s) begin
        if (got < exp_idx.size()) begin
          chk(!e_s && int'(i_s) == exp_idx[got] && p_s == img[exp_idx[got]],
              $sformatf("skip: pixel %0d got idx %0d", exp_idx[got], i_s));
          got++;
        end else begin
          chk(e_s, "skip: end token");
          @(negedge clk); cyc++;
          break;
        end
      end
      @(negedge clk); cyc++;
    end
    rdy_s = 0;
    if (!bp) chk(cyc == exp_idx.size() + 1, $sformatf("skip: %0d cycles for %0d pixels", cyc, exp_idx.size()));
    chk(!busy_s, "skip: idle after pass");
  endtask

  task automatic pass_all(bit bp);
    int cyc, got;
    @(negedge clk); start_a = 1;
    @(negedge clk); start_a = 0;
    cyc = 0; got = 1;
    forever begin
      rdy_a = bp ? ($urandom_range(2, 0) != 0) : 1'b1;
      #1;
      chk(v_a, "all: valid during pass");
      if (rdy_a) begin
        if (got <= N) begin
          chk(!e_a && int'(i_a) == got && p_a == img[got], $sformatf("all: pixel %0d", got));
          got++;
        end else begin
          chk(e_a, "all: end token");
          @(negedge clk); cyc++;
          break;
        end
      end
      @(negedge clk); cyc++;
    end
    rdy_a = 0;
    if (!bp) chk(cyc == N + 1, "all: N + 1 cycles");
    chk(!busy_a, "all: idle after pass");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(!v_s && !v_a, "idle after reset");
    load_image(0);
    pass_skip(0);
    for (int n = 0; n < 20; n++) begin
      load_image(5 + 5 * n);
      pass_skip(n % 2 == 1);
      pass_skip(0);
      pass_all(n % 2 == 1);
    end
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
