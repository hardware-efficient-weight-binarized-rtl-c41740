// weight_ram_tb: writes random rows into a 37 x 23 weight memory, reads them
// back in random order and checks data and the one-clock read latency; also
// checks that a write to row 0 (no such row) changes nothing it can see.
module weight_ram_tb;
  localparam int DEPTH = 37, NW = 23, AW = 6;
  logic          clk = 0;
  logic          re = 0, we = 0;
  logic [AW-1:0] raddr = '0, waddr = '0;
  logic [NW-1:0] rdata, wdata = '0;
  logic [NW-1:0] model [1:DEPTH];
  int checks = 0, failures = 0;

  weight_ram #(.DEPTH(DEPTH), .NW(NW), .AW(AW)) dut (.clk, .re, .raddr, .rdata, .we, .waddr, .wdata);

  always #5 clk = ~clk;

  initial begin
    for (int r = 1; r <= DEPTH; r++) begin
      @(negedge clk); we = 1; waddr = AW'(r); wdata = NW'($urandom()); model[r] = wdata;
    end
    @(negedge clk); waddr = '0; wdata = '1;     // ignored
    @(negedge clk); we = 0;
    for (int n = 0; n < 500; n++) begin
      int r;
      logic [NW-1:0] prev;
      r = $urandom_range(DEPTH, 1);
      prev = rdata;
      @(negedge clk); re = 1; raddr = AW'(r);
      checks++;
      if (rdata !== prev) begin failures++; $display("FAIL rdata changed prev clock"); end
      @(negedge clk); re = 0;
      checks++;
      if (rdata !== model[r]) begin
        failures++; $display("FAIL row %0d got %h exp %h", r, rdata, model[r]);
      end
      // rdata holds while re is low
      raddr = AW'($urandom_range(DEPTH, 1));
      @(negedge clk);
      checks++;
      if (rdata !== model[r]) begin failures++; $display("FAIL hold"); end
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
