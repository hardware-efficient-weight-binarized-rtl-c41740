// pe_tree_tb: checks the hierarchical priority encoder at 32 inputs (the
// PE4 + PE8 construction) and at 1024 inputs (the size needed by a 1023-neuron
// layer). Inputs are random vectors of varying density plus every one-hot
// vector; the expected index is the highest set bit above bit 0, else 0.
module pe_tree_tb;
  logic [31:0]   d32;
  logic [4:0]    q32;
  logic [1023:0] d1k;
  logic [9:0]    q1k;
  int checks = 0, failures = 0;

  pe_tree #(.W(32))   dut32 (.d(d32), .q(q32));
  pe_tree #(.W(1024)) dut1k (.d(d1k), .q(q1k));

  function automatic int ref32(logic [31:0] v);
    for (int i = 31; i >= 1; i--) if (v[i]) return i;
    return 0;
  endfunction
  function automatic int ref1k(logic [1023:0] v);
    for (int i = 1023; i >= 1; i--) if (v[i]) return i;
    return 0;
  endfunction

  task automatic check32();
    #1; checks++;
    if (int'(q32) != ref32(d32)) begin
      failures++; $display("FAIL 32 d=%h q=%0d exp=%0d", d32, q32, ref32(d32));
    end
  endtask
  task automatic check1k();
    #1; checks++;
    if (int'(q1k) != ref1k(d1k)) begin
      failures++; $display("FAIL 1k q=%0d exp=%0d", q1k, ref1k(d1k));
    end
  endtask

  initial begin
    for (int i = 0; i < 32; i++) begin d32 = 32'd1 << i; check32(); end
    d32 = '0; check32();
    for (int n = 0; n < 3000; n++) begin
      d32 = $urandom();
      // thin out to exercise low groups
      for (int s = 0; s < n % 5; s++) d32 &= $urandom();
      check32();
    end
    for (int i = 0; i < 1024; i++) begin d1k = '0; d1k[i] = 1'b1; check1k(); end
    for (int n = 0; n < 2000; n++) begin
      d1k = '0;
      for (int k = 0; k < (n % 6); k++) d1k[$urandom_range(1023, 0)] = 1'b1;
      check1k();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
