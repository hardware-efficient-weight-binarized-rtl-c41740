// prio_enc_tb: checks the generic priority encoder as a PE4 (exhaustive) and
// as a PE16 (exhaustive). Expected value: highest set bit above bit 0, else 0.
module prio_enc_tb;
  logic [3:0]  d4;
  logic [1:0]  q4;
  logic [15:0] d16;
  logic [3:0]  q16;
  int checks = 0, failures = 0;

  prio_enc #(.W(4))  dut4  (.d(d4),  .q(q4));
  prio_enc #(.W(16)) dut16 (.d(d16), .q(q16));

  function automatic int ref_pe(logic [15:0] v, int w);
    for (int i = w - 1; i >= 1; i--) if (v[i]) return i;
    return 0;
  endfunction

  initial begin
    for (int v = 0; v < 16; v++) begin
      d4 = 4'(v); #1;
      checks++;
      if (int'(q4) != ref_pe(16'(v), 4)) begin
        failures++; $display("FAIL PE4 d=%b q=%0d", d4, q4);
      end
    end
    for (int v = 0; v < 65536; v++) begin
      d16 = 16'(v); #1;
      checks++;
      if (int'(q16) != ref_pe(d16, 16)) begin
        failures++;
        if (failures < 10) $display("FAIL PE16 d=%b q=%0d", d16, q16);
      end
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
