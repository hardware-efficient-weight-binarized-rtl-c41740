// pe8_tb: exhaustive check of the 8-to-3 priority encoder.
// Every one of the 256 input patterns is applied; the expected index is the
// highest set bit among d[7:1], or 0 when none is set (d[0] never counts).
module pe8_tb;
  logic [7:0] d;
  logic [2:0] q;
  int checks = 0, failures = 0;

  pe8 dut (.d, .q);

  function automatic logic [2:0] ref_pe(logic [7:0] v);
    ref_pe = 3'd0;
    for (int i = 7; i >= 1; i--) if (v[i]) return 3'(i);
  endfunction

  initial begin
    for (int v = 0; v < 256; v++) begin
      d = 8'(v);
      #1;
      checks++;
      if (q !== ref_pe(d)) begin
        failures++;
        $display("FAIL d=%b q=%0d exp=%0d", d, q, ref_pe(d));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
