// acc_neuron_tb: drives the input-layer neuron with random sign-magnitude
// pixels and weight bits and compares with a model in which the product sign
// is XNOR(pixel sign, weight) (1 = negative), the accumulator saturates at its
// limits, and fire emits a spike and resets when accumulator > threshold.
// A 10-bit accumulator makes saturation happen.
module acc_neuron_tb;
  localparam int PW = 8, AW = 10;
  localparam int MAXV = 511, MINV = -512;
  logic clk = 0, rst_n = 0;
  logic clear = 0, add = 0, sign = 0, w = 0, fire = 0, th_we = 0;
  logic [PW-2:0] mag = '0;
  logic signed [AW-1:0] th_data = '0;
  logic spike;
  logic signed [AW-1:0] acc;
  int checks = 0, failures = 0;
  int m_acc = 0, m_th = MAXV;
  bit m_spike = 0;
  int n_fire = 0, n_sat = 0, n_sub = 0;

  acc_neuron #(.PIX_W(PW), .ACC_W(AW)) dut (.clk, .rst_n, .clear, .add, .sign, .mag, .w, .fire, .th_we, .th_data, .spike, .acc);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      int op;
      op = $urandom_range(99, 0);
      clear = (op < 1);
      fire  = (op >= 1 && op < 6);
      add   = (op >= 6);
      sign  = ($urandom_range(99, 0) < 30);
      w     = ($urandom_range(99, 0) < ((n / 3000) % 2 ? 20 : 80));
      mag   = (PW-1)'($urandom());
      th_we = ($urandom_range(99, 0) < 2);
      th_data = AW'($urandom_range(700, 0) - 200);
      @(negedge clk);
      if (clear) begin m_acc = 0; m_spike = 0; end
      else if (fire) begin
        m_spike = (m_acc > m_th);
        if (m_spike) begin m_acc = 0; n_fire++; end
      end else if (add) begin
        int s;
        s = (sign == w) ? m_acc - int'(mag) : m_acc + int'(mag);  // XNOR = 1 -> negative
        if (sign == w) n_sub++;
        if (s > MAXV) begin s = MAXV; n_sat++; end
        if (s < MINV) begin s = MINV; n_sat++; end
        m_acc = s;
      end
      if (th_we) m_th = int'(th_data);
      checks++;
      if (int'(acc) != m_acc || spike != m_spike) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d acc=%0d exp=%0d spike=%b exp=%b", n, acc, m_acc, spike, m_spike);
      end
    end
    checks++;
    if (n_fire == 0 || n_sat == 0 || n_sub == 0) begin
      failures++; $display("FAIL coverage fire=%0d sat=%0d sub=%0d", n_fire, n_sat, n_sub);
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
