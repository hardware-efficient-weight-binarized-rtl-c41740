// counter_neuron_tb: drives the fully connected layer's neuron with random
// clear / fire / inc operations and random weight bits and compares spike and
// potential with a model: +1 for weight 1, -1 for weight 0, saturation at the
// counter limits, spike when potential > threshold and reset to 0 on a spike.
// A narrow 6-bit counter makes saturation happen.
module counter_neuron_tb;
  localparam int CW = 6;
  localparam int MAXV = 31, MINV = -32;
  logic clk = 0, rst_n = 0;
  logic clear = 0, inc = 0, w = 0, fire = 0, th_we = 0;
  logic signed [CW-1:0] th_data = '0;
  logic spike;
  logic signed [CW-1:0] pot;
  int checks = 0, failures = 0;
  int m_pot = 0, m_th = MAXV;
  bit m_spike = 0;
  int n_fire = 0, n_sat = 0, n_neg = 0;

  counter_neuron #(.CNT_W(CW)) dut (.clk, .rst_n, .clear, .inc, .w, .fire, .th_we, .th_data, .spike, .pot);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      int op;
      op = $urandom_range(99, 0);
      clear = (op < 1);
      fire  = (op >= 1 && op < 8);
      inc   = (op >= 8);
      // weight bias drifts so the counter visits both limits
      w     = ($urandom_range(99, 0) < ((n / 2000) % 2 ? 25 : 75));
      th_we = ($urandom_range(99, 0) < 2);
      th_data = CW'($urandom_range(20, 0) - 5);
      @(negedge clk);
      // model
      if (clear) begin m_pot = 0; m_spike = 0; end
      else if (fire) begin
        m_spike = (m_pot > m_th);
        if (m_spike) begin m_pot = 0; n_fire++; end
      end else if (inc) begin
        if (w && m_pot == MAXV) n_sat++;
        if (!w && m_pot == MINV) n_sat++;
        if (w && m_pot != MAXV) m_pot++;
        else if (!w && m_pot != MINV) m_pot--;
      end
      if (th_we) m_th = int'(th_data);
      if (m_pot < 0) n_neg++;
      checks++;
      if (int'(pot) != m_pot || spike != m_spike) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d pot=%0d exp=%0d spike=%b exp=%b", n, pot, m_pot, spike, m_spike);
      end
    end
    checks++;
    if (n_fire == 0 || n_sat == 0 || n_neg == 0) begin
      failures++; $display("FAIL coverage fire=%0d sat=%0d neg=%0d", n_fire, n_sat, n_neg);
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
