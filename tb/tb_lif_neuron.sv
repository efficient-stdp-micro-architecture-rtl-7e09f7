// tb_lif_neuron: random weighted inputs and ticks against a model of the
// leaky integrate-and-fire rule (sum inputs, add at the tick, constant leak
// towards 0, fire at the threshold and reset, floor at V_MIN); also checks
// that a forced spike fires at the next tick and that the spike pulse comes
// one cycle after the tick.
module tb_lif_neuron;
  logic clk = 0, rst_n = 0, tick, in_valid, force_spike, spike;
  logic signed [7:0] in_w;
  logic signed [15:0] v;
  int checks = 0, failures = 0, fires = 0;
  int m_v = 0, m_acc = 0;
  bit m_forced = 0, m_spike = 0;

  lif_neuron #(.V_W(16), .W_W(8), .THRESH(64), .LEAK(1), .V_RESET(0), .V_MIN(-64)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tick = 0; in_valid = 0; in_w = 0; force_spike = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      checks++;
      if (spike != m_spike || int'(v) != m_v) begin
        failures++;
        $display("FAIL: t=%0d spike %0b/%0b v %0d/%0d", t, spike, m_spike, v, m_v);
      end
      tick = (t % 8) == 7;
      in_valid = ($urandom % 3) == 0;
      in_w = 8'(int'($urandom % 40) - 12);
      force_spike = ($urandom % 300) == 0;
      @(posedge clk);
      m_spike = 0;
      if (tick) begin
        int vs, vl;
        vs = m_v + m_acc;
        vl = (vs > 1) ? vs - 1 : (vs < -1) ? vs + 1 : 0;
        if (vl < -64) vl = -64;
        if (m_forced || force_spike || vl >= 64) begin
          m_spike = 1; m_v = 0; fires++;
        end else m_v = vl;
        m_acc = in_valid ? int'(in_w) : 0;
        m_forced = 0;
      end else begin
        if (in_valid) m_acc += int'(in_w);
        if (force_spike) m_forced = 1;
      end
    end
    checks++;
    if (fires < 10) begin failures++; $display("FAIL: only %0d spikes", fires); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
