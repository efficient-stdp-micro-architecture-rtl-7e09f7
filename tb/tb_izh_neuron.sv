// tb_izh_neuron: the Izhikevich cell against a real-valued reference.
//  - no input: no spike for 500 steps, v settles near the resting potential
//  - one step from rest with a given input matches the real-valued
//    two-half-step update within 0.2 mV
//  - constant input 10 (regular spiking): the number of spikes in 1000 steps
//    is within 20% of the real-valued model's count, and v is c after a spike
//  - a forced spike fires at the next tick
module tb_izh_neuron;
  logic clk = 0, rst_n = 0, tick, in_valid, force_spike, spike;
  logic signed [7:0] in_w;
  logic signed [31:0] v, u;
  int checks = 0, failures = 0;

  izh_neuron #(.W_W(8)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one time step: input I during the step, then tick
  task automatic step(input int i_in, output bit fired);
    @(negedge clk);
    if (i_in != 0) begin in_valid = 1; in_w = 8'(i_in); end
    @(negedge clk);
    in_valid = 0;
    tick = 1;
    @(negedge clk);
    tick = 0;
    fired = spike;
  endtask

  function automatic real f(real vv, real uu, real ii);
    return 0.04 * vv * vv + 5.0 * vv + 140.0 - uu + ii;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit fired;
    int n_spk, r_spk;
    real rv, ru;
    tick = 0; in_valid = 0; in_w = 0; force_spike = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // single step from rest with input 20
    @(negedge clk);
    rv = -65.0; ru = 0.2 * -65.0;
    step(20, fired);
    rv = rv + 0.5 * f(rv, ru, 20.0);
    rv = rv + 0.5 * f(rv, ru, 20.0);
    check(!fired, "no spike on first step");
    check(real'(v) / 256.0 - rv < 0.2 && rv - real'(v) / 256.0 < 0.2, $sformatf("one step: v %f want %f", real'(v) / 256.0, rv));
    // reset, no input
    rst_n = 0; @(negedge clk); rst_n = 1;
    n_spk = 0;
    for (int t = 0; t < 500; t++) begin step(0, fired); if (fired) n_spk++; end
    check(n_spk == 0, "spikes without input");
    check(real'(v) / 256.0 < -60.0 && real'(v) / 256.0 > -75.0, $sformatf("rest potential %f", real'(v) / 256.0));
    // constant input 10
    rst_n = 0; @(negedge clk); rst_n = 1;
    n_spk = 0; r_spk = 0;
    rv = -65.0; ru = 0.2 * -65.0;
    for (int t = 0; t < 1000; t++) begin
      step(10, fired);
      if (fired) begin
        n_spk++;
        check(v == -65 * 256, "v reset to c after spike");
      end
      rv = rv + 0.5 * f(rv, ru, 10.0);
      if (rv < 30.0) rv = rv + 0.5 * f(rv, ru, 10.0);
      ru = ru + 0.02 * (0.2 * rv - ru);
      if (rv >= 30.0) begin rv = -65.0; ru = ru + 8.0; r_spk++; end
    end
    $display("spikes in 1000 ms: %0d (reference %0d)", n_spk, r_spk);
    check(r_spk > 0 && real'(n_spk) >= 0.8 * real'(r_spk) && real'(n_spk) <= 1.2 * real'(r_spk),
          $sformatf("spike count %0d, reference %0d", n_spk, r_spk));
    // forced spike
    @(negedge clk); force_spike = 1; @(negedge clk); force_spike = 0;
    step(0, fired);
    check(fired, "forced spike");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
