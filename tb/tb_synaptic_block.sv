// tb_synaptic_block: the shared synaptic block with N = 3 neurons, S = 4
// partitions and 20 cycles per time step. Checks the tick period, the
// weighted input injected for an incoming spike, potentiation for a pre
// spike followed 3 steps later by a post spike, depression for a post spike
// followed 2 steps later by a pre spike (both against A*exp(-|dt|/tau) with
// A = 16, tau = 20, within one unit), the inverted change under punishment,
// no change in exploitation, and that unconnected synapses never change.
module tb_synaptic_block;
  import snn_pkg::*;
  localparam int N = 3, S = 4, CPS = 20;
  logic clk = 0, rst_n = 0, run;
  stdp_mode_e mode;
  logic pre_valid, pre_ready, tick;
  logic [1:0] pre_syn, cfg_n, cfg_s;
  logic [N-1:0] post_spike, inj_valid;
  logic [15:0] now;
  logic signed [N-1:0][7:0] inj_w;
  logic cfg_we, cfg_conn, busy, evbuf_full, post_drop, stdp_update;
  logic signed [7:0] cfg_w;
  int checks = 0, failures = 0, ticks = 0, last_tick = -1, cycle = 0;

  synaptic_block #(.N(N), .S(S), .CYCLES_PER_STEP(CPS), .EVT_DEPTH(8)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int ref_dw(int d);
    real m;
    if (d == 0 || d >= 64 || d <= -64) return 0;
    m = 16.0 * $exp(-real'(d < 0 ? -d : d) / 20.0);
    return d > 0 ? int'($floor(m + 0.5)) : -int'($floor(m + 0.5));
  endfunction

  function automatic int wt(int n, int s);
    return int'(dut.u_weights.w[n][s]);
  endfunction

  always @(posedge clk) begin
    cycle++;
    if (rst_n && tick) begin
      ticks++;
      if (last_tick >= 0) begin
        checks++;
        if (cycle - last_tick != CPS) begin failures++; $display("FAIL: tick period %0d", cycle - last_tick); end
      end
      last_tick = cycle;
    end
  end

  task automatic cfgw(int n, int s, bit conn, int w);
    @(negedge clk);
    cfg_we = 1; cfg_n = 2'(n); cfg_s = 2'(s); cfg_conn = conn; cfg_w = 8'(w);
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic pre(int s);
    @(negedge clk);
    pre_valid = 1; pre_syn = 2'(s);
    #1;
    while (!pre_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    pre_valid = 0;
  endtask

  task automatic post(int n);
    @(negedge clk);
    post_spike = '0; post_spike[n] = 1;
    @(negedge clk);
    post_spike = '0;
  endtask

  task automatic to_step(int t);
    while (int'(now) < t) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  task automatic settle();
    repeat (3) @(negedge clk);
    while (busy) @(negedge clk);
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w0, e;
    logic [N-1:0] seen_valid;
    logic signed [N-1:0][7:0] seen_w;
    run = 0; mode = STDP_PLAIN; pre_valid = 0; pre_syn = 0; post_spike = 0;
    cfg_we = 0; cfg_n = 0; cfg_s = 0; cfg_conn = 0; cfg_w = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // neurons 0 and 1 connected to partitions 1 and 2, neuron 2 only to 3
    cfgw(0, 1, 1, 40); cfgw(1, 1, 1, -20); cfgw(0, 2, 1, 30); cfgw(1, 2, 1, 10);
    cfgw(2, 3, 1, 5); cfgw(2, 1, 0, 7);
    run = 1;
    // injection of partition 1
    to_step(2);
    fork
      pre(1);
      begin
        seen_valid = '0;
        repeat (6) begin
          @(negedge clk);
          if (|inj_valid) begin seen_valid = inj_valid; seen_w = inj_w; end
        end
      end
    join
    check(seen_valid == 3'b011, $sformatf("injection mask %b", seen_valid));
    check($signed(seen_w[0]) == 40 && $signed(seen_w[1]) == -20, $sformatf("injected weights %0d %0d", seen_w[0], seen_w[1]));
    settle();
    check(wt(0, 1) == 40, "no change without post spikes");
    // post of neuron 0 three steps later: potentiation of (0,1)
    to_step(5);
    post(0);
    settle();
    e = ref_dw(3);
    check(wt(0, 1) >= 40 + e - 1 && wt(0, 1) <= 40 + e + 1, $sformatf("LTP: w %0d want %0d", wt(0, 1), 40 + e));
    check(wt(0, 2) == 30, "(0,2) has no pre stamp: unchanged");
    check(wt(2, 1) == 7, "unconnected synapse unchanged");
    // pre on partition 2 two steps after the post: depression of (0,2)
    to_step(7);
    pre(2);
    settle();
    e = ref_dw(-2);
    check(wt(0, 2) >= 30 + e - 1 && wt(0, 2) <= 30 + e + 1, $sformatf("LTD: w %0d want %0d", wt(0, 2), 30 + e));
    check(wt(1, 2) == 10, "neuron 1 never fired: (1,2) unchanged");
    // punishment: post of neuron 1, pre of partition 2 was 1 step earlier
    mode = STDP_PUNISH;
    to_step(8);
    post(1);
    settle();
    e = -ref_dw(1);
    check(wt(1, 2) >= 10 + e - 1 && wt(1, 2) <= 10 + e + 1, $sformatf("punished: w %0d want %0d", wt(1, 2), 10 + e));
    // exploitation: nothing changes
    mode = STDP_OFF;
    w0 = wt(0, 1);
    to_step(9);
    post(0);
    pre(1);
    settle();
    check(wt(0, 1) == w0, "weights frozen in exploitation");
    check(ticks >= 8, "ticks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
