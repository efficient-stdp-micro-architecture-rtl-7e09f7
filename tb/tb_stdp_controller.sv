// tb_stdp_controller: the controller against tables and a calculator
// modelled in the testbench (the calculator is replaced by w + 2*dt so that
// every pairing is visible in the weights). N = 4 neurons, S = 6 partitions.
// Checks: a pre event injects the connected weights of its partition in one
// cycle, stores its time stamp and updates (n, s) for every connected neuron
// with a valid post time stamp, in N + 2 cycles; a post event stores the
// time stamp and updates every connected partition with a valid pre time
// stamp, in S + 2 cycles; simultaneous post spikes are all processed;
// a post spike on a still-pending neuron is dropped and reported; a full
// event buffer holds off pre events and none is lost; exploitation mode
// stores time stamps but changes no weight.
module tb_stdp_controller;
  import snn_pkg::*;
  localparam int N = 4, S = 6;
  logic clk = 0, rst_n = 0;
  stdp_mode_e mode;
  logic [15:0] now;
  logic pre_valid, pre_ready;
  logic [2:0] pre_syn;
  logic [N-1:0] post_spike;
  logic pre_we, post_we, pre_rvalid, post_rvalid, w_we, calc_en;
  logic [2:0] pre_addr_w, pre_addr_r, col_s, w_s;
  logic [1:0] post_addr_w, post_addr_r, w_n;
  logic [15:0] pre_rts, post_rts;
  logic signed [N-1:0][7:0] col_w, inj_w;
  logic [N-1:0] col_conn, inj_valid;
  logic signed [7:0] w_d, calc_w_old, calc_w_new;
  logic signed [16:0] calc_dt;
  logic busy, evbuf_full, post_drop, stdp_update;

  // testbench tables
  logic [15:0] t_pre [S], t_post [N];
  bit v_pre [S], v_post [N];
  int w [N][S], m_w [N][S];
  bit c [N][S];
  int m_pre [S], m_post [N];
  bit mv_pre [S], mv_post [N];
  int checks = 0, failures = 0, injections = 0, full_seen = 0, drops = 0;

  stdp_controller #(.N(N), .S(S), .TS_W(16), .W_W(8), .EVT_DEPTH(4)) dut (.*);
  always #5 clk = ~clk;

  assign pre_rts = t_pre[pre_addr_r];
  assign pre_rvalid = v_pre[pre_addr_r];
  assign post_rts = t_post[post_addr_r];
  assign post_rvalid = v_post[post_addr_r];
  always_comb for (int n = 0; n < N; n++) begin
    col_w[n] = 8'(w[n][col_s]);
    col_conn[n] = c[n][col_s];
  end
  assign calc_w_new = calc_en ? 8'(int'(calc_w_old) + 2 * int'(calc_dt)) : calc_w_old;

  always @(posedge clk) if (rst_n) begin
    if (pre_we) begin t_pre[pre_addr_w] <= now; v_pre[pre_addr_w] <= 1; end
    if (post_we) begin t_post[post_addr_w] <= now; v_post[post_addr_w] <= 1; end
    if (w_we) w[w_n][w_s] <= int'(w_d);
    if (|inj_valid) injections++;
    if (evbuf_full) full_seen++;
    if (post_drop) drops++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // model of a pre event on s at time now
  task automatic model_pre(int s, int tnow);
    m_pre[s] = tnow; mv_pre[s] = 1;
    if (mode != STDP_OFF)
      for (int n = 0; n < N; n++)
        if (c[n][s] && mv_post[n]) m_w[n][s] = int'(8'(m_w[n][s] + 2 * (m_post[n] - tnow)));
  endtask
  task automatic model_post(int n, int tnow);
    m_post[n] = tnow; mv_post[n] = 1;
    if (mode != STDP_OFF)
      for (int s = 0; s < S; s++)
        if (c[n][s] && mv_pre[s]) m_w[n][s] = int'(8'(m_w[n][s] + 2 * (tnow - m_pre[s])));
  endtask
  task automatic compare(string what);
    for (int n = 0; n < N; n++) for (int s = 0; s < S; s++)
      check(int'(8'(w[n][s])) == int'(8'(m_w[n][s])),
            $sformatf("%s: w[%0d][%0d] = %0d, want %0d", what, n, s, 8'(w[n][s]), 8'(m_w[n][s])));
  endtask
  task automatic wait_idle(output int cycles);
    cycles = 0;
    do begin @(negedge clk); cycles++; end while (busy && cycles < 1000);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    logic [N-1:0] exp_inj;
    mode = STDP_PLAIN; now = 100; pre_valid = 0; pre_syn = 0; post_spike = 0;
    for (int n = 0; n < N; n++) begin
      v_post[n] = 0; mv_post[n] = 0;
      for (int s = 0; s < S; s++) begin
        c[n][s] = ($urandom % 4) != 0;
        w[n][s] = int'($urandom % 21);
        m_w[n][s] = w[n][s];
      end
    end
    for (int s = 0; s < S; s++) begin v_pre[s] = 0; mv_pre[s] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // post spike of neurons 1 and 3 at t=100 (no pre stamps yet: no change)
    @(negedge clk);
    post_spike = 4'b1010;
    @(negedge clk);
    post_spike = 0;
    model_post(1, 100); model_post(3, 100);
    wait_idle(cyc);
    compare("posts without pres");
    // pre event on partition 2 at t=103
    now = 103;
    @(negedge clk);
    pre_valid = 1; pre_syn = 3'd2;
    exp_inj = '0;
    for (int n = 0; n < N; n++) exp_inj[n] = c[n][2];
    check(pre_ready, "pre accepted when idle");
    @(negedge clk);
    pre_valid = 0;
    // pop happens in this cycle, injection in the next
    @(negedge clk);
    check(inj_valid == exp_inj, $sformatf("injection mask %b want %b", inj_valid, exp_inj));
    for (int n = 0; n < N; n++) if (exp_inj[n]) check(inj_w[n] == 8'(w[n][2]), "injected weight");
    model_pre(2, 103);
    cyc = 1;   // clock edges since the event was accepted
    while (busy && cyc < 100) begin @(negedge clk); cyc++; end
    check(cyc == N + 2, $sformatf("pre event took %0d cycles, want %0d", cyc, N + 2));
    compare("pre after posts");
    // pre on partitions 0 and 5 at t=105, then post of neuron 0 and 2 at t=109
    now = 105;
    @(negedge clk); pre_valid = 1; pre_syn = 0;
    @(negedge clk); pre_syn = 5;
    @(negedge clk); pre_valid = 0;
    model_pre(0, 105); model_pre(5, 105);
    wait_idle(cyc);
    compare("second pres");
    now = 109;
    @(negedge clk); post_spike = 4'b0101;
    @(negedge clk); post_spike = 0;
    model_post(0, 109); model_post(2, 109);
    cyc = 0;   // clock edges since the spikes were sampled
    while (busy && cyc < 1000) begin @(negedge clk); cyc++; end
    check(cyc == 2 * (S + 2) + 1, $sformatf("two post events took %0d cycles, want %0d", cyc, 2 * (S + 2) + 1));
    compare("posts after pres");
    // dropped post spike: all fire, neuron 3 fires again next cycle
    now = 120;
    @(negedge clk); post_spike = 4'b1111;
    @(negedge clk); post_spike = 4'b1000;
    @(negedge clk); post_spike = 0;
    for (int n = 0; n < N; n++) model_post(n, 120);
    wait_idle(cyc);
    check(drops == 1, $sformatf("post drops %0d, want 1", drops));
    compare("burst of posts");
    // exploitation: pre and post stored, no weight change
    mode = STDP_OFF; now = 125;
    @(negedge clk); pre_valid = 1; pre_syn = 1;
    @(negedge clk); pre_valid = 0; post_spike = 4'b0010;
    @(negedge clk); post_spike = 0;
    model_pre(1, 125); model_post(1, 125);
    wait_idle(cyc);
    compare("exploitation");
    check(t_pre[1] == 125 && t_post[1] == 125, "time stamps stored in exploitation");
    // burst of pre events: buffer fills, pre_ready drops, nothing lost
    mode = STDP_REWARD; now = 130;
    injections = 0;
    for (int k = 0; k < 12; k++) begin
      @(negedge clk);
      pre_valid = 1; pre_syn = 3'(k % S);
      #1;
      while (!pre_ready) begin @(negedge clk); #1; end
      @(posedge clk);
      model_pre(k % S, 130);
    end
    @(negedge clk); pre_valid = 0;
    wait_idle(cyc);
    check(full_seen > 0, "event buffer never full");
    check(injections == 12, $sformatf("%0d injections for 12 pre events", injections));
    compare("pre burst");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
