// tb_snn_noc_top: end-to-end run of the whole network at its default size
// (3x4 mesh, 10 neurons per cluster, 60 partitions, 400 cycles per 1 ms
// step, LIF cells) on an XOR network:
//   input layer  60 neurons in the six border routers 0,1,2 (input A) and
//                3,5,6 (input B), driven by Poisson spike trains at 35 Hz
//                for a logic 1 and silent for a logic 0
//   hidden layer 50 neurons in routers 4,8,9,10,11, each connected to all
//                60 input neurons
//   output       1 neuron in router 7, connected to all 50 hidden neurons
// (121 neurons do not fit the 120 places of 3x4x10, so the hidden layer has
// 50 neurons instead of 60.)
// The run: one burst step in which all input neurons fire at once (to load
// the network), then training with the four input patterns, rewarded when
// the XOR output should be 1 and punished when it should be 0, then an
// exploitation pass with learning off.
// Checks: every packet sent is delivered to its destination router, the
// number of packets equals 5 per input spike plus 1 per hidden spike, no
// packet is dropped for lack of a connection, hidden and output neurons
// fire, weights change under reward and under punishment and stay frozen in
// exploitation, all clusters tick together. It counts the network and
// learning mechanisms (router back-pressure, round-robin conflicts, event
// buffer full, synaptic-block back-pressure, pre and post STDP events) and
// fails for any that never happened.
module tb_snn_noc_top;
  import snn_pkg::*;
  localparam int MX = 3, MY = 4, NR = 12, N = 10, S = 60, CPS = 400;
  localparam int TRAIN_STEPS = 40, TEST_STEPS = 40, EPOCHS = 2;
  localparam int IN_R  [6] = '{0, 1, 2, 3, 5, 6};
  localparam int HID_R [5] = '{4, 8, 9, 10, 11};
  localparam int OUT_R = 7;

  logic clk = 0, rst_n = 0, run;
  stdp_mode_e mode;
  cfg_t cfg;
  logic [NR-1:0][N-1:0] ext_spike, spike;
  logic [NR-1:0] tick, pre_stall, evbuf_full, post_drop, tx_overflow, rx_drop, stdp_update;

  snn_noc_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycles = 0;
  int in_spk = 0, hid_spk = 0, out_spk = 0, tx_pk = 0, rx_pk = 0;
  int link_stall = 0, rr_conflict = 0, evfull = 0, syn_stall = 0, drops = 0, overflows = 0;
  int upd_reward = 0, upd_punish = 0, upd_off = 0, pre_ev = 0, post_ev = 0, tick_skew = 0;
  int out_per_pattern [4];
  int cur_pattern = 0;
  bit testing = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit is_hidden(int r);
    foreach (HID_R[i]) if (HID_R[i] == r) return 1;
    return 0;
  endfunction

  // per-router probes: arbitration conflicts, weight sums, STDP event kinds
  longint wsum [NR];
  logic snap = 0;
  for (genvar r = 0; r < NR; r++) begin : g_probe
    localparam int Y = r / MX, X = r % MX;
    always @(posedge clk) if (rst_n) begin
      for (int o = 0; o < 5; o++)
        if ($countones(dut.u_mesh.g_y[Y].g_x[X].u_router.req[o]) > 1) rr_conflict++;
      if (dut.g_y[Y].g_x[X].u_cluster.u_syn.u_ctrl.state == 3'd1) pre_ev++;
      if (dut.g_y[Y].g_x[X].u_cluster.u_syn.u_ctrl.state == 3'd3) post_ev++;
    end
    always @(snap) begin
      longint acc;
      acc = 0;
      for (int n = 0; n < N; n++)
        for (int s = 0; s < S; s++)
          acc += longint'(dut.g_y[Y].g_x[X].u_cluster.u_syn.u_weights.w[n][s]) * (n * S + s + 1);
      wsum[r] = acc;
    end
  end

  function automatic longint total_wsum();
    longint t;
    t = 0;
    foreach (wsum[r]) t += wsum[r];
    return t;
  endfunction

  always @(posedge clk) if (rst_n) begin
    cycles++;
    for (int r = 0; r < NR; r++) begin
      if (dut.tx_valid[r] && dut.tx_ready[r]) tx_pk++;
      if (dut.rx_valid[r] && dut.rx_ready[r]) rx_pk++;
      if (dut.tx_valid[r] && !dut.tx_ready[r]) link_stall++;
      if (evbuf_full[r]) evfull++;
      if (pre_stall[r]) syn_stall++;
      if (rx_drop[r]) drops++;
      if (tx_overflow[r]) overflows++;
      if (stdp_update[r]) begin
        if (mode == STDP_REWARD) upd_reward++;
        else if (mode == STDP_PUNISH) upd_punish++;
        else if (mode == STDP_OFF) upd_off++;
      end
      for (int n = 0; n < N; n++) if (spike[r][n]) begin
        if (r == OUT_R) begin
          if (n == 0) begin out_spk++; if (testing) out_per_pattern[cur_pattern]++; end
        end else if (is_hidden(r)) hid_spk++;
        else in_spk++;
      end
    end
    if (tick != '0 && tick != '1) tick_skew++;
  end

  task automatic wr(int router, cfg_sel_e sel, int slot, int idx, int data);
    @(negedge clk);
    cfg = '{valid: 1'b1, router: 4'(router), sel: sel, slot: 4'(slot), idx: 8'(idx), data: 16'(data)};
    @(negedge clk);
    cfg = '0;
  endtask

  function automatic int addr(int r, int n);
    return ((r / MX) << 6) | ((r % MX) << 4) | n;
  endfunction

  // one time step of stimulus: input-layer neurons of active inputs fire
  // with probability 35/1000 (35 Hz at 1 ms per step)
  task automatic stim_step(bit a, bit b, int prob_per_mille);
    @(negedge clk);
    ext_spike = '0;
    for (int i = 0; i < 6; i++)
      for (int n = 0; n < N; n++)
        if (((i < 3) ? a : b) && ($urandom % 1000) < prob_per_mille) ext_spike[IN_R[i]][n] = 1'b1;
    @(negedge clk);
    ext_spike = '0;
    @(posedge tick[0]);
  endtask

  initial begin
    #(64'd10 * 64'd3000000);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint w_before, w_after;
    int upd_r0, upd_p0, hid0;
    run = 0; mode = STDP_OFF; cfg = '0; ext_spike = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- configuration ----
    // hidden clusters: partition p = input neuron p (6 routers x 10 slots)
    foreach (HID_R[h]) begin
      for (int i = 0; i < 6; i++)
        for (int n = 0; n < N; n++)
          wr(HID_R[h], CFG_CONN, 0, addr(IN_R[i], n), 16'h8000 | (i * N + n));
      for (int n = 0; n < N; n++)
        for (int p = 0; p < S; p++)
          wr(HID_R[h], CFG_WEIGHT, n, p, 16'h8000 | (int'($urandom % 17) - 4) & 16'h80ff);
    end
    // output cluster: partition p = hidden neuron p, slot 0 only
    foreach (HID_R[h])
      for (int n = 0; n < N; n++) begin
        wr(OUT_R, CFG_CONN, 0, addr(HID_R[h], n), 16'h8000 | (h * N + n));
        wr(OUT_R, CFG_WEIGHT, 0, h * N + n, 16'h8000 | (8 + int'($urandom % 17)));
      end
    // fanout: input neurons -> all hidden routers, hidden neurons -> output router
    for (int i = 0; i < 6; i++)
      for (int n = 0; n < N; n++)
        wr(IN_R[i], CFG_FANOUT, n, 0, (1 << 4) | (1 << 8) | (1 << 9) | (1 << 10) | (1 << 11));
    foreach (HID_R[h])
      for (int n = 0; n < N; n++) wr(HID_R[h], CFG_FANOUT, n, 0, 1 << OUT_R);
    $display("configured after %0d cycles", cycles);
    run = 1;
    // ---- burst: every input neuron at once ----
    mode = STDP_PLAIN;
    stim_step(1, 1, 1000);
    repeat (3) stim_step(0, 0, 0);
    // ---- training ----
    for (int e = 0; e < EPOCHS; e++)
      for (int p = 0; p < 4; p++) begin
        bit a, b;
        a = p[1]; b = p[0];
        mode = (a ^ b) ? STDP_REWARD : STDP_PUNISH;
        for (int t = 0; t < TRAIN_STEPS; t++) stim_step(a, b, 35);
        mode = STDP_OFF;
        repeat (5) stim_step(0, 0, 0);   // let the network go quiet between patterns
      end
    // ---- exploitation ----
    mode = STDP_OFF;
    repeat (3) @(negedge clk);
    snap = ~snap; #1;
    w_before = total_wsum();
    upd_r0 = upd_reward; upd_p0 = upd_punish;
    testing = 1;
    hid0 = hid_spk;
    for (int p = 0; p < 4; p++) begin
      cur_pattern = p;
      for (int t = 0; t < TEST_STEPS; t++) stim_step(p[1], p[0], 35);
      repeat (5) stim_step(0, 0, 0);
    end
    testing = 0;
    run = 0;
    repeat (2000) @(negedge clk);   // drain the network
    snap = ~snap; #1;
    w_after = total_wsum();
    // ---- checks ----
    $display("cycles %0d, spikes: input %0d hidden %0d output %0d, packets sent %0d delivered %0d",
             cycles, in_spk, hid_spk, out_spk, tx_pk, rx_pk);
    $display("output spikes in exploitation for 00 01 10 11: %0d %0d %0d %0d",
             out_per_pattern[0], out_per_pattern[1], out_per_pattern[2], out_per_pattern[3]);
    $display("mechanisms: link stall %0d, arbitration conflicts %0d, event buffer full %0d, synaptic stall %0d",
             link_stall, rr_conflict, evfull, syn_stall);
    $display("STDP: pre events %0d, post events %0d, updates reward %0d punish %0d exploitation %0d",
             pre_ev, post_ev, upd_reward, upd_punish, upd_off);
    check(tx_pk == rx_pk, "every packet delivered");
    check(overflows == 0 && tx_pk == 5 * in_spk + hid_spk,
          $sformatf("packets %0d, want 5*%0d + %0d (overflows %0d)", tx_pk, in_spk, hid_spk, overflows));
    check(drops == 0, "no packet without a connection");
    check(hid_spk > 0, "hidden layer fired");
    check(out_spk > 0, "output neuron fired");
    check(hid_spk > hid0, "hidden layer fired in exploitation");
    check(w_before == w_after, "weights frozen in exploitation");
    check(upd_off == 0, "no update with learning off");
    check(tick_skew == 0, "clusters tick together");
    check(link_stall > 0, "router back-pressure never happened");
    check(rr_conflict > 0, "round-robin conflict never happened");
    check(evfull > 0, "event buffer never full");
    check(syn_stall > 0, "synaptic block never back-pressured");
    check(pre_ev > 0, "no pre-synaptic STDP event");
    check(post_ev > 0, "no post-synaptic STDP event");
    check(upd_reward > 0, "no weight update under reward");
    check(upd_punish > 0, "no weight update under punishment");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
