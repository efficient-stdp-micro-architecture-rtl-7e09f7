// tb_snn_cluster: one cluster of 4 LIF neurons whose local router port is
// looped back by a one-place buffer in the testbench (1x1 mesh), 20 cycles
// per time step. Neuron 0 is forced to fire; its packet reaches neurons 1
// and 2 through the connectivity table; neuron 1 (weight 70) fires one step
// later, and neuron 2 fires one step after that, when its inputs from
// neurons 0 (30) and 1 (40) add up. Checks the step of every spike, the STDP
// potentiation of the synapses that caused them (dt = 1 and 2 steps, within
// one unit of 16*exp(-dt/20)), and that a packet from an unconfigured source
// is dropped.
module tb_snn_cluster;
  import snn_pkg::*;
  localparam int N = 4, S = 4, CPS = 20;
  logic clk = 0, rst_n = 0, run;
  stdp_mode_e mode;
  cfg_t cfg;
  logic [N-1:0] ext_spike, spike;
  flit_t tx_flit, rx_flit;
  logic tx_valid, tx_ready, rx_valid, rx_ready;
  logic tick, pre_stall, evbuf_full, post_drop, tx_overflow, rx_drop, stdp_update;
  int checks = 0, failures = 0, drops = 0;
  int fire_step [N];

  snn_cluster #(.N(N), .S(S), .MESH_X(1), .MESH_Y(1), .CYCLES_PER_STEP(CPS)) dut (.*);
  always #5 clk = ~clk;

  // loop-back buffer standing in for the router
  logic lb_full;
  flit_t lb_flit;
  assign tx_ready = !lb_full;
  assign rx_valid = lb_full;
  assign rx_flit  = lb_flit;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lb_full <= 0;
    else if (tx_valid && tx_ready) begin lb_full <= 1; lb_flit <= tx_flit; end
    else if (rx_valid && rx_ready) lb_full <= 0;
  end

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) if (spike[n] && fire_step[n] < 0) fire_step[n] = int'(dut.now);
    if (rx_drop) drops++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(cfg_sel_e sel, int slot, int idx, int data);
    @(negedge clk);
    cfg = '{valid: 1'b1, router: '0, sel: sel, slot: 4'(slot), idx: 8'(idx), data: 16'(data)};
    @(negedge clk);
    cfg = '0;
  endtask

  function automatic int ltp(int d);
    return int'($floor(16.0 * $exp(-real'(d) / 20.0) + 0.5));
  endfunction

  function automatic int wt(int n, int s);
    return int'(dut.u_syn.u_weights.w[n][s]);
  endfunction

  function automatic bit near(int a, int b);
    return a >= b - 1 && a <= b + 1;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    run = 0; mode = STDP_PLAIN; cfg = '0; ext_spike = 0;
    foreach (fire_step[n]) fire_step[n] = -1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wr(CFG_CONN, 0, 8'h00, 16'h8000);       // source (0,0,0) -> partition 0
    wr(CFG_CONN, 0, 8'h01, 16'h8001);       // source (0,0,1) -> partition 1
    wr(CFG_WEIGHT, 1, 0, 16'h8000 | 70);
    wr(CFG_WEIGHT, 2, 0, 16'h8000 | 30);
    wr(CFG_WEIGHT, 2, 1, 16'h8000 | 40);
    wr(CFG_FANOUT, 0, 0, 1);
    wr(CFG_FANOUT, 1, 0, 1);
    wr(CFG_FANOUT, 3, 0, 1);                // neuron 3 feeds nobody here
    run = 1;
    while (dut.now < 3) @(negedge clk);
    ext_spike = 4'b0001;
    @(negedge clk);
    ext_spike = 0;
    while (dut.now < 9) @(negedge clk);
    k = fire_step[0];
    $display("spike steps: %0d %0d %0d %0d", fire_step[0], fire_step[1], fire_step[2], fire_step[3]);
    check(k == 4, $sformatf("neuron 0 fired at step %0d, want 4", k));
    check(fire_step[1] == k + 1, "neuron 1 fires one step after neuron 0");
    check(fire_step[2] == k + 2, "neuron 2 fires two steps after neuron 0");
    check(fire_step[3] == -1, "neuron 3 silent");
    check(near(wt(1, 0), 70 + ltp(1)), $sformatf("w(1,0) = %0d want %0d", wt(1, 0), 70 + ltp(1)));
    check(near(wt(2, 0), 30 + ltp(2)), $sformatf("w(2,0) = %0d want %0d", wt(2, 0), 30 + ltp(2)));
    check(near(wt(2, 1), 40 + ltp(1)), $sformatf("w(2,1) = %0d want %0d", wt(2, 1), 40 + ltp(1)));
    // unconfigured source is dropped
    ext_spike = 4'b1000;
    @(negedge clk);
    ext_spike = 0;
    while (dut.now < 11) @(negedge clk);
    check(fire_step[3] == 10, "neuron 3 forced");
    check(drops == 1, $sformatf("drops %0d, want 1", drops));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
