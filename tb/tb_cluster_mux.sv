// tb_cluster_mux: cluster at (1,2) of a 3x4 mesh with N = 4 neurons. Each
// neuron gets a random fanout mask; spikes are fired at random and the
// router side accepts at random. Every spike must produce exactly one packet
// per router in its mask, lowest router first, with the neuron's own address
// as source and the router's coordinates as destination; a spike on a
// still-pending neuron must be reported as overflow and send nothing, so
// that bursts plus overflows account for every spike.
module tb_cluster_mux;
  import snn_pkg::*;
  localparam int N = 4, MX = 3, MY = 4, NR = 12;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] spike;
  flit_t out_flit;
  logic out_valid, out_ready, overflow, cfg_we;
  logic [1:0] cfg_n;
  logic [NR-1:0] cfg_mask;
  logic [NR-1:0] fan [N];
  flit_t exp_q [$];
  int fired = 0, bursts = 0;
  int checks = 0, failures = 0, overflows = 0, pkts = 0;

  cluster_mux #(.N(N), .MESH_X(MX), .MESH_Y(MY), .MY_X(2'd1), .MY_Y(2'd2)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The checker follows the packet stream: the first packet of a burst names
  // the neuron, the rest of the burst must follow that neuron's mask.
  always @(posedge clk) if (rst_n) begin
    if (overflow) overflows++;
    if (out_valid && out_ready) begin
      pkts++;
      checks++;
      if (exp_q.size() == 0) begin
        int n;
        n = int'(out_flit.src.slot);
        if (n >= N) begin failures++; $display("FAIL: packet from a slot that does not exist"); end
        else begin
          bursts++;
          for (int r = 0; r < NR; r++) if (fan[n][r])
            exp_q.push_back('{src: '{y: 2'd2, x: 2'd1, slot: 4'(n)},
                              dst: '{y: 2'(r / MX), x: 2'(r % MX), slot: 4'd0}});
        end
      end
      if (exp_q.size() == 0 || exp_q[0] != out_flit) begin
        failures++; $display("FAIL: packet %h unexpected", out_flit);
      end
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
  end

  initial begin
    spike = 0; out_ready = 0; cfg_we = 0; cfg_n = 0; cfg_mask = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      fan[n] = NR'($urandom) | NR'(1);
      cfg_we = 1; cfg_n = 2'(n); cfg_mask = fan[n];
    end
    @(negedge clk); cfg_we = 0;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      out_ready = ($urandom % 4) != 0;
      spike = (t < 4500 && ($urandom % 3) == 0) ? N'(1 << ($urandom % N)) : '0;
      fired += $countones(spike);
    end
    repeat (200) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: packets missing"); end
    checks++;
    if (bursts + overflows != fired || overflows == 0) begin
      failures++; $display("FAIL: %0d spikes, %0d bursts, %0d overflows", fired, bursts, overflows);
    end
    $display("packets %0d overflows %0d", pkts, overflows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
