// tb_noc_router: router at (1,1) of a 4x4 coordinate space. Random packets
// enter all five ports, outputs are accepted at random. Every packet must
// leave by the XY port for its destination, exactly once, in order per
// input/output pair; a lone packet must leave one cycle after it entered;
// back-pressure (in_ready low on a full buffer) must occur.
module tb_noc_router;
  import snn_pkg::*;
  logic clk = 0, rst_n = 0;
  flit_t [4:0] in_flit, out_flit;
  logic [4:0] in_valid, in_ready, out_valid, out_ready;
  flit_t exp_q [5][5][$];   // [output][input]
  int checks = 0, failures = 0, sent = 0, recv = 0, backpressure = 0;

  noc_router #(.BUF_DEPTH(4), .MY_X(2'd1), .MY_Y(2'd1)) dut (.*);
  always #5 clk = ~clk;

  function automatic int xy(naddr_t d);
    if (d.x > 1) return 2; if (d.x < 1) return 4;
    if (d.y > 1) return 3; if (d.y < 1) return 1;
    return 0;
  endfunction

  // the source port is encoded in src.slot so the output side knows it
  function automatic flit_t rnd_flit(int port);
    flit_t f;
    f = flit_t'($urandom);
    f.src.slot = 4'(port);
    // never send back toward the arrival side (as in a real mesh)
    while (port != 0 && xy(f.dst) == port) f.dst = naddr_t'($urandom);
    return f;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < 5; o++) if (out_valid[o] && out_ready[o]) begin
      int i;
      i = int'(out_flit[o].src.slot);
      recv++;
      checks++;
      if (i > 4 || exp_q[o][i].size() == 0) begin
        failures++; $display("FAIL: unexpected flit on port %0d", o);
      end else if (exp_q[o][i][0] != out_flit[o]) begin
        failures++; $display("FAIL: order/data on port %0d from %0d", o, i);
        void'(exp_q[o][i].pop_front());
      end else void'(exp_q[o][i].pop_front());
    end
    for (int i = 0; i < 5; i++) if (in_valid[i] && !in_ready[i]) backpressure++;
  end

  initial begin
    int lat;
    in_valid = '0; out_ready = '0;
    for (int i = 0; i < 5; i++) in_flit[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // latency of a lone packet: west input to east output
    @(negedge clk);
    out_ready = '1;
    in_flit[4] = '{src: '{y: 0, x: 0, slot: 4'd4}, dst: '{y: 1, x: 3, slot: 0}};
    in_valid[4] = 1;
    @(negedge clk);
    in_valid[4] = 0;
    lat = 1;
    while (!out_valid[2] && lat < 10) begin @(negedge clk); lat++; end
    check(lat == 1, $sformatf("lone packet latency %0d, want 1", lat));
    @(negedge clk);
    // random traffic
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      for (int i = 0; i < 5; i++) begin
        if (!in_valid[i] || in_ready_q[i]) begin
          in_valid[i] = (t < 4800) && (($urandom % 2) == 0);
          in_flit[i] = rnd_flit(i);
        end
      end
      out_ready = (t < 2500) ? 5'($urandom) : 5'h1f;
    end
    repeat (20) @(negedge clk);
    for (int o = 0; o < 5; o++) for (int i = 0; i < 5; i++)
      check(exp_q[o][i].size() == 0, $sformatf("packets left undelivered %0d->%0d", i, o));
    check(sent == recv, $sformatf("sent %0d received %0d", sent, recv));
    check(backpressure > 0, "back-pressure never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // record accepted input flits
  logic [4:0] in_ready_q;
  always @(posedge clk) begin
    in_ready_q <= in_ready;
    if (rst_n) for (int i = 0; i < 5; i++) if (in_valid[i] && in_ready[i]) begin
      exp_q[xy(in_flit[i].dst)][i].push_back(in_flit[i]);
      sent++;
    end
  end
endmodule
