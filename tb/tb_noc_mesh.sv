// tb_noc_mesh: 3x4 mesh. First one lone packet per source/destination pair
// at a few distances, checking that it arrives at the right local port after
// (hops + 1) cycles; then random traffic from every local port to random
// destinations, checking that every packet arrives exactly once, unchanged,
// at its destination, and that link back-pressure occurred.
module tb_noc_mesh;
  import snn_pkg::*;
  localparam int MX = 3, MY = 4, NR = MX * MY;
  logic clk = 0, rst_n = 0;
  flit_t [NR-1:0] loc_in_flit, loc_out_flit;
  logic [NR-1:0] loc_in_valid, loc_in_ready, loc_out_valid, loc_out_ready;
  int checks = 0, failures = 0, sent = 0, recv = 0, stalls = 0;
  int pending [flit_t];

  noc_mesh #(.MESH_X(MX), .MESH_Y(MY), .BUF_DEPTH(4)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic flit_t mk(int s, int d, int tag);
    flit_t f;
    f.src = '{y: 2'(s / MX), x: 2'(s % MX), slot: 4'(tag)};
    f.dst = '{y: 2'(d / MX), x: 2'(d % MX), slot: 4'(tag >> 4)};
    return f;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // accepted / delivered packets
  always @(posedge clk) if (rst_n) begin
    for (int r = 0; r < NR; r++) begin
      if (loc_in_valid[r] && loc_in_ready[r]) begin
        sent++;
        if (pending.exists(loc_in_flit[r])) pending[loc_in_flit[r]]++;
        else pending[loc_in_flit[r]] = 1;
      end
      if (loc_in_valid[r] && !loc_in_ready[r]) stalls++;
      if (loc_out_valid[r] && loc_out_ready[r]) begin
        recv++;
        checks++;
        if (int'(loc_out_flit[r].dst.y) * MX + int'(loc_out_flit[r].dst.x) != r) begin
          failures++; $display("FAIL: delivered to router %0d, addressed elsewhere", r);
        end else if (!pending.exists(loc_out_flit[r]) || pending[loc_out_flit[r]] == 0) begin
          failures++; $display("FAIL: router %0d delivered a packet never sent", r);
        end else pending[loc_out_flit[r]]--;
      end
    end
  end

  initial begin
    int pairs [4][2] = '{'{0, 11}, '{11, 0}, '{4, 4}, '{2, 9}};
    loc_in_valid = '0; loc_out_ready = '1;
    for (int r = 0; r < NR; r++) loc_in_flit[r] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (pairs[k]) begin
      int s, d, hops, lat;
      s = pairs[k][0]; d = pairs[k][1];
      hops = ((s % MX > d % MX) ? s % MX - d % MX : d % MX - s % MX) +
             ((s / MX > d / MX) ? s / MX - d / MX : d / MX - s / MX);
      @(negedge clk);
      loc_in_flit[s] = mk(s, d, k);
      loc_in_valid[s] = 1;
      @(negedge clk);
      loc_in_valid[s] = 0;
      lat = 1;
      while (!loc_out_valid[d] && lat < 50) begin @(negedge clk); lat++; end
      check(lat == hops + 1, $sformatf("%0d -> %0d: latency %0d, want %0d", s, d, lat, hops + 1));
      repeat (3) @(negedge clk);
    end
    // random traffic
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      for (int r = 0; r < NR; r++) begin
        if (!loc_in_valid[r] || loc_in_ready_q[r]) begin
          loc_in_valid[r] = (t < 5000) && (($urandom % 3) == 0);
          loc_in_flit[r] = mk(r, int'($urandom % NR), int'($urandom % 256));
        end
      end
      loc_out_ready = (t < 3000) ? NR'($urandom) : '1;
    end
    repeat (100) @(negedge clk);
    check(sent == recv, $sformatf("sent %0d delivered %0d", sent, recv));
    check(stalls > 0, "no back-pressure seen");
    $display("sent %0d delivered %0d stalled cycles %0d", sent, recv, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [NR-1:0] loc_in_ready_q;
  always @(posedge clk) loc_in_ready_q <= loc_in_ready;
endmodule
