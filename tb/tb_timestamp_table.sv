// tb_timestamp_table: entries start invalid; random writes and reads are
// compared with a model holding the last written stamp of each entry.
module tb_timestamp_table;
  localparam int E = 60;
  logic clk = 0, rst_n = 0, we, rvalid;
  logic [5:0] waddr, raddr;
  logic [15:0] wts, rts;
  logic [15:0] m_ts [E];
  bit m_v [E];
  int checks = 0, failures = 0;

  timestamp_table #(.ENTRIES(E), .TS_W(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wts = 0;
    foreach (m_v[i]) m_v[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      we = ($urandom % 3) == 0;
      waddr = 6'($urandom % E);
      wts = 16'($urandom);
      raddr = 6'($urandom % E);
      #1;
      checks++;
      if (rvalid != m_v[raddr] || (m_v[raddr] && rts != m_ts[raddr])) begin
        failures++;
        $display("FAIL: entry %0d valid %0b/%0b ts %0d/%0d", raddr, rvalid, m_v[raddr], rts, m_ts[raddr]);
      end
      @(posedge clk);
      if (we) begin m_v[waddr] = 1; m_ts[waddr] = wts; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
