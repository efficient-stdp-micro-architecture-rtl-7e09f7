// tb_cluster_demux: packets from configured sources become pre events with
// the configured partition and wait for pre_ready (the port back-pressures);
// packets from unknown sources are consumed and reported as dropped;
// clearing an entry turns its source into a drop.
module tb_cluster_demux;
  import snn_pkg::*;
  logic clk = 0, rst_n = 0;
  flit_t in_flit;
  logic in_valid, in_ready, pre_valid, pre_ready, drop, cfg_we, cfg_valid;
  logic [5:0] pre_syn, cfg_part;
  logic [7:0] cfg_idx;
  bit m_hit [256];
  int m_part [256];
  int checks = 0, failures = 0, stalls = 0, drops = 0, events = 0;

  cluster_demux #(.S(60)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_flit = '0; pre_ready = 0; cfg_we = 0; cfg_idx = 0; cfg_valid = 0; cfg_part = 0;
    foreach (m_hit[i]) m_hit[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      cfg_we = 1; cfg_idx = 8'($urandom); cfg_valid = ($urandom % 3) != 0; cfg_part = 6'($urandom % 60);
      m_hit[cfg_idx] = cfg_valid; m_part[cfg_idx] = int'(cfg_part);
    end
    @(negedge clk); cfg_we = 0;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      in_flit = flit_t'($urandom);
      pre_ready = ($urandom % 3) != 0;
      #1;
      checks++;
      if (pre_valid != (in_valid && m_hit[in_flit.src]) ||
          drop != (in_valid && !m_hit[in_flit.src]) ||
          in_ready != (!m_hit[in_flit.src] || pre_ready) ||
          (pre_valid && int'(pre_syn) != m_part[in_flit.src])) begin
        failures++;
        $display("FAIL: src %0d hit %0b pre_valid %0b syn %0d/%0d drop %0b ready %0b",
                 in_flit.src, m_hit[in_flit.src], pre_valid, pre_syn, m_part[in_flit.src], drop, in_ready);
      end
      if (pre_valid && !pre_ready) stalls++;
      if (drop) drops++;
      if (pre_valid && pre_ready) events++;
    end
    checks++;
    if (stalls == 0 || drops == 0 || events == 0) begin failures++; $display("FAIL: a case never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
