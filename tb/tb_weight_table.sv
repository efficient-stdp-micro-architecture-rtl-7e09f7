// tb_weight_table: configuration writes, STDP writes and column reads
// against a model; a configuration write wins over a same-cycle STDP write,
// and an STDP write keeps the connected bit.
module tb_weight_table;
  localparam int N = 10, S = 60;
  logic clk = 0, rst_n = 0;
  logic [5:0] col_s, ws, cfg_s;
  logic signed [N-1:0][7:0] col_w;
  logic [N-1:0] col_conn;
  logic we, cfg_we, cfg_conn;
  logic [3:0] wn, cfg_n;
  logic signed [7:0] wd, cfg_w;
  logic signed [7:0] m_w [N][S];
  bit m_c [N][S];
  int checks = 0, failures = 0;

  weight_table #(.N(N), .S(S), .W_W(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; cfg_we = 0; col_s = 0; ws = 0; wn = 0; wd = 0; cfg_s = 0; cfg_n = 0; cfg_conn = 0; cfg_w = 0;
    for (int n = 0; n < N; n++) for (int s = 0; s < S; s++) begin m_w[n][s] = 0; m_c[n][s] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      cfg_we = ($urandom % 3) == 0;
      cfg_n = 4'($urandom % N); cfg_s = 6'($urandom % S);
      cfg_conn = 1'($urandom); cfg_w = 8'($urandom);
      we = ($urandom % 2) == 0;
      if (t % 50 == 0) begin we = 1; cfg_we = 1; end
      wn = (t % 50 == 0) ? cfg_n : 4'($urandom % N);
      ws = (t % 50 == 0) ? cfg_s : 6'($urandom % S);
      wd = 8'($urandom);
      col_s = 6'($urandom % S);
      #1;
      for (int n = 0; n < N; n++) begin
        checks++;
        if (col_w[n] != m_w[n][col_s] || col_conn[n] != m_c[n][col_s]) begin
          failures++;
          $display("FAIL: (%0d,%0d) w %0d/%0d c %0b/%0b", n, col_s, col_w[n], m_w[n][col_s], col_conn[n], m_c[n][col_s]);
        end
      end
      @(posedge clk);
      if (cfg_we) begin m_w[cfg_n][cfg_s] = cfg_w; m_c[cfg_n][cfg_s] = cfg_conn; end
      else if (we) m_w[wn][ws] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
