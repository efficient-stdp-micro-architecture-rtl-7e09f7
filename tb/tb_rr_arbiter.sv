// tb_rr_arbiter: random requests against a round-robin model; also checks
// that a permanently requesting input waits at most N-1 grants.
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, grant, exp_grant;
  logic advance;
  int ptr = 0;
  int checks = 0, failures = 0;

  rr_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wait_cnt;
    req = '0; advance = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      req = N'($urandom);
      if (t > 3000) req[2] = 1'b1;
      advance = ($urandom % 4) != 0;
      exp_grant = '0;
      for (int k = 0; k < N; k++) begin
        int i;
        i = (ptr + k) % N;
        if (exp_grant == '0 && req[i]) exp_grant[i] = 1'b1;
      end
      #1;
      checks++;
      if (grant !== exp_grant) begin
        failures++;
        $display("FAIL: req %b ptr %0d grant %b want %b", req, ptr, grant, exp_grant);
      end
      @(posedge clk);
      if (advance && exp_grant != '0)
        for (int i = 0; i < N; i++) if (exp_grant[i]) ptr = (i + 1) % N;
    end
    // fairness: input 2 always requesting, all others too, advance every cycle
    @(negedge clk);
    req = '1; advance = 1; wait_cnt = 0;
    for (int t = 0; t < 20; t++) begin
      #1;
      if (grant[2]) begin
        checks++;
        if (wait_cnt > N - 1) begin failures++; $display("FAIL: starvation %0d", wait_cnt); end
        wait_cnt = 0;
      end else wait_cnt++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
