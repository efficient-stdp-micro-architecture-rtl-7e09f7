// tb_snn_fifo: random push/pop traffic against a queue model of a depth-4
// FIFO; checks data order, full/empty/count and that a push into a full
// buffer is refused, even in a cycle with a pop.
module tb_snn_fifo;
  logic clk = 0, rst_n = 0;
  logic push, pop, full, empty;
  logic [15:0] din, dout;
  logic [2:0] count;
  int checks = 0, failures = 0;
  logic [15:0] q[$];

  snn_fifo #(.T(logic [15:0]), .DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !full && count == 0, "empty after reset");
    for (int i = 0; i < 3000; i++) begin
      push = ($urandom % 3) != 0;
      pop  = ($urandom % 2) != 0;
      din  = 16'($urandom);
      #1;
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == 4), "full flag");
      check(count == 3'(q.size()), "count");
      if (q.size() > 0) check(dout == q[0], "head data");
      @(posedge clk);
      begin
        bit was_full;
        was_full = q.size() == 4;
        if (pop && q.size() > 0) void'(q.pop_front());
        if (push && !was_full) q.push_back(din);
      end
      @(negedge clk);
    end
    // fill completely, check refusal
    pop = 0; push = 1;
    for (int i = 0; i < 6; i++) begin din = 16'(100 + i); @(posedge clk);
      if (q.size() < 4) q.push_back(din); @(negedge clk); end
    check(full && count == 4, "full after overfill");
    push = 0; pop = 1;
    while (q.size() > 0) begin #1; check(dout == q[0], "drain order"); @(posedge clk); void'(q.pop_front()); @(negedge clk); end
    check(empty, "empty after drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
