// tb_step_timer: a 7-cycle step; tick must come every 7th running cycle,
// now must count the ticks, and run low must freeze both.
module tb_step_timer;
  logic clk = 0, rst_n = 0, run, tick;
  logic [15:0] now;
  int checks = 0, failures = 0;
  int cyc = 0, steps = 0;

  step_timer #(.CYCLES_PER_STEP(7), .TS_W(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      run = (t < 100) ? 1'b1 : (($urandom % 4) != 0);
      #1;
      checks++;
      if (tick !== (run && cyc == 6) || now != 16'(steps)) begin
        failures++;
        $display("FAIL: t=%0d tick=%0b cyc=%0d now=%0d steps=%0d", t, tick, cyc, now, steps);
      end
      @(posedge clk);
      if (run) begin
        if (cyc == 6) begin cyc = 0; steps++; end
        else cyc++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
