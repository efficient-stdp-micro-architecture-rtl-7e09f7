// tb_crossbar: random flits and random one-hot (or empty) selects; each
// output must carry the selected input's flit and be valid exactly when
// something is selected.
module tb_crossbar;
  import snn_pkg::*;
  flit_t [4:0] in_flit, out_flit;
  logic [4:0][4:0] sel;
  logic [4:0] out_valid;
  int checks = 0, failures = 0;

  crossbar dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int pick [5];
      for (int i = 0; i < 5; i++) in_flit[i] = flit_t'($urandom);
      for (int o = 0; o < 5; o++) begin
        pick[o] = int'($urandom % 6);   // 5 = nothing selected
        sel[o] = '0;
        if (pick[o] < 5) sel[o][pick[o]] = 1'b1;
      end
      #1;
      for (int o = 0; o < 5; o++) begin
        checks++;
        if (pick[o] < 5) begin
          if (!out_valid[o] || out_flit[o] != in_flit[pick[o]]) begin
            failures++; $display("FAIL: output %0d", o);
          end
        end else if (out_valid[o]) begin
          failures++; $display("FAIL: output %0d valid without select", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
