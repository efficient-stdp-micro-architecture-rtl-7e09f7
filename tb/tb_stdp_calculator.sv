// tb_stdp_calculator: the weight change against A*exp(-|dt|/tau) computed
// with real arithmetic (within one weight unit), its sign for pre-before-post
// and post-before-pre, zero change at dt = 0 and outside the window, the
// reward / punishment / exploitation modes and saturation at the weight limits.
module tb_stdp_calculator;
  import snn_pkg::*;
  logic en;
  stdp_mode_e mode;
  logic signed [16:0] dt;
  logic signed [7:0] w_old, w_new;
  logic signed [8:0] dw;
  int checks = 0, failures = 0;

  stdp_calculator #(.TS_W(16), .W_W(8), .WINDOW(64), .A_PLUS(16), .A_MINUS(12),
                    .TAU_PLUS(20), .TAU_MINUS(10)) dut (.*);

  function automatic int ref_dw(int d, stdp_mode_e m);
    real mag;
    int r;
    if (d == 0 || d >= 64 || d <= -64) return 0;
    if (d > 0) mag = 16.0 * $exp(-real'(d) / 20.0);
    else       mag = 12.0 * $exp(real'(d) / 10.0);
    r = int'($floor(mag + 0.5));
    if (d < 0) r = -r;
    case (m)
      STDP_OFF:    return 0;
      STDP_PUNISH: return -r;
      default:     return r;
    endcase
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1;
    for (int m = 0; m < 4; m++) begin
      mode = stdp_mode_e'(m);
      for (int d = -70; d <= 70; d++) begin
        int e, sum, ew;
        dt = 17'(d);
        w_old = 8'($urandom % 200 - 100);
        #1;
        e = ref_dw(d, mode);
        check(int'(dw) >= e - 1 && int'(dw) <= e + 1,
              $sformatf("dw mode %0d dt %0d got %0d want %0d", m, d, dw, e));
        sum = int'(w_old) + int'(dw);
        ew = (sum > 127) ? 127 : (sum < -128) ? -128 : sum;
        check(int'(w_new) == ew, $sformatf("w_new dt %0d", d));
      end
    end
    // exact points
    mode = STDP_PLAIN; w_old = 0;
    dt = 17'sd1;  #1; check(dw == 9'sd15, $sformatf("dt=1 -> %0d, want 15", dw));
    dt = -17'sd1; #1; check(dw == -9'sd11, $sformatf("dt=-1 -> %0d, want -11", dw));
    dt = 0;       #1; check(dw == 0, "dt=0 no change");
    // saturation
    w_old = 8'sd120; dt = 17'sd1; #1; check(w_new == 8'sd127, "saturate high");
    w_old = -8'sd125; dt = -17'sd1; #1; check(w_new == -8'sd128, "saturate low");
    // disabled
    en = 0; w_old = 8'sd5; dt = 17'sd2; #1; check(dw == 0 && w_new == 8'sd5, "en low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
