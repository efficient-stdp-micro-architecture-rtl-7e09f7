// stdp_calculator: the STDP weight-change unit shared by a cluster.
//
// Combinational. dt is the post-synaptic spike time minus the pre-synaptic
// spike time, in time steps. A pre spike followed by a post spike (dt > 0)
// strengthens the synapse by A_PLUS*exp(-dt/TAU_PLUS); a post spike followed
// by a pre spike (dt < 0) weakens it by A_MINUS*exp(dt/TAU_MINUS). dt = 0, a
// dt at or beyond WINDOW steps, or en low give no change. The exponential is
// a look-up table of WINDOW entries per sign, built at elaboration by a
// constant function (integer arithmetic only: exp(-1/tau) from its Taylor
// series in Q24, then repeated multiplication), rounded to whole weight units.
// The learning mode scales the change by +1 (plain STDP or reward), -1
// (punishment) or 0 (exploitation, weights frozen). The new weight saturates
// at [W_MIN, W_MAX].
//
// The exponential rule, its sign convention (pre before post strengthens)
// and the reward/punishment modulation follow the described method; the
// constants A, tau and the window are not given there and are this design's.
module stdp_calculator
  import snn_pkg::*;
#(
  parameter int unsigned TS_W      = 16,
  parameter int unsigned W_W       = 8,
  parameter int unsigned WINDOW    = 64,
  parameter int unsigned A_PLUS    = 16,
  parameter int unsigned A_MINUS   = 16,
  parameter int unsigned TAU_PLUS  = 20,
  parameter int unsigned TAU_MINUS = 20,
  parameter int          W_MAX     = 127,
  parameter int          W_MIN     = -128
) (
  input  logic                   en,
  input  stdp_mode_e             mode,
  input  logic signed [TS_W:0]   dt,
  input  logic signed [W_W-1:0]  w_old,
  output logic signed [W_W-1:0]  w_new,
  output logic signed [W_W:0]    dw
);
  localparam int unsigned LW = $clog2(WINDOW);

  // round(2^24 * exp(-1/tau)) by the Taylor series of exp(-x), x = 1/tau.
  function automatic longint exp_step_q24(input int unsigned tau);
    longint one, x, term, sum;
    one  = 64'sd1 <<< 24;
    x    = one / longint'(tau);
    term = one;
    sum  = one;
    for (int k = 1; k <= 8; k++) begin
      term = -(term * x) / (one * longint'(k));
      sum  = sum + term;
    end
    return sum;
  endfunction

  // round(a * exp(-d/tau)) in whole weight units.
  function automatic int unsigned exp_lut(input int unsigned a, input int unsigned tau,
                                          input int unsigned d);
    longint r, v;
    r = exp_step_q24(tau);
    v = longint'(a) <<< 24;
    for (int unsigned k = 0; k < d; k++) v = (v * r) >>> 24;
    return int'((v + (64'sd1 <<< 23)) >>> 24);
  endfunction

  logic [W_W:0] lut_plus  [WINDOW];
  logic [W_W:0] lut_minus [WINDOW];

  for (genvar d = 0; d < WINDOW; d++) begin : g_lut
    assign lut_plus[d]  = (W_W+1)'(exp_lut(A_PLUS, TAU_PLUS, d));
    assign lut_minus[d] = (W_W+1)'(exp_lut(A_MINUS, TAU_MINUS, d));
  end

  logic                 in_window;
  logic [TS_W:0]        mag;
  logic signed [W_W:0]  raw;
  int                   sum;

  always_comb begin
    mag       = dt[TS_W] ? (TS_W+1)'(-dt) : (TS_W+1)'(dt);
    in_window = (mag != '0) && (mag < (TS_W+1)'(WINDOW));
    raw       = '0;
    if (in_window) begin
      if (!dt[TS_W]) raw = $signed(lut_plus[mag[LW-1:0]]);
      else           raw = -$signed(lut_minus[mag[LW-1:0]]);
    end
    dw = '0;
    if (en) begin
      unique case (mode)
        STDP_PLAIN, STDP_REWARD: dw = raw;
        STDP_PUNISH:             dw = -raw;
        default:                 dw = '0;
      endcase
    end
    sum = int'(w_old) + int'(dw);
    if (sum > W_MAX)      w_new = W_W'(W_MAX);
    else if (sum < W_MIN) w_new = W_W'(W_MIN);
    else                  w_new = W_W'(sum);
  end
endmodule
