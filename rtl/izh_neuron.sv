// izh_neuron: Izhikevich neuron cell, in fixed point.
//
// Same interface and timing as lif_neuron: weighted inputs are summed
// between ticks; at each tick the cell advances the Izhikevich model by one
// 1 ms time step and fires when v reaches V_PEAK (spike high for one cycle,
// the cycle after the tick):
//     v' = 0.04 v^2 + 5 v + 140 - u + I,   u' = a (b v - u)
//     on a spike: v <- c, u <- u + d
// v (mV) and u are held in Q8 (value * 256) in 32 bits; 0.04 is taken as
// 41/1024, a = A_Q8/256 and b = B_Q8/256 (defaults 5/256 and 51/256 for the
// regular-spiking cell a = 0.02, b = 0.2, c = -65, d = 8). v is advanced in
// two half steps of 0.5 ms for numerical stability, u in one step with the
// new v; the second half step is skipped once v has reached the peak. The
// input current I in mV/ms is the summed weight shifted right by I_SHIFT.
// force_spike makes the cell fire at the next tick.
//
// The use of the Izhikevich model is the described design's; its constants,
// number format and integration scheme are this design's choices.
module izh_neuron #(
  parameter int unsigned W_W     = 8,
  parameter int          A_Q8    = 5,
  parameter int          B_Q8    = 51,
  parameter int          C_MV    = -65,
  parameter int          D_MV    = 8,
  parameter int          V_PEAK  = 30,
  parameter int unsigned I_SHIFT = 0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  tick,
  input  logic                  in_valid,
  input  logic signed [W_W-1:0] in_w,
  input  logic                  force_spike,
  output logic                  spike,
  output logic signed [31:0]    v,
  output logic signed [31:0]    u
);
  localparam longint Q = 256;

  logic signed [15:0] acc;
  logic               forced;

  // dv/dt in Q8 per ms
  function automatic longint dvdt(input longint vq, input longint uq, input longint iq);
    longint sq;
    sq = (vq * vq) >>> 8;                  // v^2 in Q8
    return ((sq * 41) >>> 10) + 5 * vq + 140 * Q - uq + iq;
  endfunction

  longint vq, uq, iq, v1, v2, u2;
  logic   fire;

  always_comb begin
    vq = longint'(v);
    uq = longint'(u);
    iq = (longint'(acc) >>> I_SHIFT) * Q;
    v1 = vq + (dvdt(vq, uq, iq) >>> 1);
    if (v1 >= longint'(V_PEAK) * Q) v2 = v1;
    else                            v2 = v1 + (dvdt(v1, uq, iq) >>> 1);
    u2 = uq + ((longint'(A_Q8) * (((longint'(B_Q8) * v2) >>> 8) - uq)) >>> 8);
    fire = forced || force_spike || (v2 >= longint'(V_PEAK) * Q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v      <= 32'(longint'(C_MV) * Q);
      u      <= 32'((longint'(B_Q8) * longint'(C_MV) * Q) >>> 8);
      acc    <= '0;
      forced <= 1'b0;
      spike  <= 1'b0;
    end else begin
      spike <= 1'b0;
      if (tick) begin
        acc    <= in_valid ? 16'(in_w) : '0;
        forced <= 1'b0;
        spike  <= fire;
        if (fire) begin
          v <= 32'(longint'(C_MV) * Q);
          u <= 32'(u2 + longint'(D_MV) * Q);
        end else begin
          v <= 32'(v2);
          u <= 32'(u2);
        end
      end else begin
        if (in_valid)    acc    <= acc + 16'(in_w);
        if (force_spike) forced <= 1'b1;
      end
    end
  end
endmodule
