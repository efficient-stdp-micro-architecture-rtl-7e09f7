// lif_neuron: leaky integrate-and-fire neuron cell.
//
// Between time steps the cell sums the weighted inputs it receives
// (in_valid/in_w, signed weights, saturating sum). At each tick it adds the
// sum to the membrane potential v, lets v leak towards 0 by the constant
// LEAK, and fires when v reaches THRESH: spike is then high for one cycle,
// the cycle after the tick, and v returns to V_RESET. An input arriving in
// the tick cycle itself counts towards the next step. force_spike (stimulus
// of an input-layer neuron) makes the cell fire at the next tick whatever
// its potential. v never goes below V_MIN.
//
// Integrate, constant leak and threshold firing follow the described neuron;
// the widths, the threshold, leak and reset values and the force input are
// this design's choices.
module lif_neuron #(
  parameter int unsigned V_W     = 16,
  parameter int unsigned W_W     = 8,
  parameter int          THRESH  = 64,
  parameter int          LEAK    = 1,
  parameter int          V_RESET = 0,
  parameter int          V_MIN   = -64
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  tick,
  input  logic                  in_valid,
  input  logic signed [W_W-1:0] in_w,
  input  logic                  force_spike,
  output logic                  spike,
  output logic signed [V_W-1:0] v
);
  localparam int VMAX = (1 <<< (V_W - 1)) - 1;
  localparam int VMIN_REP = -(1 <<< (V_W - 1));

  logic signed [V_W-1:0] acc;
  logic                  forced;

  function automatic logic signed [V_W-1:0] sat(input int x);
    if (x > VMAX)          return V_W'(VMAX);
    else if (x < VMIN_REP) return V_W'(VMIN_REP);
    else                   return V_W'(x);
  endfunction

  int  v_int, v_leak;
  logic fire;

  always_comb begin
    v_int = int'(v) + int'(acc);
    if (v_int > LEAK)       v_leak = v_int - LEAK;
    else if (v_int < -LEAK) v_leak = v_int + LEAK;
    else                    v_leak = 0;
    if (v_leak < V_MIN) v_leak = V_MIN;
    fire = forced || force_spike || (v_leak >= THRESH);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v      <= V_W'(V_RESET);
      acc    <= '0;
      forced <= 1'b0;
      spike  <= 1'b0;
    end else begin
      spike <= 1'b0;
      if (tick) begin
        acc    <= in_valid ? V_W'(in_w) : '0;
        forced <= 1'b0;
        spike  <= fire;
        v      <= fire ? V_W'(V_RESET) : sat(v_leak);
      end else begin
        if (in_valid)    acc    <= sat(int'(acc) + int'(in_w));
        if (force_spike) forced <= 1'b1;
      end
    end
  end
endmodule
