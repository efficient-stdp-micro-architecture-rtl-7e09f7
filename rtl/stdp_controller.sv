// stdp_controller: event buffer and scheduler of a shared synaptic block.
//
// Spike events reach the controller from two sides: pre-synaptic spikes
// arriving from the network (pre_valid/pre_syn, one partition each) and
// post-synaptic spikes of the cluster's own neurons (post_spike, one bit per
// neuron slot, possibly several in the same cycle). Post spikes are latched
// in a pending vector and moved into the event buffer (a FIFO of EVT_DEPTH
// events) one per cycle, lowest slot first; a pre spike is accepted
// (pre_ready) only in a cycle in which no post spike is pending and the buffer
// has room, so a busy controller back-pressures the network. A post spike of
// a neuron that is still pending is lost and counted on post_drop.
//
// The scheduler takes one event at a time:
//   pre event on partition s  -> cycle 1: store the time stamp of s, read
//     column s of the weight table and inject each connected weight into
//     its neuron (inj_valid/inj_w); then one cycle per neuron n: pair the new
//     pre spike with n's last post spike through the STDP calculator and
//     write back weight (n, s). N + 2 cycles in all, with the pop.
//   post event of neuron n    -> cycle 1: store n's time stamp; then one
//     cycle per partition s: pair n's new post spike with the last pre spike
//     of s and write back weight (n, s). S + 2 cycles in all.
// A pair is used only when the synapse is connected and the other time stamp
// is valid. In the exploitation phase (mode STDP_OFF) time stamps are still
// stored but the loops are skipped, and a loop under way when the mode
// changes writes nothing more. Time stamps are compared modulo 2^TS_W.
//
// The sequence (store the time stamp, then walk the opposite table; one
// weight per pre spike, all weights of a neuron per post spike; an event
// buffer to hold the work) follows the described micro-architecture. The
// buffer depth, the priority of post over pre events and the cycle counts
// are this design's choices. inj_w and calc_w_old are the weight table's
// read column (col_w) passed on without a register: the table read is
// already the registered stage, and inj_valid/w_we decide when they count.
module stdp_controller
  import snn_pkg::*;
#(
  parameter int unsigned N         = 10,
  parameter int unsigned S         = 60,
  parameter int unsigned TS_W      = 16,
  parameter int unsigned W_W       = 8,
  parameter int unsigned EVT_DEPTH = 16,
  localparam int unsigned NW       = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned SW       = (S > 1) ? $clog2(S) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  stdp_mode_e                    mode,
  input  logic [TS_W-1:0]               now,
  // events
  input  logic                          pre_valid,
  input  logic [SW-1:0]                 pre_syn,
  output logic                          pre_ready,
  input  logic [N-1:0]                  post_spike,
  // pre-synaptic time-stamp table
  output logic                          pre_we,
  output logic [SW-1:0]                 pre_addr_w,
  output logic [SW-1:0]                 pre_addr_r,
  input  logic [TS_W-1:0]               pre_rts,
  input  logic                          pre_rvalid,
  // post-synaptic time-stamp table
  output logic                          post_we,
  output logic [NW-1:0]                 post_addr_w,
  output logic [NW-1:0]                 post_addr_r,
  input  logic [TS_W-1:0]               post_rts,
  input  logic                          post_rvalid,
  // weight table
  output logic [SW-1:0]                 col_s,
  input  logic signed [N-1:0][W_W-1:0]  col_w,
  input  logic [N-1:0]                  col_conn,
  output logic                          w_we,
  output logic [NW-1:0]                 w_n,
  output logic [SW-1:0]                 w_s,
  output logic signed [W_W-1:0]         w_d,
  // STDP calculator
  output logic                          calc_en,
  output logic signed [TS_W:0]          calc_dt,
  output logic signed [W_W-1:0]         calc_w_old,
  input  logic signed [W_W-1:0]         calc_w_new,
  // weighted input to the neurons
  output logic [N-1:0]                  inj_valid,
  output logic signed [N-1:0][W_W-1:0]  inj_w,
  // status
  output logic                          busy,
  output logic                          evbuf_full,
  output logic                          post_drop,
  output logic                          stdp_update
);
  typedef enum logic [2:0] {ST_IDLE, ST_PRE_INJ, ST_PRE_LOOP, ST_POST_TS, ST_POST_LOOP} state_e;

  state_e          state;
  logic [N-1:0]    pending;
  logic            ev_push, ev_pop, ev_empty;
  stdp_event_t     ev_in, ev_head;
  logic [$clog2(EVT_DEPTH+1)-1:0] ev_count;
  logic [7:0]      cur;      // partition (pre event) or neuron slot (post event)
  logic [7:0]      step;     // loop counter
  logic [N-1:0]    take_post;

  // ---------------- event buffer ----------------
  snn_fifo #(.T(stdp_event_t), .DEPTH(EVT_DEPTH)) u_evbuf (
    .clk, .rst_n,
    .push(ev_push), .din(ev_in), .full(evbuf_full),
    .pop(ev_pop), .dout(ev_head), .empty(ev_empty), .count(ev_count)
  );

  always_comb begin
    take_post = '0;
    ev_in     = '{kind: EV_PRE, idx: 8'(pre_syn)};
    ev_push   = 1'b0;
    pre_ready = 1'b0;
    if (!evbuf_full) begin
      if (|pending) begin
        for (int n = N - 1; n >= 0; n--) begin
          if (pending[n]) begin
            take_post = '0;
            take_post[n] = 1'b1;
            ev_in = '{kind: EV_POST, idx: 8'(n)};
          end
        end
        ev_push = 1'b1;
      end else begin
        pre_ready = 1'b1;
        ev_push   = pre_valid;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending   <= '0;
      post_drop <= 1'b0;
    end else begin
      pending   <= (pending & ~take_post) | post_spike;
      post_drop <= |(pending & ~take_post & post_spike);
    end
  end

  // ---------------- scheduler ----------------
  assign ev_pop = (state == ST_IDLE) && !ev_empty;
  assign busy   = (state != ST_IDLE) || !ev_empty || (|pending);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      cur   <= '0;
      step  <= '0;
    end else begin
      unique case (state)
        ST_IDLE: begin
          if (!ev_empty) begin
            cur   <= ev_head.idx;
            step  <= '0;
            state <= (ev_head.kind == EV_PRE) ? ST_PRE_INJ : ST_POST_TS;
          end
        end
        ST_PRE_INJ:  state <= (mode == STDP_OFF) ? ST_IDLE : ST_PRE_LOOP;
        ST_POST_TS:  state <= (mode == STDP_OFF) ? ST_IDLE : ST_POST_LOOP;
        ST_PRE_LOOP: begin
          step <= step + 1'b1;
          if (int'(step) == N - 1) state <= ST_IDLE;
        end
        ST_POST_LOOP: begin
          step <= step + 1'b1;
          if (int'(step) == S - 1) state <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // Modular time difference a - b as a signed TS_W+1 bit value.
  function automatic logic signed [TS_W:0] tdiff(input logic [TS_W-1:0] a, input logic [TS_W-1:0] b);
    logic signed [TS_W-1:0] d;
    d = $signed(a - b);
    return (TS_W+1)'(d);
  endfunction

  always_comb begin
    pre_we      = 1'b0;
    pre_addr_w  = SW'(cur);
    pre_addr_r  = SW'(step);
    post_we     = 1'b0;
    post_addr_w = NW'(cur);
    post_addr_r = NW'(step);
    col_s       = SW'(cur);
    w_we        = 1'b0;
    w_n         = NW'(step);
    w_s         = SW'(cur);
    calc_en     = 1'b0;
    calc_dt     = '0;
    calc_w_old  = '0;
    inj_valid   = '0;
    inj_w       = col_w;
    stdp_update = 1'b0;
    unique case (state)
      ST_PRE_INJ: begin
        pre_we    = 1'b1;
        inj_valid = col_conn;
      end
      ST_PRE_LOOP: begin
        // new pre spike (now) against the last post spike of neuron step
        calc_en    = 1'b1;
        calc_dt    = tdiff(post_rts, now);
        calc_w_old = col_w[NW'(step)];
        w_d        = calc_w_new;
        w_we       = col_conn[NW'(step)] && post_rvalid && (mode != STDP_OFF);
      end
      ST_POST_TS: begin
        post_we = 1'b1;
      end
      ST_POST_LOOP: begin
        // new post spike of neuron cur (now) against the last pre spike of partition step
        col_s      = SW'(step);
        w_n        = NW'(cur);
        w_s        = SW'(step);
        calc_en    = 1'b1;
        calc_dt    = tdiff(now, pre_rts);
        calc_w_old = col_w[NW'(cur)];
        w_we       = col_conn[NW'(cur)] && pre_rvalid && (mode != STDP_OFF);
      end
      default: ;
    endcase
    w_d         = calc_w_new;
    stdp_update = w_we;
  end

  a_ev_kind : assert property (@(posedge clk) disable iff (!rst_n)
                               ev_pop |-> (ev_head.kind == EV_POST ? int'(ev_head.idx) < N
                                                                   : int'(ev_head.idx) < S));
endmodule
