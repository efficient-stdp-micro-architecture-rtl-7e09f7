// synaptic_block: synaptic block shared by the N neurons of a cluster.
//
// The costly part of STDP learning, the calculation, is not replicated per
// synapse or per neuron: one calculator and one controller serve all N*S
// synapses of the cluster, working through the spike events one after the
// other. Time stamps are shared too: one pre-synaptic time stamp per source
// partition (S entries) serves every neuron that the source feeds, and one
// post-synaptic time stamp per neuron (N entries). The block holds
//   - step_timer       the time step, used as time stamp, and the tick
//   - timestamp_table  pre-synaptic (S entries) and post-synaptic (N entries)
//   - weight_table     N x S weights with a connected bit each
//   - stdp_calculator  the exponential STDP rule with reward modulation
//   - stdp_controller  event buffer and scheduler
// An incoming spike (pre_valid/pre_syn, handshake with pre_ready) is turned
// into weighted inputs for all connected neurons (inj_valid/inj_w, one cycle)
// followed by N weight updates; a neuron's spike (post_spike) into S weight
// updates. With N = 1 this is the per-neuron synaptic block of a neuron
// block without sharing. The configuration port writes weights and
// connected bits.
module synaptic_block
  import snn_pkg::*;
#(
  parameter int unsigned N               = 10,
  parameter int unsigned S               = 60,
  parameter int unsigned TS_W            = 16,
  parameter int unsigned W_W             = 8,
  parameter int unsigned EVT_DEPTH       = 16,
  parameter int unsigned CYCLES_PER_STEP = 400,
  parameter int unsigned WINDOW          = 64,
  parameter int unsigned A_PLUS          = 16,
  parameter int unsigned A_MINUS         = 16,
  parameter int unsigned TAU_PLUS        = 20,
  parameter int unsigned TAU_MINUS       = 20,
  localparam int unsigned NW             = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned SW             = (S > 1) ? $clog2(S) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          run,
  input  stdp_mode_e                    mode,
  input  logic                          pre_valid,
  input  logic [SW-1:0]                 pre_syn,
  output logic                          pre_ready,
  input  logic [N-1:0]                  post_spike,
  output logic                          tick,
  output logic [TS_W-1:0]               now,
  output logic [N-1:0]                  inj_valid,
  output logic signed [N-1:0][W_W-1:0]  inj_w,
  input  logic                          cfg_we,
  input  logic [NW-1:0]                 cfg_n,
  input  logic [SW-1:0]                 cfg_s,
  input  logic                          cfg_conn,
  input  logic signed [W_W-1:0]         cfg_w,
  output logic                          busy,
  output logic                          evbuf_full,
  output logic                          post_drop,
  output logic                          stdp_update
);
  logic                         pre_we, post_we, pre_rvalid, post_rvalid;
  logic [SW-1:0]                pre_addr_w, pre_addr_r;
  logic [NW-1:0]                post_addr_w, post_addr_r;
  logic [TS_W-1:0]              pre_rts, post_rts;
  logic [SW-1:0]                col_s, w_s;
  logic signed [N-1:0][W_W-1:0] col_w;
  logic [N-1:0]                 col_conn;
  logic                         w_we, calc_en;
  logic [NW-1:0]                w_n;
  logic signed [W_W-1:0]        w_d, calc_w_old, calc_w_new;
  logic signed [TS_W:0]         calc_dt;
  logic signed [W_W:0]          calc_dw;

  step_timer #(.CYCLES_PER_STEP(CYCLES_PER_STEP), .TS_W(TS_W)) u_timer (
    .clk, .rst_n, .run, .tick, .now
  );

  timestamp_table #(.ENTRIES(S), .TS_W(TS_W)) u_pre_ts (
    .clk, .rst_n, .we(pre_we), .waddr(pre_addr_w), .wts(now),
    .raddr(pre_addr_r), .rts(pre_rts), .rvalid(pre_rvalid)
  );

  timestamp_table #(.ENTRIES(N), .TS_W(TS_W)) u_post_ts (
    .clk, .rst_n, .we(post_we), .waddr(post_addr_w), .wts(now),
    .raddr(post_addr_r), .rts(post_rts), .rvalid(post_rvalid)
  );

  weight_table #(.N(N), .S(S), .W_W(W_W)) u_weights (
    .clk, .rst_n,
    .col_s, .col_w, .col_conn,
    .we(w_we), .wn(w_n), .ws(w_s), .wd(w_d),
    .cfg_we, .cfg_n, .cfg_s, .cfg_conn, .cfg_w
  );

  stdp_calculator #(
    .TS_W(TS_W), .W_W(W_W), .WINDOW(WINDOW),
    .A_PLUS(A_PLUS), .A_MINUS(A_MINUS), .TAU_PLUS(TAU_PLUS), .TAU_MINUS(TAU_MINUS)
  ) u_calc (
    .en(calc_en), .mode, .dt(calc_dt), .w_old(calc_w_old), .w_new(calc_w_new), .dw(calc_dw)
  );

  stdp_controller #(.N(N), .S(S), .TS_W(TS_W), .W_W(W_W), .EVT_DEPTH(EVT_DEPTH)) u_ctrl (
    .clk, .rst_n, .mode, .now,
    .pre_valid, .pre_syn, .pre_ready, .post_spike,
    .pre_we, .pre_addr_w, .pre_addr_r, .pre_rts, .pre_rvalid,
    .post_we, .post_addr_w, .post_addr_r, .post_rts, .post_rvalid,
    .col_s, .col_w, .col_conn, .w_we, .w_n, .w_s, .w_d,
    .calc_en, .calc_dt, .calc_w_old, .calc_w_new,
    .inj_valid, .inj_w,
    .busy, .evbuf_full, .post_drop, .stdp_update
  );
endmodule
