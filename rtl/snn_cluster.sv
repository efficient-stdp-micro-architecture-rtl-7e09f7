// snn_cluster: a cluster of N neurons behind one router port.
//
// Instead of one router per neuron, N neuron cells share one router (through
// a multiplexer and a de-multiplexer on the router's local port) and one
// synaptic block with its STDP calculator. Spikes arriving from the router go
// through cluster_demux to the synaptic block, which injects the weighted
// input into every connected neuron and learns; spikes of the neurons go to
// the synaptic block as post-synaptic events and, through cluster_mux, out to
// the network. ext_spike makes a neuron fire at the next tick (stimulus of an
// input-layer neuron). NEURON_MODEL picks leaky integrate-and-fire or
// Izhikevich cells.
//
// Configuration: cfg is broadcast to all clusters; this cluster takes the
// writes whose router index equals MY_Y*MESH_X + MY_X.
//   CFG_CONN   idx = source address, data[15] = valid, data[7:0] = partition
//   CFG_WEIGHT slot, idx = partition, data[15] = connected, data[7:0] = weight
//   CFG_FANOUT slot, data[NR-1:0] = mask of destination routers
// The cluster structure (neurons sharing a router through a mux and a demux,
// one shared synaptic block) follows the described design; the configuration
// bus is this design's.
module snn_cluster
  import snn_pkg::*;
#(
  parameter int unsigned        N               = 10,
  parameter int unsigned        S               = 60,
  parameter int unsigned        MESH_X          = 3,
  parameter int unsigned        MESH_Y          = 4,
  parameter logic [COORD_W-1:0] MY_X            = '0,
  parameter logic [COORD_W-1:0] MY_Y            = '0,
  parameter neuron_model_e      NEURON_MODEL    = NEURON_LIF,
  parameter int unsigned        TS_W            = 16,
  parameter int unsigned        W_W             = 8,
  parameter int unsigned        EVT_DEPTH       = 16,
  parameter int unsigned        CYCLES_PER_STEP = 400,
  parameter int                 LIF_THRESH      = 64,
  localparam int unsigned       NR              = MESH_X * MESH_Y,
  localparam int unsigned       NW              = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned       SW              = (S > 1) ? $clog2(S) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  input  stdp_mode_e    mode,
  input  cfg_t          cfg,
  input  logic [N-1:0]  ext_spike,
  // to the router's local input
  output flit_t         tx_flit,
  output logic          tx_valid,
  input  logic          tx_ready,
  // from the router's local output
  input  flit_t         rx_flit,
  input  logic          rx_valid,
  output logic          rx_ready,
  // observation
  output logic [N-1:0]  spike,
  output logic          tick,
  output logic          pre_stall,
  output logic          evbuf_full,
  output logic          post_drop,
  output logic          tx_overflow,
  output logic          rx_drop,
  output logic          stdp_update
);
  localparam logic [ROUTER_W-1:0] MY_R = ROUTER_W'(int'(MY_Y) * MESH_X + int'(MY_X));

  logic                         cfg_hit;
  logic                         pre_valid, pre_ready, busy;
  logic [SW-1:0]                pre_syn;
  logic [TS_W-1:0]              now;
  logic [N-1:0]                 inj_valid;
  logic signed [N-1:0][W_W-1:0] inj_w;

  assign cfg_hit   = cfg.valid && (cfg.router == MY_R);
  assign pre_stall = pre_valid && !pre_ready;

  cluster_demux #(.S(S)) u_demux (
    .clk, .rst_n,
    .in_flit(rx_flit), .in_valid(rx_valid), .in_ready(rx_ready),
    .pre_valid, .pre_syn, .pre_ready, .drop(rx_drop),
    .cfg_we(cfg_hit && cfg.sel == CFG_CONN), .cfg_idx(cfg.idx),
    .cfg_valid(cfg.data[15]), .cfg_part(SW'(cfg.data[7:0]))
  );

  synaptic_block #(
    .N(N), .S(S), .TS_W(TS_W), .W_W(W_W), .EVT_DEPTH(EVT_DEPTH),
    .CYCLES_PER_STEP(CYCLES_PER_STEP)
  ) u_syn (
    .clk, .rst_n, .run, .mode,
    .pre_valid, .pre_syn, .pre_ready, .post_spike(spike),
    .tick, .now, .inj_valid, .inj_w,
    .cfg_we(cfg_hit && cfg.sel == CFG_WEIGHT), .cfg_n(NW'(cfg.slot)), .cfg_s(SW'(cfg.idx)),
    .cfg_conn(cfg.data[15]), .cfg_w(W_W'(cfg.data[7:0])),
    .busy, .evbuf_full, .post_drop, .stdp_update
  );

  for (genvar n = 0; n < N; n++) begin : g_neuron
    if (NEURON_MODEL == NEURON_IZH) begin : g_izh
      logic signed [31:0] v, u;
      izh_neuron #(.W_W(W_W)) u_cell (
        .clk, .rst_n, .tick, .in_valid(inj_valid[n]), .in_w(inj_w[n]),
        .force_spike(ext_spike[n]), .spike(spike[n]), .v, .u
      );
    end else begin : g_lif
      logic signed [15:0] v;
      lif_neuron #(.W_W(W_W), .THRESH(LIF_THRESH)) u_cell (
        .clk, .rst_n, .tick, .in_valid(inj_valid[n]), .in_w(inj_w[n]),
        .force_spike(ext_spike[n]), .spike(spike[n]), .v
      );
    end
  end

  cluster_mux #(.N(N), .MESH_X(MESH_X), .MESH_Y(MESH_Y), .MY_X(MY_X), .MY_Y(MY_Y)) u_mux (
    .clk, .rst_n, .spike,
    .out_flit(tx_flit), .out_valid(tx_valid), .out_ready(tx_ready), .overflow(tx_overflow),
    .cfg_we(cfg_hit && cfg.sel == CFG_FANOUT), .cfg_n(NW'(cfg.slot)), .cfg_mask(NR'(cfg.data))
  );
endmodule
