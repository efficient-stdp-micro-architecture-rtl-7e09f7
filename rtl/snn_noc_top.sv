// snn_noc_top: clustered network-on-chip spiking neural network with shared
// STDP learning.
//
// A MESH_X x MESH_Y mesh of five-port routers (input buffers of BUF_DEPTH
// flits, XY routing, round-robin arbitration, 16-bit links) joins one
// cluster per router. Each cluster holds N neurons, a multiplexer and a
// de-multiplexer on the router's local port, and one synaptic block whose
// STDP calculator and controller are shared by the cluster's N*S synapses.
// The defaults are the described main configuration: 3x4 routers, 10 neurons
// per cluster, 60 synapse partitions per cluster, buffer depth 4, 400 clock
// cycles per 1 ms time step, leaky integrate-and-fire cells.
//
// Interface: run lets time advance; mode sets the learning phase (STDP_OFF
// for exploitation, the others for exploration with plain STDP, reward or
// punishment); cfg writes connectivity, weights and fanout masks of one
// cluster at a time; ext_spike[r][n] makes neuron n of cluster r fire at the
// next time step (input stimulus); spike[r][n] pulses when that neuron fires.
// The remaining outputs are per-cluster event flags for observation: tick
// (time step boundary), pre_stall (incoming spike waiting for the synaptic
// block), evbuf_full, post_drop, tx_overflow, rx_drop, stdp_update.
module snn_noc_top
  import snn_pkg::*;
#(
  parameter int unsigned   MESH_X          = 3,
  parameter int unsigned   MESH_Y          = 4,
  parameter int unsigned   N               = 10,
  parameter int unsigned   S               = 60,
  parameter int unsigned   BUF_DEPTH       = 4,
  parameter neuron_model_e NEURON_MODEL    = NEURON_LIF,
  parameter int unsigned   EVT_DEPTH       = 16,
  parameter int unsigned   CYCLES_PER_STEP = 400,
  parameter int            LIF_THRESH      = 64,
  localparam int unsigned  NR              = MESH_X * MESH_Y
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  run,
  input  stdp_mode_e            mode,
  input  cfg_t                  cfg,
  input  logic [NR-1:0][N-1:0]  ext_spike,
  output logic [NR-1:0][N-1:0]  spike,
  output logic [NR-1:0]         tick,
  output logic [NR-1:0]         pre_stall,
  output logic [NR-1:0]         evbuf_full,
  output logic [NR-1:0]         post_drop,
  output logic [NR-1:0]         tx_overflow,
  output logic [NR-1:0]         rx_drop,
  output logic [NR-1:0]         stdp_update
);
  flit_t [NR-1:0] tx_flit, rx_flit;
  logic  [NR-1:0] tx_valid, tx_ready, rx_valid, rx_ready;

  noc_mesh #(.MESH_X(MESH_X), .MESH_Y(MESH_Y), .BUF_DEPTH(BUF_DEPTH)) u_mesh (
    .clk, .rst_n,
    .loc_in_flit(tx_flit), .loc_in_valid(tx_valid), .loc_in_ready(tx_ready),
    .loc_out_flit(rx_flit), .loc_out_valid(rx_valid), .loc_out_ready(rx_ready)
  );

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned R = y * MESH_X + x;
      snn_cluster #(
        .N(N), .S(S), .MESH_X(MESH_X), .MESH_Y(MESH_Y),
        .MY_X(COORD_W'(x)), .MY_Y(COORD_W'(y)),
        .NEURON_MODEL(NEURON_MODEL), .EVT_DEPTH(EVT_DEPTH),
        .CYCLES_PER_STEP(CYCLES_PER_STEP), .LIF_THRESH(LIF_THRESH)
      ) u_cluster (
        .clk, .rst_n, .run, .mode, .cfg,
        .ext_spike(ext_spike[R]),
        .tx_flit(tx_flit[R]), .tx_valid(tx_valid[R]), .tx_ready(tx_ready[R]),
        .rx_flit(rx_flit[R]), .rx_valid(rx_valid[R]), .rx_ready(rx_ready[R]),
        .spike(spike[R]), .tick(tick[R]), .pre_stall(pre_stall[R]),
        .evbuf_full(evbuf_full[R]), .post_drop(post_drop[R]),
        .tx_overflow(tx_overflow[R]), .rx_drop(rx_drop[R]), .stdp_update(stdp_update[R])
      );
    end
  end
endmodule
