// snn_pkg: types and constants shared by the clustered NoC spiking network.
//
// A spike travels through the mesh as one 16-bit flit made of two 8-bit
// addresses, the source neuron and the destination. An address names a
// router by its mesh coordinates (y, x) and a neuron slot inside that
// router's cluster. The 16-bit packet of a source and a destination field
// follows the network description; the split of each 8-bit field into
// 2+2+4 bits is this design's choice (it covers a 4x4 mesh with up to 15
// neurons per cluster, enough for the 3x4 mesh with 10 neurons per cluster).
package snn_pkg;

  localparam int unsigned COORD_W = 2;               // bits of one mesh coordinate
  localparam int unsigned SLOT_W  = 4;               // bits of the neuron slot
  localparam int unsigned ROUTER_W = 2 * COORD_W;    // bits of a router index
  localparam int unsigned NPORTS  = 5;               // local, north, east, south, west

  typedef struct packed {
    logic [COORD_W-1:0] y;
    logic [COORD_W-1:0] x;
    logic [SLOT_W-1:0]  slot;
  } naddr_t;

  // One spike packet = one flit = one link word (16 bits).
  typedef struct packed {
    naddr_t src;
    naddr_t dst;
  } flit_t;

  // Router port numbering. North is y-1, south is y+1, east is x+1, west is x-1.
  typedef enum logic [2:0] {
    PORT_L = 3'd0,
    PORT_N = 3'd1,
    PORT_E = 3'd2,
    PORT_S = 3'd3,
    PORT_W = 3'd4
  } port_e;

  // Learning mode applied to every STDP update.
  //   STDP_OFF    exploitation phase: weights are frozen
  //   STDP_PLAIN  unsupervised STDP
  //   STDP_REWARD reward: the STDP change is applied as computed
  //   STDP_PUNISH punishment: the STDP change is applied with its sign inverted
  typedef enum logic [1:0] {
    STDP_OFF    = 2'd0,
    STDP_PLAIN  = 2'd1,
    STDP_REWARD = 2'd2,
    STDP_PUNISH = 2'd3
  } stdp_mode_e;

  // Neuron cell used in every cluster.
  typedef enum logic {NEURON_LIF = 1'b0, NEURON_IZH = 1'b1} neuron_model_e;

  // Targets of the configuration bus.
  typedef enum logic [1:0] {
    CFG_CONN   = 2'd0,  // connectivity: source address idx -> {valid, partition}
    CFG_WEIGHT = 2'd1,  // weight table: neuron slot, partition idx -> {connected, weight}
    CFG_FANOUT = 2'd2   // fanout mask of a neuron slot: destination routers
  } cfg_sel_e;

  // One configuration write, broadcast to all clusters; the cluster whose
  // router index matches takes it.
  typedef struct packed {
    logic                valid;
    logic [ROUTER_W-1:0] router;
    cfg_sel_e            sel;
    logic [SLOT_W-1:0]   slot;
    logic [7:0]          idx;
    logic [15:0]         data;
  } cfg_t;

  // STDP controller event: a pre-synaptic spike on partition idx, or a
  // post-synaptic spike of neuron slot idx.
  typedef enum logic {EV_PRE = 1'b0, EV_POST = 1'b1} ev_kind_e;

  typedef struct packed {
    ev_kind_e   kind;
    logic [7:0] idx;
  } stdp_event_t;

endpackage
