// cluster_demux: de-multiplexer from the router's local port into the
// cluster's synaptic block.
//
// A spike packet that the router delivers to this cluster names its source
// neuron. The connectivity table, indexed by that 8-bit source address,
// tells whether the cluster has a synapse partition for the source and which
// one; a hit becomes a pre-synaptic event (pre_valid/pre_syn, held until
// pre_ready), a miss is consumed and reported on drop for one cycle. The
// local port is ready whenever the packet at hand can be consumed, so a busy
// synaptic block back-pressures the router. Table entries are written
// through cfg_we/cfg_idx (source address) with cfg_valid and cfg_part; reset
// clears them all. A lookup table for non-layered connectivity is what the
// described design calls for; that this cluster always uses one, with 256
// entries, is this design's choice.
module cluster_demux
  import snn_pkg::*;
#(
  parameter int unsigned S  = 60,
  localparam int unsigned SW = (S > 1) ? $clog2(S) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  flit_t         in_flit,
  input  logic          in_valid,
  output logic          in_ready,
  output logic          pre_valid,
  output logic [SW-1:0] pre_syn,
  input  logic          pre_ready,
  output logic          drop,
  input  logic          cfg_we,
  input  logic [7:0]    cfg_idx,
  input  logic          cfg_valid,
  input  logic [SW-1:0] cfg_part
);
  logic [255:0]  hit_tab;
  logic [SW-1:0] part_tab [256];
  logic [7:0]    src;

  assign src       = in_flit.src;
  assign pre_valid = in_valid && hit_tab[src];
  assign pre_syn   = part_tab[src];
  assign in_ready  = !hit_tab[src] || pre_ready;
  assign drop      = in_valid && !hit_tab[src];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      hit_tab <= '0;
    else if (cfg_we) hit_tab[cfg_idx] <= cfg_valid;
  end

  always_ff @(posedge clk) begin
    if (cfg_we) part_tab[cfg_idx] <= cfg_part;
  end
endmodule
