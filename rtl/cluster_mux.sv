// cluster_mux: multiplexer of the cluster's neuron spikes onto the router's
// local port.
//
// Each neuron slot has a fanout mask with one bit per router of the mesh:
// the routers whose clusters hold neurons this neuron feeds. When a neuron
// fires, its slot is marked pending. The mux serves one pending neuron at a
// time, lowest slot first, and sends one spike packet to every router in its
// mask, lowest router index first, one packet per cycle while the router
// accepts (valid/ready). The packet carries the neuron's own address as
// source and the destination router's coordinates (slot field 0) as
// destination. A neuron that fires again while still pending loses that
// spike, reported on overflow for one cycle. A mask is written through
// cfg_we/cfg_n/cfg_mask; reset clears all masks and pending spikes.
// Sending one unicast packet per destination cluster (no multicast) follows
// the described network; the fanout masks and their order are this design's.
// The source router coordinates and the destination slot field of every
// packet are constants of the instance, so those output bits never change.
module cluster_mux
  import snn_pkg::*;
#(
  parameter int unsigned        N      = 10,
  parameter int unsigned        MESH_X = 3,
  parameter int unsigned        MESH_Y = 4,
  parameter logic [COORD_W-1:0] MY_X   = '0,
  parameter logic [COORD_W-1:0] MY_Y   = '0,
  localparam int unsigned       NR     = MESH_X * MESH_Y,
  localparam int unsigned       NW     = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  spike,
  output flit_t         out_flit,
  output logic          out_valid,
  input  logic          out_ready,
  output logic          overflow,
  input  logic          cfg_we,
  input  logic [NW-1:0] cfg_n,
  input  logic [NR-1:0] cfg_mask
);
  logic [NR-1:0] fanout [N];
  logic [N-1:0]  pending, take;
  logic          active;
  logic [NW-1:0] cur_n;
  logic [NR-1:0] rem, rem_next;
  int unsigned   dst_r;

  // lowest pending neuron
  always_comb begin
    take = '0;
    if (!active) begin
      for (int n = N - 1; n >= 0; n--) begin
        if (pending[n]) begin
          take    = '0;
          take[n] = 1'b1;
        end
      end
    end
  end

  // lowest remaining destination router
  always_comb begin
    dst_r = 0;
    for (int r = NR - 1; r >= 0; r--) if (rem[r]) dst_r = r;
    rem_next = rem;
    if (out_valid && out_ready) rem_next[dst_r] = 1'b0;
  end

  assign out_valid         = active && (rem != '0);
  assign out_flit.src.y    = MY_Y;
  assign out_flit.src.x    = MY_X;
  assign out_flit.src.slot = SLOT_W'(cur_n);
  assign out_flit.dst.y    = COORD_W'(dst_r / MESH_X);
  assign out_flit.dst.x    = COORD_W'(dst_r % MESH_X);
  assign out_flit.dst.slot = '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending  <= '0;
      active   <= 1'b0;
      cur_n    <= '0;
      rem      <= '0;
      overflow <= 1'b0;
    end else begin
      pending  <= (pending & ~take) | spike;
      overflow <= |(pending & ~take & spike);
      if (active) begin
        rem <= rem_next;
        if (rem_next == '0) active <= 1'b0;
      end else if (|take) begin
        active <= 1'b1;
        for (int n = 0; n < N; n++) begin
          if (take[n]) begin
            cur_n <= NW'(n);
            rem   <= fanout[n];
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < N; n++) fanout[n] <= '0;
    end else if (cfg_we && int'(cfg_n) < N) begin
      fanout[cfg_n] <= cfg_mask;
    end
  end

  a_stable : assert property (@(posedge clk) disable iff (!rst_n)
                              out_valid && !out_ready |=> out_valid && $stable(out_flit));
endmodule
