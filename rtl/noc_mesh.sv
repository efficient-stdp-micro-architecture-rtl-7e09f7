// noc_mesh: MESH_X x MESH_Y mesh of noc_router instances and their links.
//
// Router (x, y) has index y*MESH_X + x. Neighbouring routers are joined by
// one 16-bit link in each direction, with a valid/ready handshake; a link is
// as wide as a packet, as in the network description. The local port of
// every router is brought out as an array indexed by router. Ports at the
// mesh edge are tied off: nothing enters there, and an edge output is never
// ready (XY routing with in-range addresses never uses it; an assertion
// checks this). The described configuration is a 3x4 mesh; the 3 columns by
// 4 rows orientation is this design's choice.
module noc_mesh
  import snn_pkg::*;
#(
  parameter int unsigned MESH_X    = 3,
  parameter int unsigned MESH_Y    = 4,
  parameter int unsigned BUF_DEPTH = 4,
  localparam int unsigned NR       = MESH_X * MESH_Y
) (
  input  logic              clk,
  input  logic              rst_n,
  input  flit_t [NR-1:0]    loc_in_flit,
  input  logic  [NR-1:0]    loc_in_valid,
  output logic  [NR-1:0]    loc_in_ready,
  output flit_t [NR-1:0]    loc_out_flit,
  output logic  [NR-1:0]    loc_out_valid,
  input  logic  [NR-1:0]    loc_out_ready
);
  flit_t [NR-1:0][NPORTS-1:0] r_in_flit, r_out_flit;
  logic  [NR-1:0][NPORTS-1:0] r_in_valid, r_in_ready, r_out_valid, r_out_ready;

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned R = y * MESH_X + x;

      noc_router #(
        .BUF_DEPTH(BUF_DEPTH),
        .MY_X(COORD_W'(x)),
        .MY_Y(COORD_W'(y))
      ) u_router (
        .clk, .rst_n,
        .in_flit(r_in_flit[R]), .in_valid(r_in_valid[R]), .in_ready(r_in_ready[R]),
        .out_flit(r_out_flit[R]), .out_valid(r_out_valid[R]), .out_ready(r_out_ready[R])
      );

      // local port
      assign r_in_flit[R][PORT_L]   = loc_in_flit[R];
      assign r_in_valid[R][PORT_L]  = loc_in_valid[R];
      assign loc_in_ready[R]        = r_in_ready[R][PORT_L];
      assign loc_out_flit[R]        = r_out_flit[R][PORT_L];
      assign loc_out_valid[R]       = r_out_valid[R][PORT_L];
      assign r_out_ready[R][PORT_L] = loc_out_ready[R];

      // north link: from router (x, y-1) going south
      if (y > 0) begin : g_n
        assign r_in_flit[R][PORT_N]   = r_out_flit[R-MESH_X][PORT_S];
        assign r_in_valid[R][PORT_N]  = r_out_valid[R-MESH_X][PORT_S];
        assign r_out_ready[R][PORT_N] = r_in_ready[R-MESH_X][PORT_S];
      end else begin : g_n_edge
        assign r_in_flit[R][PORT_N]   = '0;
        assign r_in_valid[R][PORT_N]  = 1'b0;
        assign r_out_ready[R][PORT_N] = 1'b0;
        a_edge_n : assert property (@(posedge clk) disable iff (!rst_n) !r_out_valid[R][PORT_N]);
      end

      // south link: from router (x, y+1) going north
      if (y < MESH_Y - 1) begin : g_s
        assign r_in_flit[R][PORT_S]   = r_out_flit[R+MESH_X][PORT_N];
        assign r_in_valid[R][PORT_S]  = r_out_valid[R+MESH_X][PORT_N];
        assign r_out_ready[R][PORT_S] = r_in_ready[R+MESH_X][PORT_N];
      end else begin : g_s_edge
        assign r_in_flit[R][PORT_S]   = '0;
        assign r_in_valid[R][PORT_S]  = 1'b0;
        assign r_out_ready[R][PORT_S] = 1'b0;
        a_edge_s : assert property (@(posedge clk) disable iff (!rst_n) !r_out_valid[R][PORT_S]);
      end

      // east link: from router (x+1, y) going west
      if (x < MESH_X - 1) begin : g_e
        assign r_in_flit[R][PORT_E]   = r_out_flit[R+1][PORT_W];
        assign r_in_valid[R][PORT_E]  = r_out_valid[R+1][PORT_W];
        assign r_out_ready[R][PORT_E] = r_in_ready[R+1][PORT_W];
      end else begin : g_e_edge
        assign r_in_flit[R][PORT_E]   = '0;
        assign r_in_valid[R][PORT_E]  = 1'b0;
        assign r_out_ready[R][PORT_E] = 1'b0;
        a_edge_e : assert property (@(posedge clk) disable iff (!rst_n) !r_out_valid[R][PORT_E]);
      end

      // west link: from router (x-1, y) going east
      if (x > 0) begin : g_w
        assign r_in_flit[R][PORT_W]   = r_out_flit[R-1][PORT_E];
        assign r_in_valid[R][PORT_W]  = r_out_valid[R-1][PORT_E];
        assign r_out_ready[R][PORT_W] = r_in_ready[R-1][PORT_E];
      end else begin : g_w_edge
        assign r_in_flit[R][PORT_W]   = '0;
        assign r_in_valid[R][PORT_W]  = 1'b0;
        assign r_out_ready[R][PORT_W] = 1'b0;
        a_edge_w : assert property (@(posedge clk) disable iff (!rst_n) !r_out_valid[R][PORT_W]);
      end
    end
  end
endmodule
