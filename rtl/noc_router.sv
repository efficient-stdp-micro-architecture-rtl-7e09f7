// noc_router: five-port mesh router for spike packets.
//
// Ports 0..4 are local, north, east, south and west. Every input port has a
// FIFO buffer of BUF_DEPTH flits (4 in the described configuration); there
// are no virtual channels. The flit at the head of each buffer is routed by
// XY routing; each output port has a round-robin arbiter over the input
// buffers whose head wants it, and the crossbar forwards the winner. A packet
// is a single 16-bit flit, so an output is held for one cycle only.
//
// Handshake on every port, in and out: a word moves in a cycle where valid
// and ready are both high. in_ready is "buffer not full" (a register), so the
// ready path never loops through a neighbour. out_valid depends on the
// arbiters only, never on out_ready. A flit takes one cycle to enter a buffer
// and can leave in the next cycle: one hop costs one cycle when uncongested.
module noc_router
  import snn_pkg::*;
#(
  parameter int unsigned       BUF_DEPTH = 4,
  parameter logic [COORD_W-1:0] MY_X     = '0,
  parameter logic [COORD_W-1:0] MY_Y     = '0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  flit_t [NPORTS-1:0]   in_flit,
  input  logic  [NPORTS-1:0]   in_valid,
  output logic  [NPORTS-1:0]   in_ready,
  output flit_t [NPORTS-1:0]   out_flit,
  output logic  [NPORTS-1:0]   out_valid,
  input  logic  [NPORTS-1:0]   out_ready
);
  flit_t [NPORTS-1:0]              head;
  logic  [NPORTS-1:0]              empty, full, pop;
  port_e                           route [NPORTS];
  logic  [NPORTS-1:0][NPORTS-1:0]  req;    // req[output][input]
  logic  [NPORTS-1:0][NPORTS-1:0]  grant;  // grant[output][input]

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    logic [$clog2(BUF_DEPTH+1)-1:0] cnt;
    snn_fifo #(.T(flit_t), .DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst_n,
      .push(in_valid[i]), .din(in_flit[i]), .full(full[i]),
      .pop(pop[i]), .dout(head[i]), .empty(empty[i]), .count(cnt)
    );
    assign in_ready[i] = !full[i];

    xy_route u_route (.dst(head[i].dst), .my_x(MY_X), .my_y(MY_Y), .out_port(route[i]));
  end

  always_comb begin
    for (int unsigned o = 0; o < NPORTS; o++)
      for (int unsigned i = 0; i < NPORTS; i++)
        req[o][i] = !empty[i] && (route[i] == port_e'(o));
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    rr_arbiter #(.N(NPORTS)) u_arb (
      .clk, .rst_n,
      .req(req[o]), .advance(out_ready[o]), .grant(grant[o])
    );
  end

  crossbar #(.N_IN(NPORTS), .N_OUT(NPORTS)) u_xbar (
    .in_flit(head), .sel(grant), .out_flit(out_flit), .out_valid(out_valid)
  );

  // An input buffer is popped when its granted output accepts the flit.
  always_comb begin
    pop = '0;
    for (int unsigned o = 0; o < NPORTS; o++)
      for (int unsigned i = 0; i < NPORTS; i++)
        if (grant[o][i] && out_ready[o]) pop[i] = 1'b1;
  end

  // A flit never turns back to the port it came from (XY routing).
  for (genvar p = 0; p < NPORTS; p++) begin : g_chk
    if (p != 0) begin : g_nu
      a_no_uturn : assert property (@(posedge clk) disable iff (!rst_n) !grant[p][p]);
    end
  end
endmodule
