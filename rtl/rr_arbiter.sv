// rr_arbiter: round-robin arbiter, one per router output port.
//
// Combinational grant, registered priority. Among the requesting inputs the
// grant goes to the first one at or after the priority pointer, wrapping
// around. When advance is high in a cycle with a grant (the granted flit
// really moved), the pointer moves to the input just after the winner, so
// every requester is served within N grants. Round-robin arbitration among
// the input buffers is the network description's; the pointer update only
// on a completed transfer is this design's choice. Reset points at input 0.
module rr_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr;
  logic [IW-1:0] win;
  logic          any;

  always_comb begin
    grant = '0;
    win   = '0;
    any   = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned i;
      i = (int'(ptr) + k) % N;
      if (!any && req[i]) begin
        any      = 1'b1;
        win      = IW'(i);
        grant[i] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (advance && any) ptr <= (win == IW'(N - 1)) ? '0 : win + 1'b1;
  end

  // A grant is always one-hot or empty, and only to a requester.
  a_onehot : assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  a_req    : assert property (@(posedge clk) disable iff (!rst_n) (grant & ~req) == '0);
endmodule
