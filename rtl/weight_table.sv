// weight_table: synaptic weight table of a cluster's shared synaptic block.
//
// Holds one signed W_W-bit weight and one "connected" bit for every pair of
// neuron slot (N) and synapse partition (S). It is organised as N banks, one
// per neuron, all addressed by the same partition: a column read returns the
// weights of partition col_s for every neuron at once, so an incoming spike
// can apply its weighted input to all neurons of the cluster in one cycle.
// The STDP write port updates one weight (the connected bit is kept); the
// configuration port writes weight and connected bit together and wins over
// the STDP port. Reads are combinational, writes take effect at the next
// clock edge. Reset clears every entry (unconnected, weight 0).
// The banked organisation and the connected bit are this design's choices.
module weight_table #(
  parameter int unsigned N   = 10,
  parameter int unsigned S   = 60,
  parameter int unsigned W_W = 8,
  localparam int unsigned NW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned SW = (S > 1) ? $clog2(S) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [SW-1:0]              col_s,
  output logic signed [N-1:0][W_W-1:0] col_w,
  output logic [N-1:0]               col_conn,
  input  logic                       we,
  input  logic [NW-1:0]              wn,
  input  logic [SW-1:0]              ws,
  input  logic signed [W_W-1:0]      wd,
  input  logic                       cfg_we,
  input  logic [NW-1:0]              cfg_n,
  input  logic [SW-1:0]              cfg_s,
  input  logic                       cfg_conn,
  input  logic signed [W_W-1:0]      cfg_w
);
  logic signed [W_W-1:0] w    [N][S];
  logic [S-1:0]          conn [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < N; n++) begin
        conn[n] <= '0;
        for (int s = 0; s < S; s++) w[n][s] <= '0;
      end
    end else if (cfg_we) begin
      if (int'(cfg_n) < N && int'(cfg_s) < S) begin
        w[cfg_n][cfg_s]    <= cfg_w;
        conn[cfg_n][cfg_s] <= cfg_conn;
      end
    end else if (we) begin
      if (int'(wn) < N && int'(ws) < S) w[wn][ws] <= wd;
    end
  end

  always_comb begin
    for (int n = 0; n < N; n++) begin
      if (int'(col_s) < S) begin
        col_w[n]    = w[n][col_s];
        col_conn[n] = conn[n][col_s];
      end else begin
        col_w[n]    = '0;
        col_conn[n] = 1'b0;
      end
    end
  end
endmodule
