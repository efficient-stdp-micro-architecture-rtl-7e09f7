// timestamp_table: pre- or post-synaptic time-stamp table.
//
// One entry per partition (a pre-synaptic source, or a post-synaptic neuron)
// holding the time step of its most recent spike and a valid bit that is
// set by the first spike. Only the latest spike is kept: STDP pairs each spike
// with the nearest spike of the opposite kind only. Writing an entry stores
// the time stamp and sets valid. The read port is combinational. Reset
// marks every entry as never spiked. The valid bit is this design's addition.
module timestamp_table #(
  parameter int unsigned ENTRIES = 60,
  parameter int unsigned TS_W    = 16,
  localparam int unsigned AW     = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            we,
  input  logic [AW-1:0]   waddr,
  input  logic [TS_W-1:0] wts,
  input  logic [AW-1:0]   raddr,
  output logic [TS_W-1:0] rts,
  output logic            rvalid
);
  logic [TS_W-1:0]    ts    [ENTRIES];
  logic [ENTRIES-1:0] valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
    end else if (we && (int'(waddr) < ENTRIES)) begin
      valid[waddr] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (we && (int'(waddr) < ENTRIES)) ts[waddr] <= wts;
  end

  always_comb begin
    rts    = '0;
    rvalid = 1'b0;
    if (int'(raddr) < ENTRIES) begin
      rts    = ts[raddr];
      rvalid = valid[raddr];
    end
  end
endmodule
