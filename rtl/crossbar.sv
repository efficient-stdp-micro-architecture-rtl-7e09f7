// crossbar: the router's switch from input buffers to output ports.
//
// Combinational. Each output port has a one-hot select over the inputs,
// taken from that output's round-robin arbiter; the output word is the
// selected input's flit, and out_valid tells whether any input is selected.
// An all-zero select gives an idle output with a zero word.
module crossbar
  import snn_pkg::*;
#(
  parameter int unsigned N_IN  = NPORTS,
  parameter int unsigned N_OUT = NPORTS
) (
  input  flit_t [N_IN-1:0]             in_flit,
  input  logic  [N_OUT-1:0][N_IN-1:0]  sel,
  output flit_t [N_OUT-1:0]            out_flit,
  output logic  [N_OUT-1:0]            out_valid
);
  always_comb begin
    for (int unsigned o = 0; o < N_OUT; o++) begin
      out_flit[o]  = '0;
      out_valid[o] = |sel[o];
      for (int unsigned i = 0; i < N_IN; i++) begin
        if (sel[o][i]) out_flit[o] = out_flit[o] | in_flit[i];
      end
    end
  end
endmodule
