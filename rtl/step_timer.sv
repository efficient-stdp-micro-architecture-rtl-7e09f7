// step_timer: simulation time-step timer of a synaptic block.
//
// The network runs on a fast clock; biological time advances in steps of
// CYCLES_PER_STEP clock cycles. With one clock cycle standing for 1/400 ms
// of biological time, 400 cycles make a 1 ms step (both numbers follow the
// network description; the 1 ms step also matches its count of 60 synapses
// giving 60,000 STDP operations per second). While run is high the timer
// counts cycles; in the last cycle of a step it raises tick for one cycle and
// now, the step number used as spike time stamp, increments with it
// (wrapping at 2^TS_W). Reset clears both counters.
module step_timer #(
  parameter int unsigned CYCLES_PER_STEP = 400,
  parameter int unsigned TS_W            = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  output logic            tick,
  output logic [TS_W-1:0] now
);
  localparam int unsigned CW = (CYCLES_PER_STEP > 1) ? $clog2(CYCLES_PER_STEP) : 1;

  logic [CW-1:0] cyc;

  assign tick = run && (cyc == CW'(CYCLES_PER_STEP - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc <= '0;
      now <= '0;
    end else if (run) begin
      if (tick) begin
        cyc <= '0;
        now <= now + 1'b1;
      end else begin
        cyc <= cyc + 1'b1;
      end
    end
  end
endmodule
