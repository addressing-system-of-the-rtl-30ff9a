// phase_adder: the phase adder of the phase accumulator.
//
// Adds the phase increment to the current phase. The sum wraps modulo 2**PHASE_W, which is what
// makes the LUT be read cyclically: every wrap is the end of one output period. The carry out of
// the top bit is brought out as `wrap` so that the periods can be observed; the document does not
// use it. Purely combinational; the phase register that follows samples the sum.
module phase_adder #(
  parameter int unsigned PHASE_W = dds_pkg::PHASE_W
) (
  input  logic [PHASE_W-1:0] phase,  // current phase (phase register output)
  input  logic [PHASE_W-1:0] incr,   // phase increment (M in run mode)
  output logic [PHASE_W-1:0] sum,    // next phase, modulo 2**PHASE_W
  output logic               wrap    // carry out: the phase passed 2**PHASE_W
);

  always_comb begin
    {wrap, sum} = {1'b0, phase} + {1'b0, incr};
  end

endmodule
