// phase_register: the phase register of the phase accumulator.
//
// Holds the current phase of the output signal. On a clock edge with `step` high it takes the
// phase adder's sum; `clr` (synchronous, stronger than step) returns it to zero. Its ADDR_W most
// significant bits are the LUT address: with the document's sizes, bits 31..20 of a 32-bit phase
// address a 4096-entry table, and the 20 lower bits keep the fraction that gives the accumulator
// its fine frequency resolution.
//
// Timing: q and addr change one clock after step. The register and the 12-bit address tap follow
// the document; the enable in place of a separate sample clock, the clear and the reset value of
// zero are this design's choices.
module phase_register #(
  parameter int unsigned PHASE_W = dds_pkg::PHASE_W,
  parameter int unsigned ADDR_W  = dds_pkg::ADDR_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clr,    // synchronous clear to phase 0
  input  logic               step,   // take d on this edge
  input  logic [PHASE_W-1:0] d,      // next phase from the adder
  output logic [PHASE_W-1:0] q,      // current phase
  output logic [ADDR_W-1:0]  addr    // LUT address: the ADDR_W MSBs of the phase
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (clr)  q <= '0;
    else if (step) q <= d;
  end

  assign addr = q[PHASE_W-1 -: ADDR_W];

endmodule
