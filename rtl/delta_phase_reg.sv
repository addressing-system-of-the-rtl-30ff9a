// delta_phase_reg: the delta phase register, which holds the tuning word M.
//
// The supervising CPU writes the tuning word; the register latches it on a clock edge where
// tw_we is high and holds it until the next write. Its output feeds the phase adder, so M is the
// phase step taken on every sample clock in run mode and sets F_OUT = M * F_S / 2**PHASE_W.
// Writing a new M while the generator runs changes the frequency without a phase jump, because
// the phase register itself is not touched.
//
// Interface: tw_we/tw (CPU side), m (to the adder). Timing: m shows the new word one clock after
// the write. Following the document, the register is PHASE_W = 32 bits wide and latches on a CPU
// write strobe. Here that strobe is a synchronous one-clock enable rather than a separate clock,
// and reset clears the word to 0 (the generator then stands still): both are this design's choice.
module delta_phase_reg #(
  parameter int unsigned PHASE_W = dds_pkg::PHASE_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               tw_we,   // CPU write strobe for the tuning word
  input  logic [PHASE_W-1:0] tw,      // tuning word from the CPU bus
  output logic [PHASE_W-1:0] m        // latched tuning word M
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     m <= '0;
    else if (tw_we) m <= tw;
  end

endmodule
