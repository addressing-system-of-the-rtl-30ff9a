// mode_mux: the LOAD/#RUN multiplexer in front of the phase accumulator.
//
// In load mode (load_run = 1) the accumulator must hand out successive LUT addresses, one per CPU
// sample write: the mux selects the CPU write strobe as the advance signal and an increment of
// exactly one LUT location, 2**(PHASE_W-ADDR_W). In run mode (load_run = 0) it selects the sample
// clock enable fs_en and the tuning word M from the delta phase register.
//
// Purely combinational. The document's multiplexer switches the accumulator's clock between the
// CPU write line and REF_CLK; this design keeps one clock and switches a clock enable instead.
// The document also says the tuning word "equals one" while loading; since the LUT address is the
// top ADDR_W phase bits, this design reads that as one address step and forces that increment here.
module mode_mux #(
  parameter int unsigned PHASE_W = dds_pkg::PHASE_W,
  parameter int unsigned ADDR_W  = dds_pkg::ADDR_W
) (
  input  logic               load_run,  // 1 = load the LUT, 0 = generate
  input  logic               cpu_wr,    // CPU sample write strobe
  input  logic               fs_en,     // sample clock enable (REF_CLK tick)
  input  logic [PHASE_W-1:0] m,         // tuning word
  output logic               step,      // advance the phase register
  output logic [PHASE_W-1:0] incr       // increment for the phase adder
);

  localparam logic [PHASE_W-1:0] LOAD_INCR = PHASE_W'(1) << (PHASE_W - ADDR_W);

  always_comb begin
    if (load_run == dds_pkg::MODE_LOAD) begin
      step = cpu_wr;
      incr = LOAD_INCR;
    end else begin
      step = fs_en;
      incr = m;
    end
  end

endmodule
