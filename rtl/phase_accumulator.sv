// phase_accumulator: mode multiplexer, phase adder and phase register.
//
// The phase register holds a PHASE_W-bit phase; on each advance the adder adds an increment to it,
// modulo 2**PHASE_W, and its ADDR_W most significant bits address the LUT.
//  - Run mode (load_run = 0): the phase advances by the tuning word M on every sample clock enable
//    fs_en, so the LUT is read with M/2**(PHASE_W-ADDR_W) locations skipped per sample and the output
//    frequency is F_OUT = M * F_S / 2**PHASE_W.
//  - Load mode (load_run = 1): the phase advances by one LUT location on every CPU sample write, so
//    successive samples land in successive addresses. Entering load mode (a rising edge of
//    load_run) clears the phase so that loading starts at address 0.
//
// The CPU must not write a sample in the first load-mode clock, which clears the phase (asserted).
// Timing: phase and addr show the new value one clock after the advance. `wrap` pulses for one clock,
// in the same cycle as a run-mode advance that passes 2**PHASE_W (one output period).
// The structure follows the document; the clear on entering load mode is this design's choice.
module phase_accumulator #(
  parameter int unsigned PHASE_W = dds_pkg::PHASE_W,
  parameter int unsigned ADDR_W  = dds_pkg::ADDR_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load_run,  // LOAD/#RUN
  input  logic               cpu_wr,    // CPU sample write strobe (advances in load mode)
  input  logic               fs_en,     // sample clock enable (advances in run mode)
  input  logic [PHASE_W-1:0] m,         // tuning word from the delta phase register
  output logic [PHASE_W-1:0] phase,     // current phase
  output logic [ADDR_W-1:0]  addr,      // LUT address
  output logic               step,      // the phase advances on this edge
  output logic               wrap       // this advance completes an output period
);

  logic [PHASE_W-1:0] incr;
  logic [PHASE_W-1:0] sum;
  logic               carry;
  logic               load_run_q;
  logic               load_entry;

  mode_mux #(.PHASE_W(PHASE_W), .ADDR_W(ADDR_W)) u_mux (
    .load_run (load_run),
    .cpu_wr   (cpu_wr),
    .fs_en    (fs_en),
    .m        (m),
    .step     (step),
    .incr     (incr)
  );

  phase_adder #(.PHASE_W(PHASE_W)) u_adder (
    .phase (phase),
    .incr  (incr),
    .sum   (sum),
    .wrap  (carry)
  );

  // Rising edge of LOAD/#RUN: restart the table from address 0.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) load_run_q <= 1'b0;
    else        load_run_q <= load_run;
  end
  assign load_entry = load_run & ~load_run_q;

  phase_register #(.PHASE_W(PHASE_W), .ADDR_W(ADDR_W)) u_reg (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (load_entry),
    .step  (step),
    .d     (sum),
    .q     (phase),
    .addr  (addr)
  );

  assign wrap = step & carry & (load_run == dds_pkg::MODE_RUN);

  // Interface rule: the CPU leaves the first load-mode clock (the one that clears the phase) free
  // of sample writes; a write in that clock would land at the address left over from run mode.
  a_no_write_on_load_entry : assert property (
    @(posedge clk) disable iff (!rst_n) load_entry |-> !cpu_wr
  ) else $error("sample write in the clock that enters load mode");

endmodule
