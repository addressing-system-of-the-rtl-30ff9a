// dds_top: look-up-table addressing system of a direct digital synthesis (DDS) waveform generator.
//
// One period of an arbitrary waveform sits in a 2**ADDR_W-sample look-up table. A PHASE_W-bit phase
// accumulator walks through it: on every sample clock it adds the tuning word M to its phase, and
// the ADDR_W most significant phase bits address the table. The table is therefore read at a fixed
// rate but with locations skipped, and the output frequency is F_OUT = M * F_S / 2**PHASE_W. With
// the default sizes (32-bit phase, 4096 x 12-bit table, 16 MHz sample clock) M = 1 gives about
// 3.7 mHz and M = 2**28 gives 1 MHz with 16 samples per period.
//
// Blocks: delta phase register (M), phase accumulator (mode mux, phase adder, phase register),
// fast memory (the table) and a behavioural model of the 12-bit D/A converter.
//
// Operation, driven by a supervising CPU through the cpu_* ports:
//  1. Load mode (load_run = 1): the phase restarts at 0; each cpu_sample_we writes cpu_sample at
//     the current table address and advances the phase by one location. The table output is off.
//  2. The CPU writes the tuning word (cpu_tw_we); it may do so in either mode, and a write during
//     run mode changes the frequency without a phase jump (frequency sweep).
//  3. Run mode (load_run = 0): on each clock with fs_en high the phase advances by M, the table
//     is read, and the converter takes the previous read. Table writes are ignored.
//
// Timing: one clock domain, clk = the reference clock REF_CLK. fs_en is the sample clock as an
// enable (tie it high to sample at the clock rate). The converter code follows the phase by two
// sample clocks: code(k+2) = table[address of phase(k)]. All CPU inputs are synchronous to clk.
// The structure and sizes follow the document; the single clock with enables (in place of the
// document's clock multiplexer), the phase clear on entering load mode and the two-sample latency
// are this design's choices.
module dds_top #(
  parameter int unsigned PHASE_W  = dds_pkg::PHASE_W,
  parameter int unsigned ADDR_W   = dds_pkg::ADDR_W,
  parameter int unsigned SAMPLE_W = dds_pkg::SAMPLE_W
) (
  input  logic                clk,           // REF_CLK
  input  logic                rst_n,         // asynchronous reset, active low
  input  logic                fs_en,         // sample clock enable
  input  logic                load_run,      // LOAD/#RUN: 1 = load the table, 0 = generate
  // CPU side
  input  logic                cpu_tw_we,     // write the tuning word
  input  logic [PHASE_W-1:0]  cpu_tw,        // tuning word M
  input  logic                cpu_sample_we, // write one sample (load mode)
  input  logic [SAMPLE_W-1:0] cpu_sample,    // sample value
  // Converter side
  output logic [SAMPLE_W-1:0] dac_code,      // code held by the D/A converter
  output logic [31:0]         dac_vout_uv,   // converter output level, microvolts (model)
  // Observation
  output logic [PHASE_W-1:0]  phase,         // current phase
  output logic [ADDR_W-1:0]   lut_addr,      // current table address
  output logic                lut_oe,        // table output enabled (run mode)
  output logic                phase_step,    // the phase advances on this clock edge
  output logic                period_wrap    // the phase wrapped: one output period completed
);

  logic [PHASE_W-1:0]  m;
  logic [SAMPLE_W-1:0] lut_rdata;

  delta_phase_reg #(.PHASE_W(PHASE_W)) u_delta (
    .clk   (clk),
    .rst_n (rst_n),
    .tw_we (cpu_tw_we),
    .tw    (cpu_tw),
    .m     (m)
  );

  phase_accumulator #(.PHASE_W(PHASE_W), .ADDR_W(ADDR_W)) u_acc (
    .clk      (clk),
    .rst_n    (rst_n),
    .load_run (load_run),
    .cpu_wr   (cpu_sample_we),
    .fs_en    (fs_en),
    .m        (m),
    .phase    (phase),
    .addr     (lut_addr),
    .step     (phase_step),
    .wrap     (period_wrap)
  );

  lut_memory #(.ADDR_W(ADDR_W), .SAMPLE_W(SAMPLE_W)) u_lut (
    .clk      (clk),
    .rst_n    (rst_n),
    .load_run (load_run),
    .we       (cpu_sample_we),
    .addr     (lut_addr),
    .wdata    (cpu_sample),
    .rd_en    (fs_en),
    .rdata    (lut_rdata),
    .oe       (lut_oe)
  );

  dac_model #(.SAMPLE_W(SAMPLE_W)) u_dac (
    .clk     (clk),
    .rst_n   (rst_n),
    .fs_en   (fs_en & ~load_run),
    .code    (lut_rdata),
    .code_q  (dac_code),
    .vout_uv (dac_vout_uv)
  );

endmodule
