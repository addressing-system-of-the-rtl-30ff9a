// lut_memory: the fast memory holding the look-up table (LUT) of waveform samples.
//
// 2**ADDR_W words of SAMPLE_W bits (4096 x 12 by default) hold one period of the waveform.
//  - Load mode (load_run = 1): a CPU write (we) stores wdata at addr. Reads are off and the output
//    is disabled (oe = 0, rdata = 0).
//  - Run mode (load_run = 0): writes are ignored, the output is enabled (oe = 1) and on each clock
//    with rd_en high the word at addr is read into the output register.
//
// Timing: synchronous write; synchronous read with one clock of latency, so rdata after an rd_en
// edge holds the word addressed before that edge. The document gives the table's role, the
// load-only writes and run-only output enable, and the 12-bit address from the phase register; the
// 12-bit word follows from the 12-bit D/A converter. The synchronous read port (standing in for an
// asynchronous fast SRAM), the zero output while disabled (standing in for tri-stated outputs) and
// the output register reset are this design's choices. The array itself is not reset.
module lut_memory #(
  parameter int unsigned ADDR_W   = dds_pkg::ADDR_W,
  parameter int unsigned SAMPLE_W = dds_pkg::SAMPLE_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load_run,  // LOAD/#RUN: 1 = writes allowed, 0 = output enabled
  input  logic                we,        // CPU write strobe
  input  logic [ADDR_W-1:0]   addr,      // from the phase register
  input  logic [SAMPLE_W-1:0] wdata,     // sample value from the CPU bus
  input  logic                rd_en,     // sample clock enable
  output logic [SAMPLE_W-1:0] rdata,     // sample to the D/A converter
  output logic                oe         // output enabled (run mode)
);

  localparam int unsigned DEPTH = 2 ** ADDR_W;

  logic [SAMPLE_W-1:0] mem [DEPTH];
  logic [SAMPLE_W-1:0] rdata_q;

  always_ff @(posedge clk) begin
    if (we && load_run == dds_pkg::MODE_LOAD) mem[addr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                       rdata_q <= '0;
    else if (rd_en && load_run == dds_pkg::MODE_RUN) rdata_q <= mem[addr];
  end

  assign oe    = (load_run == dds_pkg::MODE_RUN);
  assign rdata = oe ? rdata_q : '0;

endmodule
