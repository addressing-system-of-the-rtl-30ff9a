// dac_model: behavioural model of the 12-bit D/A converter. Not logic of this design: the real
// part is an analog converter outside the FPGA, modelled here so the chain can be simulated.
//
// The converter latches its input code on each sample clock (a clock edge with fs_en high) and
// holds it until the next one: a zero-order hold, which is why the generated signal is a staircase
// approximating the desired one. The analog output is represented by an integer in microvolts,
// vout_uv = code * VREF_UV / 2**SAMPLE_W, for a unipolar converter with reference VREF_UV.
//
// Timing: code_q and vout_uv change one clock after an fs_en edge. The 12-bit resolution and the
// clocking by the sample clock follow the document; the unipolar transfer function, the 2.5 V
// default reference and the reset to code 0 are this model's assumptions.
module dac_model #(
  parameter int unsigned SAMPLE_W = dds_pkg::SAMPLE_W,
  parameter int unsigned VREF_UV  = 2_500_000     // full-scale reference in microvolts
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                fs_en,    // sample clock
  input  logic [SAMPLE_W-1:0] code,     // digital input from the LUT
  output logic [SAMPLE_W-1:0] code_q,   // code held by the converter
  output logic [31:0]         vout_uv   // output level in microvolts
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     code_q <= '0;
    else if (fs_en) code_q <= code;
  end

  always_comb begin
    vout_uv = 32'((64'(code_q) * 64'(VREF_UV)) >> SAMPLE_W);
  end

endmodule
