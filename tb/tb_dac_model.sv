// tb_dac_model: self-checking test of the converter model (12 bits, 2.5 V reference).
// Checks that the code is taken only on fs_en clocks and held otherwise (zero-order hold), and
// that the output level is code * 2.5 V / 4096, rounded down to a microvolt.
module tb_dac_model;
  localparam int unsigned D = 12;

  logic          clk = 1'b0, rst_n = 1'b0, fs_en = 1'b0;
  logic [D-1:0]  code = '0, code_q, held;
  logic [31:0]   vout_uv;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dac_model #(.SAMPLE_W(D), .VREF_UV(2_500_000)) dut (
    .clk(clk), .rst_n(rst_n), .fs_en(fs_en), .code(code), .code_q(code_q), .vout_uv(vout_uv));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    held = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      fs_en = 1'($urandom);
      code  = (i == 10) ? 12'hFFF : (i == 11) ? 12'h800 : D'($urandom);
      @(posedge clk);
      if (fs_en) held = code;
      #1;
      checks++;
      if (code_q !== held || vout_uv !== 32'((longint'(held) * 64'd2_500_000) / 64'd4096)) begin
        failures++;
        $display("FAIL code_q %h held %h vout %0d", code_q, held, vout_uv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
