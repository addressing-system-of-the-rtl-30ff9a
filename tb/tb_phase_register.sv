// tb_phase_register: self-checking test of the phase register at the default sizes (32-bit phase,
// 12-bit address). Checks reset to 0, load on step, hold without step, clear winning over step,
// and that addr is always the 12 most significant phase bits.
module tb_phase_register;
  localparam int unsigned W = 32;
  localparam int unsigned A = 12;

  logic         clk = 1'b0, rst_n = 1'b0, clr = 1'b0, step = 1'b0;
  logic [W-1:0] d = '0, q, expected;
  logic [A-1:0] addr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  phase_register #(.PHASE_W(W), .ADDR_W(A)) dut (
    .clk(clk), .rst_n(rst_n), .clr(clr), .step(step), .d(d), .q(q), .addr(addr));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expected = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      step = ($urandom_range(0, 1) == 1);
      clr  = ($urandom_range(0, 9) == 0);
      d    = $urandom;
      @(posedge clk);
      if (clr)       expected = '0;
      else if (step) expected = d;
      #1;
      checks++;
      if (q !== expected || addr !== expected[31:20]) begin
        failures++;
        $display("FAIL cycle %0d: q %h addr %h expected %h", i, q, addr, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
