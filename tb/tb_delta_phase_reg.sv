// tb_delta_phase_reg: self-checking test of the tuning-word register.
// Checks the reset value, that a word is taken one clock after a write strobe and that it is held
// while the strobe is low, with random words and random strobes.
module tb_delta_phase_reg;
  localparam int unsigned W = 32;

  logic         clk = 1'b0, rst_n = 1'b0, tw_we = 1'b0;
  logic [W-1:0] tw = '0, m;
  logic [W-1:0] expected;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  delta_phase_reg #(.PHASE_W(W)) dut (.clk(clk), .rst_n(rst_n), .tw_we(tw_we), .tw(tw), .m(m));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (m !== '0) begin failures++; $display("FAIL reset value %h", m); end
    rst_n = 1'b1;
    expected = '0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      tw_we = ($urandom_range(0, 2) == 0);
      tw    = $urandom;
      @(posedge clk);
      if (tw_we) expected = tw;
      #1;
      checks++;
      if (m !== expected) begin
        failures++;
        $display("FAIL cycle %0d: m %h expected %h", i, m, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
