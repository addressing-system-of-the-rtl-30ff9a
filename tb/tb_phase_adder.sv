// tb_phase_adder: self-checking test of the phase adder at its default 32-bit width.
// Drives directed corner cases (zero, wrap at 2**32, all ones) and random operands, and compares
// sum and carry with 64-bit arithmetic done in the testbench.
module tb_phase_adder;
  localparam int unsigned W = 32;

  logic [W-1:0] phase, incr, sum;
  logic         wrap;
  int checks = 0, failures = 0;

  phase_adder #(.PHASE_W(W)) dut (.phase(phase), .incr(incr), .sum(sum), .wrap(wrap));

  task automatic check_one(input logic [W-1:0] a, input logic [W-1:0] b);
    longint unsigned full;
    phase = a; incr = b;
    #1;
    full = longint'(a) + longint'(b);
    checks++;
    if (sum !== full[W-1:0] || wrap !== full[W]) begin
      failures++;
      $display("FAIL %h + %h -> sum %h wrap %b, expected %h %b", a, b, sum, wrap, full[W-1:0], full[W]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(32'h0, 32'h0);
    check_one(32'hFFFF_FFFF, 32'h1);
    check_one(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    check_one(32'h8000_0000, 32'h8000_0000);
    check_one(32'h7FFF_FFFF, 32'h1);
    check_one(32'h0FFF_FFFF, 32'h0FFF_FFF6);
    for (int i = 0; i < 2000; i++) check_one($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
