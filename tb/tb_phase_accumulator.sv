// tb_phase_accumulator: self-checking test of the phase accumulator at the default sizes.
// A reference phase kept in the testbench is advanced by 2**20 per CPU write in load mode and by M
// per fs_en in run mode; phase, addr and the wrap pulse are compared every clock. It also checks
// that entering load mode restarts the phase at 0 and that the wrap count over a run matches
// floor((P0 + n*M) / 2**32).
module tb_phase_accumulator;
  localparam int unsigned W = 32;
  localparam int unsigned A = 12;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         load_run = 1'b0, cpu_wr = 1'b0, fs_en = 1'b0;
  logic [W-1:0] m = '0, phase;
  logic [A-1:0] addr;
  logic         step, wrap;

  longint unsigned ref_phase;
  int checks = 0, failures = 0, wraps_seen = 0, wraps_expected = 0;

  always #5 clk = ~clk;

  phase_accumulator #(.PHASE_W(W), .ADDR_W(A)) dut (
    .clk(clk), .rst_n(rst_n), .load_run(load_run), .cpu_wr(cpu_wr), .fs_en(fs_en), .m(m),
    .phase(phase), .addr(addr), .step(step), .wrap(wrap));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One clock: apply the inputs, update the reference, compare.
  task automatic cycle(input logic lr, input logic wr, input logic fs, input logic entry);
    logic exp_wrap;
    @(negedge clk);
    load_run = lr; cpu_wr = wr; fs_en = fs;
    #1;
    exp_wrap = 1'b0;
    if (!entry && !lr && fs && (ref_phase + longint'(m)) >= 64'h1_0000_0000) exp_wrap = 1'b1;
    checks++;
    if (wrap !== exp_wrap || step !== (lr ? wr : fs)) begin
      failures++;
      $display("FAIL wrap %b/%b step %b", wrap, exp_wrap, step);
    end
    if (wrap) wraps_seen++;
    @(posedge clk);
    if (entry)   ref_phase = 0;
    else if (lr) begin if (wr) ref_phase = (ref_phase + 64'h10_0000) & 64'hFFFF_FFFF; end
    else if (fs) ref_phase = (ref_phase + longint'(m)) & 64'hFFFF_FFFF;
    #1;
    checks++;
    if (phase !== ref_phase[31:0] || addr !== ref_phase[31:20]) begin
      failures++;
      $display("FAIL phase %h addr %h expected %h", phase, addr, ref_phase[31:0]);
    end
  endtask

  initial begin
    ref_phase = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Run a little from reset with some M, so the phase is not 0 before loading.
    m = 32'h1234_5678;
    for (int i = 0; i < 50; i++) cycle(1'b0, 1'b0, 1'b1, 1'b0);
    // Enter load mode: the first load-mode clock clears the phase.
    cycle(1'b1, 1'b0, 1'b0, 1'b1);
    // 4096 + 10 CPU writes with gaps: addresses count 0, 1, 2, ... and wrap past 4095.
    for (int i = 0; i < 4106; i++) begin
      cycle(1'b1, 1'b1, 1'b0, 1'b0);
      if (i % 7 == 0) cycle(1'b1, 1'b0, 1'b1, 1'b0);   // fs_en alone must not advance in load mode
    end
    // Run mode with several tuning words, fs_en at random; count wraps.
    for (int k = 0; k < 4; k++) begin
      longint unsigned p0;
      int n;
      m = (k == 0) ? 32'd268435456 : (k == 1) ? 32'd268435254 : $urandom;
      p0 = ref_phase; n = 0; wraps_seen = 0;
      for (int i = 0; i < 2000; i++) begin
        logic fs;
        fs = ($urandom_range(0, 3) != 0);
        cycle(1'b0, 1'($urandom), fs, 1'b0);
        if (fs) n++;
      end
      wraps_expected = int'((p0 + longint'(n) * longint'(m)) >> 32);
      checks++;
      if (wraps_seen != wraps_expected) begin
        failures++;
        $display("FAIL wraps %0d expected %0d for M=%0d", wraps_seen, wraps_expected, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
