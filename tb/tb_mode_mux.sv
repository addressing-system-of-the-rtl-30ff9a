// tb_mode_mux: self-checking test of the LOAD/#RUN multiplexer at the default sizes.
// In load mode the advance must follow the CPU write strobe with an increment of one table location
// (2**20 for a 32-bit phase and 12-bit address); in run mode it must follow fs_en with increment M.
module tb_mode_mux;
  localparam int unsigned W = 32;
  localparam int unsigned A = 12;

  logic         load_run, cpu_wr, fs_en, step;
  logic [W-1:0] m, incr;
  int checks = 0, failures = 0;

  mode_mux #(.PHASE_W(W), .ADDR_W(A)) dut (
    .load_run(load_run), .cpu_wr(cpu_wr), .fs_en(fs_en), .m(m), .step(step), .incr(incr));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      load_run = 1'($urandom);
      cpu_wr   = 1'($urandom);
      fs_en    = 1'($urandom);
      m        = $urandom;
      #1;
      checks++;
      if (load_run) begin
        if (step !== cpu_wr || incr !== 32'h0010_0000) begin
          failures++;
          $display("FAIL load: step %b incr %h", step, incr);
        end
      end else begin
        if (step !== fs_en || incr !== m) begin
          failures++;
          $display("FAIL run: step %b incr %h m %h", step, incr, m);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
