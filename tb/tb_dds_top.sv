// tb_dds_top: end-to-end test of the DDS generator with every parameter at its default
// (32-bit phase, 4096 x 12-bit table, 12-bit converter).
//
// The testbench keeps its own model of the generator: a table array, a 64-bit reference phase
// advanced by M per sample, the table read register and the converter's hold register. Every clock
// it compares the design's phase, table address, converter code and output level with the model.
// The sequence:
//   1. load mode: write all 4096 samples (computed from a formula), output must stay disabled;
//   2. run at M = 268435254 (about 1 MHz at 16 MHz, 16 samples per period) with fs_en always on:
//      check the number of samples between period wraps (16 or 17) and the number of periods;
//   3. run with fs_en gaps, write attempts to the table (must be ignored) and tuning-word changes
//      in flight (a frequency sweep, phase-continuous);
//   4. reload part of the table with a second waveform: the phase must restart at 0;
//   5. run at M = 1, the finest step: the table address must move from 0 to 1 after exactly
//      2**20 samples.
// Each mechanism is counted and a mechanism that never happened counts as a failure.
module tb_dds_top;
  import dds_pkg::*;

  localparam int unsigned W = PHASE_W;
  localparam int unsigned A = ADDR_W;
  localparam int unsigned D = SAMPLE_W;
  localparam int unsigned DEPTH = 2 ** A;
  localparam int unsigned VREF_UV = 2_500_000;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         fs_en = 1'b0, load_run = 1'b1;
  logic         cpu_tw_we = 1'b0, cpu_sample_we = 1'b0;
  logic [W-1:0] cpu_tw = '0;
  logic [D-1:0] cpu_sample = '0;
  logic [D-1:0] dac_code;
  logic [31:0]  dac_vout_uv;
  logic [W-1:0] phase;
  logic [A-1:0] lut_addr;
  logic         lut_oe, phase_step, period_wrap;

  // Reference model state.
  logic [D-1:0]    tbl [DEPTH];
  longint unsigned ref_phase;
  longint unsigned ref_m;
  logic [D-1:0]    ref_rd;
  logic [D-1:0]    ref_dac;
  logic            ref_lr_q;

  int checks = 0, failures = 0;
  // Mechanism counters.
  int n_load_writes = 0, n_samples = 0, n_wraps = 0, n_sweeps = 0, n_blocked_writes = 0;
  int n_fs_gaps = 0, n_reloads = 0, n_fine_steps = 0;

  always #5 clk = ~clk;

  dds_top dut (
    .clk(clk), .rst_n(rst_n), .fs_en(fs_en), .load_run(load_run),
    .cpu_tw_we(cpu_tw_we), .cpu_tw(cpu_tw), .cpu_sample_we(cpu_sample_we), .cpu_sample(cpu_sample),
    .dac_code(dac_code), .dac_vout_uv(dac_vout_uv), .phase(phase), .lut_addr(lut_addr),
    .lut_oe(lut_oe), .phase_step(phase_step), .period_wrap(period_wrap));

  initial begin
    repeat (1_300_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [D-1:0] wave(input int i, input int pass);
    return D'((i * i * 3 + i * 5 + pass * 1234) ^ (i >>> 2));
  endfunction

  // One clock of the generator: drive at the falling edge, advance the model with the rising
  // edge, compare just after it. Returns whether the phase wrapped in this clock.
  task automatic cycle(input logic lr, input logic fs, input logic swe, input logic [D-1:0] sdat,
                       input logic twe, input logic [W-1:0] tw, output logic wrapped);
    logic            entry;
    logic            pre_wrap;
    logic [A-1:0]    a;
    longint unsigned next;
    @(negedge clk);
    load_run = lr; fs_en = fs; cpu_sample_we = swe; cpu_sample = sdat;
    cpu_tw_we = twe; cpu_tw = tw;
    #1;
    entry   = lr && !ref_lr_q;
    a       = A'(ref_phase >> (W - A));
    wrapped = 1'b0;
    checks++;
    if (lut_oe !== !lr) begin failures++; $display("FAIL lut_oe %b in mode %b", lut_oe, lr); end
    pre_wrap = period_wrap;
    @(posedge clk);
    // Model update, in the order the hardware's registers take their inputs.
    if (lr) begin
      if (swe) begin tbl[a] = sdat; n_load_writes++; end
    end else begin
      if (swe) n_blocked_writes++;
      if (fs) begin
        ref_dac = ref_rd;
        ref_rd  = tbl[a];
        n_samples++;
      end
    end
    if (entry) ref_phase = 0;
    else if (lr && swe) ref_phase = (ref_phase + (64'd1 << (W - A))) & 64'hFFFF_FFFF;
    else if (!lr && fs) begin
      next = ref_phase + ref_m;
      if (next >= 64'h1_0000_0000) begin wrapped = 1'b1; n_wraps++; end
      ref_phase = next & 64'hFFFF_FFFF;
    end
    if (twe) begin
      if (!lr && ref_m != longint'(tw)) n_sweeps++;
      ref_m = longint'(tw);
    end
    ref_lr_q = lr;
    checks++;
    if (pre_wrap !== wrapped) begin failures++; $display("FAIL wrap flag %b/%b", pre_wrap, wrapped); end
    #1;
    checks++;
    if (phase !== W'(ref_phase) || lut_addr !== A'(ref_phase >> (W - A)) ||
        dac_code !== ref_dac ||
        dac_vout_uv !== 32'((longint'(ref_dac) * longint'(VREF_UV)) >> D)) begin
      failures++;
      if (failures < 10)
        $display("FAIL t=%0t phase %h/%h addr %h code %h/%h vout %0d", $time, phase,
                 W'(ref_phase), lut_addr, dac_code, ref_dac, dac_vout_uv);
    end
  endtask

  logic w;
  int   since_wrap, wraps_in_run, samples_in_run;
  longint unsigned p0;

  initial begin
    ref_phase = 0; ref_m = 0; ref_rd = '0; ref_dac = '0; ref_lr_q = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. Load the whole table, the tuning word written in the middle of it.
    cycle(1'b1, 1'b1, 1'b0, '0, 1'b0, '0, w);
    for (int i = 0; i < DEPTH; i++) begin
      cycle(1'b1, 1'b1, 1'b1, wave(i, 0), (i == 100), 32'd268435254, w);
      checks++;
      if (dac_code !== '0) begin failures++; $display("FAIL converter moved while loading"); end
    end

    // 2. Run at about 1 MHz: 16 samples per period.
    since_wrap = 0; wraps_in_run = 0; p0 = ref_phase;
    for (int i = 0; i < 4000; i++) begin
      cycle(1'b0, 1'b1, 1'b0, '0, 1'b0, '0, w);
      since_wrap++;
      if (w) begin
        wraps_in_run++;
        if (wraps_in_run > 1) begin
          checks++;
          if (since_wrap != 16 && since_wrap != 17) begin
            failures++;
            $display("FAIL %0d samples in a period at M=268435254", since_wrap);
          end
        end
        since_wrap = 0;
      end
    end
    checks++;
    // 4000 samples at M = 268435254 from phase p0: floor((p0 + 4000 M) / 2**32) periods.
    if (wraps_in_run != int'((p0 + 64'd4000 * 64'd268435254) >> 32)) begin
      failures++;
      $display("FAIL %0d periods in 4000 samples", wraps_in_run);
    end
    $display("1 MHz run: %0d periods in 4000 samples, output %0d Hz at a 16 MHz sample clock",
             wraps_in_run, (64'd268435254 * F_S_HZ) >> 32);

    // 3. Sweep: fs_en gaps, blocked table writes, tuning word changes in flight.
    for (int i = 0; i < 20000; i++) begin
      logic fs;
      fs = ($urandom_range(0, 4) != 0);
      if (!fs) n_fs_gaps++;
      cycle(1'b0, fs, ($urandom_range(0, 9) == 0), D'($urandom),
            (i % 1000 == 999), 32'd10_000_000 + 32'(i) * 32'd20_000, w);
    end

    // 4. Reload the first 256 locations with another waveform; M = 1 for the next run.
    //    The CPU leaves one clock after raising LOAD/#RUN before its first write.
    n_reloads++;
    cycle(1'b1, 1'b0, 1'b0, '0, 1'b0, '0, w);
    for (int i = 0; i < 256; i++)
      cycle(1'b1, 1'($urandom), 1'b1, wave(i, 1), (i == 0), 32'd1, w);
    checks++;
    if (phase !== 32'd256 << 20) begin failures++; $display("FAIL reload did not start at 0"); end

    // 5. M = 1: after re-entering load mode the phase is 0 again; the address steps to 1 after
    //    exactly 2**20 samples.
    cycle(1'b0, 1'b0, 1'b0, '0, 1'b0, '0, w);  // leave load mode
    cycle(1'b1, 1'b0, 1'b0, '0, 1'b0, '0, w);  // re-enter: phase cleared
    n_reloads++;
    for (int i = 0; i < (1 << 20) + 8; i++) begin
      logic [A-1:0] addr_before;
      addr_before = lut_addr;
      cycle(1'b0, 1'b1, 1'b0, '0, 1'b0, '0, w);
      if (lut_addr != addr_before) begin
        n_fine_steps++;
        checks++;
        if (i != (1 << 20) - 1) begin failures++; $display("FAIL address stepped after %0d", i + 1); end
      end
    end

    $display("mechanisms: load writes %0d, samples %0d, period wraps %0d, sweeps %0d, blocked writes %0d, fs gaps %0d, reloads %0d, M=1 address steps %0d",
             n_load_writes, n_samples, n_wraps, n_sweeps, n_blocked_writes, n_fs_gaps, n_reloads,
             n_fine_steps);
    if (n_load_writes == 0) begin failures++; $display("FAIL no load writes"); end
    if (n_samples == 0) begin failures++; $display("FAIL no samples"); end
    if (n_wraps == 0) begin failures++; $display("FAIL no period wraps"); end
    if (n_sweeps == 0) begin failures++; $display("FAIL no tuning word change in run mode"); end
    if (n_blocked_writes == 0) begin failures++; $display("FAIL no blocked writes"); end
    if (n_fs_gaps == 0) begin failures++; $display("FAIL no fs gaps"); end
    if (n_reloads == 0) begin failures++; $display("FAIL no reloads"); end
    if (n_fine_steps != 1) begin failures++; $display("FAIL M=1 address steps %0d", n_fine_steps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
