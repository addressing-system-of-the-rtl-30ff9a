// tb_lut_memory: self-checking test of the look-up table at its default size (4096 x 12).
// Fills every location in load mode with pseudo-random samples, checks that the output is disabled
// and zero while loading, then in run mode reads all locations in random order and checks the data
// with its one-clock latency, that writes attempted in run mode change nothing and that reads wait
// for rd_en.
module tb_lut_memory;
  localparam int unsigned A = 12;
  localparam int unsigned D = 12;
  localparam int unsigned DEPTH = 2 ** A;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         load_run = 1'b1, we = 1'b0, rd_en = 1'b0, oe;
  logic [A-1:0] addr = '0;
  logic [D-1:0] wdata = '0, rdata;
  logic [D-1:0] model [DEPTH];
  logic [D-1:0] expected;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lut_memory #(.ADDR_W(A), .SAMPLE_W(D)) dut (
    .clk(clk), .rst_n(rst_n), .load_run(load_run), .we(we), .addr(addr), .wdata(wdata),
    .rd_en(rd_en), .rdata(rdata), .oe(oe));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Load every location.
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      load_run = 1'b1; we = 1'b1; rd_en = 1'($urandom);
      addr = A'(i); wdata = D'($urandom); model[i] = wdata;
      @(posedge clk);
      #1;
      checks++;
      if (oe !== 1'b0 || rdata !== '0) begin
        failures++;
        $display("FAIL output enabled while loading: oe %b rdata %h", oe, rdata);
      end
    end
    // Run mode: random reads, with write attempts that must be ignored.
    expected = '0;
    for (int i = 0; i < 3 * DEPTH; i++) begin
      @(negedge clk);
      load_run = 1'b0;
      rd_en = ($urandom_range(0, 3) != 0);
      we    = 1'($urandom);
      addr  = A'($urandom);
      wdata = D'($urandom);
      @(posedge clk);
      if (rd_en) expected = model[addr];
      #1;
      checks++;
      if (oe !== 1'b1 || rdata !== expected) begin
        failures++;
        $display("FAIL read: oe %b rdata %h expected %h", oe, rdata, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
