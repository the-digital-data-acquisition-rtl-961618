// wicdrm_tb: self-checking testbench for wicdrm.
//
// Eight behavioural daisy chains of 64 bits, filled with random data, sit
// on the module's inputs; they shift on sr_shift and take sr_pattern at
// their far end. The testbench plays the processor: it writes a test
// pattern, enables it, starts a cycle, waits for the flag, then latches and
// restarts in one write and reads the eight words. Checks: each word equals
// the chain contents in order (first bit in bit 0), each 32-bit cycle takes
// 32*SR_DIV clocks (4 Mbit/s at 16 MHz), no shifting happens while the
// processor is late, and once the whole chain has been read the next words
// are all the test pattern (the chain-integrity test). Register read-back
// is checked as well.
module wicdrm_tb;
  localparam int unsigned N = 8;
  localparam int unsigned L = 64;
  localparam int unsigned DIV = 4;
  logic clk = 0, rst_n = 0;
  logic [3:0] cpu_addr = '0;
  logic cpu_wr = 0;
  logic [31:0] cpu_wdata = '0, cpu_rdata;
  logic flag, sr_shift, sr_pattern;
  logic [N-1:0][L-1:0] chain;
  logic [N-1:0] din;
  int checks = 0, failures = 0, nshift = 0, cyc = 0, t_start = 0;

  wicdrm #(.N_IN(N), .SR_DIV(DIV)) dut (.clk, .rst_n, .cpu_addr, .cpu_wr, .cpu_wdata,
    .cpu_rdata, .flag, .din, .sr_shift, .sr_pattern);

  always #5 clk = ~clk;

  for (genvar i = 0; i < N; i++) begin : g_ch
    assign din[i] = chain[i][0];
    always @(posedge clk) if (sr_shift) chain[i] <= {sr_pattern, chain[i][L-1:1]};
  end
  always @(posedge clk) if (rst_n && sr_shift) nshift++;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); cpu_addr = a; cpu_wdata = d; cpu_wr = 1;
    if (a == 4'd0) t_start = cyc;
    @(negedge clk); cpu_wr = 0;
  endtask

  task automatic rd(input logic [3:0] a, output logic [31:0] d);
    @(negedge clk); cpu_addr = a; #1 d = cpu_rdata;
  endtask

  // Wait for the flag; clocks since the start write was sampled.
  task automatic wait_flag(output int clocks);
    logic [31:0] st;
    forever begin
      rd(4'd0, st);
      if (st[1]) break;
    end
    clocks = cyc - t_start - 1;   // the start write is sampled one edge after t_start
  endtask

  initial begin
    logic [N-1:0][L-1:0] init;
    logic [31:0] v, pat;
    int clocks, n0;
    for (int i = 0; i < N; i++) begin
      init[i] = {$urandom, $urandom};
      chain[i] = init[i];
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    pat = $urandom;
    wr(4'd1, pat);
    wr(4'd2, 32'd1);
    rd(4'd1, v); check(v == pat, "pattern read-back");
    rd(4'd2, v); check(v == 32'd1, "pattern enable read-back");
    wr(4'd0, 32'd2);                         // first cycle
    for (int w = 0; w < 4; w++) begin
      wait_flag(clocks);
      check(clocks == 32*DIV, $sformatf("word %0d took %0d clocks", w, clocks));
      rd(4'd0, v); check(v[0] == 1'b0, "not busy with the flag up");
      // a late processor: nothing moves meanwhile
      check(nshift == 32 * (w + 1), $sformatf("32 shifts per word (%0d)", nshift));
      n0 = nshift;
      repeat (w * 20) @(negedge clk);
      check(nshift == n0, "chains wait for the processor");
      wr(4'd0, 32'd3);                       // latch and restart
      rd(4'd0, v); check(v[0] == 1'b1, "busy after restart");
      for (int i = 0; i < N; i++) begin
        rd(4'(8 + i), v);
        if (w < 2) check(v == init[i][w*32 +: 32], $sformatf("word %0d input %0d: %h vs %h", w, i, v, init[i][w*32 +: 32]));
        else       check(v == pat, $sformatf("test pattern word %0d input %0d: %h", w, i, v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
