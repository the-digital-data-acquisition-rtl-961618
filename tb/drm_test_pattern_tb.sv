// drm_test_pattern_tb: self-checking testbench for drm_test_pattern.
//
// Writes random patterns, enables and disables injection, and checks
// pat_bit for every bit index against the pattern written, and zero while
// disabled; the register read-back outputs are checked too.
module drm_test_pattern_tb;
  logic clk = 0, rst_n = 0;
  logic pat_we = 0, en_we = 0;
  logic [31:0] wdata = '0, pattern;
  logic [4:0] bit_idx = '0;
  logic enable, pat_bit;
  int checks = 0, failures = 0;

  drm_test_pattern dut (.clk, .rst_n, .pat_we, .en_we, .wdata, .bit_idx, .pattern, .enable, .pat_bit);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input bit which, input logic [31:0] v);
    @(negedge clk); wdata = v; pat_we = !which; en_we = which;
    @(negedge clk); pat_we = 0; en_we = 0; wdata = $urandom;
  endtask

  initial begin
    logic [31:0] p;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!enable && pattern == 0, "reset values");
    for (int r = 0; r < 8; r++) begin
      p = $urandom;
      wr(0, p);
      wr(1, 32'(r % 2));
      check(pattern == p && enable == r[0], "register read-back");
      for (int i = 0; i < 32; i++) begin
        bit_idx = 5'(i);
        #1 check(pat_bit == (r[0] ? p[i] : 1'b0), $sformatf("round %0d bit %0d", r, i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
