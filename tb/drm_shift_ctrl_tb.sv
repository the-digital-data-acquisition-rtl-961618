// drm_shift_ctrl_tb: self-checking testbench for drm_shift_ctrl.
//
// Starts several 32-bit cycles, some with the start held over several
// clocks and some with the processor answering late, and checks: exactly 32
// strobes per cycle, strobe k (1..32) on the clock SR_DIV*k after start,
// bit_idx counting 0..31 on the strobes, busy during the cycle, flag rising
// after the last strobe and held until the next start, and a start during a
// cycle being ignored. The shift rate is checked against 4 Mbit/s at the
// 16 MHz system clock (SR_DIV = 4), and again with SR_DIV = 3.
module drm_shift_ctrl_tb;
  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic shift4, busy4, flag4, shift3, busy3, flag3;
  logic [4:0] idx4, idx3;
  int checks = 0, failures = 0;

  drm_shift_ctrl #(.SR_DIV(4)) dut4 (.clk, .rst_n, .start, .shift(shift4), .bit_idx(idx4), .busy(busy4), .flag(flag4));
  drm_shift_ctrl #(.SR_DIV(3)) dut3 (.clk, .rst_n, .start, .shift(shift3), .bit_idx(idx3), .busy(busy3), .flag(flag3));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Start both; watch one of them cycle by cycle.
  task automatic run(input int div, input int late);
    int t, nshift, expect_next;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    t = 0; nshift = 0;
    // cycles after the start edge
    for (int c = 1; c <= 32*div + 2; c++) begin
      logic s, b, f; logic [4:0] ix;
      s  = (div == 4) ? shift4 : shift3;
      b  = (div == 4) ? busy4  : busy3;
      f  = (div == 4) ? flag4  : flag3;
      ix = (div == 4) ? idx4   : idx3;
      // strobe k is high in the clock before edge start+div*k
      expect_next = ((c % div) == 0) && (c / div >= 1) && (c / div <= 32);
      check(s == expect_next, $sformatf("div %0d strobe at cycle %0d", div, c));
      if (s) begin
        check(ix == 5'(nshift), $sformatf("bit_idx %0d", nshift));
        nshift++;
      end
      check(b == (c <= 32*div), $sformatf("busy at cycle %0d", c));
      check(f == (c > 32*div),  $sformatf("flag at cycle %0d", c));
      if (c == 5) begin start = 1; end     // ignored: busy
      if (c == 6) begin start = 0; end
      @(negedge clk);
    end
    check(nshift == 32, "32 strobes per cycle");
    repeat (late) begin
      check(((div == 4) ? flag4 : flag3) == 1'b1, "flag held until the next start");
      check(((div == 4) ? shift4 : shift3) == 1'b0, "no strobe while waiting");
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!flag4 && !busy4, "idle after reset");
    // waits until both are idle before each new start
    run(4, 0);  run(4, 7);
    run(3, 40); run(3, 0);
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
