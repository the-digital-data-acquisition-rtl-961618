// d779_tb: self-checking testbench for d779.
//
// Fires a random set of discriminator pulses, checks the Digor on the same
// cycle, loads, then shifts the whole chain out while feeding a random bit
// stream into the far end: the first 4 bits out must be the hit pattern
// in channel order, the next ones the far-end stream. A second round checks
// that hits older than the one-shot width are not loaded, and a round with
// only the last channel hit checks the Digor of the far end.
module d779_tb;
  localparam int unsigned N  = 4;
  localparam int unsigned OS = 6;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] disc = '0;
  logic load = 0, shift = 0, ser_in = 0, ser_out, digor;
  int checks = 0, failures = 0;

  d779 #(.ONESHOT_CYCLES(OS)) dut (.clk, .rst_n, .disc, .load, .shift, .ser_in(ser_in), .ser_out, .digor);

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  task automatic round(input int age, input bit last_only = 0);   // age: cycles between hits and load
    logic [N-1:0] hits;
    logic [2*N-1:0] tail;
    hits = '0;
    for (int i = 0; i < N; i++) hits[i] = ($urandom_range(0, 3) == 0);
    if (hits == '0 || last_only) hits = {1'b1, {(N-1){1'b0}}};
    for (int i = 0; i < 2*N; i++) tail[i] = $urandom_range(0, 1) == 1;
    @(negedge clk); disc = hits;
    #1 check(digor, |hits, "digor with hits");
    @(negedge clk); disc = '0;
    #1 check(digor, 1'b0, "digor idle");
    repeat (age) @(negedge clk);
    load = 1; @(negedge clk); load = 0;
    for (int i = 0; i < 2*N; i++) begin
      logic exp;
      exp = (i < N) ? ((age <= OS - 1) ? hits[i] : 1'b0) : tail[i-N];
      check(ser_out, exp, $sformatf("bit %0d age %0d", i, age));
      ser_in = tail[i]; shift = 1;
      @(negedge clk); shift = 0;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    round(2, 1);        // only the channel farthest down the chain
    for (int r = 0; r < 4; r++) round(2);
    round(OS - 1);      // last cycle still inside the one-shot
    round(OS + 3);      // one-shot expired
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
