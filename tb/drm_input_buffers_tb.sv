// drm_input_buffers_tb: self-checking testbench for drm_input_buffers.
//
// Shifts random 32-bit words into all eight buffers at once (with idle
// clocks between strobes), latches, and checks every latched word against
// the word sent, first bit sent in bit 0. The next words are shifted in
// while the latches still hold the previous ones, which is checked too, and
// one latch coincides with the first shift of the next word.
module drm_input_buffers_tb;
  localparam int unsigned N = 8;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] din = '0;
  logic shift = 0, latch = 0;
  logic [N-1:0][31:0] word;
  int checks = 0, failures = 0;

  drm_input_buffers #(.N_IN(N)) dut (.clk, .rst_n, .din, .shift, .latch, .word);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [N-1:0][31:0] sent, prev;
    repeat (3) @(negedge clk);
    rst_n = 1;
    prev = '0;
    for (int r = 0; r < 6; r++) begin
      for (int i = 0; i < N; i++) sent[i] = $urandom;
      for (int b = 0; b < 32; b++) begin
        for (int i = 0; i < N; i++) din[i] = sent[i][b];
        shift = 1;
        if (b == 0 && r > 0) latch = (r % 2 == 0);   // latch together with the first shift
        @(negedge clk);
        shift = 0; latch = 0;
        if (b == 16) check(word == prev, $sformatf("latches hold previous words (round %0d)", r));
        repeat (r % 3) @(negedge clk);
      end
      latch = 1;
      @(negedge clk);
      latch = 0;
      for (int i = 0; i < N; i++)
        check(word[i] == sent[i], $sformatf("round %0d input %0d: %h vs %h", r, i, word[i], sent[i]));
      prev = sent;
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
