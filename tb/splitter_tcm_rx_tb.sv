// splitter_tcm_rx_tb: self-checking testbench for splitter_tcm_rx.
//
// Sends 24-bit command words on the selected TCM line set while the other
// set carries different traffic, and checks that exactly the selected set's
// words come out, one clock after the frame ends, with a one-cycle
// cmd_valid. Also checks that a frame of the wrong length is dropped, that
// switching link_sel moves reception to the other set, and that the reply
// bit is driven on both sets.
module splitter_tcm_rx_tb;
  import wic_pkg::*;
  logic clk = 0, rst_n = 0;
  tcm_lines_t a = '0, b = '0;
  logic link_sel = 0, reply_bit = 0;
  logic reply_a, reply_b, bit_strobe, cmd_valid;
  logic [CMD_BITS-1:0] cmd;
  int checks = 0, failures = 0, nvalid = 0;

  splitter_tcm_rx dut (.clk, .rst_n, .tcm_a(a), .tcm_b(b), .link_sel, .reply_bit,
                       .reply_a, .reply_b, .bit_strobe, .cmd_valid, .cmd);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && cmd_valid) nvalid++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Send a word on set A (which=0) or B (which=1), the other set carries
  // the bit-inverted word at the same time.
  task automatic send(input bit which, input logic [31:0] w, input int nbits, input int gap);
    @(negedge clk);
    a.frame = 1; b.frame = 1;
    for (int i = nbits - 1; i >= 0; i--) begin
      a.data = which ? ~w[i] : w[i];
      b.data = which ? w[i] : ~w[i];
      a.strobe = 1; b.strobe = 1;
      #1 check(bit_strobe == 1'b1, "bit_strobe follows selected strobe");
      @(negedge clk);
      a.strobe = 0; b.strobe = 0;
      repeat (gap) @(negedge clk);
    end
    a.frame = 0; b.frame = 0;
  endtask

  initial begin
    logic [23:0] w;
    int n0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 6; k++) begin
      w = 24'($urandom);
      link_sel = k[0];
      n0 = nvalid;
      send(k[0], {8'd0, w}, 24, k % 3);
      @(posedge clk); #1;
      check(cmd_valid && cmd == w, $sformatf("word %0d received (%h vs %h)", k, cmd, w));
      @(posedge clk); #1;
      check(!cmd_valid, "cmd_valid lasts one cycle");
      check(nvalid == n0 + 1, "exactly one cmd_valid per frame");
    end
    // Too short and too long frames are dropped.
    n0 = nvalid;
    send(0, 32'h00ABCDEF, 23, 0);
    repeat (3) @(posedge clk);
    send(0, 32'h00ABCDEF, 25, 1);
    repeat (3) @(posedge clk);
    check(nvalid == n0, "wrong-length frames dropped");
    // Reply goes out on both sets.
    reply_bit = 1; #1 check(reply_a && reply_b, "reply on both sets (1)");
    reply_bit = 0; #1 check(!reply_a && !reply_b, "reply on both sets (0)");
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
