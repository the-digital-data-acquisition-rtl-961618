// clu_lut_ram_tb: self-checking testbench for clu_lut_ram.
//
// Downloads a whole 4Kx4 table of random data one word per clock, then
// reads it back through the lookup port in scrambled order, checking that
// the lookup is combinational (data valid in the cycle the address is
// applied), and that a later partial download changes only its words.
module clu_lut_ram_tb;
  logic clk = 0;
  logic [11:0] addr = '0, waddr = '0;
  logic [3:0] rdata, wdata = '0;
  logic we = 0;
  logic [3:0] model [4096];
  int checks = 0, failures = 0;

  clu_lut_ram dut (.clk, .addr, .rdata, .we, .waddr, .wdata);

  always #5 clk = ~clk;

  task automatic check_all();
    for (int i = 0; i < 4096; i++) begin
      addr = 12'(i * 1117 + 5);   // odd stride visits every address
      #1;
      checks++;
      if (rdata !== model[addr]) begin
        failures++;
        $display("FAIL addr %h: %h vs %h", addr, rdata, model[addr]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk);
      we = 1; waddr = 12'(i); wdata = 4'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    check_all();
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      we = 1; waddr = 12'($urandom); wdata = 4'($urandom); model[waddr] = wdata;
    end
    @(negedge clk); we = 0;
    check_all();
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
