// clu_pretrigger_tb: self-checking testbench for clu_pretrigger.
//
// Applies random private-bus words (and all-zero / all-one) and checks every
// pre-trigger field against a reference built here: octant k from coffins 2k
// and 2k+1, the endcap middle sections merged, one 45-degree sum per side,
// the top and bottom barrel sums over octants 1-3 and 5-7.
module clu_pretrigger_tb;
  import wic_pkg::*;
  logic [31:0] bus;
  pretrig_t pt, e;
  int checks = 0, failures = 0;

  clu_pretrigger dut (.bus, .pt);

  task automatic apply(logic [31:0] b);
    bus = b;
    #1;
    for (int k = 0; k < 8; k++) begin
      e.coffin_in[k]  = b[2*k];
      e.coffin_out[k] = b[2*k+1];
      e.octant[k]     = b[2*k] || b[2*k+1];
    end
    e.ec_n = {b[21], b[20], b[19] || b[18], b[17], b[16]};
    e.ec_s = {b[27], b[26], b[25] || b[24], b[23], b[22]};
    e.d45  = {b[30] || b[31], b[28] || b[29]};
    e.btop = e.octant[1] || e.octant[2] || e.octant[3];
    e.bbot = e.octant[5] || e.octant[6] || e.octant[7];
    checks++;
    if (pt !== e) begin
      failures++;
      $display("FAIL bus %h: pt %h expected %h", b, pt, e);
    end
  endtask

  initial begin
    apply('0);
    apply('1);
    for (int i = 0; i < 32; i++) apply(32'(1) << i);
    for (int r = 0; r < 1000; r++) apply($urandom & $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
