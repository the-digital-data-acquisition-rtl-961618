// clu_l1_lookup_tb: self-checking testbench for clu_l1_lookup.
//
// Downloads all eight RAMs with a different arithmetic table each (word at
// address a of RAM m is (a*(2m+3) + (a>>5) + m) mod 16), then applies random
// pre-trigger sets and checks all 32 Level 1 bits in the same cycle, with
// the 12-bit address of each RAM assembled here from the named pre-trigger
// fields.
module clu_l1_lookup_tb;
  import wic_pkg::*;
  logic clk = 0;
  pretrig_t pt = '0;
  logic dl_we = 0;
  logic [2:0] dl_ram = '0;
  logic [11:0] dl_addr = '0;
  logic [3:0] dl_data = '0;
  logic [15:0] cosmic_l1, physics_l1;
  int checks = 0, failures = 0;

  clu_l1_lookup dut (.clk, .pt, .dl_we, .dl_ram, .dl_addr, .dl_data, .cosmic_l1, .physics_l1);

  always #5 clk = ~clk;

  function automatic logic [3:0] table_word(int m, int a);
    return 4'((a * (2*m + 3) + (a >> 5) + m) % 16);
  endfunction

  function automatic logic [11:0] group_addr(int r, pretrig_t p);
    logic [11:0] g;
    case (r)
      0: for (int k = 0; k < 8; k++) g[k] = p.coffin_out[k];
      1: for (int k = 0; k < 8; k++) g[k] = p.octant[k];
      3: for (int k = 0; k < 8; k++) g[k] = p.coffin_in[k];
      default: ;
    endcase
    if (r == 2) begin
      for (int k = 0; k < 5; k++) begin g[k] = p.ec_n[k]; g[5+k] = p.ec_s[k]; end
      g[10] = p.btop; g[11] = p.bbot;
    end else begin
      g[8] = p.btop; g[9] = p.bbot; g[10] = p.d45[0]; g[11] = p.d45[1];
    end
    return g;
  endfunction

  initial begin
    for (int m = 0; m < 8; m++)
      for (int a = 0; a < 4096; a++) begin
        @(negedge clk);
        dl_we = 1; dl_ram = 3'(m); dl_addr = 12'(a); dl_data = table_word(m, a);
      end
    @(negedge clk); dl_we = 0;
    for (int i = 0; i < 3000; i++) begin
      logic [15:0] ec, ep;
      pt = pretrig_t'({$urandom, $urandom});
      #1;
      for (int r = 0; r < 4; r++) begin
        ec[4*r +: 4] = table_word(r, int'(group_addr(r, pt)));
        ep[4*r +: 4] = table_word(4 + r, int'(group_addr(r, pt)));
      end
      checks++;
      if (cosmic_l1 !== ec || physics_l1 !== ep) begin
        failures++;
        $display("FAIL pt %h: cosmic %h/%h physics %h/%h", pt, cosmic_l1, ec, physics_l1, ep);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
