// clu_tb: self-checking testbench for clu, the Cosmic Logic Unit.
//
// Downloads trigger tables with a physical meaning: tight (outer coffins)
// and loose (octants) single and multiple barrel muons, a top-bottom
// through-going muon, endcap-plus-barrel combinations, and a back-to-back
// octant pair in the physics set. Random sparse splitter-trigger patterns
// are then applied and every output is checked one clock later against
// those definitions evaluated here directly on the splitter boards that
// were hit. The cosmic enable mask is changed half-way.
module clu_tb;
  import wic_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [41:0] spl = '0;
  logic dl_we = 0, mask_we = 0;
  logic [2:0] dl_ram = '0;
  logic [11:0] dl_addr = '0;
  logic [3:0] dl_data = '0;
  logic [15:0] mask_data = '0, cosmic_l1, physics_l1;
  logic cosmic_trig;
  int checks = 0, failures = 0, nfire = 0;

  clu dut (.clk, .rst_n, .spl_trig(spl), .dl_we, .dl_ram, .dl_addr, .dl_data,
           .mask_we, .mask_data, .cosmic_l1, .cosmic_trig, .physics_l1);

  always #5 clk = ~clk;

  // Table contents, from the address bits of each RAM.
  function automatic logic [3:0] table_word(int m, logic [11:0] a);
    logic [3:0] w = '0;
    case (m)
      0, 1: begin   // [7:0] coffins (0) or octants (1), 8 top, 9 bottom, 10-11 45-degree
        w[0] = $countones(a[7:0]) == 1;
        w[1] = $countones(a[7:0]) >= 2;
        w[2] = a[8] && a[9] && (m == 1 || a[7:0] != 0);
        w[3] = (m == 1) && (a[11:10] != 0);
      end
      2: begin      // [4:0] north, [9:5] south, 10 top, 11 bottom
        w[0] = (a[4:0] != 0) && (a[10] || a[11]);
        w[1] = (a[9:5] != 0) && (a[10] || a[11]);
        w[2] = (a[4:0] != 0) && (a[9:5] != 0);
      end
      5: begin      // physics, octants: back to back
        for (int k = 0; k < 4; k++) if (a[k] && a[k+4]) w[0] = 1'b1;
      end
      default: ;
    endcase
    return w;
  endfunction

  function automatic logic [31:0] expect_l1(logic [41:0] s);
    logic [7:0] outer, oct;
    logic north, south, top, bot, d45;
    logic [15:0] c = '0, p = '0;
    for (int k = 0; k < 8; k++) begin
      outer[k] = s[2*k+1];
      oct[k]   = s[2*k] || s[2*k+1];
    end
    north = s[26:16] != 0;
    south = s[37:27] != 0;
    d45   = s[41:38] != 0;
    top   = oct[1] || oct[2] || oct[3];
    bot   = oct[5] || oct[6] || oct[7];
    c[0] = $countones(outer) == 1;
    c[1] = $countones(outer) >= 2;
    c[2] = top && bot && outer != 0;
    c[4] = $countones(oct) == 1;
    c[5] = $countones(oct) >= 2;
    c[6] = top && bot;
    c[7] = d45;
    c[8] = north && (top || bot);
    c[9] = south && (top || bot);
    c[10] = north && south;
    for (int k = 0; k < 4; k++) if (oct[k] && oct[k+4]) p[4] = 1'b1;
    return {p, c};
  endfunction

  initial begin
    logic [15:0] mask;
    logic [31:0] e;
    for (int m = 0; m < 8; m++)
      for (int a = 0; a < 4096; a++) begin
        @(negedge clk);
        dl_we = 1; dl_ram = 3'(m); dl_addr = 12'(a); dl_data = table_word(m, 12'(a));
      end
    @(negedge clk); dl_we = 0;
    rst_n = 1;
    mask = '1;
    for (int i = 0; i < 2000; i++) begin
      if (i == 1000) begin
        mask = 16'h0104;     // only through-going tight and north endcap + barrel
        @(negedge clk); mask_we = 1; mask_data = mask;
        @(negedge clk); mask_we = 0;
      end
      for (int j = 0; j < 42; j++) spl[j] = ($urandom_range(0, 11) == 0);
      e = expect_l1(spl);
      @(negedge clk);      // outputs registered: one clock later
      checks++;
      if (cosmic_l1 !== e[15:0] || physics_l1 !== e[31:16] || cosmic_trig !== |(e[15:0] & mask)) begin
        failures++;
        $display("FAIL spl %h: cosmic %h/%h physics %h/%h trig %b", spl, cosmic_l1, e[15:0], physics_l1, e[31:16], cosmic_trig);
      end
      if (cosmic_trig) nfire++;
    end
    if (nfire == 0) begin failures++; $display("FAIL cosmic trigger never fired"); end
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
