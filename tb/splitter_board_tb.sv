// splitter_board_tb: self-checking testbench for splitter_board.
//
// Three planes, each a one-board daisy chain, hang on the board. The
// testbench plays the TCM: it writes a threshold, programs the majority over
// the backup line set, and issues the load command. It checks the trigger
// against the plane hit pattern in the same cycle, and then, playing the
// readout module, shifts the concatenated chain out: plane 0's 32 strips,
// plane 1's, plane 2's and then the test-pattern bits injected at the far
// end must appear on drm_data in that order.
module splitter_board_tb;
  import wic_pkg::*;
  localparam int unsigned NP = 3;
  localparam int unsigned NCH = 32;
  logic clk = 0, rst_n = 0;
  tcm_lines_t a = '0, b = '0;
  logic link_sel = 0;
  logic reply_a, reply_b;
  logic [NP-1:0] plane_dig, plane_ser, plane_far;
  logic fe_load, fe_shift, drm_shift = 0, drm_pattern = 0, drm_data, trig;
  logic [NP-1:0][DAC_BITS-1:0] dac_code;
  logic [3:0] adc_sel;
  logic [NP-1:0][NCH-1:0] disc = '0;
  int checks = 0, failures = 0, nload = 0;

  splitter_board #(.N_PLANES(NP)) dut (.clk, .rst_n, .board_addr(4'd2), .link_sel,
    .tcm_a(a), .tcm_b(b), .reply_a, .reply_b, .plane_digor(plane_dig),
    .plane_ser, .plane_far, .fe_load, .fe_shift, .drm_shift, .drm_pattern,
    .drm_data, .trig, .dac_code, .adc_sel, .adc_value(12'h0));

  for (genvar p = 0; p < NP; p++) begin : g_pl
    fe_plane_chain #(.BOARDS(1)) u_pl (.clk, .rst_n, .disc(disc[p]), .load(fe_load),
      .shift(fe_shift), .far_in(plane_far[p]), .ser_out(plane_ser[p]), .digor(plane_dig[p]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && fe_load) nload++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic tcm(input bit use_b, input tcm_cmd_t c);
    logic [CMD_BITS-1:0] w = c;
    @(negedge clk);
    if (use_b) b.frame = 1; else a.frame = 1;
    for (int i = CMD_BITS - 1; i >= 0; i--) begin
      if (use_b) begin b.data = w[i]; b.strobe = 1; end
      else       begin a.data = w[i]; a.strobe = 1; end
      @(negedge clk);
      a.strobe = 0; b.strobe = 0;
    end
    a.frame = 0; b.frame = 0;
    repeat (4) @(negedge clk);   // command decoded and executed
  endtask

  initial begin
    logic [NP-1:0][NCH-1:0] hits;
    logic [NCH-1:0] pat;
    int nplanes;
    repeat (3) @(negedge clk);
    rst_n = 1;
    tcm(0, '{addr: 4'd2, op: OP_SET_DAC, sel: 4'd1, value: 12'h3C7});
    check(dac_code[1] == 12'h3C7 && dac_code[0] == 0, "threshold written over line set A");
    tcm(0, '{addr: 4'd3, op: OP_SET_DAC, sel: 4'd0, value: 12'h111});
    check(dac_code[0] == 0, "command for another board ignored");
    link_sel = 1;
    tcm(1, '{addr: 4'd2, op: OP_SET_MAJ, sel: 4'd0, value: 12'd2});
    tcm(0, '{addr: 4'd2, op: OP_SET_MAJ, sel: 4'd0, value: 12'd3});  // unselected set
    for (int r = 0; r < 3; r++) begin
      // trigger: majority 2 of 3 planes
      hits = '0;
      for (int p = 0; p < NP; p++)
        if (r == 2 ? (p == 1) : ($urandom_range(0, 3) != 0)) hits[p][$urandom_range(0, NCH-1)] = 1'b1;
      nplanes = 0;
      for (int p = 0; p < NP; p++) if (hits[p] != 0) nplanes++;
      @(negedge clk); disc = hits;
      #1 check(trig == (nplanes >= 2), $sformatf("trigger for %0d hit planes", nplanes));
      @(negedge clk); disc = '0;
      #1 check(trig == 1'b0, "trigger drops with the Digors");
      tcm(1, '{addr: BCAST_ADDR, op: OP_LOAD, sel: 0, value: 0});
      check(nload == r + 1, $sformatf("load issued %0d", nload));
      // readout: NP*NCH data bits, then NCH pattern bits
      pat = $urandom;
      for (int i = 0; i < NP*NCH + NCH; i++) begin
        logic exp;
        exp = (i < NP*NCH) ? hits[i / NCH][i % NCH] : pat[i - NP*NCH];
        if (r == 0 || i < NP*NCH) check(drm_data == exp, $sformatf("round %0d bit %0d got %b hits %h", r, i, drm_data, hits));
        drm_pattern = pat[i % NCH];
        drm_shift = 1;
        @(negedge clk);
        drm_shift = 0;
        @(negedge clk);
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
