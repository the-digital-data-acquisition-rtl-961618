// wic_top_tb: end-to-end testbench of the WIC readout chain and cosmic
// trigger.
//
// The testbench plays the parts outside the design: the TCM (one line-set
// pair per translator group), the processors of the six readout modules,
// the Fastbus master loading the CLU tables, and the threshold ADCs. The
// front-end size is reduced (N_PLANES and BOARDS parameters) so that a run
// takes seconds; with the defaults see wic_top_full_tb.
//
// Sequence of one complete operation, repeated for several events:
//   1. configure every splitter board over the TCM links: thresholds,
//      majority, exclude / require masks; read one threshold back over the
//      reply line; move one group to its backup line set;
//   2. download the CLU tables (a loose single-muon trigger and a
//      back-to-back physics bit) and the cosmic enable mask;
//   3. fire a cosmic-ray-like hit pattern, check the splitter triggers in
//      the same cycle and the CLU outputs one clock later;
//   4. broadcast the load command on all groups while the one-shots still
//      hold the hits;
//   5. read every module out word by word, processor-paced, checking every
//      bit against the hits and the cycle count of each 32-bit cycle, with
//      one processor answering late;
//   6. read the chains again with the test pattern injected at the far end
//      and check that it comes back intact.
// Each mechanism is counted; one that never happened is a failure.
module wic_top_tb;
  import wic_pkg::*;
  localparam int unsigned NS   = 42;
  localparam int unsigned NP   = 2;
  localparam int unsigned NB   = 1;
  localparam int unsigned NCH  = NB * 32;
  localparam int unsigned NDRM = 6;
  localparam int unsigned DIV  = 4;
  localparam int unsigned WORDS = NP * NCH / 32;     // words per splitter and readout

  logic clk = 0, rst_n = 0;
  logic [NS-1:0][NP-1:0][NCH-1:0] disc = '0;
  tcm_lines_t [NDRM-1:0] tcm_a = '0, tcm_b = '0;
  logic [NDRM-1:0] link_sel = '0, reply_a, reply_b;
  logic [NS-1:0][NP-1:0][DAC_BITS-1:0] dac_code;
  logic [NS-1:0][3:0] adc_sel;
  logic [NS-1:0][DAC_BITS-1:0] adc_value;
  logic [NDRM-1:0][3:0] cpu_addr = '0;
  logic [NDRM-1:0] cpu_wr = '0;
  logic [NDRM-1:0][31:0] cpu_wdata = '0, cpu_rdata;
  logic [NDRM-1:0] drm_flag;
  logic [NS-1:0] spl_trig;
  logic dl_we = 0, mask_we = 0;
  logic [2:0] dl_ram = '0;
  logic [11:0] dl_addr = '0;
  logic [3:0] dl_data = '0;
  logic [15:0] mask_data = '0, cosmic_l1, physics_l1;
  logic cosmic_trig;

  wic_top #(.N_PLANES(NP), .BOARDS(NB)) dut (.*);

  always #5 clk = ~clk;

  // ADC model: reads back the DAC code of the selected plane.
  for (genvar s = 0; s < NS; s++) begin : g_adc
    assign adc_value[s] = (adc_sel[s] < NP) ? dac_code[s][adc_sel[s]] : '0;
  end

  int checks = 0, failures = 0, cyc = 0;
  // mechanism counters
  int n_spl_trig = 0, n_maj_veto = 0, n_excl = 0, n_req_veto = 0, n_cosmic = 0,
      n_mask_veto = 0, n_physics = 0, n_load = 0, n_words = 0, n_late = 0,
      n_pattern = 0, n_backup = 0, n_adc = 0, n_dac = 0;

  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- TCM ----------------
  task automatic tcm(input int g, input tcm_cmd_t c, output logic [DAC_BITS-1:0] reply);
    logic [CMD_BITS-1:0] w = c;
    bit use_b = link_sel[g];
    reply = '0;
    @(negedge clk);
    if (use_b) tcm_b[g].frame = 1; else tcm_a[g].frame = 1;
    for (int i = CMD_BITS - 1; i >= 0; i--) begin
      if (use_b) begin tcm_b[g].data = w[i]; tcm_b[g].strobe = 1; end
      else       begin tcm_a[g].data = w[i]; tcm_a[g].strobe = 1; end
      #1 if (i >= CMD_BITS - DAC_BITS) reply = {reply[DAC_BITS-2:0], use_b ? reply_b[g] : reply_a[g]};
      @(negedge clk);
      tcm_a[g].strobe = 0; tcm_b[g].strobe = 0;
    end
    tcm_a[g].frame = 0; tcm_b[g].frame = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic tcm_all(input tcm_cmd_t c);
    logic [DAC_BITS-1:0] r;
    for (int g = 0; g < NDRM; g++) begin
      fork
        automatic int gg = g;
        begin logic [DAC_BITS-1:0] rr; tcm(gg, c, rr); end
      join_none
    end
    wait fork;
  endtask

  // ---------------- readout-module processor ----------------
  task automatic cpu_wr_reg(input int d, input logic [3:0] a, input logic [31:0] v);
    @(negedge clk); cpu_addr[d] = a; cpu_wdata[d] = v; cpu_wr[d] = 1;
    @(negedge clk); cpu_wr[d] = 0;
  endtask

  // Reads `words` words from every input of module d; returns them in words_out.
  task automatic cpu_readout(input int d, input int words, input int late,
                             output logic [SPL_PER_DRM-1:0][7:0][31:0] words_out);
    int t0, t1;
    words_out = '0;
    cpu_wr_reg(d, 4'd0, 32'd2);                 // start the first cycle
    t0 = cyc - 1;
    for (int w = 0; w < words; w++) begin
      @(negedge clk); cpu_addr[d] = 4'd0;
      #1 while (!cpu_rdata[d][1]) begin @(negedge clk); #1; end
      t1 = cyc;
      check(t1 - t0 - 1 == 32 * DIV, $sformatf("module %0d word %0d took %0d clocks", d, w, t1 - t0 - 1));
      if (late > 0) begin
        repeat (late) @(negedge clk);
        #1 check(drm_flag[d] && !cpu_rdata[d][0], "module waits for a late processor");
        n_late++;
      end
      @(negedge clk); cpu_addr[d] = 4'd0; cpu_wdata[d] = (w == words - 1) ? 32'd1 : 32'd3; cpu_wr[d] = 1;   // latch (+ restart)
      t0 = cyc;
      @(negedge clk); cpu_wr[d] = 0;
      for (int k = 0; k < SPL_PER_DRM; k++) begin
        cpu_addr[d] = 4'(8 + k);
        #1 words_out[k][w] = cpu_rdata[d];
        @(negedge clk);
      end
      n_words++;
    end
  endtask

  // ---------------- CLU tables ----------------
  function automatic logic [3:0] table_word(int m, logic [11:0] a);
    logic [3:0] w = '0;
    if (m == 1) begin                 // loose: octants
      w[0] = a[7:0] != 0;              // any barrel muon
      w[1] = $countones(a[7:0]) >= 2;  // multiple
      w[2] = a[8] && a[9];             // top and bottom
    end
    if (m == 5) for (int k = 0; k < 4; k++) if (a[k] && a[k+4]) w[0] = 1'b1;  // back to back
    return w;
  endfunction

  // ---------------- splitter settings ----------------
  // Splitter s: majority 2 (both planes), except: s%7==3 excludes plane 1
  // with majority 1; s%7==5 requires plane 0 with majority 1.
  function automatic logic exp_trig(int s, logic [NP-1:0] hitp);
    if (s % 7 == 3) return hitp[0];
    if (s % 7 == 5) return hitp[0];
    return hitp == '1;
  endfunction

  initial begin
    logic [NS-1:0][NP-1:0][NCH-1:0] hits;
    logic [NDRM-1:0][SPL_PER_DRM-1:0][7:0][31:0] rbuf;
    logic [DAC_BITS-1:0] rep;
    logic [31:0] pat;
    logic [7:0] oct;
    logic [15:0] mask;

    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1. configuration
    tcm_all('{addr: BCAST_ADDR, op: OP_SET_MAJ, sel: 0, value: 12'd2});
    for (int s = 0; s < NS; s++) begin
      for (int p = 0; p < NP; p++) begin
        tcm(s / 8, '{addr: 4'(s % 8), op: OP_SET_DAC, sel: 4'(p), value: 12'(100 + 10*s + p)}, rep);
        n_dac++;
      end
      if (s % 7 == 3) begin
        tcm(s / 8, '{addr: 4'(s % 8), op: OP_SET_EXCL, sel: 0, value: 12'b10}, rep);
        tcm(s / 8, '{addr: 4'(s % 8), op: OP_SET_MAJ, sel: 0, value: 12'd1}, rep);
      end
      if (s % 7 == 5) begin
        tcm(s / 8, '{addr: 4'(s % 8), op: OP_SET_REQ, sel: 0, value: 12'b01}, rep);
        tcm(s / 8, '{addr: 4'(s % 8), op: OP_SET_MAJ, sel: 0, value: 12'd1}, rep);
      end
    end
    for (int s = 0; s < NS; s++)
      for (int p = 0; p < NP; p++)
        check(dac_code[s][p] == 12'(100 + 10*s + p), $sformatf("threshold of splitter %0d plane %0d", s, p));
    // group 2 switches to its backup line set; read a threshold back over it
    link_sel[2] = 1'b1;
    tcm(2, '{addr: 4'd3, op: OP_ADC_SEL, sel: 4'd1, value: 0}, rep);
    tcm(2, '{addr: 4'd3, op: OP_ADC_READ, sel: 0, value: 0}, rep);
    tcm(2, '{addr: 4'd3, op: OP_NOP, sel: 0, value: 0}, rep);
    check(rep == 12'(100 + 10*19 + 1), $sformatf("threshold read back through the ADC: %0d", rep));
    n_adc++; n_backup++;

    // 2. CLU tables: cosmic set uses RAM 1, physics RAM 5
    for (int m = 0; m < 8; m++)
      for (int a = 0; a < 4096; a++) begin
        @(negedge clk);
        dl_we = 1; dl_ram = 3'(m); dl_addr = 12'(a); dl_data = table_word(m, 12'(a));
      end
    @(negedge clk); dl_we = 0;

    for (int ev = 0; ev < 6; ev++) begin
      logic [NS-1:0] exp_spl;
      logic [15:0] exp_c, exp_p;
      // cosmic enable mask: all cosmic bits, or only "top and bottom"
      mask = (ev >= 4) ? 16'h0040 : 16'hFFFF;
      @(negedge clk); mask_we = 1; mask_data = mask;
      @(negedge clk); mask_we = 0;
      // 3. an event: a track through two barrel octants, plus noise hits
      hits = '0;
      begin
        int o1 = $urandom_range(0, 7), o2 = (ev % 2 == 0) ? (o1 + 4) % 8 : $urandom_range(0, 7);
        int c1 = 2*o1 + $urandom_range(0, 1), c2 = 2*o2 + $urandom_range(0, 1);
        for (int p = 0; p < NP; p++) begin
          hits[c1][p][$urandom_range(0, NCH-1)] = 1'b1;
          hits[c2][p][$urandom_range(0, NCH-1)] = 1'b1;
        end
      end
      for (int s = 0; s < NS; s++)
        if ($urandom_range(0, 5) == 0) hits[s][$urandom_range(0, NP-1)][$urandom_range(0, NCH-1)] = 1'b1;
      oct = '0;
      for (int s = 0; s < NS; s++) begin
        logic [NP-1:0] hp;
        for (int p = 0; p < NP; p++) hp[p] = hits[s][p] != 0;
        exp_spl[s] = exp_trig(s, hp);
        if (hp != 0 && !exp_spl[s] && s % 7 != 3 && s % 7 != 5) n_maj_veto++;
        if (s % 7 == 3 && hp[1] && !hp[0]) n_excl++;
        if (s % 7 == 5 && hp[1] && !hp[0]) n_req_veto++;
        if (s < 16 && exp_spl[s]) oct[s / 2] = 1'b1;
      end
      exp_c = {13'd0, oct[1] | oct[2] | oct[3] ? (oct[5] | oct[6] | oct[7]) : 1'b0, $countones(oct) >= 2, oct != 0} << 4;
      exp_p = '0;
      for (int k = 0; k < 4; k++) if (oct[k] && oct[k+4]) exp_p[4] = 1'b1;
      @(negedge clk);
      disc = hits;
      #1 check(spl_trig == exp_spl, $sformatf("event %0d splitter triggers %h vs %h", ev, spl_trig, exp_spl));
      n_spl_trig += $countones(spl_trig);
      @(negedge clk);
      disc = '0;
      check(cosmic_l1 == exp_c && physics_l1 == exp_p, $sformatf("event %0d CLU %h/%h physics %h/%h", ev, cosmic_l1, exp_c, physics_l1, exp_p));
      check(cosmic_trig == |(exp_c & mask), "cosmic trigger");
      if (cosmic_trig) n_cosmic++;
      if (!cosmic_trig && exp_c != 0) n_mask_veto++;
      if (physics_l1 != 0) n_physics++;
      // 4. load, on every group at once
      tcm_all('{addr: BCAST_ADDR, op: OP_LOAD, sel: 0, value: 0});
      n_load++;
      // 5. readout, all modules in parallel, module ev%6 late
      for (int d = 0; d < NDRM; d++) begin
        fork
          automatic int dd = d;
          cpu_readout(dd, WORDS, (dd == ev % NDRM) ? 25 : 0, rbuf[dd]);
        join_none
      end
      wait fork;
      for (int s = 0; s < NS; s++)
        for (int w = 0; w < WORDS; w++)
          check(rbuf[s / 8][s % 8][w] == hits[s][(w * 32) / NCH][(w * 32) % NCH +: 32],
                $sformatf("event %0d splitter %0d word %0d: %h", ev, s, w, rbuf[s / 8][s % 8][w]));
      // 6. chain integrity: pattern on, read the chains twice
      if (ev % 3 == 2) begin
        pat = $urandom;
        for (int d = 0; d < NDRM; d++) begin
          cpu_wr_reg(d, 4'd1, pat);
          cpu_wr_reg(d, 4'd2, 32'd1);
        end
        for (int d = 0; d < NDRM; d++) begin
          fork
            automatic int dd = d;
            cpu_readout(dd, WORDS, 0, rbuf[dd]);
          join_none
        end
        wait fork;
        for (int d = 0; d < NDRM; d++) begin
          fork
            automatic int dd = d;
            cpu_readout(dd, WORDS, 0, rbuf[dd]);
          join_none
        end
        wait fork;
        for (int s = 0; s < NS; s++)
          for (int w = 0; w < WORDS; w++)
            check(rbuf[s / 8][s % 8][w] == pat, $sformatf("pattern back from splitter %0d word %0d", s, w));
        n_pattern++;
        for (int d = 0; d < NDRM; d++) cpu_wr_reg(d, 4'd2, 32'd0);
      end
    end

    $display("mechanisms: spl_trig=%0d majority_veto=%0d excluded=%0d require_veto=%0d cosmic=%0d mask_veto=%0d physics=%0d load=%0d words=%0d late_cpu=%0d pattern=%0d backup_link=%0d adc=%0d dac=%0d",
             n_spl_trig, n_maj_veto, n_excl, n_req_veto, n_cosmic, n_mask_veto, n_physics, n_load, n_words, n_late, n_pattern, n_backup, n_adc, n_dac);
    check(n_spl_trig > 0 && n_maj_veto > 0 && n_cosmic > 0 && n_mask_veto > 0 && n_physics > 0, "trigger mechanisms exercised");
    check(n_load > 0 && n_words > 0 && n_late > 0 && n_pattern > 0 && n_backup > 0 && n_adc > 0 && n_dac > 0, "readout mechanisms exercised");
    check(n_excl > 0, "exclusion exercised");
    check(n_req_veto > 0, "requirement exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
