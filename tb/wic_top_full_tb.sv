// wic_top_full_tb: one complete readout of the full-size WIC chain.
//
// wic_top with its default sizes: 42 splitter boards of ten planes, ten
// 32-channel boards per plane (134,400 channels) and six readout modules.
// The testbench, as TCM, sets every splitter's majority to one plane; fires
// a random sparse hit pattern; checks the splitter triggers; broadcasts the
// load; and, as the six processors, reads every chain out completely (100
// words of 32 bits per splitter board) and checks each word. It also checks
// that one readout fits twice in an SLC pulse interval at 180 Hz.
module wic_top_full_tb;
  import wic_pkg::*;
  localparam int unsigned NS    = N_SPLITTERS;
  localparam int unsigned NP    = PLANES_PER_SPL;
  localparam int unsigned NCH   = BOARDS_PER_PLANE * 32;
  localparam int unsigned NDRM  = 6;
  localparam int unsigned WORDS = NP * NCH / 32;        // 100

  logic clk = 0, rst_n = 0;
  logic [NS-1:0][NP-1:0][NCH-1:0] disc = '0;
  tcm_lines_t [NDRM-1:0] tcm_a = '0, tcm_b = '0;
  logic [NDRM-1:0] link_sel = '0, reply_a, reply_b;
  logic [NS-1:0][NP-1:0][DAC_BITS-1:0] dac_code;
  logic [NS-1:0][3:0] adc_sel;
  logic [NS-1:0][DAC_BITS-1:0] adc_value = '0;
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
  int checks = 0, failures = 0, cyc = 0, errors_word = 0;

  wic_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  logic [NS-1:0][NP-1:0][NCH-1:0] hits;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic tcm(input int g, input tcm_cmd_t c);
    logic [CMD_BITS-1:0] w = c;
    @(negedge clk);
    tcm_a[g].frame = 1;
    for (int i = CMD_BITS - 1; i >= 0; i--) begin
      tcm_a[g].data = w[i]; tcm_a[g].strobe = 1;
      @(negedge clk);
      tcm_a[g].strobe = 0;
    end
    tcm_a[g].frame = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic tcm_all(input tcm_cmd_t c);
    for (int g = 0; g < NDRM; g++) begin
      fork
        automatic int gg = g;
        tcm(gg, c);
      join_none
    end
    wait fork;
  endtask

  task automatic readout(input int d);
    int t0;
    @(negedge clk); cpu_addr[d] = 4'd0; cpu_wdata[d] = 32'd2; cpu_wr[d] = 1;
    @(negedge clk); cpu_wr[d] = 0;
    for (int w = 0; w < WORDS; w++) begin
      #1 while (!cpu_rdata[d][1]) begin @(negedge clk); #1; end
      @(negedge clk); cpu_wdata[d] = (w == WORDS - 1) ? 32'd1 : 32'd3; cpu_wr[d] = 1;
      @(negedge clk); cpu_wr[d] = 0;
      for (int k = 0; k < SPL_PER_DRM; k++) begin
        int s = d * SPL_PER_DRM + k;
        cpu_addr[d] = 4'(8 + k);
        #1;
        if (s < NS) begin
          checks++;
          if (cpu_rdata[d] != hits[s][(w * 32) / NCH][(w * 32) % NCH +: 32]) begin
            failures++;
            if (errors_word++ < 10) $display("FAIL splitter %0d word %0d: %h", s, w, cpu_rdata[d]);
          end
        end
        @(negedge clk);
      end
      cpu_addr[d] = 4'd0;
    end
  endtask

  initial begin
    logic [NS-1:0] exp_trig;
    int t0, t1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    tcm_all('{addr: BCAST_ADDR, op: OP_SET_MAJ, sel: 0, value: 12'd1});
    hits = '0;
    for (int s = 0; s < NS; s++) begin
      exp_trig[s] = 1'b0;
      for (int n = 0; n < 3; n++)
        if ($urandom_range(0, 1) == 1) begin
          hits[s][$urandom_range(0, NP-1)][$urandom_range(0, NCH-1)] = 1'b1;
          exp_trig[s] = 1'b1;
        end
    end
    @(negedge clk); disc = hits;
    #1 check(spl_trig == exp_trig, "splitter triggers");
    @(negedge clk); disc = '0;
    tcm_all('{addr: BCAST_ADDR, op: OP_LOAD, sel: 0, value: 0});
    t0 = cyc;
    for (int d = 0; d < NDRM; d++) begin
      fork
        automatic int dd = d;
        readout(dd);
      join_none
    end
    wait fork;
    t1 = cyc;
    $display("full readout: %0d clocks = %0d us at 16 MHz", t1 - t0, (t1 - t0) / 16);
    // 180 Hz, two readouts per pulse: 2 * readout < 1/180 s = 88888 clocks
    check(2 * (t1 - t0) < SYS_CLK_HZ / 180, "two readouts fit in one 180 Hz interval");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
