// wic_top: the digital strip readout chain and the cosmic-ray trigger of the
// WIC (Warm Iron Calorimeter and muon identifier).
//
// Front end: every detector plane is one daisy chain of BOARDS_PER_PLANE
// 32-channel boards (fe_plane_chain), each channel a D779 one-shot and
// shift-register bit. Splitter boards: each serves N_PLANES planes, sets
// their thresholds, latches them on a TCM load command, concatenates their
// chains onto one serial line and forms a trigger from their Digors. Readout
// modules: WICDRM d reads splitter boards 8d..8d+7 in parallel, 32 bits per
// cycle, driving their shift clock and test pattern. Cosmic Logic Unit: the
// splitter triggers go through recombination, pre-triggers and lookup RAMs
// to a cosmic trigger and to physics Level 1 bits.
//
// Outside this block, and so reached through its ports: the analog
// discriminators (disc), the threshold DACs and ADCs (dac_code, adc_sel,
// adc_value), the TCM behind its fibre translators (one redundant pair of
// line sets per group of eight splitter boards; splitter i has group i/8
// and address i%8, and the replies of a group are OR-ed), the MC68020 of
// each WICDRM (cpu_* register bus and drm_flag) and the Fastbus side of the
// CLU (dl_*, mask_*).
//
// The default sizes are the published ones: 42 splitter boards, ten planes
// of ten boards each, up to eight splitter boards per readout module, hence
// six modules. The grouping of boards onto modules, translators and CLU
// inputs is this design's. One clock drives everything; the shift clock and
// the TCM bit clock are clock-enable strobes.
module wic_top
  import wic_pkg::*;
#(
  parameter int unsigned N_SPLITTERS_USED = N_SPLITTERS,
  parameter int unsigned N_PLANES         = PLANES_PER_SPL,
  parameter int unsigned BOARDS           = BOARDS_PER_PLANE,
  parameter int unsigned ONESHOT_CYCLES   = 32,
  parameter int unsigned SR_DIV           = SR_DIV_DEF,
  localparam int unsigned NS   = N_SPLITTERS_USED,
  localparam int unsigned NCH  = BOARDS * CH_PER_BOARD,
  localparam int unsigned NDRM = (NS + SPL_PER_DRM - 1) / SPL_PER_DRM,
  localparam int unsigned NGRP = NDRM
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  // front end
  input  logic [NS-1:0][N_PLANES-1:0][NCH-1:0]   disc,
  // TCM links, one redundant pair per translator group
  input  tcm_lines_t [NGRP-1:0]                  tcm_a,
  input  tcm_lines_t [NGRP-1:0]                  tcm_b,
  input  logic [NGRP-1:0]                        link_sel,
  output logic [NGRP-1:0]                        reply_a,
  output logic [NGRP-1:0]                        reply_b,
  // threshold converters
  output logic [NS-1:0][N_PLANES-1:0][DAC_BITS-1:0] dac_code,
  output logic [NS-1:0][3:0]                     adc_sel,
  input  logic [NS-1:0][DAC_BITS-1:0]            adc_value,
  // readout modules
  input  logic [NDRM-1:0][3:0]                   cpu_addr,
  input  logic [NDRM-1:0]                        cpu_wr,
  input  logic [NDRM-1:0][31:0]                  cpu_wdata,
  output logic [NDRM-1:0][31:0]                  cpu_rdata,
  output logic [NDRM-1:0]                        drm_flag,
  // triggers
  output logic [NS-1:0]                          spl_trig,
  input  logic                                   dl_we,
  input  logic [2:0]                             dl_ram,
  input  logic [LUT_ABITS-1:0]                   dl_addr,
  input  logic [LUT_DBITS-1:0]                   dl_data,
  input  logic                                   mask_we,
  input  logic [L1_PER_SET-1:0]                  mask_data,
  output logic [L1_PER_SET-1:0]                  cosmic_l1,
  output logic                                   cosmic_trig,
  output logic [L1_PER_SET-1:0]                  physics_l1
);
  logic [NS-1:0]                 fe_load, fe_shift, drm_data;
  logic [NS-1:0][N_PLANES-1:0]   plane_ser, plane_far, plane_dig;
  logic [NS-1:0]                 rep_a, rep_b;
  logic [NDRM-1:0]               sr_shift, sr_pattern;
  logic [NDRM-1:0][SPL_PER_DRM-1:0] drm_din;
  logic [N_SPLITTERS-1:0]        clu_in;

  for (genvar s = 0; s < NS; s++) begin : g_spl
    localparam int unsigned D = s / SPL_PER_DRM;

    for (genvar p = 0; p < N_PLANES; p++) begin : g_plane
      fe_plane_chain #(.BOARDS(BOARDS), .ONESHOT_CYCLES(ONESHOT_CYCLES)) u_chain (
        .clk, .rst_n, .disc(disc[s][p]), .load(fe_load[s]), .shift(fe_shift[s]),
        .far_in(plane_far[s][p]), .ser_out(plane_ser[s][p]), .digor(plane_dig[s][p]));
    end

    splitter_board #(.N_PLANES(N_PLANES)) u_spl (
      .clk, .rst_n, .board_addr(4'(s % SPL_PER_DRM)), .link_sel(link_sel[D]),
      .tcm_a(tcm_a[D]), .tcm_b(tcm_b[D]), .reply_a(rep_a[s]), .reply_b(rep_b[s]),
      .plane_digor(plane_dig[s]), .plane_ser(plane_ser[s]), .plane_far(plane_far[s]),
      .fe_load(fe_load[s]), .fe_shift(fe_shift[s]),
      .drm_shift(sr_shift[D]), .drm_pattern(sr_pattern[D]), .drm_data(drm_data[s]),
      .trig(spl_trig[s]), .dac_code(dac_code[s]), .adc_sel(adc_sel[s]),
      .adc_value(adc_value[s]));
  end

  for (genvar d = 0; d < NDRM; d++) begin : g_drm
    always_comb begin
      drm_din[d] = '0;
      reply_a[d] = 1'b0;
      reply_b[d] = 1'b0;
      for (int k = 0; k < SPL_PER_DRM; k++) begin
        if (d * SPL_PER_DRM + k < NS) begin
          drm_din[d][k] = drm_data[d * SPL_PER_DRM + k];
          reply_a[d]    = reply_a[d] | rep_a[d * SPL_PER_DRM + k];
          reply_b[d]    = reply_b[d] | rep_b[d * SPL_PER_DRM + k];
        end
      end
    end

    wicdrm #(.N_IN(SPL_PER_DRM), .SR_DIV(SR_DIV)) u_drm (
      .clk, .rst_n, .cpu_addr(cpu_addr[d]), .cpu_wr(cpu_wr[d]),
      .cpu_wdata(cpu_wdata[d]), .cpu_rdata(cpu_rdata[d]), .flag(drm_flag[d]),
      .din(drm_din[d]), .sr_shift(sr_shift[d]), .sr_pattern(sr_pattern[d]));
  end

  always_comb begin
    clu_in = '0;
    clu_in[NS-1:0] = spl_trig;
  end

  clu u_clu (
    .clk, .rst_n, .spl_trig(clu_in), .dl_we, .dl_ram, .dl_addr, .dl_data,
    .mask_we, .mask_data, .cosmic_l1, .cosmic_trig, .physics_l1);
endmodule
