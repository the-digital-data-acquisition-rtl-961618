// clu_l1_lookup: the first level of lookup tables of the Cosmic Logic Unit.
//
// Two sets of four 4Kx4 RAMs: set 0 forms the 16 cosmic-ray Level 1
// triggers, set 1 the 16 physics ones. RAM r of either set is addressed by
// pre-trigger group r of 12 signals:
//   group 0  outer coffins[7:0], btop, bbot, d45[1:0]   (tight barrel)
//   group 1  octants[7:0],       btop, bbot, d45[1:0]   (loose barrel)
//   group 2  ec_n[4:0], ec_s[4:0], btop, bbot           (endcap + barrel)
//   group 3  inner coffins[7:0], btop, bbot, d45[1:0]
// (LSB first as listed). RAM r supplies Level 1 bits 4r..4r+3 of its set.
// Tables are downloaded one word per clock: dl_ram = set*4 + r. The lookup
// is combinational. The RAM count, size, the 12-bit addressing and the
// roles of the first three cosmic RAMs follow the published unit; the
// grouping of the pre-triggers is this design's.
module clu_l1_lookup
  import wic_pkg::*;
(
  input  logic                 clk,
  input  pretrig_t             pt,
  input  logic                 dl_we,
  input  logic [2:0]           dl_ram,
  input  logic [LUT_ABITS-1:0] dl_addr,
  input  logic [LUT_DBITS-1:0] dl_data,
  output logic [L1_PER_SET-1:0] cosmic_l1,
  output logic [L1_PER_SET-1:0] physics_l1
);
  logic [LUTS_PER_SET-1:0][LUT_ABITS-1:0] grp;

  assign grp[0] = {pt.d45, pt.bbot, pt.btop, pt.coffin_out};
  assign grp[1] = {pt.d45, pt.bbot, pt.btop, pt.octant};
  assign grp[2] = {pt.bbot, pt.btop, pt.ec_s, pt.ec_n};
  assign grp[3] = {pt.d45, pt.bbot, pt.btop, pt.coffin_in};

  logic [2*LUTS_PER_SET-1:0][LUT_DBITS-1:0] q;

  for (genvar s = 0; s < 2; s++) begin : g_set
    for (genvar r = 0; r < LUTS_PER_SET; r++) begin : g_ram
      clu_lut_ram #(.ADDR_BITS(LUT_ABITS), .DATA_BITS(LUT_DBITS)) u_ram (
        .clk, .addr(grp[r]), .rdata(q[s*LUTS_PER_SET + r]),
        .we(dl_we && dl_ram == 3'(s*LUTS_PER_SET + r)),
        .waddr(dl_addr), .wdata(dl_data));
    end
  end

  assign cosmic_l1  = q[LUTS_PER_SET-1:0];
  assign physics_l1 = q[2*LUTS_PER_SET-1:LUTS_PER_SET];
endmodule
