// clu_pretrigger: the pre-trigger logic (PALs) of the Cosmic Logic Unit.
//
// From the 32 private-bus signals it forms: the eight barrel octants, each
// the OR of its two radially juxtaposed coffins (inner 2k, outer 2k+1); the
// coffins themselves; each endcap's six sections with the two middle-plane
// sections (2 and 3) merged into one; one 45-degree sum per side; and the
// barrel-top and barrel-bottom sums of the three uppermost (1,2,3) and
// lowermost (5,6,7) octants. The kinds of combination are the published
// ones; the numbering and the use of OR for "adding" and "summing" are this
// design's. Purely combinational.
module clu_pretrigger
  import wic_pkg::*;
(
  input  logic [CLU_BUS-1:0] bus,
  output pretrig_t           pt
);
  always_comb begin
    for (int k = 0; k < 8; k++) begin
      pt.coffin_in[k]  = bus[BUS_COFFIN + 2*k];
      pt.coffin_out[k] = bus[BUS_COFFIN + 2*k + 1];
      pt.octant[k]     = pt.coffin_in[k] | pt.coffin_out[k];
    end
    pt.ec_n = {bus[BUS_EC_N+5], bus[BUS_EC_N+4], bus[BUS_EC_N+3] | bus[BUS_EC_N+2],
               bus[BUS_EC_N+1], bus[BUS_EC_N+0]};
    pt.ec_s = {bus[BUS_EC_S+5], bus[BUS_EC_S+4], bus[BUS_EC_S+3] | bus[BUS_EC_S+2],
               bus[BUS_EC_S+1], bus[BUS_EC_S+0]};
    pt.d45[0] = bus[BUS_D45+0] | bus[BUS_D45+1];
    pt.d45[1] = bus[BUS_D45+2] | bus[BUS_D45+3];
    pt.btop   = pt.octant[1] | pt.octant[2] | pt.octant[3];
    pt.bbot   = pt.octant[5] | pt.octant[6] | pt.octant[7];
  end
endmodule
