// clu_recombiner: first level of trigger-signal recombination, done on the
// board that converts the splitter boards' optical trigger links.
//
// Some logical units of the detector are spread over more than one splitter
// board; their triggers are OR-ed here so that the 42 splitter triggers
// become the 32 signals of the Cosmic Logic Unit's private bus: 16 barrel
// coffins, six sections of each endcap and four 45-degree chambers. Which
// boards are merged is given by wic_pkg::recomb_row (coffins one to one,
// eleven boards per endcap folded onto six sections, the 45-degree boards
// one to one), a choice of this design. Purely combinational.
module clu_recombiner
  import wic_pkg::*;
(
  input  logic [N_SPLITTERS-1:0] spl_trig,
  output logic [CLU_BUS-1:0]     bus
);
  for (genvar i = 0; i < CLU_BUS; i++) begin : g_bus
    localparam recomb_row_t ROW = recomb_row(i);
    assign bus[i] = |(spl_trig & ROW);
  end
endmodule
