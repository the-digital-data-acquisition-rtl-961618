// splitter_trigger: combinatory and majority trigger logic of a splitter
// board.
//
// Inputs are the Digor lines of the planes the board serves. Planes in
// excl_mask are left out of the count; every plane in req_mask must be hit;
// and at least `majority` of the counted planes must be hit (a majority of 0
// is treated as 1, so nothing fires without a hit). trig is the AND of the
// two conditions. The logic is purely combinational, so the trigger follows
// a valid Digor combination within the same clock cycle, as the published
// board's sub-50 ns delay requires. The exclude / require / minimum-count
// controls are the published ones; the handling of a zero majority and of a
// plane both required and excluded is this design's choice.
module splitter_trigger
  import wic_pkg::*;
#(
  parameter int unsigned N_PLANES = PLANES_PER_SPL
) (
  input  logic [N_PLANES-1:0] digor,
  input  logic [N_PLANES-1:0] excl_mask,
  input  logic [N_PLANES-1:0] req_mask,
  input  logic [3:0]          majority,
  output logic                trig
);
  logic [N_PLANES-1:0] counted;
  logic [4:0]          nhit;
  logic [4:0]          need;

  always_comb begin
    counted = digor & ~excl_mask;
    nhit    = '0;
    for (int p = 0; p < N_PLANES; p++) nhit += 5'(counted[p]);
    need    = (majority == 4'd0) ? 5'd1 : {1'b0, majority};
    trig    = (nhit >= need) && ((digor & req_mask) == req_mask);
  end
endmodule
