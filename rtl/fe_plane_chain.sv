// fe_plane_chain: the daisy chain of all front-end boards of one detector
// plane.
//
// BOARDS 32-channel boards share the load and shift lines; board 0, nearest
// the splitter board, drives ser_out and board b takes its serial input from
// board b+1. far_in enters the far end of the last board, which is where a
// test pattern is injected. After a load, strip k of the plane leaves
// ser_out on shift k, and after BOARDS*32 shifts the bits that entered at
// far_in follow. The plane Digor is the wired-OR of all boards' Digor and
// feeds the splitter board's trigger logic.
module fe_plane_chain #(
  parameter int unsigned BOARDS         = 10,
  parameter int unsigned ONESHOT_CYCLES = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [BOARDS*32-1:0]  disc,
  input  logic                  load,
  input  logic                  shift,
  input  logic                  far_in,
  output logic                  ser_out,
  output logic                  digor
);
  logic [BOARDS:0]   chain;
  logic [BOARDS-1:0] dig;

  for (genvar b = 0; b < BOARDS; b++) begin : g_brd
    fe_board #(.ONESHOT_CYCLES(ONESHOT_CYCLES)) u_brd (
      .clk, .rst_n, .disc(disc[b*32 +: 32]), .load, .shift,
      .ser_in(chain[b+1]), .ser_out(chain[b]), .digor(dig[b]));
  end

  assign chain[BOARDS] = far_in;
  assign ser_out       = chain[0];
  assign digor         = |dig;
endmodule
