// fe_board: 32-channel front-end board built from four dual-D779 hybrids.
//
// The hybrids are daisy-chained in channel order: hybrid 0 (channels 0-7)
// drives ser_out, hybrid h takes its serial input from hybrid h+1, and
// ser_in enters the last hybrid, so the board itself is one link of a
// plane's daisy chain. After a load, channel k leaves ser_out on shift k.
// The board Digor is the OR of the hybrids' Digor.
module fe_board #(
  parameter int unsigned HYBRIDS        = 4,
  parameter int unsigned ONESHOT_CYCLES = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [HYBRIDS*8-1:0] disc,
  input  logic                 load,
  input  logic                 shift,
  input  logic                 ser_in,
  output logic                 ser_out,
  output logic                 digor
);
  logic [HYBRIDS:0]   chain;   // chain[h] = output of hybrid h, chain[HYBRIDS] = ser_in
  logic [HYBRIDS-1:0] dig;

  for (genvar h = 0; h < HYBRIDS; h++) begin : g_hyb
    fe_hybrid #(.ONESHOT_CYCLES(ONESHOT_CYCLES)) u_hyb (
      .clk, .rst_n, .disc(disc[h*8 +: 8]), .load, .shift,
      .ser_in(chain[h+1]), .ser_out(chain[h]), .digor(dig[h]));
  end

  assign chain[HYBRIDS] = ser_in;
  assign ser_out        = chain[0];
  assign digor          = |dig;
endmodule
