// fe_hybrid: dual-D779 hybrid, eight strip channels.
//
// Two D779 chips are daisy-chained: chip 0 (channels 0-3) drives ser_out,
// chip 1 (channels 4-7) feeds chip 0, and ser_in enters chip 1. The hybrid's
// Digor is the wired-OR of both chips' Digor. The two-stage preamplifier
// that sits on the real hybrid is analog and not part of this model; disc
// is the discriminator output of each channel. Timing is that of d779:
// after a load, channel k leaves ser_out on the k-th shift (counting from 0).
module fe_hybrid #(
  parameter int unsigned ONESHOT_CYCLES = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] disc,
  input  logic       load,
  input  logic       shift,
  input  logic       ser_in,
  output logic       ser_out,
  output logic       digor
);
  logic s_mid, dig0, dig1;

  d779 #(.ONESHOT_CYCLES(ONESHOT_CYCLES)) u_chip0 (
    .clk, .rst_n, .disc(disc[3:0]), .load, .shift,
    .ser_in(s_mid), .ser_out, .digor(dig0));
  d779 #(.ONESHOT_CYCLES(ONESHOT_CYCLES)) u_chip1 (
    .clk, .rst_n, .disc(disc[7:4]), .load, .shift,
    .ser_in, .ser_out(s_mid), .digor(dig1));

  assign digor = dig0 | dig1;
endmodule
