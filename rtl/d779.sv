// d779: digital section of the D779 front-end chip (four strip channels).
//
// Each channel's discriminator output fires a one-shot; a load pulse copies
// the four one-shot outputs into a 4-bit shift register, which is then
// clocked out through a daisy chain: ser_out is the bit nearest the reader,
// ser_in takes the output of the next chip further down the chain. Digor is
// the OR of the four discriminator outputs, used to build triggers.
//
// Timing: one clock domain. The one-shot is a synchronous retriggerable
// pulse stretcher: a discriminator pulse seen at edge t keeps the one-shot
// output high for edges t+1 .. t+ONESHOT_CYCLES after its last active
// cycle. load and shift are clock enables; load wins when both are high.
// After a load, ser_out shows channel 0; each shift moves the register one
// bit toward ser_out. Digor is combinational.
//
// The channel count, one-shots, loadable daisy-chained shift register and
// Digor follow the published chip; the one-shot width, its synchronous form
// and the bit order are this design's choices. The analog discriminators
// are outside this module: disc is their digital output.
module d779 #(
  parameter int unsigned ONESHOT_CYCLES = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] disc,
  input  logic       load,
  input  logic       shift,
  input  logic       ser_in,
  output logic       ser_out,
  output logic       digor
);
  localparam int unsigned CW = $clog2(ONESHOT_CYCLES + 1);

  logic [CW-1:0] os_cnt [4];
  logic [3:0]    os_out;
  logic [3:0]    sr;

  for (genvar c = 0; c < 4; c++) begin : g_ch
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)           os_cnt[c] <= '0;
      else if (disc[c])     os_cnt[c] <= CW'(ONESHOT_CYCLES);
      else if (os_cnt[c] != '0) os_cnt[c] <= os_cnt[c] - 1'b1;
    end
    assign os_out[c] = (os_cnt[c] != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sr <= '0;
    else if (load)  sr <= os_out;
    else if (shift) sr <= {ser_in, sr[3:1]};
  end

  assign ser_out = sr[0];
  assign digor   = |disc;
endmodule
