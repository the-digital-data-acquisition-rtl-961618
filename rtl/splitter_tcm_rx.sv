// splitter_tcm_rx: receiver for the Timing and Control Module link of a
// splitter board.
//
// The TCM reaches each board over two identical sets of four lines kept for
// redundancy. Three lines of a set come in (bit strobe, frame, data) and one
// goes back (reply). The strap link_sel picks the set that is listened to
// (0 = set A, 1 = set B); the reply is driven on both sets.
//
// Protocol (this design's own): while frame is high, each cycle with strobe
// high shifts one data bit in, MSB first. When frame falls, a word of exactly
// CMD_BITS bits is presented on cmd with a one-cycle cmd_valid pulse; a frame
// of any other length is dropped. bit_strobe repeats the selected strobe
// while frame is high, so that the command decoder can shift its reply out
// in step. All inputs are taken to be synchronous to clk (the translator
// board delivers them that way); cmd_valid follows the falling frame edge
// by one clock.
module splitter_tcm_rx
  import wic_pkg::*;
#(
  parameter int unsigned CMD_W = CMD_BITS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  tcm_lines_t       tcm_a,
  input  tcm_lines_t       tcm_b,
  input  logic             link_sel,
  input  logic             reply_bit,
  output logic             reply_a,
  output logic             reply_b,
  output logic             bit_strobe,
  output logic             cmd_valid,
  output logic [CMD_W-1:0] cmd
);
  localparam int unsigned NW = $clog2(CMD_W + 2);

  tcm_lines_t      lines;
  logic            frame_q;
  logic [CMD_W-1:0] shreg;
  logic [NW-1:0]   nbits;

  assign lines      = link_sel ? tcm_b : tcm_a;
  assign bit_strobe = lines.frame & lines.strobe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_q   <= 1'b0;
      shreg     <= '0;
      nbits     <= '0;
      cmd_valid <= 1'b0;
      cmd       <= '0;
    end else begin
      frame_q   <= lines.frame;
      cmd_valid <= 1'b0;
      if (bit_strobe) shreg <= {shreg[CMD_W-2:0], lines.data};
      if (lines.frame && !frame_q)              nbits <= bit_strobe ? NW'(1) : '0;
      else if (bit_strobe && nbits <= NW'(CMD_W)) nbits <= nbits + 1'b1;
      if (!lines.frame && frame_q) begin
        if (nbits == NW'(CMD_W)) begin
          cmd_valid <= 1'b1;
          cmd       <= shreg;
        end
        nbits <= '0;
      end
    end
  end

  assign reply_a = reply_bit;
  assign reply_b = reply_bit;
endmodule
