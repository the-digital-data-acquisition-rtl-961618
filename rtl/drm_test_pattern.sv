// drm_test_pattern: test-pattern source of the WIC digital readout module.
//
// Holds a WORD_BITS pattern word and an enable bit, both written by the
// processor (pat_we / en_we, one clock). While enabled, pat_bit is bit
// bit_idx of the pattern, so with each shift of a 32-bit cycle one pattern
// bit enters the far end of every daisy chain the module serves; while
// disabled a zero is injected. Because the pattern repeats every 32 bits, a
// chain whose length is a multiple of 32 returns the pattern word itself, in
// every word, on the readout that follows, so the chain-integrity check is a
// plain compare. pat_bit is combinational in bit_idx. Injecting a
// preselected pattern at the far end is the published test; the
// word-repeating form and the reset values (pattern 0, disabled) are this
// design's choices.
module drm_test_pattern #(
  parameter int unsigned WORD_BITS = 32
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         pat_we,
  input  logic                         en_we,
  input  logic [WORD_BITS-1:0]         wdata,
  input  logic [$clog2(WORD_BITS)-1:0] bit_idx,
  output logic [WORD_BITS-1:0]         pattern,
  output logic                         enable,
  output logic                         pat_bit
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pattern <= '0;
      enable  <= 1'b0;
    end else begin
      if (pat_we) pattern <= wdata;
      if (en_we)  enable  <= wdata[0];
    end
  end

  assign pat_bit = enable & pattern[bit_idx];
endmodule
