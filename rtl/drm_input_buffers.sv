// drm_input_buffers: the eight parallel input buffers of the WIC digital
// readout module.
//
// Each buffer is a WORD_BITS serial-in shift register fed by one splitter
// board's data line. On a shift strobe every buffer takes its input bit
// into the top and moves right, so after 32 strobes the first bit of the
// cycle sits in bit 0. On latch the eight words are copied to holding
// latches, which the processor reads at leisure while the next 32-bit cycle
// fills the buffers again. shift and latch are clock enables; both act at
// the same edge if both are high (the buffers shift, the latch takes the
// pre-shift words).
//
// Eight buffers of one 32-bit word follow the published module; the bit
// order and the holding latches are this design's reading of "the processor
// latches the data and immediately starts a new cycle".
module drm_input_buffers #(
  parameter int unsigned N_IN      = 8,
  parameter int unsigned WORD_BITS = 32
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic [N_IN-1:0]                     din,
  input  logic                                shift,
  input  logic                                latch,
  output logic [N_IN-1:0][WORD_BITS-1:0]      word
);
  logic [N_IN-1:0][WORD_BITS-1:0] buffer;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buffer <= '0;
      word   <= '0;
    end else begin
      if (latch) word <= buffer;
      if (shift)
        for (int i = 0; i < N_IN; i++)
          buffer[i] <= {din[i], buffer[i][WORD_BITS-1:1]};
    end
  end
endmodule
