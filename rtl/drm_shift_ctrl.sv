// drm_shift_ctrl: shift-clock sequencer of the WIC digital readout module.
//
// On start (ignored while a cycle is running) it issues WORD_BITS shift
// strobes, one every SR_DIV system clocks, which clock the front-end daisy
// chains and the input buffers together; with the assumed 16 MHz system
// clock and SR_DIV = 4 that is the published 4 Mbit/s. bit_idx gives the
// position, within the 32-bit word, of the bit taken at the current strobe.
// After the last strobe, flag rises and stays high until the next start: it
// tells the processor that the buffers are full.
//
// Timing: start is sampled at clock edge t; the k-th strobe (k = 1..32) is
// high before edge t + k*SR_DIV, where it is acted upon, and flag is high
// from edge t + WORD_BITS*SR_DIV on. shift is a combinational decode of the
// sequencer state. The 32-bit cycle and the flag follow the published
// module; the sequencing details are this design's.
module drm_shift_ctrl #(
  parameter int unsigned SR_DIV    = 4,
  parameter int unsigned WORD_BITS = 32
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  output logic                         shift,
  output logic [$clog2(WORD_BITS)-1:0] bit_idx,
  output logic                         busy,
  output logic                         flag
);
  localparam int unsigned DW = (SR_DIV > 1) ? $clog2(SR_DIV) : 1;
  localparam int unsigned BW = $clog2(WORD_BITS);

  logic [DW-1:0] div;

  assign shift = busy && (div == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      flag    <= 1'b0;
      div     <= '0;
      bit_idx <= '0;
    end else if (!busy) begin
      if (start) begin
        busy    <= 1'b1;
        flag    <= 1'b0;
        div     <= DW'(SR_DIV - 1);
        bit_idx <= '0;
      end
    end else if (shift) begin
      div     <= DW'(SR_DIV - 1);
      bit_idx <= bit_idx + 1'b1;
      if (bit_idx == BW'(WORD_BITS - 1)) begin
        busy <= 1'b0;
        flag <= 1'b1;
      end
    end else begin
      div <= div - 1'b1;
    end
  end
endmodule
