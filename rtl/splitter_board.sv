// splitter_board: concentrator for the daisy chains of one detector
// sub-sub-system (up to ten planes).
//
// Control: commands arrive from the TCM over two redundant line sets
// (splitter_tcm_rx) and are executed by splitter_config, which holds the
// threshold DAC codes, the trigger masks and the majority, and issues the
// load pulse that latches the one-shots of every plane into the shift
// registers.
//
// Readout: the shift strobe and the test pattern come from the readout
// module and are passed to all planes. The planes are read as one long
// chain: plane 0's output drives drm_data, plane p's far end is fed by plane
// p+1's output, and the test pattern enters the far end of the last plane.
// With each drm_shift the next bit appears on drm_data, so after a load the
// readout module sees plane 0 strip 0 first and plane N_PLANES-1's last
// strip after N_PLANES*strips bits.
//
// Trigger: splitter_trigger combines the plane Digors into trig, sent to the
// Cosmic Logic Unit. The DAC codes, ADC multiplexer and ADC result are
// ports toward the converters, which are analog.
//
// The functions follow the published board; the serial concatenation of the
// planes, the TCM protocol and the register encoding are this design's.
module splitter_board
  import wic_pkg::*;
#(
  parameter int unsigned N_PLANES = PLANES_PER_SPL
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [3:0]                   board_addr,
  input  logic                         link_sel,
  input  tcm_lines_t                   tcm_a,
  input  tcm_lines_t                   tcm_b,
  output logic                         reply_a,
  output logic                         reply_b,
  input  logic [N_PLANES-1:0]          plane_digor,
  input  logic [N_PLANES-1:0]          plane_ser,
  output logic [N_PLANES-1:0]          plane_far,
  output logic                         fe_load,
  output logic                         fe_shift,
  input  logic                         drm_shift,
  input  logic                         drm_pattern,
  output logic                         drm_data,
  output logic                         trig,
  output logic [N_PLANES-1:0][DAC_BITS-1:0] dac_code,
  output logic [3:0]                   adc_sel,
  input  logic [DAC_BITS-1:0]          adc_value
);
  logic                cmd_valid, bit_strobe, reply_bit;
  logic [CMD_BITS-1:0] cmd_word;
  logic [N_PLANES-1:0] excl_mask, req_mask;
  logic [3:0]          majority;

  splitter_tcm_rx u_rx (
    .clk, .rst_n, .tcm_a, .tcm_b, .link_sel, .reply_bit,
    .reply_a, .reply_b, .bit_strobe, .cmd_valid, .cmd(cmd_word));

  splitter_config #(.N_PLANES(N_PLANES)) u_cfg (
    .clk, .rst_n, .board_addr, .cmd_valid, .cmd(tcm_cmd_t'(cmd_word)),
    .bit_strobe, .dac_code, .excl_mask, .req_mask, .majority, .fe_load,
    .adc_sel, .adc_value, .reply_bit);

  splitter_trigger #(.N_PLANES(N_PLANES)) u_trg (
    .digor(plane_digor), .excl_mask, .req_mask, .majority, .trig);

  for (genvar p = 0; p < N_PLANES; p++) begin : g_cat
    if (p == N_PLANES - 1) begin : g_last
      assign plane_far[p] = drm_pattern;
    end else begin : g_mid
      assign plane_far[p] = plane_ser[p+1];
    end
  end

  assign drm_data = plane_ser[0];
  assign fe_shift = drm_shift;
endmodule
