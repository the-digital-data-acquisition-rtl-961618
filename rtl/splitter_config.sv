// splitter_config: command decoder and configuration registers of a splitter
// board.
//
// A command word {addr, op, sel, value} from splitter_tcm_rx is executed when
// addr equals the board's strap address, or is the broadcast address 15. The
// board keeps one 12-bit threshold DAC code per plane, the trigger exclude
// and require masks and the majority (minimum number of hit planes), sends a
// one-cycle load pulse to the front end, steers the threshold ADC's input
// multiplexer and returns the ADC result to the TCM.
//
// Read-back: OP_ADC_READ copies adc_value into a 12-bit reply register;
// during the next frame the register is shifted out MSB first, one bit per
// bit_strobe, on reply_bit (which is low at all other times, so the replies
// of several boards can be OR-ed). Registers update one clock after
// cmd_valid; fe_load is high for exactly that clock.
//
// The per-plane 12-bit DACs, the ADC read-back, the masks, the majority
// setting and the unique selection address follow the published board; the
// opcodes, the broadcast address and the reply protocol are this design's.
module splitter_config
  import wic_pkg::*;
#(
  parameter int unsigned N_PLANES = PLANES_PER_SPL
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [3:0]                   board_addr,
  input  logic                         cmd_valid,
  input  tcm_cmd_t                     cmd,
  input  logic                         bit_strobe,
  output logic [N_PLANES-1:0][DAC_BITS-1:0] dac_code,
  output logic [N_PLANES-1:0]          excl_mask,
  output logic [N_PLANES-1:0]          req_mask,
  output logic [3:0]                   majority,
  output logic                         fe_load,
  output logic [3:0]                   adc_sel,
  input  logic [DAC_BITS-1:0]          adc_value,
  output logic                         reply_bit
);
  logic                hit;
  logic [DAC_BITS-1:0] reply_sr;
  logic                reply_arm;   // reply register holds a result to send
  logic                reply_act;   // ... and its frame has begun

  assign hit = cmd_valid && (cmd.addr == board_addr || cmd.addr == BCAST_ADDR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dac_code  <= '0;
      excl_mask <= '0;
      req_mask  <= '0;
      majority  <= 4'd1;
      fe_load   <= 1'b0;
      adc_sel   <= '0;
      reply_sr  <= '0;
      reply_arm <= 1'b0;
      reply_act <= 1'b0;
    end else begin
      fe_load <= 1'b0;
      // Shift out a pending reply during the frame that follows the read.
      if (reply_arm && bit_strobe) begin
        reply_act <= 1'b1;
        reply_sr  <= {reply_sr[DAC_BITS-2:0], 1'b0};
      end
      if (reply_act && cmd_valid) begin   // that frame has ended
        reply_arm <= 1'b0;
        reply_act <= 1'b0;
        reply_sr  <= '0;
      end
      if (hit) begin
        unique case (cmd.op)
          OP_SET_DAC:  if (cmd.sel < 4'(N_PLANES)) dac_code[cmd.sel] <= cmd.value;
          OP_SET_EXCL: excl_mask <= cmd.value[N_PLANES-1:0];
          OP_SET_REQ:  req_mask  <= cmd.value[N_PLANES-1:0];
          OP_SET_MAJ:  majority  <= cmd.value[3:0];
          OP_LOAD:     fe_load   <= 1'b1;
          OP_ADC_SEL:  adc_sel   <= cmd.sel;
          OP_ADC_READ: begin
            reply_sr  <= adc_value;
            reply_arm <= 1'b1;
            reply_act <= 1'b0;
          end
          default: ;
        endcase
      end
    end
  end

  assign reply_bit = reply_arm & bit_strobe & reply_sr[DAC_BITS-1];
endmodule
