// wicdrm: data path of the WIC digital readout module (WICDRM).
//
// The module reads up to N_IN splitter boards in parallel. Its processor
// (outside this block) drives a small register bus:
//   addr 0  write: bit0 = 1 latches the eight input buffers into the holding
//                  latches, bit1 = 1 starts a new 32-bit shift cycle; both
//                  are ignored while a cycle is running
//           read : bit0 busy, bit1 flag (buffers full), bit2 pattern enable
//   addr 1  test pattern word (read/write)
//   addr 2  bit0 = test pattern enable (read/write)
//   addr 8+i  latched word of input i (read only)
// Reads are combinational. During a cycle, drm_shift_ctrl issues 32 shift
// strobes at SR_DIV-clock spacing; each goes out on sr_shift to the splitter
// boards (which clock their daisy chains with it), shifts the bits arriving
// on din into drm_input_buffers, and sends one test-pattern bit on
// sr_pattern. When the 32nd bit is in, flag rises; the processor then writes
// the control register again (value 3), which latches the words and starts
// the next cycle at once, so shifting continues while it processes the words just
// latched. If the processor is late the chains simply wait.
//
// The 4 Mbit/s shift rate, the eight 32-bit buffers, the flag and the
// latch-and-restart sequence follow the published module; the register map
// is this design's.
module wicdrm
  import wic_pkg::*;
#(
  parameter int unsigned N_IN   = SPL_PER_DRM,
  parameter int unsigned SR_DIV = SR_DIV_DEF
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [3:0]      cpu_addr,
  input  logic            cpu_wr,
  input  logic [31:0]     cpu_wdata,
  output logic [31:0]     cpu_rdata,
  output logic            flag,
  input  logic [N_IN-1:0] din,
  output logic            sr_shift,
  output logic            sr_pattern
);
  logic                        start, latch, busy, pat_en;
  logic [4:0]                  bit_idx;
  logic [31:0]                 pattern;
  logic [N_IN-1:0][31:0]       word;

  assign latch = cpu_wr && cpu_addr == 4'd0 && cpu_wdata[0] && !busy;
  assign start = cpu_wr && cpu_addr == 4'd0 && cpu_wdata[1] && !busy;

  drm_shift_ctrl #(.SR_DIV(SR_DIV), .WORD_BITS(DRM_WORD)) u_ctrl (
    .clk, .rst_n, .start, .shift(sr_shift), .bit_idx, .busy, .flag);

  drm_input_buffers #(.N_IN(N_IN), .WORD_BITS(DRM_WORD)) u_buf (
    .clk, .rst_n, .din, .shift(sr_shift), .latch, .word);

  drm_test_pattern #(.WORD_BITS(DRM_WORD)) u_pat (
    .clk, .rst_n,
    .pat_we(cpu_wr && cpu_addr == 4'd1),
    .en_we (cpu_wr && cpu_addr == 4'd2),
    .wdata (cpu_wdata), .bit_idx, .pattern, .enable(pat_en),
    .pat_bit(sr_pattern));

  always_comb begin
    cpu_rdata = '0;
    if (cpu_addr[3]) begin
      if (32'(cpu_addr[2:0]) < N_IN) cpu_rdata = word[cpu_addr[2:0]];
    end else begin
      unique case (cpu_addr[2:0])
        3'd0:    cpu_rdata = {29'd0, pat_en, flag, busy};
        3'd1:    cpu_rdata = pattern;
        3'd2:    cpu_rdata = {31'd0, pat_en};
        default: cpu_rdata = '0;
      endcase
    end
  end
endmodule
