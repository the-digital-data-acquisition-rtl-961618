// wic_pkg: constants and types shared by the Warm Iron Calorimeter strip
// readout chain and its Cosmic Logic Unit.
//
// The front-end granularity (4 channels per D779, two D779 per hybrid, four
// hybrids per 32-channel board, ten boards per plane, ten planes per splitter
// board, up to eight splitter boards per readout module, 42 splitter boards,
// six readout modules), the 12-bit threshold DACs, the 32-bit readout word and
// the 4Kx4 lookup RAMs addressed by 12 pre-triggers are the published numbers.
// The TCM command word, the opcodes, the system clock and the pre-trigger
// layout are this design's own choices.
package wic_pkg;

  // ---------------- front end ----------------
  localparam int unsigned D779_CH          = 4;
  localparam int unsigned CH_PER_HYBRID    = 8;
  localparam int unsigned HYBRIDS_PER_BOARD= 4;
  localparam int unsigned CH_PER_BOARD     = 32;
  localparam int unsigned BOARDS_PER_PLANE = 10;
  localparam int unsigned PLANES_PER_SPL   = 10;

  // ---------------- splitter / TCM ----------------
  localparam int unsigned DAC_BITS  = 12;
  localparam int unsigned CMD_BITS  = 24;
  localparam logic [3:0]  BCAST_ADDR = 4'hF;

  typedef enum logic [3:0] {
    OP_NOP        = 4'd0,
    OP_SET_DAC    = 4'd1,   // sel = plane, value = 12-bit DAC code
    OP_SET_EXCL   = 4'd2,   // value[9:0] = planes left out of the count
    OP_SET_REQ    = 4'd3,   // value[9:0] = planes that must be hit
    OP_SET_MAJ    = 4'd4,   // value[3:0] = minimum number of hit planes
    OP_LOAD       = 4'd5,   // latch one-shots into the shift registers
    OP_ADC_SEL    = 4'd6,   // sel = plane whose threshold the ADC reads
    OP_ADC_READ   = 4'd7    // send the ADC result on the reply line
  } tcm_op_e;

  typedef struct packed {
    logic [3:0]  addr;
    tcm_op_e     op;
    logic [3:0]  sel;
    logic [11:0] value;
  } tcm_cmd_t;

  // Lines from the TCM (through the fibre translator) to one splitter board;
  // the fourth line of a set, the reply, runs the other way.
  typedef struct packed {
    logic strobe;   // bit clock enable
    logic frame;    // high while a command word is sent
    logic data;     // command bit, MSB first
  } tcm_lines_t;

  // ---------------- readout module ----------------
  localparam int unsigned DRM_WORD    = 32;
  localparam int unsigned SPL_PER_DRM = 8;
  localparam int unsigned SYS_CLK_HZ  = 16_000_000;
  localparam int unsigned SR_BIT_HZ   = 4_000_000;
  localparam int unsigned SR_DIV_DEF  = SYS_CLK_HZ / SR_BIT_HZ;

  // ---------------- Cosmic Logic Unit ----------------
  localparam int unsigned N_SPLITTERS = 42;
  localparam int unsigned CLU_BUS     = 32;
  localparam int unsigned LUT_ABITS   = 12;
  localparam int unsigned LUT_DBITS   = 4;
  localparam int unsigned LUTS_PER_SET= 4;
  localparam int unsigned L1_PER_SET  = LUTS_PER_SET * LUT_DBITS;   // 16

  // Private-bus layout after recombination.
  localparam int unsigned BUS_COFFIN = 0;    // 16 coffins, 2k inner / 2k+1 outer of octant k
  localparam int unsigned BUS_EC_N   = 16;   // 6 sections of the north endcap
  localparam int unsigned BUS_EC_S   = 22;   // 6 sections of the south endcap
  localparam int unsigned BUS_D45    = 28;   // 45-degree chambers: 28,29 north; 30,31 south

  typedef struct packed {
    logic       btop;        // OR of the three uppermost octants (1,2,3)
    logic       bbot;        // OR of the three lowermost octants (5,6,7)
    logic [1:0] d45;         // [0] north, [1] south 45-degree sums
    logic [4:0] ec_s;        // south endcap, middle sections 2|3 merged into [2]
    logic [4:0] ec_n;        // north endcap, likewise
    logic [7:0] coffin_in;   // inner coffin of each octant
    logic [7:0] coffin_out;  // outer coffin of each octant
    logic [7:0] octant;      // inner | outer
  } pretrig_t;

  // OR map of the conversion board: bit j of entry i set when splitter j
  // feeds private-bus signal i.
  typedef logic [N_SPLITTERS-1:0] recomb_row_t;
  function automatic recomb_row_t recomb_row(int unsigned i);
    recomb_row_t r = '0;
    if (i < 16) r[i] = 1'b1;                          // coffins one to one
    else if (i < 28) begin                            // endcap sections
      int unsigned ec   = (i - 16) / 6;               // 0 north, 1 south
      int unsigned sec  = (i - 16) % 6;
      int unsigned base = 16 + ec * 11;               // 11 boards per endcap
      r[base + 2*sec] = 1'b1;
      if (sec < 5) r[base + 2*sec + 1] = 1'b1;
    end else r[i + 10] = 1'b1;                        // 38..41 -> 28..31
    return r;
  endfunction

endpackage
