// clu: the Fastbus Cosmic Logic Unit, which turns the splitter-board
// triggers into a programmable cosmic-ray trigger.
//
// Path: the 42 splitter triggers are recombined onto 32 private-bus signals
// (clu_recombiner), the PAL stage forms the pre-triggers (clu_pretrigger),
// and two sets of four 4Kx4 lookup RAMs give 16 cosmic and 16 physics Level 1
// triggers (clu_l1_lookup). cosmic_trig is the OR of the cosmic Level 1 bits
// enabled in a 16-bit mask; physics_l1 is the set of inputs offered to the
// Trigger Supervisor's Fastbus latch. All three outputs are registered, so
// they follow the splitter triggers by one clock.
//
// Download port (from the Fastbus side, modelled as a plain write strobe):
// dl_ram 0..7 writes dl_data into RAM dl_ram at dl_addr; mask_we writes
// mask_data into the cosmic enable mask (reset: all enabled). The
// recombination, pre-triggers and lookup tables follow the published unit;
// the registered outputs and the enable mask are this design's.
module clu
  import wic_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [N_SPLITTERS-1:0] spl_trig,
  input  logic                   dl_we,
  input  logic [2:0]             dl_ram,
  input  logic [LUT_ABITS-1:0]   dl_addr,
  input  logic [LUT_DBITS-1:0]   dl_data,
  input  logic                   mask_we,
  input  logic [L1_PER_SET-1:0]  mask_data,
  output logic [L1_PER_SET-1:0]  cosmic_l1,
  output logic                   cosmic_trig,
  output logic [L1_PER_SET-1:0]  physics_l1
);
  logic [CLU_BUS-1:0]    bus;
  pretrig_t              pt;
  logic [L1_PER_SET-1:0] c_l1, p_l1, mask;

  clu_recombiner u_rec (.spl_trig, .bus);
  clu_pretrigger u_pt  (.bus, .pt);
  clu_l1_lookup  u_l1  (.clk, .pt, .dl_we, .dl_ram, .dl_addr, .dl_data,
                        .cosmic_l1(c_l1), .physics_l1(p_l1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mask        <= '1;
      cosmic_l1   <= '0;
      cosmic_trig <= 1'b0;
      physics_l1  <= '0;
    end else begin
      if (mask_we) mask <= mask_data;
      cosmic_l1   <= c_l1;
      cosmic_trig <= |(c_l1 & mask);
      physics_l1  <= p_l1;
    end
  end
endmodule
