// splitter_config_tb: self-checking testbench for splitter_config.
//
// Presents decoded command words directly. Checks that each setting
// command changes the right register one clock later, that commands for
// another address are ignored while broadcast ones are taken, that the load
// command gives exactly one one-clock fe_load pulse, and that an ADC read
// returns the ADC value MSB first on the reply line during the next frame
// and leaves the line low afterwards.
module splitter_config_tb;
  import wic_pkg::*;
  localparam int unsigned NP = 10;
  logic clk = 0, rst_n = 0;
  logic [3:0] board_addr = 4'd5;
  logic cmd_valid = 0, bit_strobe = 0;
  tcm_cmd_t cmd = '0;
  logic [NP-1:0][DAC_BITS-1:0] dac_code;
  logic [NP-1:0] excl_mask, req_mask;
  logic [3:0] majority, adc_sel;
  logic fe_load, reply_bit;
  logic [DAC_BITS-1:0] adc_value = '0;
  int checks = 0, failures = 0, nload = 0;

  splitter_config #(.N_PLANES(NP)) dut (.clk, .rst_n, .board_addr, .cmd_valid, .cmd, .bit_strobe,
    .dac_code, .excl_mask, .req_mask, .majority, .fe_load, .adc_sel, .adc_value, .reply_bit);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && fe_load) nload++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic issue(input logic [3:0] addr, input tcm_op_e op, input logic [3:0] sel, input logic [11:0] val);
    @(negedge clk);
    cmd = '{addr: addr, op: op, sel: sel, value: val};
    cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0;
  endtask

  initial begin
    logic [NP-1:0][DAC_BITS-1:0] exp_dac;
    logic [DAC_BITS-1:0] got;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(majority == 4'd1 && excl_mask == '0 && req_mask == '0 && dac_code == '0, "reset values");
    exp_dac = '0;
    for (int p = 0; p < NP; p++) begin
      exp_dac[p] = 12'($urandom);
      issue(4'd5, OP_SET_DAC, 4'(p), exp_dac[p]);
    end
    check(dac_code == exp_dac, "all DAC codes written");
    issue(4'd3, OP_SET_DAC, 4'd2, 12'hABC);           // other board
    check(dac_code == exp_dac, "other address ignored");
    issue(4'd5, OP_SET_EXCL, 4'd0, 12'h2A5);
    check(excl_mask == 10'h2A5, "exclude mask");
    issue(4'd5, OP_SET_REQ, 4'd0, 12'h013);
    check(req_mask == 10'h013, "require mask");
    issue(BCAST_ADDR, OP_SET_MAJ, 4'd0, 12'd4);
    check(majority == 4'd4, "broadcast majority");
    issue(4'd6, OP_SET_MAJ, 4'd0, 12'd7);
    check(majority == 4'd4, "majority for other board ignored");
    // load: one pulse, the clock after the command
    @(negedge clk); cmd = '{addr: 4'd5, op: OP_LOAD, sel: 0, value: 0}; cmd_valid = 1;
    @(negedge clk); cmd_valid = 0;
    check(fe_load == 1'b1, "fe_load follows command by one clock");
    @(negedge clk);
    check(fe_load == 1'b0 && nload == 1, "fe_load is a single pulse");
    issue(BCAST_ADDR, OP_LOAD, 0, 0);
    issue(4'd1, OP_LOAD, 0, 0);
    check(nload == 2, "broadcast load taken, foreign load ignored");
    // ADC select and read-back
    issue(4'd5, OP_ADC_SEL, 4'd7, 0);
    check(adc_sel == 4'd7, "ADC select");
    adc_value = 12'hB5C;
    issue(4'd5, OP_ADC_READ, 0, 0);
    adc_value = 12'h000;
    check(reply_bit == 1'b0, "reply quiet before the next frame");
    got = '0;
    for (int i = 0; i < 24; i++) begin
      @(negedge clk); bit_strobe = 1;
      #1 if (i < DAC_BITS) got = {got[DAC_BITS-2:0], reply_bit};
      else check(reply_bit == 1'b0, "reply pads with zeros");
      @(negedge clk); bit_strobe = 0;
      #1 check(reply_bit == 1'b0, "reply only with strobe");
    end
    check(got == 12'hB5C, $sformatf("ADC value read back (%h)", got));
    issue(4'd2, OP_NOP, 0, 0);                        // end of that frame
    @(negedge clk); bit_strobe = 1;
    #1 check(reply_bit == 1'b0, "reply released after its frame");
    @(negedge clk); bit_strobe = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
