// splitter_trigger_tb: self-checking testbench for splitter_trigger.
//
// Applies random Digor patterns, masks and majority settings, plus the
// corner cases (majority 0, everything excluded, required planes missing),
// and compares trig, in the same cycle it is applied (the logic has no
// clock), with a reference computed here plane by plane.
module splitter_trigger_tb;
  localparam int unsigned NP = 10;
  logic [NP-1:0] digor, excl, req;
  logic [3:0] maj;
  logic trig;
  int checks = 0, failures = 0, nfire = 0;

  splitter_trigger #(.N_PLANES(NP)) dut (.digor, .excl_mask(excl), .req_mask(req), .majority(maj), .trig);

  function automatic logic ref_trig(logic [NP-1:0] d, logic [NP-1:0] e, logic [NP-1:0] r, logic [3:0] m);
    int n = 0;
    bit req_ok = 1;
    for (int p = 0; p < NP; p++) begin
      if (d[p] && !e[p]) n++;
      if (r[p] && !d[p]) req_ok = 0;
    end
    return req_ok && (n >= ((m == 0) ? 1 : m));
  endfunction

  task automatic apply(logic [NP-1:0] d, logic [NP-1:0] e, logic [NP-1:0] r, logic [3:0] m);
    logic exp;
    digor = d; excl = e; req = r; maj = m;
    #1;
    exp = ref_trig(d, e, r, m);
    checks++;
    if (exp) nfire++;
    if (trig !== exp) begin
      failures++;
      $display("FAIL d=%b e=%b r=%b m=%0d trig=%b exp=%b", d, e, r, m, trig, exp);
    end
  endtask

  initial begin
    apply('0, '0, '0, 4'd0);           // nothing hit: never fires
    apply(10'b1, '0, '0, 4'd0);         // majority 0 acts as 1
    apply('1, '1, '0, 4'd1);           // all excluded
    apply(10'b0000000011, '0, 10'b100, 4'd1);   // required plane missing
    apply(10'b0000000111, '0, 10'b100, 4'd3);
    apply(10'b1111111111, '0, '0, 4'd10);
    apply(10'b1111111110, '0, '0, 4'd10);
    for (int i = 0; i < 4000; i++) begin
      logic [NP-1:0] d, e, r;
      d = NP'($urandom);
      e = ($urandom_range(0, 1) == 1) ? NP'($urandom) & NP'($urandom) : '0;
      r = ($urandom_range(0, 2) == 0) ? NP'($urandom) & NP'($urandom) & NP'($urandom) : '0;
      apply(d, e, r, 4'($urandom_range(0, 10)));
    end
    if (nfire == 0 || nfire == checks) begin failures++; $display("FAIL no variety"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
