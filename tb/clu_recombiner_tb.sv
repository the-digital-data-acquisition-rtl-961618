// clu_recombiner_tb: self-checking testbench for clu_recombiner.
//
// Builds the expected bus from a table of which splitter board serves which
// logical unit (written out here board by board), walks a single active
// trigger over all 42 inputs, then applies random trigger sets and checks
// every private-bus bit.
module clu_recombiner_tb;
  logic [41:0] spl;
  logic [31:0] bus;
  int checks = 0, failures = 0;
  int unit_of [42];

  clu_recombiner dut (.spl_trig(spl), .bus);

  function automatic logic [31:0] expected(logic [41:0] s);
    logic [31:0] e = '0;
    for (int j = 0; j < 42; j++) if (s[j]) e[unit_of[j]] = 1'b1;
    return e;
  endfunction

  initial begin
    // boards 0-15: the 16 barrel coffins
    for (int j = 0; j < 16; j++) unit_of[j] = j;
    // boards 16-26 north endcap, 27-37 south endcap: two boards per section,
    // one for the last section
    for (int k = 0; k < 11; k++) begin
      unit_of[16 + k] = 16 + k / 2;
      unit_of[27 + k] = 22 + k / 2;
    end
    // boards 38-41: the four 45-degree chambers
    for (int j = 38; j < 42; j++) unit_of[j] = j - 10;
    for (int j = 0; j < 42; j++) begin
      spl = 42'(1) << j;
      #1;
      checks++;
      if (bus !== (32'(1) << unit_of[j])) begin
        failures++;
        $display("FAIL board %0d alone -> %h", j, bus);
      end
    end
    for (int r = 0; r < 500; r++) begin
      spl = {$urandom, $urandom} & {$urandom, $urandom};
      #1;
      checks++;
      if (bus !== expected(spl)) begin
        failures++;
        $display("FAIL %h -> %h expected %h", spl, bus, expected(spl));
      end
    end
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
