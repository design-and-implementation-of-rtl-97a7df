// tb_access_decoder: exhaustive self-checking test of access_decoder.
//
// All 64 combinations of REG#, OE#, WE#, CE1#, CE0# and A0 are applied. The
// expected mode comes from a row-by-row transcription of the controller's
// function table (expected_mode below), written independently of the RTL's
// decision order. The decoder is combinational, so each result is checked one
// time unit after its inputs change (zero cycles of latency).
module tb_access_decoder;
  import pcmcia_pkg::*;

  logic reg_n, oe_n, we_n, ce1_n, ce0_n, a0;
  access_mode_e mode;
  int checks = 0, failures = 0;
  int seen [access_mode_e];

  access_decoder dut (.*);

  // One table row per if: reg, oe, we, ce1, ce0, a0 ('x' = any).
  function automatic access_mode_e expected_mode(logic r, logic o, logic w,
                                                 logic c1, logic c0, logic a);
    // Common memory rows
    if (r && !o &&  w &&  c1 && !c0 && !a) return ACC_RD_EVEN;
    if (r && !o &&  w &&  c1 && !c0 &&  a) return ACC_RD_ODD;
    if (r && !o &&  w && !c1 &&  c0)       return ACC_RD_ODD_ONLY;
    if (r && !o &&  w && !c1 && !c0)       return ACC_RD_WORD;
    if (r &&  o && !w &&  c1 && !c0 && !a) return ACC_WR_EVEN;
    if (r &&  o && !w &&  c1 && !c0 &&  a) return ACC_WR_ODD;
    if (r &&  o && !w && !c1 &&  c0)       return ACC_WR_ODD_ONLY;
    if (r &&  o && !w && !c1 && !c0)       return ACC_WR_WORD;
    // Attribute memory rows
    if (!r && !o &&  w && c1 && !c0 && !a) return ACC_ATTR_RD;
    if (!r &&  o && !w && c1 && !c0 && !a) return ACC_ATTR_WR;
    // Output disable row
    if (o && w) return ACC_DISABLE;
    return ACC_STANDBY;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {reg_n, oe_n, we_n, ce1_n, ce0_n, a0} = 6'(v);
      #1;
      checks++;
      if (mode !== expected_mode(reg_n, oe_n, we_n, ce1_n, ce0_n, a0)) begin
        failures++;
        $display("FAIL reg=%b oe=%b we=%b ce1=%b ce0=%b a0=%b: got %s expected %s",
                 reg_n, oe_n, we_n, ce1_n, ce0_n, a0, mode.name(),
                 expected_mode(reg_n, oe_n, we_n, ce1_n, ce0_n, a0).name());
      end
      seen[mode]++;
    end
    // Every row of the table must have been reached.
    for (access_mode_e m = m.first(); ; m = m.next()) begin
      checks++;
      if (!seen.exists(m)) begin
        failures++;
        $display("FAIL mode %s never produced", m.name());
      end
      if (m == m.last()) break;
    end
    // Spot checks against the controller's waveforms: common even-byte read
    // and attribute read / write.
    {reg_n, oe_n, we_n, ce1_n, ce0_n, a0} = 6'b101100; #1;
    checks++; if (mode != ACC_RD_EVEN) begin failures++; $display("FAIL even read"); end
    {reg_n, oe_n, we_n, ce1_n, ce0_n, a0} = 6'b001100; #1;
    checks++; if (mode != ACC_ATTR_RD) begin failures++; $display("FAIL attr read"); end
    {reg_n, oe_n, we_n, ce1_n, ce0_n, a0} = 6'b010100; #1;
    checks++; if (mode != ACC_ATTR_WR) begin failures++; $display("FAIL attr write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
