// tb_cs_decoder: self-checking test of the chip enable decoder and address
// buffer at the default 26-bit address and eight chip selects.
//
// The expected CS# pattern for each value of Address[25:23] is the literal
// one-of-eight table (11111110 ... 01111111), and the two addresses seen in
// the controller's common memory waveforms (0F9EFCA -> CS# = FD, 19CCDA0 ->
// CS# = F7) are checked too. Random addresses check the ADD output
// (Address[25:1]) and that CS# stays all high outside a common memory cycle.
module tb_cs_decoder;
  logic [25:0] address;
  logic        reg_n, ce0_n, ce1_n;
  logic [24:0] add;
  logic [7:0]  cs_n;
  int checks = 0, failures = 0;

  localparam logic [7:0] CS_TABLE [8] = '{8'b11111110, 8'b11111101, 8'b11111011,
                                          8'b11110111, 8'b11101111, 8'b11011111,
                                          8'b10111111, 8'b01111111};

  cs_decoder dut (.*);

  task automatic check(string what, logic [7:0] exp_cs);
    checks++;
    if (cs_n !== exp_cs || add !== address[25:1]) begin
      failures++;
      $display("FAIL %s: addr=%h reg=%b ce=%b%b cs=%b (exp %b) add=%h",
               what, address, reg_n, ce1_n, ce0_n, cs_n, exp_cs, add);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Table, all three card-enable combinations of a common memory cycle.
    for (int k = 0; k < 8; k++) begin
      for (int ce = 0; ce < 3; ce++) begin
        address = {3'(k), 23'($urandom)};
        reg_n = 1'b1;
        {ce1_n, ce0_n} = 2'(ce);
        #1 check("table", CS_TABLE[k]);
      end
    end
    // Waveform examples.
    reg_n = 1; ce1_n = 1; ce0_n = 0;
    address = 26'h0F9EFCA; #1 check("waveform 0F9EFCA", 8'hFD);
    address = 26'h19CCDA0; #1 check("waveform 19CCDA0", 8'hF7);
    // No chip select outside common memory cycles.
    for (int i = 0; i < 200; i++) begin
      address = 26'($urandom);
      {reg_n, ce1_n, ce0_n} = 3'($urandom);
      #1;
      if (reg_n && !(ce1_n && ce0_n)) check("random", CS_TABLE[address[25:23]]);
      else                            check("idle", 8'hFF);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
