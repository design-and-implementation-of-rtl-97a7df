// tb_published_transfers: replays the four reference bus transfers of the
// controller (attribute read, attribute write, common even-byte read, common
// write) and checks, with the strobe asserted, the pin values recorded for
// each: chip selects, strobes, select and data bytes. The memory devices are
// stood in for by driving d_mem_in directly, so this test isolates the
// controller's combinational response. It runs the top at its default size.
module tb_published_transfers;
  logic [25:0] address;
  logic [1:0]  ce_n;
  logic        reg_n, oe_n, we_n, ready, wp;
  logic [15:0] d_host_in, d_host_out, d_mem_in, d_mem_out;
  logic        d_host_oe_hi, d_host_oe_lo, d_mem_oe_hi, d_mem_oe_lo;
  logic        wp_in, att_wp, rdy;
  logic [24:0] add;
  logic [7:0]  cs_n;
  logic        coel_n, coeh_n, cwel_n, cweh_n, cis_oe_n, cis_we_n, csa_n, cis_drive;
  int checks = 0, failures = 0;

  pcmcia_ctrl dut (.*);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic idle();
    oe_n = 1; we_n = 1; ce_n = 2'b11; reg_n = 1;
    #10;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wp_in = 0; att_wp = 0; rdy = 1; address = '0; d_host_in = '0; d_mem_in = '0;
    idle();

    // Attribute memory read: REG# 0, CE0# 0, CE1# 1, WE# 1; CIS byte CD.
    address = 26'h000000A; reg_n = 0; ce_n = 2'b10; d_mem_in = 16'h00CD;
    #5 oe_n = 0; #1;
    check("attr rd csa 0",   csa_n == 0);
    check("attr rd ciswe 1", cis_we_n == 1);
    check("attr rd cisoe 0", cis_oe_n == 0);
    check("attr rd dilow CD", d_host_oe_lo && d_host_out[7:0] == 8'hCD);
    idle();

    // Attribute memory write: REG# 0, A0 0, CE0# 0, CE1# 1, OE# 1; byte FF.
    address = 26'h000000A; reg_n = 0; ce_n = 2'b10; d_host_in = 16'h00FF;
    #5 we_n = 0; #1;
    check("attr wr csa 0",   csa_n == 0);
    check("attr wr cisoe 1", cis_oe_n == 1);
    check("attr wr ciswe 0", cis_we_n == 0);
    check("attr wr dolow FF", d_mem_oe_lo && d_mem_out[7:0] == 8'hFF);
    idle();

    // Common memory even-byte read at 0F9EFCA: CS# FD, COEL# 0, COEH# 1, FA.
    address = 26'h0F9EFCA; reg_n = 1; ce_n = 2'b10; d_mem_in = 16'h00FA;
    #1 check("before OE: cs FD", cs_n == 8'hFD);
    #5 oe_n = 0; #1;
    check("common rd cs FD",   cs_n == 8'hFD);
    check("common rd coel 0",  coel_n == 0);
    check("common rd coeh 1",  coeh_n == 1);
    check("common rd cwel 1",  cwel_n == 1);
    check("common rd cweh 1",  cweh_n == 1);
    check("common rd dilow FA", d_host_oe_lo && d_host_out[7:0] == 8'hFA);
    check("common rd dihigh released", !d_host_oe_hi);
    idle();
    check("idle cs FF", cs_n == 8'hFF);

    // Common memory write at 19CCDA0, RDY 1: CS# F7, READY 1, CD/55 to devices.
    address = 26'h19CCDA0; reg_n = 1; ce_n = 2'b00; d_host_in = 16'h55CD;
    #5 we_n = 0; #1;
    check("common wr cs F7",   cs_n == 8'hF7);
    check("common wr ready 1", ready == 1);
    check("common wr strobes", cwel_n == 0 && cweh_n == 0 && coel_n && coeh_n);
    check("common wr data",    d_mem_oe_lo && d_mem_oe_hi && d_mem_out == 16'h55CD);
    check("common wr host released", !d_host_oe_lo && !d_host_oe_hi);
    idle();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
