// tb_rw_control: self-checking test of the read/write strobe logic.
//
// Every access mode is applied with every combination of REG#, CE0#, WPin,
// ATTWP and RDY. Expected strobes are written out per mode as a lane list:
// which common-memory lanes are read or written, and whether the attribute
// memory is read or written. A write strobe is expected only when the
// matching protect input is low and RDY is high. CSa#, the tri-state enable
// of the attribute pins and the READY/WP pass-through are checked as well.
module tb_rw_control;
  import pcmcia_pkg::*;

  access_mode_e mode;
  logic reg_n, ce0_n, wp_in, att_wp, rdy;
  logic coel_n, coeh_n, cwel_n, cweh_n, cis_oe_n, cis_we_n, csa_n, cis_drive, ready, wp;
  int checks = 0, failures = 0;
  int blocked_wp = 0, blocked_attwp = 0, blocked_busy = 0;

  rw_control dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    access_mode_e m;
    logic rd_lo, rd_hi, wr_lo, wr_hi, att_rd, att_wr, ok_c, ok_a;
    logic [9:0] got, exp;
    m = m.first();
    forever begin
      // Lanes touched by each mode.
      rd_lo  = (m == ACC_RD_EVEN) || (m == ACC_RD_WORD);
      rd_hi  = (m == ACC_RD_ODD) || (m == ACC_RD_ODD_ONLY) || (m == ACC_RD_WORD);
      wr_lo  = (m == ACC_WR_EVEN) || (m == ACC_WR_WORD);
      wr_hi  = (m == ACC_WR_ODD) || (m == ACC_WR_ODD_ONLY) || (m == ACC_WR_WORD);
      att_rd = (m == ACC_ATTR_RD);
      att_wr = (m == ACC_ATTR_WR);
      for (int v = 0; v < 32; v++) begin
        mode = m;
        {reg_n, ce0_n, wp_in, att_wp, rdy} = 5'(v);
        #1;
        ok_c = !wp_in && rdy;
        ok_a = !att_wp && rdy;
        exp = {!rd_lo, !rd_hi, !(wr_lo && ok_c), !(wr_hi && ok_c),
               !att_rd, !(att_wr && ok_a), !(!reg_n && !ce0_n), !reg_n, rdy, wp_in};
        got = {coel_n, coeh_n, cwel_n, cweh_n, cis_oe_n, cis_we_n, csa_n, cis_drive, ready, wp};
        checks++;
        if (got !== exp) begin
          failures++;
          $display("FAIL mode=%s reg=%b ce0=%b wp=%b attwp=%b rdy=%b got=%b exp=%b",
                   m.name(), reg_n, ce0_n, wp_in, att_wp, rdy, got, exp);
        end
        if ((wr_lo || wr_hi) && wp_in && rdy) blocked_wp++;
        if (att_wr && att_wp && rdy) blocked_attwp++;
        if ((wr_lo || wr_hi || att_wr) && !rdy) blocked_busy++;
      end
      if (m == m.last()) break;
      m = m.next();
    end
    checks++;
    if (blocked_wp == 0 || blocked_attwp == 0 || blocked_busy == 0) begin
      failures++;
      $display("FAIL protection cases not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
