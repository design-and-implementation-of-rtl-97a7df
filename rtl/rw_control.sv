// rw_control: read and write strobe generation for common and attribute memory.
//
// From the access mode (see access_decoder) this block drives the separate
// output and write enables of the common memory's two byte lanes (COEL#,
// COEH#, CWEL#, CWEH#) and the output and write enables of the attribute
// memory (CISOE#, CISWE#), all active low:
//
//   even byte read / write       COEL# / CWEL#
//   odd byte read / write        COEH# / CWEH#  (8-bit mode and odd-only)
//   word read / write            both lanes
//   attribute read / write       CISOE# / CISWE#
//
// Write protection follows the specification: WPin high blocks every common
// memory write strobe, ATTWP high blocks the attribute write strobe. The
// card's RDY/BUSY# line (rdy, high = ready) also gates the write strobes, so
// that a slow device that is still busy is not written; this is how this
// design reads the specification's remark that RDY/BUSY# is used when writing
// slow devices. RDY and WPin are passed to the host's READY and WP pins.
//
// CSa# selects the attribute memory device while REG# is low and the even
// lane is enabled (CE0# low). CISOE#, CISWE# and CSa# are tri-state pins on
// the card (the function table leaves them unspecified for common memory
// cycles): cis_drive is their output enable and is high while REG# is low;
// when REG# is high they are released. These two choices are this design's.
//
// Timing: purely combinational, zero cycles.
module rw_control
  import pcmcia_pkg::*;
(
  input  access_mode_e mode,
  input  logic         reg_n,      // REG#
  input  logic         ce0_n,      // CE0#
  input  logic         wp_in,      // WPin: 1 = common memory write protected
  input  logic         att_wp,     // ATTWP: 1 = attribute memory write protected
  input  logic         rdy,        // RDY/BUSY# from the memory devices: 1 = ready
  output logic         coel_n,     // common memory output enable, low byte
  output logic         coeh_n,     // common memory output enable, high byte
  output logic         cwel_n,     // common memory write enable, low byte
  output logic         cweh_n,     // common memory write enable, high byte
  output logic         cis_oe_n,   // attribute memory output enable
  output logic         cis_we_n,   // attribute memory write enable
  output logic         csa_n,      // attribute memory chip select
  output logic         cis_drive,  // output enable of cis_oe_n, cis_we_n, csa_n
  output logic         ready,      // READY to the host
  output logic         wp          // WP to the host
);

  logic common_wr_ok, attr_wr_ok;

  always_comb begin
    common_wr_ok = !wp_in && rdy;
    attr_wr_ok   = !att_wp && rdy;

    coel_n   = 1'b1;
    coeh_n   = 1'b1;
    cwel_n   = 1'b1;
    cweh_n   = 1'b1;
    cis_oe_n = 1'b1;
    cis_we_n = 1'b1;

    unique case (mode)
      ACC_RD_EVEN:     coel_n = 1'b0;
      ACC_RD_ODD:      coeh_n = 1'b0;
      ACC_RD_ODD_ONLY: coeh_n = 1'b0;
      ACC_RD_WORD:     begin coel_n = 1'b0; coeh_n = 1'b0; end
      ACC_WR_EVEN:     cwel_n = !common_wr_ok;
      ACC_WR_ODD:      cweh_n = !common_wr_ok;
      ACC_WR_ODD_ONLY: cweh_n = !common_wr_ok;
      ACC_WR_WORD:     begin cwel_n = !common_wr_ok; cweh_n = !common_wr_ok; end
      ACC_ATTR_RD:     cis_oe_n = 1'b0;
      ACC_ATTR_WR:     cis_we_n = !attr_wr_ok;
      default:         ;
    endcase

    csa_n     = !(!reg_n && !ce0_n);
    cis_drive = !reg_n;
    ready     = rdy;
    wp        = wp_in;
  end

  // Never drive both strobes of one lane at once.
  always_comb begin
    assert (coel_n || cwel_n) else $error("rw_control: COEL# and CWEL# both asserted");
    assert (coeh_n || cweh_n) else $error("rw_control: COEH# and CWEH# both asserted");
    assert (cis_oe_n || cis_we_n) else $error("rw_control: CISOE# and CISWE# both asserted");
  end

endmodule
