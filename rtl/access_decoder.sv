// access_decoder: classifies one PCMCIA host bus state into an access mode.
//
// The controller has no clock: every output is a combinational function of
// the host's REG#, OE#, WE#, CE1#, CE0# and A0 pins. This block implements
// the function table of the controller (which row of the table applies):
//
//   OE# = WE# = 1                      -> output disable
//   CE1# = CE0# = 1                    -> standby
//   REG# = 1 (common memory)
//     CE1#,CE0#,A0 = 1,0,0             -> even byte      (8- and 16-bit modes)
//     CE1#,CE0#,A0 = 1,0,1             -> odd byte       (8-bit mode)
//     CE1#,CE0#    = 0,1               -> odd byte only  (16-bit mode)
//     CE1#,CE0#    = 0,0               -> word           (16-bit mode)
//   REG# = 0 (attribute memory)
//     CE1#,CE0#,A0 = 1,0,0             -> attribute byte (even address only)
//
// OE# low selects the read form of a mode, WE# low the write form. The table
// comes from the controller's specification; two choices are this design's
// own: OE# and WE# low together is not a legal PCMCIA cycle and is decoded as
// standby, and an attribute access other than an even-byte access on CE0# is
// ignored (standby) since attribute memory is reachable only as even bytes.
//
// Interface: active-low host strobes and A0 in, access_mode_e out.
// Timing: purely combinational, zero cycles.
module access_decoder
  import pcmcia_pkg::*;
(
  input  logic         reg_n,   // REG#: 0 = attribute memory, 1 = common memory
  input  logic         oe_n,    // OE#: output (read) enable
  input  logic         we_n,    // WE#: write enable
  input  logic         ce1_n,   // CE1#: odd (high) byte enable
  input  logic         ce0_n,   // CE0#: even (low) byte enable
  input  logic         a0,      // A0: byte address within a word
  output access_mode_e mode
);

  always_comb begin
    mode = ACC_STANDBY;
    if (oe_n && we_n) begin
      mode = ACC_DISABLE;
    end else if (!oe_n && !we_n) begin
      mode = ACC_STANDBY;
    end else if (ce1_n && ce0_n) begin
      mode = ACC_STANDBY;
    end else if (reg_n) begin
      // Common memory: byte or word, both lanes reachable.
      unique casez ({ce1_n, ce0_n, a0})
        3'b100:  mode = !oe_n ? ACC_RD_EVEN     : ACC_WR_EVEN;
        3'b101:  mode = !oe_n ? ACC_RD_ODD      : ACC_WR_ODD;
        3'b01?:  mode = !oe_n ? ACC_RD_ODD_ONLY : ACC_WR_ODD_ONLY;
        3'b00?:  mode = !oe_n ? ACC_RD_WORD     : ACC_WR_WORD;
        default: mode = ACC_STANDBY;
      endcase
    end else begin
      // Attribute memory: even bytes only, on the low lane.
      if (ce1_n && !ce0_n && !a0)
        mode = !oe_n ? ACC_ATTR_RD : ACC_ATTR_WR;
    end
  end

endmodule
