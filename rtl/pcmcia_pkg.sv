// pcmcia_pkg: types and constants shared by the PCMCIA memory card controller.
//
// access_mode_e names the rows of the controller's function table: every
// combination of REG#, OE#, WE#, CE1#, CE0# and A0 falls into exactly one of
// these modes. The decoder (access_decoder) produces it; the read/write
// strobe logic (rw_control) and the data buffer (data_steering) consume it.
// The bus widths are those of a PCMCIA Type I memory card: a 26-bit byte
// address, a 16-bit data bus split in an even (low) and odd (high) byte lane.
package pcmcia_pkg;

  localparam int unsigned ADDR_W = 26;  // host address A[25:0]
  localparam int unsigned NUM_CS = 8;   // chip enable outputs CS#[7:0]

  typedef enum logic [3:0] {
    ACC_DISABLE,         // OE# and WE# both high: output disable
    ACC_STANDBY,         // card not enabled (CE1# = CE0# = 1), or no legal access
    ACC_RD_EVEN,         // common: byte read, even byte (8- and 16-bit modes)
    ACC_RD_ODD,          // common: byte read, odd byte (8-bit mode, swapped to low lane)
    ACC_RD_ODD_ONLY,     // common: odd byte only read (16-bit mode)
    ACC_RD_WORD,         // common: word read (16-bit mode)
    ACC_WR_EVEN,         // common: byte write, even byte
    ACC_WR_ODD,          // common: byte write, odd byte (8-bit mode, swapped from low lane)
    ACC_WR_ODD_ONLY,     // common: odd byte only write (16-bit mode)
    ACC_WR_WORD,         // common: word write (16-bit mode)
    ACC_ATTR_RD,         // attribute memory read, even byte only
    ACC_ATTR_WR          // attribute memory write, even byte only
  } access_mode_e;

  // True for the four common-memory read modes.
  function automatic logic is_common_read(access_mode_e m);
    return m inside {ACC_RD_EVEN, ACC_RD_ODD, ACC_RD_ODD_ONLY, ACC_RD_WORD};
  endfunction

  // True for the four common-memory write modes.
  function automatic logic is_common_write(access_mode_e m);
    return m inside {ACC_WR_EVEN, ACC_WR_ODD, ACC_WR_ODD_ONLY, ACC_WR_WORD};
  endfunction

endpackage
