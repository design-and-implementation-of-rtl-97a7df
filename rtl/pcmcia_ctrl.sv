// pcmcia_ctrl: PCMCIA Type I memory card controller (SRAM and Flash cards).
//
// The controller sits between the PCMCIA socket and the card's memory
// devices: up to sixteen byte-wide common memory devices, arranged as eight
// pairs (low byte lane and high byte lane) each selected by one CS#, and one
// byte-wide attribute memory (EEPROM) holding the Card Information Structure.
// It contains no storage and no clock: every output is a combinational
// function of the socket pins, so a host cycle reaches the memory devices
// after gate delay only.
//
//   cs_decoder      CS#[7:0] from Address[25:23]; ADD[24:0] to the devices
//   access_decoder  REG#, OE#, WE#, CE1#, CE0#, A0 -> access mode
//   rw_control      COEL#/COEH#/CWEL#/CWEH#, CISOE#/CISWE#/CSa#, write
//                   protection (WPin, ATTWP) and RDY gating
//   data_steering   host <-> memory byte lanes, odd-byte swap in 8-bit mode
//
// The pin list follows the specification's block diagram: Address[25:0],
// CE#[1:0], REG#, WE#, OE#, WPin, ATTWP and RDY in; ADD[24:0], CS#[7:0],
// the four common memory strobes, READY and WP out; CISOE#, CISWE# and CSa#
// as tri-state outputs; DIHIGH/DILOW (socket) and DOHIGH/DOLOW (memory) as
// bidirectional buses. Each tri-state or bidirectional pin is brought out
// here as separate input, output and output-enable signals, to be joined by
// the FPGA's I/O buffers; 'x_oe' high means the card drives the pin.
//
// Timing: zero cycles; the specification quotes about 6 ns from OE# to the
// read strobes and 7 ns from WE# to the write strobes on its FPGA.
module pcmcia_ctrl #(
  parameter int unsigned ADDR_W = pcmcia_pkg::ADDR_W,  // host address width
  parameter int unsigned NUM_CS = pcmcia_pkg::NUM_CS    // chip enable outputs
) (
  // PCMCIA socket
  input  logic [ADDR_W-1:0] address,      // Address[25:0]
  input  logic [1:0]        ce_n,         // CE#[1:0]: [1] odd lane, [0] even lane
  input  logic              reg_n,        // REG#
  input  logic              oe_n,         // OE#
  input  logic              we_n,         // WE#
  output logic              ready,        // READY
  output logic              wp,           // WP
  input  logic [15:0]       d_host_in,    // DIHIGH:DILOW, driven by the host
  output logic [15:0]       d_host_out,   // DIHIGH:DILOW, driven by the card
  output logic              d_host_oe_hi, // card drives DIHIGH
  output logic              d_host_oe_lo, // card drives DILOW
  // card-side status inputs
  input  logic              wp_in,        // WPin: write protect switch
  input  logic              att_wp,       // ATTWP: attribute write protect
  input  logic              rdy,          // RDY/BUSY# of the memory devices
  // common memory devices
  output logic [ADDR_W-2:0] add,          // ADD[24:0]
  output logic [NUM_CS-1:0] cs_n,         // CS#[7:0]
  output logic              coel_n,       // COEL#
  output logic              coeh_n,       // COEH#
  output logic              cwel_n,       // CWEL#
  output logic              cweh_n,       // CWEH#
  input  logic [15:0]       d_mem_in,     // DOHIGH:DOLOW, driven by the devices
  output logic [15:0]       d_mem_out,    // DOHIGH:DOLOW, driven by the card
  output logic              d_mem_oe_hi,  // card drives DOHIGH
  output logic              d_mem_oe_lo,  // card drives DOLOW
  // attribute memory
  output logic              cis_oe_n,     // CISOE#
  output logic              cis_we_n,     // CISWE#
  output logic              csa_n,        // CSa#
  output logic              cis_drive     // output enable of CISOE#, CISWE#, CSa#
);

  import pcmcia_pkg::*;

  access_mode_e mode;

  cs_decoder #(
    .ADDR_W (ADDR_W),
    .NUM_CS (NUM_CS)
  ) u_cs_decoder (
    .address (address),
    .reg_n   (reg_n),
    .ce0_n   (ce_n[0]),
    .ce1_n   (ce_n[1]),
    .add     (add),
    .cs_n    (cs_n)
  );

  access_decoder u_access_decoder (
    .reg_n (reg_n),
    .oe_n  (oe_n),
    .we_n  (we_n),
    .ce1_n (ce_n[1]),
    .ce0_n (ce_n[0]),
    .a0    (address[0]),
    .mode  (mode)
  );

  rw_control u_rw_control (
    .mode      (mode),
    .reg_n     (reg_n),
    .ce0_n     (ce_n[0]),
    .wp_in     (wp_in),
    .att_wp    (att_wp),
    .rdy       (rdy),
    .coel_n    (coel_n),
    .coeh_n    (coeh_n),
    .cwel_n    (cwel_n),
    .cweh_n    (cweh_n),
    .cis_oe_n  (cis_oe_n),
    .cis_we_n  (cis_we_n),
    .csa_n     (csa_n),
    .cis_drive (cis_drive),
    .ready     (ready),
    .wp        (wp)
  );

  data_steering u_data_steering (
    .mode       (mode),
    .host_in    (d_host_in),
    .host_out   (d_host_out),
    .host_oe_hi (d_host_oe_hi),
    .host_oe_lo (d_host_oe_lo),
    .mem_in     (d_mem_in),
    .mem_out    (d_mem_out),
    .mem_oe_hi  (d_mem_oe_hi),
    .mem_oe_lo  (d_mem_oe_lo)
  );

endmodule
