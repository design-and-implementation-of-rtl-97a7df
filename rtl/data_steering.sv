// data_steering: the controller's data buffer between the PCMCIA data bus
// and the memory devices' data bus, with byte-lane swapping.
//
// The host side (DIHIGH[15:8], DILOW[7:0]) and the memory side (DOHIGH[15:8],
// DOLOW[7:0]) are bidirectional. Each is split here into an input, an output
// and a per-lane output enable; the FPGA's tri-state I/O buffers join them on
// the pins. Per access mode:
//
//   mode                  host out                memory out
//   even byte read        DILOW  <= DOLOW         -
//   odd byte read (8-bit) DILOW  <= DOHIGH        -
//   odd byte only read    DIHIGH <= DOHIGH        -
//   word read             DIHIGH/DILOW <= DOHIGH/DOLOW
//   even byte write       -                       DOLOW  <= DILOW
//   odd byte write(8-bit) -                       DOHIGH <= DILOW
//   odd byte only write   -                       DOHIGH <= DIHIGH
//   word write            -                       DOHIGH/DOLOW <= DIHIGH/DILOW
//   attribute read        DILOW  <= DOLOW         -
//   attribute write       -                       DOLOW  <= DILOW
//
// Lanes not listed are released (high impedance). This table is the
// specification's; the attribute memory sitting on the low memory lane is
// taken from its attribute read/write waveforms. Data is driven toward the
// memory during a write cycle whether or not write protection blocks the
// strobe: without the strobe no device stores it.
//
// Timing: purely combinational, zero cycles.
module data_steering
  import pcmcia_pkg::*;
(
  input  access_mode_e mode,
  // host side
  input  logic [15:0]  host_in,      // DIHIGH:DILOW as driven by the host
  output logic [15:0]  host_out,     // value the card drives on DIHIGH:DILOW
  output logic         host_oe_hi,   // drive DIHIGH
  output logic         host_oe_lo,   // drive DILOW
  // memory side
  input  logic [15:0]  mem_in,       // DOHIGH:DOLOW as driven by the devices
  output logic [15:0]  mem_out,      // value driven on DOHIGH:DOLOW
  output logic         mem_oe_hi,    // drive DOHIGH
  output logic         mem_oe_lo     // drive DOLOW
);

  always_comb begin
    host_out   = '0;
    mem_out    = '0;
    host_oe_hi = 1'b0;
    host_oe_lo = 1'b0;
    mem_oe_hi  = 1'b0;
    mem_oe_lo  = 1'b0;

    unique case (mode)
      ACC_RD_EVEN, ACC_ATTR_RD: begin
        host_out[7:0] = mem_in[7:0];
        host_oe_lo    = 1'b1;
      end
      ACC_RD_ODD: begin
        host_out[7:0] = mem_in[15:8];
        host_oe_lo    = 1'b1;
      end
      ACC_RD_ODD_ONLY: begin
        host_out[15:8] = mem_in[15:8];
        host_oe_hi     = 1'b1;
      end
      ACC_RD_WORD: begin
        host_out   = mem_in;
        host_oe_hi = 1'b1;
        host_oe_lo = 1'b1;
      end
      ACC_WR_EVEN, ACC_ATTR_WR: begin
        mem_out[7:0] = host_in[7:0];
        mem_oe_lo    = 1'b1;
      end
      ACC_WR_ODD: begin
        mem_out[15:8] = host_in[7:0];
        mem_oe_hi     = 1'b1;
      end
      ACC_WR_ODD_ONLY: begin
        mem_out[15:8] = host_in[15:8];
        mem_oe_hi     = 1'b1;
      end
      ACC_WR_WORD: begin
        mem_out   = host_in;
        mem_oe_hi = 1'b1;
        mem_oe_lo = 1'b1;
      end
      default: ;
    endcase
  end

  // The card never drives a lane from both sides at once.
  always_comb begin
    assert (!((host_oe_hi || host_oe_lo) && (mem_oe_hi || mem_oe_lo)))
      else $error("data_steering: host and memory buses driven together");
  end

endmodule
