// cs_decoder: address buffer and memory device selection.
//
// The card's common memory is built from up to NUM_CS pairs of byte-wide
// devices (one device per byte lane; eight chip enables serve sixteen
// devices). The top log2(NUM_CS) address bits choose the pair: with the
// default 26-bit address, Address[25:23] = k drives CS#[k] low and all other
// chip selects high (a one-of-eight decoder, as in the specification's chip
// enable table).
//
// Chip selects are asserted only during a common memory cycle: REG# high and
// at least one of CE1#/CE0# low. Otherwise all are high. This gating is this
// design's reading of the controller's waveforms, which show CS# all high
// before the card is enabled.
//
// The address buffer passes the word address Address[ADDR_W-1:1] to the
// memory devices as ADD[ADDR_W-2:0]; A0 is consumed by the byte-lane logic
// and is therefore unused here.
// The 25-bit width of ADD is the specification's; which host bits it carries
// is this design's choice.
//
// Timing: purely combinational, zero cycles.
module cs_decoder #(
  parameter int unsigned ADDR_W = pcmcia_pkg::ADDR_W,  // host address width
  parameter int unsigned NUM_CS = pcmcia_pkg::NUM_CS    // chip enable outputs (power of two)
) (
  input  logic [ADDR_W-1:0] address,   // host address A[ADDR_W-1:0]
  input  logic              reg_n,     // REG#
  input  logic              ce0_n,     // CE0#
  input  logic              ce1_n,     // CE1#
  output logic [ADDR_W-2:0] add,       // word address to the memory devices
  output logic [NUM_CS-1:0] cs_n       // active-low chip selects
);

  localparam int unsigned SEL_W = $clog2(NUM_CS);

  logic [SEL_W-1:0] sel;
  logic             enable;

  always_comb begin
    sel    = address[ADDR_W-1 -: SEL_W];
    enable = reg_n && !(ce0_n && ce1_n);
    cs_n   = '1;
    if (enable)
      cs_n[sel] = 1'b0;
    add = address[ADDR_W-1:1];
  end

endmodule
