// card_memory_model: behavioural model of the memory devices on a PCMCIA
// memory card, for simulation only (not synthesizable RTL).
//
// Common memory: NUM_CS pairs of byte-wide SRAM-like devices, one per byte
// lane, pair k selected by cs_n[k]. Each device holds 2**DEV_AW bytes and
// uses only the low DEV_AW bits of the word address ADD, so the model is
// small; real devices would use ADD[22:0]. Attribute memory: one byte-wide
// device on the low data lane, selected by csa_n and indexed the same way.
//
// A device writes while its write enable and select are low (level
// sensitive, as an asynchronous SRAM does) and drives its lane while its
// output enable and select are low. protocol_ok is low whenever the bus is
// in an illegal state: a write strobe on a lane the controller does not
// drive, two chip selects at once, or the controller driving a lane a device
// is also driving. The testbench samples it during every strobe.
module card_memory_model #(
  parameter int unsigned ADDR_W = 26,
  parameter int unsigned NUM_CS = 8,
  parameter int unsigned DEV_AW = 8
) (
  input  logic [ADDR_W-2:0] add,
  input  logic [NUM_CS-1:0] cs_n,
  input  logic              coel_n,
  input  logic              coeh_n,
  input  logic              cwel_n,
  input  logic              cweh_n,
  input  logic              cis_oe_n,
  input  logic              cis_we_n,
  input  logic              csa_n,
  input  logic [15:0]       d_mem_out,
  input  logic              d_mem_oe_hi,
  input  logic              d_mem_oe_lo,
  output logic [15:0]       d_mem_in,
  output logic              protocol_ok
);

  logic [7:0] lo_mem [NUM_CS][2**DEV_AW];
  logic [7:0] hi_mem [NUM_CS][2**DEV_AW];
  logic [7:0] attr   [2**DEV_AW];

  logic [DEV_AW-1:0] idx;
  int                sel;
  logic              one_sel;

  initial begin
    foreach (lo_mem[k, i]) begin lo_mem[k][i] = '0; hi_mem[k][i] = '0; end
    foreach (attr[i]) attr[i] = '0;
  end

  always @* begin
    idx = add[DEV_AW-1:0];
    sel = -1;
    one_sel = 1'b1;
    for (int k = 0; k < NUM_CS; k++)
      if (!cs_n[k]) begin
        if (sel != -1) one_sel = 1'b0;
        sel = k;
      end
  end

  // Writes: level-sensitive storage, like an asynchronous SRAM.
  always_latch begin
    if (!cwel_n && sel >= 0) begin
      lo_mem[sel][idx] = d_mem_out[7:0];
    end
    if (!cweh_n && sel >= 0) begin
      hi_mem[sel][idx] = d_mem_out[15:8];
    end
    if (!cis_we_n && !csa_n) begin
      attr[idx] = d_mem_out[7:0];
    end
  end

  // Reads.
  always @* begin
    d_mem_in = '0;
    if (!coel_n && sel >= 0)       d_mem_in[7:0]  = lo_mem[sel][idx];
    if (!cis_oe_n && !csa_n)       d_mem_in[7:0]  = attr[idx];
    if (!coeh_n && sel >= 0)       d_mem_in[15:8] = hi_mem[sel][idx];
  end

  always_comb begin
    protocol_ok = one_sel;
    if ((!cwel_n || (!cis_we_n && !csa_n)) && !d_mem_oe_lo) protocol_ok = 1'b0;
    if (!cweh_n && !d_mem_oe_hi) protocol_ok = 1'b0;
    if (((!coel_n && sel >= 0) || (!cis_oe_n && !csa_n)) && d_mem_oe_lo) protocol_ok = 1'b0;
    if (!coeh_n && sel >= 0 && d_mem_oe_hi) protocol_ok = 1'b0;
  end

endmodule
