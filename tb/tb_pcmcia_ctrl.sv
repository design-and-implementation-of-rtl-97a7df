// tb_pcmcia_ctrl: end-to-end test of the memory card controller at its
// default size (26-bit address, eight chip selects), acting as the PCMCIA
// host in front of a behavioural model of the card's memory devices.
//
// The host performs complete bus cycles: address, REG# and CE#[1:0] set up,
// then an OE# or WE# pulse, then CE# released. Every transfer type of the
// controller's function table is exercised: word, even byte, odd byte with
// lane swap (8-bit mode) and odd-byte-only (16-bit mode) reads and writes on
// common memory, even-byte attribute memory reads and writes, and writes
// blocked by WPin, by ATTWP and by a busy RDY. A golden byte store predicts
// every read. During each strobe the chip select pattern, the byte-lane
// strobes and the data enables are checked in the same time step as the
// host's strobe edge: the controller is combinational, so its latency is
// zero cycles. The bus cycles reproduce the controller's published
// waveforms: common even-byte read of FA at 0F9EFCA (CS# = FD), common
// write of CD/55 at 19CCDA0 (CS# = F7), attribute read of CD and attribute
// write of FF. Each mechanism is counted and a failure is counted for any
// that never occurred.
module tb_pcmcia_ctrl;
  localparam int unsigned DEV_AW = 8;

  logic [25:0] address;
  logic [1:0]  ce_n;
  logic        reg_n, oe_n, we_n, ready, wp;
  logic [15:0] d_host_in, d_host_out, d_mem_in, d_mem_out;
  logic        d_host_oe_hi, d_host_oe_lo, d_mem_oe_hi, d_mem_oe_lo;
  logic        wp_in, att_wp, rdy;
  logic [24:0] add;
  logic [7:0]  cs_n;
  logic        coel_n, coeh_n, cwel_n, cweh_n, cis_oe_n, cis_we_n, csa_n, cis_drive;
  logic        protocol_ok;

  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_word_rd, n_word_wr, n_even_rd, n_even_wr, n_swap_rd, n_swap_wr;
  int n_oddonly_rd, n_oddonly_wr, n_attr_rd, n_attr_wr;
  int n_wp_block, n_attwp_block, n_busy_block, n_attr_ignored, n_standby;
  logic [7:0] cs_used;

  pcmcia_ctrl dut (.*);

  card_memory_model #(.DEV_AW(DEV_AW)) u_card (
    .add, .cs_n, .coel_n, .coeh_n, .cwel_n, .cweh_n, .cis_oe_n, .cis_we_n, .csa_n,
    .d_mem_out, .d_mem_oe_hi, .d_mem_oe_lo, .d_mem_in, .protocol_ok
  );

  // Golden store: one byte per (space, chip select, device index, lane),
  // aliased the same way as the model's small devices.
  logic [7:0] golden [bit [31:0]];

  function automatic bit [31:0] key(logic r, logic [25:0] a);
    if (!r) return {1'b1, 31'(a[DEV_AW:1])};
    return {1'b0, 31'({a[25:23], a[DEV_AW:1], a[0]})};
  endfunction

  function automatic logic [7:0] gold(logic r, logic [25:0] a);
    return golden.exists(key(r, a)) ? golden[key(r, a)] : 8'h00;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: addr=%h reg=%b ce=%b", what, $time, address, reg_n, ce_n);
    end
  endtask

  function automatic logic [7:0] exp_cs(logic [25:0] a);
    return ~(8'b1 << a[25:23]);
  endfunction

  // One write cycle. ce: CE#[1:0]. Returns nothing; checks strobes mid-pulse.
  task automatic write_cycle(logic r, logic [25:0] a, logic [1:0] ce, logic [15:0] d);
    logic exp_lo, exp_hi, allowed;
    address = a; reg_n = r; ce_n = ce; d_host_in = d;
    #5;
    we_n = 1'b0;
    #1;  // same time step as far as the clockless controller is concerned
    check("write bus protocol", protocol_ok);
    if (r) begin
      exp_lo  = (ce == 2'b00) || (ce == 2'b10 && !a[0]);
      exp_hi  = (ce == 2'b00) || (ce == 2'b01) || (ce == 2'b10 && a[0]);
      allowed = !wp_in && rdy;
      check("write cs", cs_n == exp_cs(a));
      check("write cwel", cwel_n == !(exp_lo && allowed));
      check("write cweh", cweh_n == !(exp_hi && allowed));
      check("write no read strobes", coel_n && coeh_n && cis_oe_n && cis_we_n);
      check("write host not driven", !d_host_oe_hi && !d_host_oe_lo);
      if (allowed) cs_used[a[25:23]] = 1'b1;
      if (allowed) begin
        if (ce == 2'b00) begin
          golden[key(1, {a[25:1], 1'b0})] = d[7:0];
          golden[key(1, {a[25:1], 1'b1})] = d[15:8];
          n_word_wr++;
        end else if (ce == 2'b10 && !a[0]) begin
          golden[key(1, a)] = d[7:0];
          n_even_wr++;
        end else if (ce == 2'b10) begin
          golden[key(1, a)] = d[7:0];
          check("swap write data", d_mem_oe_hi && d_mem_out[15:8] == d[7:0]);
          n_swap_wr++;
        end else if (ce == 2'b01) begin
          golden[key(1, {a[25:1], 1'b1})] = d[15:8];
          n_oddonly_wr++;
        end
      end else if (wp_in) n_wp_block++;
      else n_busy_block++;
    end else begin
      allowed = !att_wp && rdy;
      check("attr write cs", cs_n == 8'hFF);
      if (ce == 2'b10 && !a[0]) begin
        check("attr write strobe", cis_we_n == !allowed && !csa_n && cis_drive);
        check("attr write data", d_mem_oe_lo && d_mem_out[7:0] == d[7:0]);
        if (allowed) begin golden[key(0, a)] = d[7:0]; n_attr_wr++; end
        else if (att_wp) n_attwp_block++;
        else n_busy_block++;
      end else begin
        check("attr write ignored", cis_we_n);
        n_attr_ignored++;
      end
      check("attr write no common strobes", cwel_n && cweh_n && coel_n && coeh_n);
    end
    #10;
    we_n = 1'b1;
    #5;
    ce_n = 2'b11;
    #1;
    check("idle after write", cs_n == 8'hFF && cwel_n && cweh_n && cis_we_n);
  endtask

  // One read cycle; compares the host-side data with the golden store.
  task automatic read_cycle(logic r, logic [25:0] a, logic [1:0] ce, output logic [15:0] q);
    logic [15:0] e;
    address = a; reg_n = r; ce_n = ce; d_host_in = 16'($urandom);
    #5;
    oe_n = 1'b0;
    #1;
    q = d_host_out;
    check("read bus protocol", protocol_ok);
    if (r) begin
      check("read cs", cs_n == exp_cs(a));
      check("read no write strobes", cwel_n && cweh_n && !d_mem_oe_lo && !d_mem_oe_hi);
      cs_used[a[25:23]] = 1'b1;
      if (ce == 2'b00) begin
        e = {gold(1, {a[25:1], 1'b1}), gold(1, {a[25:1], 1'b0})};
        check("word read", !coel_n && !coeh_n && d_host_oe_hi && d_host_oe_lo && q == e);
        n_word_rd++;
      end else if (ce == 2'b10 && !a[0]) begin
        check("even read", !coel_n && coeh_n && !d_host_oe_hi && d_host_oe_lo
                           && q[7:0] == gold(1, a));
        n_even_rd++;
      end else if (ce == 2'b10) begin
        check("odd swap read", coel_n && !coeh_n && !d_host_oe_hi && d_host_oe_lo
                               && q[7:0] == gold(1, a));
        n_swap_rd++;
      end else if (ce == 2'b01) begin
        check("odd only read", coel_n && !coeh_n && d_host_oe_hi && !d_host_oe_lo
                               && q[15:8] == gold(1, {a[25:1], 1'b1}));
        n_oddonly_rd++;
      end
    end else begin
      check("attr read cs", cs_n == 8'hFF && coel_n && coeh_n);
      if (ce == 2'b10 && !a[0]) begin
        check("attr read", !cis_oe_n && !csa_n && cis_drive && d_host_oe_lo
                           && !d_host_oe_hi && q[7:0] == gold(0, a));
        n_attr_rd++;
      end else begin
        check("attr read ignored", cis_oe_n && !d_host_oe_lo && !d_host_oe_hi);
        n_attr_ignored++;
      end
    end
    #10;
    oe_n = 1'b1;
    #1;
    check("output disable", !d_host_oe_hi && !d_host_oe_lo && coel_n && coeh_n && cis_oe_n);
    #4;
    ce_n = 2'b11;
    #1;
    check("standby", cs_n == 8'hFF);
    n_standby++;
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] q;
    logic [25:0] a;
    logic [1:0]  ce;
    address = '0; ce_n = 2'b11; reg_n = 1'b1; oe_n = 1'b1; we_n = 1'b1;
    d_host_in = '0; wp_in = 1'b0; att_wp = 1'b0; rdy = 1'b1;
    cs_used = '0;
    {n_word_rd, n_word_wr, n_even_rd, n_even_wr, n_swap_rd, n_swap_wr} = '0;
    {n_oddonly_rd, n_oddonly_wr, n_attr_rd, n_attr_wr} = '0;
    {n_wp_block, n_attwp_block, n_busy_block, n_attr_ignored, n_standby} = '0;
    #10;

    // Published waveforms.
    write_cycle(1, 26'h0F9EFCA, 2'b10, 16'h00FA);
    read_cycle (1, 26'h0F9EFCA, 2'b10, q);
    check("waveform even read FA", q[7:0] == 8'hFA);
    write_cycle(1, 26'h19CCDA0, 2'b00, 16'h55CD);
    read_cycle (1, 26'h19CCDA0, 2'b00, q);
    check("waveform word CD/55", q == 16'h55CD);
    write_cycle(0, 26'h000000A, 2'b10, 16'h00CD);
    read_cycle (0, 26'h000000A, 2'b10, q);
    check("waveform attr read CD", q[7:0] == 8'hCD);
    write_cycle(0, 26'h000000A, 2'b10, 16'h00FF);
    read_cycle (0, 26'h000000A, 2'b10, q);
    check("waveform attr write FF", q[7:0] == 8'hFF);

    // Random traffic over every transfer type and chip select.
    for (int i = 0; i < 400; i++) begin
      a  = {3'(i % 8), 23'($urandom)};
      ce = 2'($urandom_range(0, 2));
      write_cycle(1, a, ce, 16'($urandom));
      a  = {3'($urandom), 23'($urandom)};
      ce = 2'($urandom_range(0, 2));
      read_cycle(1, a, ce, q);
      if (i % 4 == 0) begin
        a = 26'($urandom) & ~26'h1;
        write_cycle(0, a, 2'b10, 16'($urandom));
        read_cycle(0, 26'($urandom) & ~26'h1, 2'b10, q);
      end
    end

    // Attribute accesses the card ignores: odd address, odd lane.
    read_cycle (0, 26'h0000013, 2'b10, q);
    write_cycle(0, 26'h0000012, 2'b01, 16'h1234);

    // Write protection and busy device: strobes stay high, data unchanged.
    wp_in = 1'b1;
    write_cycle(1, 26'h0F9EFCA, 2'b10, 16'h0011);
    check("WP pin", wp == 1'b1);
    wp_in = 1'b0;
    read_cycle(1, 26'h0F9EFCA, 2'b10, q);
    check("write protect kept FA", q[7:0] == 8'hFA);
    att_wp = 1'b1;
    write_cycle(0, 26'h0000040, 2'b10, 16'h0022);
    att_wp = 1'b0;
    rdy = 1'b0;
    write_cycle(1, 26'h19CCDA0, 2'b00, 16'h3344);
    write_cycle(0, 26'h0000040, 2'b10, 16'h0044);
    check("READY follows RDY", ready == 1'b0);
    rdy = 1'b1;
    read_cycle(1, 26'h19CCDA0, 2'b00, q);
    check("busy kept 55CD", q == 16'h55CD);

    #10;

    $display("mechanisms: word rd/wr %0d/%0d even rd/wr %0d/%0d swap rd/wr %0d/%0d",
             n_word_rd, n_word_wr, n_even_rd, n_even_wr, n_swap_rd, n_swap_wr);
    $display("  odd-only rd/wr %0d/%0d attr rd/wr %0d/%0d ignored %0d",
             n_oddonly_rd, n_oddonly_wr, n_attr_rd, n_attr_wr, n_attr_ignored);
    $display("  blocked wp/attwp/busy %0d/%0d/%0d standby %0d cs used %b",
             n_wp_block, n_attwp_block, n_busy_block, n_standby, cs_used);
    foreach (cs_used[k]) check($sformatf("chip select %0d used", k), cs_used[k]);
    check("word read",    n_word_rd > 0);    check("word write",    n_word_wr > 0);
    check("even read",    n_even_rd > 0);    check("even write",    n_even_wr > 0);
    check("swap read",    n_swap_rd > 0);    check("swap write",    n_swap_wr > 0);
    check("odd-only rd",  n_oddonly_rd > 0); check("odd-only wr",   n_oddonly_wr > 0);
    check("attr read",    n_attr_rd > 0);    check("attr write",    n_attr_wr > 0);
    check("wp block",     n_wp_block > 0);   check("attwp block",   n_attwp_block > 0);
    check("busy block",   n_busy_block > 0); check("attr ignored",  n_attr_ignored > 0);
    check("standby",      n_standby > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
