// tb_data_steering: self-checking test of the data buffer and byte-lane swap.
//
// For every access mode, random host-side and memory-side data are applied
// many times. The expected lane drivers are listed per mode: which host lane
// is driven and from which memory lane, or which memory lane is driven and
// from which host lane. Undriven lanes are only checked for their enables.
module tb_data_steering;
  import pcmcia_pkg::*;

  access_mode_e mode;
  logic [15:0] host_in, host_out, mem_in, mem_out;
  logic host_oe_hi, host_oe_lo, mem_oe_hi, mem_oe_lo;
  int checks = 0, failures = 0;

  data_steering dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_lane(string what, logic oe, logic exp_oe,
                             logic [7:0] val, logic [7:0] exp_val);
    checks++;
    if (oe !== exp_oe || (exp_oe && val !== exp_val)) begin
      failures++;
      $display("FAIL %s mode=%s oe=%b exp_oe=%b val=%h exp=%h",
               what, mode.name(), oe, exp_oe, val, exp_val);
    end
  endtask

  initial begin
    access_mode_e m;
    m = m.first();
    forever begin
      for (int i = 0; i < 20; i++) begin
        mode = m;
        host_in = 16'($urandom);
        mem_in  = 16'($urandom);
        #1;
        unique case (m)
          ACC_RD_EVEN, ACC_ATTR_RD: begin
            expect_lane("host lo", host_oe_lo, 1, host_out[7:0], mem_in[7:0]);
            expect_lane("host hi", host_oe_hi, 0, '0, '0);
            expect_lane("mem lo", mem_oe_lo, 0, '0, '0);
            expect_lane("mem hi", mem_oe_hi, 0, '0, '0);
          end
          ACC_RD_ODD: begin
            expect_lane("host lo", host_oe_lo, 1, host_out[7:0], mem_in[15:8]);
            expect_lane("host hi", host_oe_hi, 0, '0, '0);
            expect_lane("mem lo", mem_oe_lo, 0, '0, '0);
            expect_lane("mem hi", mem_oe_hi, 0, '0, '0);
          end
          ACC_RD_ODD_ONLY: begin
            expect_lane("host lo", host_oe_lo, 0, '0, '0);
            expect_lane("host hi", host_oe_hi, 1, host_out[15:8], mem_in[15:8]);
            expect_lane("mem lo", mem_oe_lo, 0, '0, '0);
            expect_lane("mem hi", mem_oe_hi, 0, '0, '0);
          end
          ACC_RD_WORD: begin
            expect_lane("host lo", host_oe_lo, 1, host_out[7:0], mem_in[7:0]);
            expect_lane("host hi", host_oe_hi, 1, host_out[15:8], mem_in[15:8]);
            expect_lane("mem lo", mem_oe_lo, 0, '0, '0);
            expect_lane("mem hi", mem_oe_hi, 0, '0, '0);
          end
          ACC_WR_EVEN, ACC_ATTR_WR: begin
            expect_lane("host lo", host_oe_lo, 0, '0, '0);
            expect_lane("host hi", host_oe_hi, 0, '0, '0);
            expect_lane("mem lo", mem_oe_lo, 1, mem_out[7:0], host_in[7:0]);
            expect_lane("mem hi", mem_oe_hi, 0, '0, '0);
          end
          ACC_WR_ODD: begin
            expect_lane("host lo", host_oe_lo, 0, '0, '0);
            expect_lane("host hi", host_oe_hi, 0, '0, '0);
            expect_lane("mem lo", mem_oe_lo, 0, '0, '0);
            expect_lane("mem hi", mem_oe_hi, 1, mem_out[15:8], host_in[7:0]);
          end
          ACC_WR_ODD_ONLY: begin
            expect_lane("host lo", host_oe_lo, 0, '0, '0);
            expect_lane("host hi", host_oe_hi, 0, '0, '0);
            expect_lane("mem lo", mem_oe_lo, 0, '0, '0);
            expect_lane("mem hi", mem_oe_hi, 1, mem_out[15:8], host_in[15:8]);
          end
          ACC_WR_WORD: begin
            expect_lane("host lo", host_oe_lo, 0, '0, '0);
            expect_lane("host hi", host_oe_hi, 0, '0, '0);
            expect_lane("mem lo", mem_oe_lo, 1, mem_out[7:0], host_in[7:0]);
            expect_lane("mem hi", mem_oe_hi, 1, mem_out[15:8], host_in[15:8]);
          end
          default: begin
            expect_lane("host lo", host_oe_lo, 0, '0, '0);
            expect_lane("host hi", host_oe_hi, 0, '0, '0);
            expect_lane("mem lo", mem_oe_lo, 0, '0, '0);
            expect_lane("mem hi", mem_oe_hi, 0, '0, '0);
          end
        endcase
      end
      if (m == m.last()) break;
      m = m.next();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
