// tb_tpg_fifo: self-checking testbench of the FIFO TPG.
// The TPG drives a FIFO (controller plus block RAM model) in each shape, in
// standard and first-word-fall-through mode. Checks: the run takes 8N + 9
// clocks, the FIFO is reset first, the FIFO becomes FULL after N writes and
// EMPTY after N reads in every background, the extra write and read are
// refused (WRERR, RDERR), read data come out in write order, and the four
// backgrounds toggle every data bit.
module tb_tpg_fifo;
  import bist_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, start, fwft;
  width_e width;
  tpg_out_t tpg;
  logic [DW-1:0] dout, ram_do, dob;
  logic full, empty, afull, aempty, wrerr, rderr, c1, c2;
  bram_port_t pa, pb;

  tpg_fifo dut (.clk, .rst, .start, .width, .tpg);
  fifo_ctrl u_fifo (.clk, .rst(tpg.fifo_rst), .width, .fwft, .almost(12'h080), .wren(tpg.fifo_wr),
                    .din(tpg.fifo_di), .rden(tpg.fifo_rd), .dout, .full, .empty, .afull, .aempty,
                    .wrerr, .rderr, .pa, .pb, .ram_do);
  bram_core u_ram (.clk, .width, .wmode(WM_WRITE_FIRST), .oreg(1'b0), .mode(SM_NORMAL), .pa, .pb,
                   .doa(ram_do), .dob, .casc_in_a(1'b0), .casc_in_b(1'b0),
                   .casc_out_a(c1), .casc_out_b(c2));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    rst = 1; start = 0; fwft = 0; width = W4;
    @(posedge clk); #1; rst = 0;
    for (int m = 0; m < 5; m++) begin
      int n, cycles, fulls, empties, wrerrs, rderrs, resets;
      logic was_full;
      logic [DW-1:0] q[$];
      logic [DW-1:0] ones, zeros;
      width = width_e'(2 + (m % 4));
      fwft = (m == 4);
      n = 16384 >> (2 + (m % 4));
      start = 1; @(posedge clk); #1; start = 0;
      cycles = 0; fulls = 0; empties = 0; wrerrs = 0; rderrs = 0; resets = 0; was_full = 0;
      ones = '0; zeros = '0;
      while (!tpg.done && cycles < 100000) begin
        logic std_rd, fw_rd;
        logic [DW-1:0] front;
        front = (q.size() != 0) ? q[0] : '0;
        std_rd = !fwft && tpg.fifo_rd && q.size() != 0;
        fw_rd  = fwft && tpg.fifo_rd && q.size() != 0;
        if (fw_rd) check("fwft data", dout == front);
        resets += int'(tpg.fifo_rst);
        if (tpg.fifo_rd && q.size() != 0) void'(q.pop_front());
        if (tpg.fifo_wr && q.size() != n) begin
          q.push_back(tpg.fifo_di);
          ones |= tpg.fifo_di; zeros |= ~tpg.fifo_di;
        end
        @(posedge clk); #1;
        cycles++;
        if (std_rd) check("read data", dout == front);
        fulls += int'(full && !was_full);
        was_full = full;
        empties += int'(empty && q.size() == 0 && tpg.fifo_rd);
        wrerrs += int'(wrerr);
        rderrs += int'(rderr);
      end
      check("clock count", cycles == 8 * n + 9);
      check("reset once", resets == 1);
      check("four fills", fulls == 4);
      check("write errors", wrerrs == 4);
      check("read errors", rderrs == 4);
      check("bits toggled", (ones & width_mask(width)) == width_mask(width) &&
                            (zeros & width_mask(width)) == width_mask(width));
      $display("shape %0d fwft %0d: %0d clocks, %0d fills, %0d/%0d errors",
               width, fwft, cycles, fulls, wrerrs, rderrs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
