// tb_tpg_casc: self-checking testbench of the cascade TPG.
// The TPG drives a LOWER/UPPER pair of block RAM models and an UPPER RAM with
// an open cascade input. Checks: 20 clocks from start to done, every MATS+
// read returns the expected value through the cascade multiplexer, both
// halves of the 32K space are visited, and whenever the ORA clock enable of
// the bottom RAM is high the open-input RAM agrees with the connected one.
// Port B reads along with port A and is checked the same way.
module tb_tpg_casc;
  import bist_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, start;
  tpg_out_t tpg;
  logic [DW-1:0] lo_a, lo_b, up_a, up_b, op_a, op_b;
  logic lca, lcb, uca, ucb, oca, ocb;

  tpg_casc dut (.clk, .rst, .start, .tpg);
  bram_core u_lo (.clk, .width(W1), .wmode(WM_WRITE_FIRST), .oreg(1'b0), .mode(SM_CASC_LOWER),
                  .pa(tpg.pa), .pb(tpg.pb), .doa(lo_a), .dob(lo_b), .casc_in_a(1'b0),
                  .casc_in_b(1'b0), .casc_out_a(lca), .casc_out_b(lcb));
  bram_core u_up (.clk, .width(W1), .wmode(WM_WRITE_FIRST), .oreg(1'b0), .mode(SM_CASC_UPPER),
                  .pa(tpg.pa), .pb(tpg.pb), .doa(up_a), .dob(up_b), .casc_in_a(lca),
                  .casc_in_b(lcb), .casc_out_a(uca), .casc_out_b(ucb));
  bram_core u_op (.clk, .width(W1), .wmode(WM_WRITE_FIRST), .oreg(1'b0), .mode(SM_CASC_UPPER),
                  .pa(tpg.pa), .pb(tpg.pb), .doa(op_a), .dob(op_b), .casc_in_a(1'b0),
                  .casc_in_b(1'b0), .casc_out_a(oca), .casc_out_b(ocb));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int cycles, reads, lo_hits, hi_hits, gated, wrs;
    logic mem [logic [14:0]];
    rst = 1; start = 0;
    @(posedge clk); #1; rst = 0;
    start = 1; @(posedge clk); #1; start = 0;
    cycles = 0; reads = 0; lo_hits = 0; hi_hits = 0; gated = 0; wrs = 0;
    while (!tpg.done && cycles < 100) begin
      logic rd_now, expv;
      rd_now = tpg.pa.en && !tpg.pa.we;
      expv = mem.exists(tpg.pa.addr) ? mem[tpg.pa.addr] : 1'b0;
      if (tpg.pa.en && tpg.pa.we) begin mem[tpg.pa.addr] = tpg.pa.di[0]; wrs++; end
      if (tpg.pa.en) begin
        if (tpg.pa.addr[14]) hi_hits++; else lo_hits++;
      end
      @(posedge clk); #1;
      cycles++;
      if (rd_now) begin
        check("cascade read", up_a[0] == expv);
        check("cascade read port B", up_b[0] == expv);
        reads++;
      end
      if (tpg.ora_ce_bottom) check("gated compare", op_a == up_a);
      else gated++;
    end
    check("20 clocks", cycles == 20);
    check("8 reads", reads == 8);
    check("12 writes", wrs == 12);
    check("both halves", lo_hits == 10 && hi_hits == 10);
    check("enable gated", gated > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
