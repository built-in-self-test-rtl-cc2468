// Body shared by the end-to-end testbenches of v4_bram_bist. The including
// module declares `localparam int NS` (number of sites) and instantiates the
// design as `dut` with ports clk, rst, cfg_id, start, done, fail, ora_pass.
//
// It runs the fifteen BIST configurations in order on a fault-free array and
// checks, for each: the run length from start to done, that the pass/fail bit
// stays at pass and every ORA flip-flop holds pass, and that the two TPG copies
// drive identical patterns. It counts the mechanisms the method relies on
// (FIFO flags, ECC correction and detection, cascade ORA gating, output
// register, both ports) and fails any that never happened. Then it injects a
// stuck-at fault on one output bit of one RAM and checks that configuration 1
// detects it, that the carry-chain bit reports it, and that exactly the two
// ORAs watching that output of that RAM record it.

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, start, done, fail;
  logic [3:0] cfg_id;
  logic [bist_pkg::OUTW-1:0] ora_pass [NS];

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int expected_clocks(int c);
    case (c)
      1, 2: return 16 * 512 * 7;
      3:  return 23 * 512;
      4:  return 10 * 8192;
      5:  return 10 * 16384;
      6:  return 10 * 512;
      7, 8: return 20;
      9:  return 2 * 512;
      10: return 10 * 512;
      11: return 8 * 2048 + 9;
      12: return 8 * 512 + 9;
      13: return 8 * 1024 + 9;
      default: return 8 * 4096 + 9;
    endcase
  endfunction

  int n_full, n_empty, n_afull, n_aempty, n_wrerr, n_rderr, n_sbit, n_dbit, n_gated;
  int n_portb, n_tpg_diff, n_oreg;
  logic counting;

  // mechanism counters, sampled every clock
  always @(posedge clk) if (counting) begin
    logic [7:0] f;
    f = dut.flg[0];
    n_full   += int'(f[0]);
    n_empty  += int'(f[1]);
    n_afull  += int'(f[2] && !f[0]);
    n_aempty += int'(f[3] && !f[1]);
    n_wrerr  += int'(f[4]);
    n_rderr  += int'(f[5]);
    n_sbit   += int'(dut.ecc_flg[0][1]);
    n_dbit   += int'(dut.ecc_flg[0][0]);
    n_gated  += int'(dut.ce_bottom == 1'b0);
    n_portb  += int'(dut.tout[0].pb.en);
    n_oreg   += int'(dut.cfg.oreg);
    n_tpg_diff += int'(dut.tout[0] != dut.tout[1]);
  end

  task automatic run_cfg(int c, output int clocks);
    cfg_id = 4'(c);
    @(posedge clk); #1;
    start = 1; @(posedge clk); #1; start = 0;
    clocks = 0;
    while (!done && clocks < 400000) begin @(posedge clk); #1; clocks++; end
    repeat (3) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int clocks, total;
    n_full = 0; n_empty = 0; n_afull = 0; n_aempty = 0; n_wrerr = 0; n_rderr = 0;
    n_sbit = 0; n_dbit = 0; n_gated = 0; n_portb = 0; n_tpg_diff = 0; n_oreg = 0;
    counting = 0;
    rst = 1; start = 0; cfg_id = 4'd1;
    repeat (2) @(posedge clk); #1; rst = 0;
    counting = 1;
    total = 0;
    for (int c = 1; c <= 15; c++) begin
      int bad;
      run_cfg(c, clocks);
      total += clocks;
      bad = 0;
      for (int j = 0; j < NS; j++) bad += int'(ora_pass[j] != '1);
      check($sformatf("config %0d run length", c), clocks == expected_clocks(c));
      check($sformatf("config %0d passes", c), fail == 1'b0 && bad == 0);
      $display("config %2d: %6d clocks (expected %6d), fail=%0d, failing sites=%0d",
               c, clocks, expected_clocks(c), fail, bad);
    end
    counting = 0;
    $display("mechanisms: full=%0d empty=%0d afull=%0d aempty=%0d wrerr=%0d rderr=%0d",
             n_full, n_empty, n_afull, n_aempty, n_wrerr, n_rderr);
    $display("            sbiterr=%0d dbiterr=%0d gated=%0d portB=%0d oreg=%0d tpg_diff=%0d",
             n_sbit, n_dbit, n_gated, n_portb, n_oreg, n_tpg_diff);
    check("FULL seen", n_full > 0);
    check("EMPTY seen", n_empty > 0);
    check("ALMOST FULL seen", n_afull > 0);
    check("ALMOST EMPTY seen", n_aempty > 0);
    check("write error seen", n_wrerr > 0);
    check("read error seen", n_rderr > 0);
    check("single-bit correction seen", n_sbit > 0);
    check("double-bit detection seen", n_dbit > 0);
    check("cascade ORA gating seen", n_gated > 0);
    check("port B used", n_portb > 0);
    check("output register used", n_oreg > 0);
    check("TPG copies identical", n_tpg_diff == 0);
    $display("total BIST clocks for 15 configurations: %0d", total);

    // fault injection: data bit 5 of port A of RAM 3 stuck at 1
    force dut.doa[3][5] = 1'b1;
    run_cfg(1, clocks);
    check("fault detected", fail == 1'b1);
    for (int j = 0; j < NS; j++)
      for (int i = 0; i < int'(bist_pkg::OUTW); i++) begin
        logic expect_fail;
        expect_fail = (i == 5) && (j == 3 || j == 2);
        if (ora_pass[j][i] != !expect_fail) begin
          check($sformatf("diagnosis ORA %0d.%0d", j, i), 1'b0);
        end
      end
    check("fault located", ora_pass[3][5] == 1'b0 && ora_pass[2][5] == 1'b0);
    release dut.doa[3][5];
    run_cfg(1, clocks);
    check("pass after fault removed", fail == 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
