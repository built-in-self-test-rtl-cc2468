// tb_tpg_bram: self-checking testbench of the block RAM TPG.
// The TPG drives a fault-free block RAM model. For each algorithm and shape of
// configurations 1-6 it checks every read the algorithm makes (the RAM must
// return the value the march expects), the number of clocks from start to
// done (16N x backgrounds, 23N, 10N), that both ports are used where the
// algorithm says, and that the background changes between March LR passes.
module tb_tpg_bram;
  import bist_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, start, use_port_b, exp_vld, exp_on_b;
  alg_e alg;
  width_e width;
  tpg_out_t tpg;
  logic [DW-1:0] exp, doa, dob;
  logic c1, c2;

  tpg_bram dut (.clk, .rst, .start, .alg, .width, .use_port_b, .tpg, .exp, .exp_vld, .exp_on_b);
  bram_core u_ram (.clk, .width, .wmode(WM_READ_FIRST), .oreg(1'b0), .mode(SM_NORMAL),
                   .pa(tpg.pa), .pb(tpg.pb), .doa, .dob, .casc_in_a(1'b0), .casc_in_b(1'b0),
                   .casc_out_a(c1), .casc_out_b(c2));

  initial begin
    repeat (600000) @(posedge clk);
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

  task automatic run(alg_e al, width_e w, logic pb, int exp_cycles);
    int cycles, reads, a_ops, b_ops, bgs;
    logic [DW-1:0] last_wr;
    alg = al; width = w; use_port_b = pb;
    start = 1; @(posedge clk); #1; start = 0;
    cycles = 0; reads = 0; a_ops = 0; b_ops = 0; bgs = 0;
    last_wr = '1;
    while (!tpg.done) begin
      logic nv, nb;
      logic [DW-1:0] ne;
      nv = exp_vld; nb = exp_on_b; ne = exp;
      a_ops += int'(tpg.pa.en); b_ops += int'(tpg.pb.en);
      // a new background shows as a first write value never seen before
      if (tpg.pa.en && tpg.pa.we && tpg.pa.di != last_wr && tpg.pa.di != ~last_wr) bgs++;
      if (tpg.pb.en && tpg.pb.we && tpg.pb.di != last_wr && tpg.pb.di != ~last_wr) bgs++;
      if (tpg.pa.en && tpg.pa.we) last_wr = tpg.pa.di;
      if (tpg.pb.en && tpg.pb.we) last_wr = tpg.pb.di;
      @(posedge clk); #1;
      cycles++;
      if (nv) begin                      // read data appear one clock later
        check("march read", (nb ? dob : doa) == ne);
        reads++;
      end
      if (cycles > 400000) break;
    end
    check("clock count", cycles == exp_cycles);
    check("reads made", reads > 0);
    if (al == ALG_2PF)  check("both ports", a_ops > 0 && b_ops > 0);
    if (al == ALG_MATS) check("both ports", a_ops == b_ops);
    if (al == ALG_MLR_BDS) begin
      check("one port", pb ? a_ops == 0 : b_ops == 0);
      check("backgrounds", bgs >= 6);
    end
    $display("alg %0d width %0d port_b %0d: %0d clocks (expected %0d), %0d reads",
             al, w, pb, cycles, exp_cycles, reads);
  endtask

  initial begin
    rst = 1; start = 0; alg = ALG_MATS; width = W36; use_port_b = 0;
    @(posedge clk); #1; rst = 0;
    run(ALG_MLR_BDS, W36, 1'b0, 16 * 512 * 7);
    run(ALG_MLR_BDS, W36, 1'b1, 16 * 512 * 7);
    run(ALG_2PF,     W36, 1'b0, 23 * 512);
    run(ALG_MATS,    W2,  1'b0, 10 * 8192);
    run(ALG_MATS,    W1,  1'b0, 10 * 16384);
    run(ALG_MATS,    W36, 1'b0, 10 * 512);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
