// tb_tpg_ecc: self-checking testbench of the ECC TPG.
// The TPG drives two block RAM models joined by the ECC logic into a 512x64
// ECC RAM. Configuration 9 (generation bypassed): every one of the 256 check
// values meets the decoder with data 0, and every data bit is hit by a single
// error; the test checks the corrected data and the error flags of each read.
// Configuration 10 (correction bypassed): all 64 single-1 and 2016 two-1
// patterns are written exactly once, and each raw read returns the pattern and
// its check bits as an independent Hamming model computes them. Clock counts
// 2N and 10N (N = 512) are checked.
module tb_tpg_ecc;
  import bist_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, start, wr_byp;
  tpg_out_t tpg;
  bram_port_t plo, phi, idle;
  logic [DW-1:0] lo_di, hi_di, lo_do, hi_do, lo_out, hi_out, lo_b, hi_b;
  logic [FLAGW-1:0] flags;
  logic c1, c2, c3, c4;
  assign idle = '0;

  tpg_ecc dut (.clk, .rst, .start, .wr_byp, .tpg);
  ecc_logic u_ecc (.wr_byp, .rd_byp(!wr_byp), .din(tpg.ecc_di), .chk_in(tpg.ecc_chk), .lo_di,
                   .hi_di, .lo_do, .hi_do, .lo_out, .hi_out, .flags);
  always_comb begin
    plo = tpg.pa; plo.di = lo_di;
    phi = tpg.pa; phi.di = hi_di;
  end
  bram_core u_lo (.clk, .width(W36), .wmode(WM_READ_FIRST), .oreg(1'b0), .mode(SM_ECC), .pa(plo),
                  .pb(idle), .doa(lo_do), .dob(lo_b), .casc_in_a(1'b0), .casc_in_b(1'b0),
                  .casc_out_a(c1), .casc_out_b(c2));
  bram_core u_hi (.clk, .width(W36), .wmode(WM_READ_FIRST), .oreg(1'b0), .mode(SM_ECC), .pa(phi),
                  .pb(idle), .doa(hi_do), .dob(hi_b), .casc_in_a(1'b0), .casc_in_b(1'b0),
                  .casc_out_a(c3), .casc_out_b(c4));

  int pos [64];
  function automatic logic [7:0] ref_enc(logic [63:0] d);
    logic [6:0] h;
    h = '0;
    for (int i = 0; i < 64; i++) if (d[i]) h ^= 7'(pos[i]);
    return {^d ^ ^h, h};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
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
    int n;
    logic [63:0] stored [512];
    logic [7:0]  schk [512];
    n = 0;
    for (int q = 1; q < 72; q++) if ((q & (q - 1)) != 0) begin pos[n] = q; n++; end
    rst = 1; start = 0; wr_byp = 1;
    @(posedge clk); #1; rst = 0;
    for (int c = 9; c <= 10; c++) begin
      int cycles, reads, singles, doubles, corrected, patterns, zeros;
      bit seen [logic [63:0]];
      wr_byp = (c == 9);
      start = 1; @(posedge clk); #1; start = 0;
      cycles = 0; reads = 0; singles = 0; doubles = 0; corrected = 0; patterns = 0; zeros = 0;
      while (!tpg.done && cycles < 10000) begin
        logic rd_now;
        int a;
        a = int'(tpg.pa.addr[8:0]);
        rd_now = tpg.pa.en && !tpg.pa.we;
        if (tpg.pa.en && tpg.pa.we) begin
          stored[a] = tpg.ecc_di;
          schk[a] = wr_byp ? tpg.ecc_chk : ref_enc(tpg.ecc_di);
          if (!wr_byp) begin
            if (tpg.ecc_di == '0) zeros++;
            else begin
              check("pattern once", !seen.exists(tpg.ecc_di));
              check("one or two 1s", $countones(tpg.ecc_di) inside {1, 2});
              seen[tpg.ecc_di] = 1'b1;
              patterns++;
            end
          end
        end
        @(posedge clk); #1;
        cycles++;
        if (rd_now) begin
          reads++;
          if (!wr_byp) begin
            check("raw read", {hi_out[31:0], lo_out[31:0]} == stored[a] &&
                              {hi_out[35:32], lo_out[35:32]} == schk[a]);
          end else begin
            // syndrome-based expectation from the independent model
            logic [7:0] diff;
            diff = ref_enc(stored[a]) ^ schk[a];
            if (diff == 8'h00) check("clean", flags[1:0] == 2'b00);
            else if (^diff == 1'b1 && (diff[6:0] == 7'd0 || diff[6:0] <= 7'd71)) begin
              check("single error flagged", flags[1:0] == 2'b10);
              singles++;
              if (stored[a] != '0) begin
                check("data corrected", {hi_out[31:0], lo_out[31:0]} == '0);
                corrected++;
              end
            end else begin
              check("double error flagged", flags[1] == 1'b0 && flags[0] == 1'b1);
              doubles++;
            end
          end
        end
      end
      check("clock count", cycles == ((c == 9) ? 1024 : 5120));
      if (c == 9) check("error classes", singles > 64 && doubles > 0 && corrected == 256);
      else check("all patterns", patterns == 2080);
      $display("config %0d: %0d clocks, %0d reads, singles %0d doubles %0d corrected %0d patterns %0d",
               c, cycles, reads, singles, doubles, corrected, patterns);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
