// tb_fifo_ctrl: self-checking testbench of the FIFO mode.
// A FIFO controller drives a block RAM model. For all four shapes, in standard
// and first-word-fall-through mode, random writes and reads (biased so the
// FIFO fills and drains completely) are checked against a queue reference:
// read data, FULL, EMPTY, ALMOST FULL, ALMOST EMPTY, WRERR and RDERR.
module tb_fifo_ctrl;
  import bist_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, fwft, wren, rden;
  width_e width;
  logic [11:0] almost;
  logic [DW-1:0] din, dout, ram_do, dob;
  logic full, empty, afull, aempty, wrerr, rderr;
  bram_port_t pa, pb;
  logic c1, c2;

  fifo_ctrl dut (.clk, .rst, .width, .fwft, .almost, .wren, .din, .rden, .dout, .full, .empty,
                 .afull, .aempty, .wrerr, .rderr, .pa, .pb, .ram_do);
  bram_core u_ram (.clk, .width, .wmode(WM_WRITE_FIRST), .oreg(1'b0), .mode(SM_NORMAL), .pa, .pb,
                   .doa(ram_do), .dob, .casc_in_a(1'b0), .casc_in_b(1'b0),
                   .casc_out_a(c1), .casc_out_b(c2));

  initial begin
    repeat (400000) @(posedge clk);
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
    logic [DW-1:0] q[$];
    logic [DW-1:0] front;
    int n_full, n_empty, n_wrerr, n_rderr, n_af, n_ae;
    n_full = 0; n_empty = 0; n_wrerr = 0; n_rderr = 0; n_af = 0; n_ae = 0;
    wren = 0; rden = 0; din = '0; fwft = 0; width = W36; almost = 12'd5; rst = 1;
    for (int m = 0; m < 8; m++) begin
      int depth, k;
      k = 2 + (m % 4);
      width = width_e'(k);
      fwft = (m >= 4);
      depth = 16384 >> k;
      almost = 12'($urandom_range(1, depth / 2));
      q.delete();
      rst = 1; wren = 0; rden = 0;
      @(posedge clk); #1; rst = 0;
      for (int t = 0; t < 8 * depth; t++) begin
        logic exp_wrerr, exp_rderr, std_rd;
        int phase;
        phase = (t / (2 * depth)) % 2;    // fill, then drain
        wren = ($urandom_range(0, 9) < (phase == 0 ? 9 : 1));
        rden = ($urandom_range(0, 9) < (phase == 0 ? 1 : 9));
        din  = {$urandom, $urandom} & width_mask(width);
        exp_wrerr = wren && (q.size() == depth);
        exp_rderr = rden && (fwft ? empty : (q.size() == 0));
        std_rd = !fwft && rden && q.size() != 0;
        front = (q.size() != 0) ? q[0] : '0;
        if (fwft && !empty) check("fwft data", dout == front);
        if (rden && !exp_rderr) void'(q.pop_front());
        if (wren && !exp_wrerr) q.push_back(din);
        @(posedge clk); #1;
        if (std_rd) check("read data", dout == front);
        check("full",   full == (q.size() == depth));
        check("afull",  afull == ((depth - q.size()) <= int'(almost)));
        check("aempty", aempty == (q.size() <= int'(almost)));
        if (!fwft) check("empty", empty == (q.size() == 0));
        else if (q.size() == 0) check("fwft empty", empty);
        check("wrerr", wrerr == exp_wrerr);
        check("rderr", rderr == exp_rderr);
        n_full += int'(full); n_empty += int'(empty); n_wrerr += int'(wrerr);
        n_rderr += int'(rderr); n_af += int'(afull && !full); n_ae += int'(aempty && !empty);
      end
    end
    check("all flags seen", n_full > 0 && n_empty > 0 && n_wrerr > 0 && n_rderr > 0 &&
                            n_af > 0 && n_ae > 0);
    $display("flags: full=%0d empty=%0d wrerr=%0d rderr=%0d", n_full, n_empty, n_wrerr, n_rderr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
