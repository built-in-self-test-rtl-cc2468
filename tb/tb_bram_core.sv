// tb_bram_core: self-checking testbench of the block RAM model.
// Phase 1: random dual-port traffic for every width, write mode and output
// register setting, checked against a flat bit-level reference (16K data bits,
// 2K parity bits; location a of a 2^k-bit port is data bits a*2^k and up).
// Phase 2: two RAMs cascaded as LOWER and UPPER form a 32Kx1 RAM; random
// accesses are checked against a 32K-bit reference, and an UPPER RAM with an
// open cascade input must read 0 in the lower half.
module tb_bram_core;
  import bist_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  width_e width; wmode_e wmode; logic oreg; site_mode_e mode;
  bram_port_t pa, pb;
  logic [DW-1:0] doa, dob;
  logic coa, cob;
  bram_core dut (.clk, .width, .wmode, .oreg, .mode, .pa, .pb, .doa, .dob,
                 .casc_in_a(1'b0), .casc_in_b(1'b0), .casc_out_a(coa), .casc_out_b(cob));

  // cascade pair
  bram_port_t cp;
  logic [DW-1:0] lo_a, lo_b, up_a, up_b;
  logic lca, lcb, uca, ucb;
  bram_port_t idle;
  assign idle = '0;
  bram_core u_lo (.clk, .width(W1), .wmode(WM_WRITE_FIRST), .oreg(1'b0), .mode(SM_CASC_LOWER),
                  .pa(cp), .pb(idle), .doa(lo_a), .dob(lo_b), .casc_in_a(1'b0), .casc_in_b(1'b0),
                  .casc_out_a(lca), .casc_out_b(lcb));
  bram_core u_up (.clk, .width(W1), .wmode(WM_WRITE_FIRST), .oreg(1'b0), .mode(SM_CASC_UPPER),
                  .pa(cp), .pb(idle), .doa(up_a), .dob(up_b), .casc_in_a(lca), .casc_in_b(lcb),
                  .casc_out_a(uca), .casc_out_b(ucb));
  // an UPPER RAM with an open cascade input
  logic [DW-1:0] op_a, op_b;
  logic oca, ocb;
  bram_core u_open (.clk, .width(W1), .wmode(WM_WRITE_FIRST), .oreg(1'b0), .mode(SM_CASC_UPPER),
                  .pa(cp), .pb(idle), .doa(op_a), .dob(op_b), .casc_in_a(1'b0), .casc_in_b(1'b0),
                  .casc_out_a(oca), .casc_out_b(ocb));

  logic rd [16384];
  logic rp [2048];
  logic r32 [32768];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DW-1:0] ref_read(int k, int a);
    logic [DW-1:0] o;
    o = '0;
    for (int i = 0; i < (1 << k); i++) o[i] = rd[a * (1 << k) + i];
    if (k >= 3) for (int i = 0; i < (1 << (k - 3)); i++) o[32 + i] = rp[a * (1 << (k - 3)) + i];
    return o;
  endfunction

  task automatic ref_write(int k, int a, logic [DW-1:0] d);
    for (int i = 0; i < (1 << k); i++) rd[a * (1 << k) + i] = d[i];
    if (k >= 3) for (int i = 0; i < (1 << (k - 3)); i++) rp[a * (1 << (k - 3)) + i] = d[32 + i];
  endtask

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    logic [DW-1:0] ea, eb, ea_q, eb_q, ea_p, eb_p, ea_r, eb_r;
    int wrops;
    wrops = 0;
    for (int i = 0; i < 16384; i++) rd[i] = 1'b0;
    for (int i = 0; i < 2048; i++) rp[i] = 1'b0;
    for (int i = 0; i < 32768; i++) r32[i] = 1'b0;
    pa = '0; pb = '0; cp = '0; mode = SM_NORMAL; width = W36; wmode = WM_WRITE_FIRST; oreg = 0;
    ea_q = '0; eb_q = '0;
    @(posedge clk); #1;
    for (int cfg = 0; cfg < 36; cfg++) begin
      int k, n;
      k = cfg % 6;
      width = width_e'(k);
      wmode = wmode_e'((cfg / 6) % 3);
      oreg  = (cfg >= 18);
      n = 16384 >> k;
      ea_p = doa; eb_p = dob; // hold values carried over
      ea_r = doa; eb_r = dob;
      for (int t = 0; t < 1500; t++) begin
        int aa, ab;
        logic [DW-1:0] da, db, oa, ob;
        aa = (t < 60) ? t % 8 : $urandom_range(0, n - 1);
        ab = $urandom_range(0, n - 1);
        pa.en = ($urandom_range(0, 7) != 0);
        pb.en = ($urandom_range(0, 7) != 0);
        pa.we = (t < 60) ? 1'b1 : 1'($urandom);
        pb.we = 1'($urandom);
        // keep the two ports on different rows whenever one of them writes
        if ((aa >> (5 - k)) == (ab >> (5 - k))) pb.en = 1'b0;
        da = {$urandom, $urandom}; db = {$urandom, $urandom};
        pa.addr = AW'(aa); pb.addr = AW'(ab); pa.di = da; pb.di = db;
        oa = ref_read(k, aa); ob = ref_read(k, ab);
        ea = ea_q; eb = eb_q;
        if (pa.en) ea = (!pa.we || wmode == WM_READ_FIRST) ? oa :
                        (wmode == WM_WRITE_FIRST) ? (da & width_mask(width)) : ea_q;
        if (pb.en) eb = (!pb.we || wmode == WM_READ_FIRST) ? ob :
                        (wmode == WM_WRITE_FIRST) ? (db & width_mask(width)) : eb_q;
        if (pa.en && pa.we) begin ref_write(k, aa, da); wrops++; end
        if (pb.en && pb.we) ref_write(k, ab, db);
        @(posedge clk); #1;
        ea_r = ea_p; eb_r = eb_p;     // registered copy of the previous latch
        ea_p = ea; eb_p = eb;
        ea_q = ea; eb_q = eb;
        if (t > 2) begin
          check("port A", doa == (oreg ? ea_r : ea));
          check("port B", dob == (oreg ? eb_r : eb));
        end
      end
      pa = '0; pb = '0;
    end
    // cascade 32Kx1
    for (int t = 0; t < 6000; t++) begin
      int a;
      logic d;
      a = (t < 64) ? ((t % 2) ? 16384 + t : t) : $urandom_range(0, 32767);
      d = 1'($urandom);
      cp.en = 1'b1; cp.we = (t < 64) ? 1'b1 : 1'($urandom); cp.addr = AW'(a); cp.di = DW'(d);
      @(posedge clk); #1;
      if (cp.we) r32[a] = d;
      check("cascade read", up_a[0] == r32[a] && up_a[DW-1:1] == '0);
      check("open cascade", op_a[0] == (a >= 16384 ? r32[a] : 1'b0));
    end
    check("writes happened", wrops > 1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
