// tb_ecc_logic: self-checking testbench of the ECC generation and correction.
// The reference is an independent Hamming (72,64) model written here with the
// positions computed by counting. Checks: encoding of random words and of the
// single-1 and two-1 patterns, correction of every single-bit error, detection
// of random double errors, and both bypass paths.
module tb_ecc_logic;
  import bist_pkg::*;
  logic wr_byp, rd_byp;
  logic [63:0] din;
  logic [7:0] chk_in;
  logic [DW-1:0] lo_di, hi_di, lo_do, hi_do, lo_out, hi_out;
  logic [FLAGW-1:0] flags;
  int checks = 0, failures = 0;

  ecc_logic dut (.*);

  int pos [64];
  initial begin
    int n;
    n = 0;
    for (int q = 1; q < 72; q++) if ((q & (q - 1)) != 0) begin pos[n] = q; n++; end
  end

  function automatic logic [7:0] ref_enc(logic [63:0] d);
    logic [6:0] h;
    h = '0;
    for (int i = 0; i < 64; i++) if (d[i]) h ^= 7'(pos[i]);
    return {^d ^ ^h, h};
  endfunction

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] d;
    logic [7:0]  c;
    logic [71:0] cw;
    #1;
    wr_byp = 0; rd_byp = 0; chk_in = '0;
    // encoding
    for (int n = 0; n < 300; n++) begin
      d = (n < 64) ? (64'd1 << n) : (n < 128) ? ((64'd1 << (n - 64)) | (64'd1 << ((n * 7) % 64)))
                                  : {$urandom, $urandom};
      din = d; #1;
      c = ref_enc(d);
      check("encode", {hi_di[35:32], lo_di[35:32]} == c && hi_di[31:0] == d[63:32] && lo_di[31:0] == d[31:0]);
      // read back clean
      lo_do = lo_di; hi_do = hi_di; #1;
      check("clean read", {hi_out[31:0], lo_out[31:0]} == d && flags[1:0] == 2'b00);
      // every single-bit error in data, Hamming and parity bits
      for (int b = 0; b < 72; b++) begin
        cw = {c, d};
        cw[b] = ~cw[b];
        lo_do = {cw[67:64], cw[31:0]}; hi_do = {cw[71:68], cw[63:32]}; #1;
        check("single corrected", {hi_out[31:0], lo_out[31:0]} == d && flags[1:0] == 2'b10);
      end
      // a double error
      begin
        int b1, b2;
        b1 = $urandom_range(0, 71); b2 = (b1 + 1 + $urandom_range(0, 70)) % 72;
        cw = {c, d}; cw[b1] = ~cw[b1]; cw[b2] = ~cw[b2];
        lo_do = {cw[67:64], cw[31:0]}; hi_do = {cw[71:68], cw[63:32]}; #1;
        check("double detected", flags[1:0] == 2'b01);
      end
    end
    // write bypass: check bits come from chk_in
    wr_byp = 1; din = 64'h0123_4567_89ab_cdef; chk_in = 8'h5a; #1;
    check("write bypass", {hi_di[35:32], lo_di[35:32]} == 8'h5a);
    // read bypass: raw stored bits out, flags quiet
    wr_byp = 0; rd_byp = 1; lo_do = 36'h9_1234_5678; hi_do = 36'h6_8765_4321; #1;
    check("read bypass", lo_out == 36'h9_1234_5678 && hi_out == 36'h6_8765_4321 && flags == '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
