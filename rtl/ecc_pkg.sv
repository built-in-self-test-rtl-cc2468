// ecc_pkg: the SEC-DED Hamming code of the 512x64 ECC RAM.
//
// 64 data bits and 7 Hamming bits form a 71-bit Hamming codeword: the Hamming
// bits sit at positions 1, 2, 4, 8, 16, 32 and 64, and data bit i at the i-th
// position that is not a power of two. Hamming bit j is the XOR of the data
// bits whose position has bit j set. An eighth bit, the XOR of all 71, makes
// double errors detectable. Decoding recomputes the Hamming bits: the syndrome
// names the position of a single error, which is corrected; a non-zero
// syndrome with even overall parity is a double error, flagged and left alone.
// Seven Hamming bits plus one overall parity bit is the method's code; the bit
// ordering is this design's own.
package ecc_pkg;

  // Codeword position (1..71) of data bit i.
  function automatic int unsigned data_pos(input int unsigned i);
    int unsigned p;
    p = i + 1;
    for (int unsigned j = 0; j < 7; j++)
      if (p >= (1 << j)) p++;   // skip each Hamming-bit position passed
    return p;
  endfunction

  typedef logic [6:0]  pos_t;
  typedef pos_t        pos_tab_t [64];
  typedef logic [63:0] mask_tab_t [7];

  function automatic pos_tab_t pos_table();
    pos_tab_t t;
    for (int unsigned i = 0; i < 64; i++) t[i] = 7'(data_pos(i));
    return t;
  endfunction

  // HMASK[j]: the data bits that Hamming bit j covers.
  function automatic mask_tab_t mask_table();
    mask_tab_t t;
    logic [63:0] m;
    for (int unsigned j = 0; j < 7; j++) begin
      for (int unsigned i = 0; i < 64; i++) m[i] = 1'(data_pos(i) >> j);
      t[j] = m;
    end
    return t;
  endfunction

  localparam pos_tab_t  DPOS  = pos_table();
  localparam mask_tab_t HMASK = mask_table();

  // The 8 check bits of a 64-bit word: {overall parity, Hamming[6:0]}.
  function automatic logic [7:0] ecc_encode(input logic [63:0] d);
    logic [6:0] h;
    for (int j = 0; j < 7; j++) h[j] = ^(d & HMASK[j]);
    return {^{d, h}, h};
  endfunction

  typedef struct packed {
    logic [63:0] data;    // corrected data
    logic        sbiterr; // a single error was corrected
    logic        dbiterr; // an uncorrectable error was found
  } ecc_dec_t;

  function automatic ecc_dec_t ecc_decode(input logic [63:0] d, input logic [7:0] c);
    ecc_dec_t r;
    logic [7:0] n;
    logic [6:0] s;
    logic       p;
    n = ecc_encode(d);
    s = n[6:0] ^ c[6:0];  // n[7] is not needed: p below covers all 72 bits
    p = ^{d, c};
    r.data = d;
    r.sbiterr = 1'b0;
    r.dbiterr = 1'b0;
    if (p) begin
      if (s > 7'd71) r.dbiterr = 1'b1;
      else begin
        r.sbiterr = 1'b1;
        for (int unsigned i = 0; i < 64; i++)
          if (DPOS[i] == s) r.data[i] = ~d[i];
      end
    end else if (s != 7'd0) begin
      r.dbiterr = 1'b1;
    end
    return r;
  endfunction

endpackage
