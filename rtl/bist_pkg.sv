// bist_pkg: types and constants shared by the block-RAM BIST design.
//
// The design tests the block RAMs of a Virtex-4 class FPGA with a circular
// comparison architecture: identical test pattern generators (TPGs) drive
// identically configured block RAMs under test, and every output of every RAM
// is compared with the same output of a neighbouring RAM by an output response
// analyzer (ORA). The fifteen BIST configurations of the method (normal RAM,
// cascade, ECC and FIFO modes) are selected here by a configuration number that
// stands for the bitstream that would be downloaded; cfg_decode() turns that
// number into the settings of the TPGs and the RAMs. The list of configurations,
// their algorithms, address depths and widths follow the method; the write mode,
// FIFO mode and ALMOST offsets given to each configuration are this design's
// own choices.
package bist_pkg;

  // Width code of a block RAM port: data bits = 1 << code, parity bits for
  // codes 3..5 (x9, x18, x36) = 1 << (code - 3).
  typedef enum logic [2:0] {
    W1 = 3'd0, W2 = 3'd1, W4 = 3'd2, W9 = 3'd3, W18 = 3'd4, W36 = 3'd5
  } width_e;

  // Write modes of a block RAM port.
  typedef enum logic [1:0] {
    WM_WRITE_FIRST = 2'd0, WM_READ_FIRST = 2'd1, WM_NO_CHANGE = 2'd2
  } wmode_e;

  // Mode of one block RAM site.
  typedef enum logic [2:0] {
    SM_NORMAL = 3'd0, SM_FIFO = 3'd1, SM_CASC_LOWER = 3'd2, SM_CASC_UPPER = 3'd3,
    SM_ECC = 3'd4
  } site_mode_e;

  // Which TPG drives a configuration.
  typedef enum logic [1:0] {
    TK_BRAM = 2'd0, TK_CASC = 2'd1, TK_ECC = 2'd2, TK_FIFO = 2'd3
  } tpg_kind_e;

  // Algorithms of the block RAM TPG.
  typedef enum logic [1:0] {
    ALG_MLR_BDS = 2'd0, ALG_2PF = 2'd1, ALG_MATS = 2'd2
  } alg_e;

  localparam int unsigned DW      = 36;     // widest port, data + parity
  localparam int unsigned AW      = 15;     // 14 address bits + cascade MSB
  localparam int unsigned ROWS    = 512;    // 512 x 36 = 18K bits
  localparam int unsigned FLAGW   = 8;
  localparam int unsigned OUTW    = 2 * DW + FLAGW;  // outputs compared per site

  // One port of a block RAM.
  typedef struct packed {
    logic          en;
    logic          we;
    logic [AW-1:0] addr;
    logic [DW-1:0] di;
  } bram_port_t;

  // Everything a TPG drives into the array.
  typedef struct packed {
    bram_port_t    pa;
    bram_port_t    pb;
    logic          fifo_rst;
    logic          fifo_wr;
    logic          fifo_rd;
    logic [DW-1:0] fifo_di;
    logic [63:0]   ecc_di;        // ECC RAM write data
    logic [7:0]    ecc_chk;       // check bits written when ECC write is bypassed
    logic          ora_ce_bottom; // clock enable of ORAs watching the bottom RAM
    logic          done;
  } tpg_out_t;


  // Settings of one BIST configuration.
  typedef struct packed {
    tpg_kind_e  kind;
    alg_e       alg;
    width_e     width;
    wmode_e     wmode;
    logic       oreg;        // output register used
    logic       use_port_b;  // single-port algorithm applied through port B
    logic       casc_swap;   // cascade: even sites UPPER instead of LOWER
    logic       ecc_wr_byp;  // ECC write (Hamming generation) disabled
    logic       ecc_rd_byp;  // ECC read (correction) disabled
    logic       fwft;        // FIFO first-word-fall-through
    logic [11:0] almost;     // ALMOST FULL / ALMOST EMPTY offset
    logic [1:0] cmp_dist;    // ORA compares site j with site j + cmp_dist
  } cfg_t;

  // Settings of BIST configuration 1..15 (numbering of the method).
  function automatic cfg_t cfg_decode(input logic [3:0] id);
    cfg_t c;
    c = '{kind: TK_BRAM, alg: ALG_MLR_BDS, width: W36, wmode: WM_WRITE_FIRST,
          oreg: 1'b0, use_port_b: 1'b0, casc_swap: 1'b0, ecc_wr_byp: 1'b0,
          ecc_rd_byp: 1'b0, fwft: 1'b0, almost: 12'h080, cmp_dist: 2'd1};
    unique case (id)
      4'd1:  ;
      4'd2:  begin c.use_port_b = 1'b1; c.wmode = WM_READ_FIRST; end
      4'd3:  begin c.alg = ALG_2PF; c.wmode = WM_READ_FIRST; end
      4'd4:  begin c.alg = ALG_MATS; c.width = W2; end
      4'd5:  begin c.alg = ALG_MATS; c.width = W1; c.wmode = WM_READ_FIRST; end
      4'd6:  begin c.alg = ALG_MATS; c.wmode = WM_NO_CHANGE; c.oreg = 1'b1; end
      4'd7:  begin c.kind = TK_CASC; c.width = W1; c.cmp_dist = 2'd2; end
      4'd8:  begin c.kind = TK_CASC; c.width = W1; c.cmp_dist = 2'd2; c.casc_swap = 1'b1; end
      4'd9:  begin c.kind = TK_ECC; c.ecc_wr_byp = 1'b1; c.cmp_dist = 2'd2; c.wmode = WM_READ_FIRST; end
      4'd10: begin c.kind = TK_ECC; c.ecc_rd_byp = 1'b1; c.cmp_dist = 2'd2; c.wmode = WM_READ_FIRST; end
      4'd11: begin c.kind = TK_FIFO; c.width = W9; end
      4'd12: begin c.kind = TK_FIFO; c.width = W36; c.fwft = 1'b1; end
      4'd13: begin c.kind = TK_FIFO; c.width = W18; end
      4'd14: begin c.kind = TK_FIFO; c.width = W4; c.almost = 12'hAAA; end
      4'd15: begin c.kind = TK_FIFO; c.width = W4; c.almost = 12'h555; end
      default: ;
    endcase
    return c;
  endfunction

  // Data bits of a port of the given width code.
  function automatic int unsigned data_bits(input width_e w);
    return 1 << int'(w);
  endfunction

  // Mask of the bits a port of width code w uses in the 36-bit bus
  // (data in the low bits, parity from bit 32 up).
  function automatic logic [DW-1:0] width_mask(input width_e w);
    logic [DW-1:0] m;
    m = '0;
    for (int i = 0; i < 32; i++) if (i < (1 << int'(w))) m[i] = 1'b1;
    if (int'(w) >= 3)
      for (int i = 0; i < 4; i++) if (i < (1 << (int'(w) - 3))) m[32+i] = 1'b1;
    return m;
  endfunction

  // log2 of the number of locations of a port of width code w (16K/2^w).
  function automatic int unsigned depth_log2(input width_e w);
    return 14 - int'(w);
  endfunction

endpackage
