// ecc_logic: the error-correction logic that turns two adjacent block RAM
// sites into one 512x64 ECC RAM.
//
// Write side: the Hamming generator encodes the 64-bit write word into 8 check
// bits (ecc_pkg). The lower site stores data[31:0] with check bits 3:0 in its
// four parity bits, the upper site data[63:32] with check bits 7:4. With
// `wr_byp` set the generator is bypassed and the check bits come from `chk_in`,
// so arbitrary codewords, including erroneous ones, can be written.
//
// Read side: the 72 bits read from the two sites are checked and corrected.
// The corrected word goes out as lo_out = {4'b0, data[31:0]} and
// hi_out = {4'b0, data[63:32]}, with `flags` = {6'b0, sbiterr, dbiterr}. With
// `rd_byp` set, correction is bypassed and the raw stored bits, check bits
// included in bits 35:32, go out instead, so the generated check bits can be
// observed. Write and read sides are combinational around the RAMs' one-clock
// read. The split of the code over the parity bits of two RAMs and both bypass
// controls follow the method; the port packing is this design's own.
module ecc_logic
  import bist_pkg::*;
  import ecc_pkg::*;
(
  input  logic          wr_byp,
  input  logic          rd_byp,
  input  logic [63:0]   din,
  input  logic [7:0]    chk_in,
  output logic [DW-1:0] lo_di,
  output logic [DW-1:0] hi_di,
  input  logic [DW-1:0] lo_do,
  input  logic [DW-1:0] hi_do,
  output logic [DW-1:0] lo_out,
  output logic [DW-1:0] hi_out,
  output logic [FLAGW-1:0] flags
);

  logic [7:0] chk;
  ecc_dec_t   dec;

  assign chk   = wr_byp ? chk_in : ecc_encode(din);
  assign lo_di = {chk[3:0], din[31:0]};
  assign hi_di = {chk[7:4], din[63:32]};

  assign dec = ecc_decode({hi_do[31:0], lo_do[31:0]}, {hi_do[35:32], lo_do[35:32]});

  always_comb begin
    if (rd_byp) begin
      lo_out = lo_do;
      hi_out = hi_do;
      flags  = '0;
    end else begin
      lo_out = {4'b0, dec.data[31:0]};
      hi_out = {4'b0, dec.data[63:32]};
      flags  = {6'b0, dec.sbiterr, dec.dbiterr};
    end
  end

endmodule
