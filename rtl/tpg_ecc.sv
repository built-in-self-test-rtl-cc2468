// tpg_ecc: test pattern generator for the ECC configurations 9 and 10.
//
// Drives port A of both RAMs of every 512x64 ECC RAM pair (address, enable,
// write enable) and the 64-bit write word and 8 check bits that ecc_logic
// stores. A pass writes all 512 locations in ascending order and then reads
// them back, 2N = 1024 clocks.
//   wr_byp (configuration 9, Hamming generation bypassed): one pass. Location
//     a < 256 holds data 0 with check bits a[7:0], so all 256 combinations of
//     check bits meet the correction and detection logic; location a >= 256
//     holds a single data 1 at bit a[5:0] with check bits 0, a correctable
//     error in each data bit.
//   rd_byp (configuration 10, correction bypassed): five passes write the 64
//     patterns with a single 1 and then the 2016 patterns with two 1s in a field
//     of 0s (zeros after the last), 2080 patterns, 10N = 5120 clocks; the
//     generated check bits are read back raw.
// Timing as tpg_bram. The two bypass approaches and the pattern classes follow
// the method; the location assignment and pass structure are this design's.
module tpg_ecc
  import bist_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     start,
  input  logic     wr_byp,
  output tpg_out_t tpg
);

  logic       run, rd;
  logic [2:0] pass;
  logic [8:0] a;
  logic [5:0] pi, pj;       // the two 1s of the current pair pattern
  logic       single;       // still in the single-1 patterns
  logic       exhausted;    // all patterns written

  always_ff @(posedge clk) begin
    if (rst || start) begin
      run <= start; rd <= 1'b0; pass <= '0; a <= '0;
      pi <= '0; pj <= 6'd1; single <= 1'b1; exhausted <= 1'b0;
      tpg.done <= 1'b0;
    end else if (run) begin
      a <= a + 9'd1;
      // step the pattern after each write of configuration 10
      if (!rd && !wr_byp && !exhausted) begin
        if (single) begin
          pi <= pi + 6'd1;
          if (pi == 6'd63) begin single <= 1'b0; pi <= 6'd0; pj <= 6'd1; end
        end else if (pj != 6'd63) pj <= pj + 6'd1;
        else if (pi == 6'd62) exhausted <= 1'b1;
        else begin pi <= pi + 6'd1; pj <= pi + 6'd2; end
      end
      if (a == 9'd511) begin
        rd <= !rd;
        if (rd) begin
          if (wr_byp || pass == 3'd4) begin run <= 1'b0; tpg.done <= 1'b1; end
          else pass <= pass + 3'd1;
        end
      end
    end
  end

  always_comb begin
    tpg.pa = '0;
    tpg.pb = '0;
    tpg.ecc_di  = '0;
    tpg.ecc_chk = '0;
    if (run) begin
      tpg.pa.en   = 1'b1;
      tpg.pa.we   = !rd;
      tpg.pa.addr = AW'(a);
      if (wr_byp) begin
        if (!a[8]) tpg.ecc_chk = a[7:0];
        else       tpg.ecc_di  = 64'd1 << a[5:0];
      end else if (!exhausted) begin
        tpg.ecc_di = single ? (64'd1 << pi) : ((64'd1 << pi) | (64'd1 << pj));
      end
    end
  end

  assign tpg.fifo_rst      = 1'b0;
  assign tpg.fifo_wr       = 1'b0;
  assign tpg.fifo_rd       = 1'b0;
  assign tpg.fifo_di       = '0;
  assign tpg.ora_ce_bottom = 1'b1;

endmodule
