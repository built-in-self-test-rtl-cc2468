// tpg_fifo: test pattern generator for the FIFO configurations 11-15.
//
// Plays a FIFO march: starting from an empty FIFO (a one-clock FIFO reset
// after `start`), it writes until the FIFO is full, makes one more write that
// must be refused (write error), reads until it is empty, and makes one more
// read that must be refused (read error). This is done with four data
// backgrounds (all 0, all 1, 0101..., 1010...), each word of a background
// inverted at odd positions, so every flag (EMPTY, ALMOST EMPTY, ALMOST FULL,
// FULL, and the two error flags) changes several times and every data bit
// toggles. A background takes 2N + 2 clocks for a FIFO of N words, the whole
// run 8N + 8 plus the reset clock.
//
// The generator counts rather than watching the flags, so the flags of the
// FIFOs under test are checked only by the ORAs' comparisons. Writing to full
// and reading to empty, order 8N, follow the method; the backgrounds and the
// error-provoking accesses are this design's choices. Timing as tpg_bram.
module tpg_fifo
  import bist_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     start,
  input  width_e   width,
  output tpg_out_t tpg
);

  logic        run, rstp, rd;
  logic [1:0]  bgi;
  logic [12:0] cnt;
  logic [12:0] n;
  assign n = 13'(1 << depth_log2(width));

  always_ff @(posedge clk) begin
    if (rst || start) begin
      run <= 1'b0; rstp <= start; rd <= 1'b0; bgi <= '0; cnt <= '0;
      tpg.done <= 1'b0;
    end else if (rstp) begin
      rstp <= 1'b0; run <= 1'b1;
    end else if (run) begin
      if (cnt != n) cnt <= cnt + 13'd1;     // n accesses plus one refused
      else begin
        cnt <= '0;
        rd  <= !rd;
        if (rd) begin
          bgi <= bgi + 2'd1;
          if (bgi == 2'd3) begin run <= 1'b0; tpg.done <= 1'b1; end
        end
      end
    end
  end

  logic [DW-1:0] bg;
  always_comb begin
    unique case (bgi)
      2'd0: bg = '0;
      2'd1: bg = '1;
      2'd2: bg = {(DW/2){2'b01}};
      default: bg = {(DW/2){2'b10}};
    endcase
  end

  always_comb begin
    tpg.pa = '0;
    tpg.pb = '0;
    tpg.fifo_rst = rstp;
    tpg.fifo_wr  = run && !rd;
    tpg.fifo_rd  = run && rd;
    tpg.fifo_di  = (bg ^ {DW{cnt[0]}}) & width_mask(width);
  end

  assign tpg.ecc_di        = '0;
  assign tpg.ecc_chk       = '0;
  assign tpg.ora_ce_bottom = 1'b1;

endmodule
