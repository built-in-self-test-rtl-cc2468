// fifo_ctrl: FIFO mode logic of one block RAM.
//
// In FIFO mode one port of the block RAM writes and the other reads: this
// controller drives port B with writes and port A with reads and keeps the
// pointers and status flags. Shapes are 4Kx4, 2Kx9, 1Kx18 and 512x36
// (width code W4..W36); the depth is 16K / data bits.
//
// Flags: FULL when the FIFO holds `depth` words, EMPTY when it holds none,
// ALMOST FULL when at most `almost` locations are free, ALMOST EMPTY when at
// most `almost` words are held (the 12-bit offset serves both comparators),
// WRERR for one clock after a write refused because the FIFO was full, RDERR
// after a read refused because it was empty. All flags are registered.
//
// Standard mode: a read request takes one clock, and the word appears on `dout`
// on the clock edge after the request. First-word-fall-through mode: the oldest
// word is already on `dout` while EMPTY is low, and a read request removes it.
// The FULL/EMPTY/ALMOST flags, the four shapes, the split of the two ports and
// the two read modes follow the FPGA's block RAM FIFO; the offset semantics
// (one offset for both ALMOST flags) and flag timing are this design's choices.
// `rst` is synchronous and empties the FIFO.
module fifo_ctrl
  import bist_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  width_e        width,
  input  logic          fwft,
  input  logic [11:0]   almost,
  input  logic          wren,
  input  logic [DW-1:0] din,
  input  logic          rden,
  output logic [DW-1:0] dout,
  output logic          full,
  output logic          empty,
  output logic          afull,
  output logic          aempty,
  output logic          wrerr,
  output logic          rderr,
  // block RAM ports
  output bram_port_t    pa,     // read port
  output bram_port_t    pb,     // write port
  input  logic [DW-1:0] ram_do
);

  logic [12:0] depth;
  assign depth = 13'(1 << depth_log2(width));

  logic [12:0] wptr, rptr;      // memory pointers
  logic [12:0] occ;             // words held, as seen by the user
  logic        ovalid;          // FWFT: an earlier word still waits on the output
  logic        fetch_q;         // FWFT: the word fetched last clock is on the output
  logic        hold;            // FWFT: a word is on the output now

  logic wr_ok, rd_ok, fetch;
  logic [12:0] mem_words, amask;
  assign amask = depth - 13'd1;
  assign mem_words = wptr - rptr;
  assign hold  = fetch_q || ovalid;
  assign wr_ok = wren && (occ != depth);
  // Standard mode: a user read fetches from memory directly.
  // FWFT: a user read consumes the output word; a fetch refills the output
  // whenever it is free or being consumed.
  assign rd_ok = rden && (fwft ? hold : (occ != 13'd0));
  assign fetch = fwft ? ((mem_words != 13'd0) && (!hold || rd_ok)) : rd_ok;

  always_comb begin
    pb = '0;
    pb.en   = wr_ok;
    pb.we   = wr_ok;
    pb.addr = AW'(wptr & amask);
    pb.di   = din;
    pa = '0;
    pa.en   = fetch;
    pa.addr = AW'(rptr & amask);
  end

  logic [12:0] occ_n;
  always_comb begin
    occ_n = occ;
    if (wr_ok) occ_n = occ_n + 13'd1;
    if (rd_ok) occ_n = occ_n - 13'd1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr <= '0; rptr <= '0; occ <= '0; ovalid <= 1'b0; fetch_q <= 1'b0;
      full <= 1'b0; empty <= 1'b1; afull <= 1'b0; aempty <= 1'b1;
      wrerr <= 1'b0; rderr <= 1'b0;
    end else begin
      if (wr_ok) wptr <= wptr + 13'd1;
      if (fetch) rptr <= rptr + 13'd1;
      occ <= occ_n;
      fetch_q <= fwft && fetch;
      ovalid  <= fwft && hold && !rd_ok;
      full   <= (occ_n == depth);
      empty  <= fwft ? !(fetch || (hold && !rd_ok)) : (occ_n == 13'd0);
      afull  <= (depth - occ_n) <= 13'(almost);
      aempty <= occ_n <= 13'(almost);
      wrerr  <= wren && !wr_ok;
      rderr  <= rden && !rd_ok;
    end
  end

  assign dout = ram_do;

endmodule
