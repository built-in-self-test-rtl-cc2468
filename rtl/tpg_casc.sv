// tpg_casc: test pattern generator for the cascade configurations 7 and 8.
//
// The cascade circuitry only routes data between two 16Kx1 RAMs, so a
// functional test suffices: MATS+ {c(w0); u(r0,w1); d(r1,w0)} applied through
// port A of the 32Kx1 RAM, with port B reading the same location each clock,
// at four addresses, the two ends of the LOWER half
// (0x0000, 0x3FFF) and of the UPPER half (0x4000, 0x7FFF); 20 clocks in all.
// Every write and read therefore crosses the address-bit-14 decode and the
// cascade output multiplexer both ways.
//
// The bottom RAM of a column has no RAM below it: when it acts as an UPPER RAM
// its cascade input is unconnected, and reads of the LOWER half differ from
// every other UPPER RAM. `ora_ce_bottom` is low for the clocks in which the RAM
// outputs show such an access (one clock after an operation on the LOWER half),
// and gates the ORAs that watch the bottom RAM.
//
// Timing as tpg_bram: operations from the clock after `start`, `done` after the
// last. MATS+ as the cascade algorithm and the ORA clock enable controlled by
// the TPG follow the method; the four addresses are this design's choice.
module tpg_casc
  import bist_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     start,
  output tpg_out_t tpg
);

  localparam logic [AW-1:0] ADDRS [4] = '{15'h0000, 15'h3FFF, 15'h4000, 15'h7FFF};

  logic       run;
  logic [1:0] el;     // MATS+ element
  logic       oi;     // operation within the element
  logic [1:0] ai;     // address index
  logic [1:0] idx;

  assign idx = (el == 2'd2) ? ~ai : ai;

  always_ff @(posedge clk) begin
    if (rst) begin
      run <= 1'b0; el <= '0; oi <= 1'b0; ai <= '0; tpg.done <= 1'b0;
      tpg.ora_ce_bottom <= 1'b1;
    end else begin
      // Outputs next clock show the operation issued now.
      if (run) tpg.ora_ce_bottom <= ADDRS[idx][14];
      if (start) begin
        run <= 1'b1; el <= '0; oi <= 1'b0; ai <= '0; tpg.done <= 1'b0;
        tpg.ora_ce_bottom <= 1'b1;
      end else if (run) begin
        if (el != 2'd0 && !oi) oi <= 1'b1;
        else begin
          oi <= 1'b0;
          ai <= ai + 2'd1;
          if (ai == 2'd3) begin
            if (el == 2'd2) begin run <= 1'b0; tpg.done <= 1'b1; end
            else el <= el + 2'd1;
          end
        end
      end
    end
  end


  always_comb begin
    tpg.pa = '0;
    tpg.pb = '0;
    if (run) begin
      tpg.pa.en   = 1'b1;
      tpg.pa.we   = (el == 2'd0) || oi;
      tpg.pa.addr = ADDRS[idx];
      // element 1 reads 0 and writes 1, element 2 reads 1 and writes 0
      tpg.pa.di   = DW'((el == 2'd1) ? 1'b1 : 1'b0);
      // port B reads the same location, so its cascade path is exercised too
      tpg.pb.en   = 1'b1;
      tpg.pb.addr = ADDRS[idx];
    end
  end

  assign tpg.fifo_rst = 1'b0;
  assign tpg.fifo_wr  = 1'b0;
  assign tpg.fifo_rd  = 1'b0;
  assign tpg.fifo_di  = '0;
  assign tpg.ecc_di   = '0;
  assign tpg.ecc_chk  = '0;

endmodule
