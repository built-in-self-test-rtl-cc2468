// bram_site: one block RAM site of the array, in whichever mode the current
// BIST configuration puts it.
//
// The site is the block RAM (bram_core) plus its FIFO logic (fifo_ctrl). In
// normal, cascade and ECC modes the TPG's two port bundles go straight to the
// RAM; in FIFO mode the FIFO logic drives the RAM ports from the TPG's
// write/read requests. The site presents what an ORA compares:
//   doa, dob  the two 36-bit RAM outputs (FIFO mode: doa is the FIFO output,
//             dob is zero)
//   flags     FIFO mode: {2'b0, rderr, wrerr, aempty, afull, empty, full};
//             zero in the other modes
// ECC correction sits outside, in ecc_logic, because an ECC RAM spans two sites.
// Latency is that of bram_core: one clock, two with the output register.
module bram_site
  import bist_pkg::*;
(
  input  logic          clk,
  input  site_mode_e    mode,
  input  width_e        width,
  input  wmode_e        wmode,
  input  logic          oreg,
  input  logic          fwft,
  input  logic [11:0]   almost,
  input  tpg_out_t      tpg,
  input  logic          casc_in_a,
  input  logic          casc_in_b,
  output logic          casc_out_a,
  output logic          casc_out_b,
  output logic [DW-1:0] doa,
  output logic [DW-1:0] dob,
  output logic [FLAGW-1:0] flags
);

  bram_port_t fa, fb, pa, pb;
  logic [DW-1:0] ra, rb, fdout;
  logic full, empty, afull, aempty, wrerr, rderr;
  logic is_fifo;
  assign is_fifo = (mode == SM_FIFO);

  fifo_ctrl u_fifo (
    .clk, .rst(tpg.fifo_rst || !is_fifo), .width, .fwft, .almost,
    .wren(is_fifo && tpg.fifo_wr), .din(tpg.fifo_di), .rden(is_fifo && tpg.fifo_rd),
    .dout(fdout), .full, .empty, .afull, .aempty, .wrerr, .rderr,
    .pa(fa), .pb(fb), .ram_do(ra)
  );

  assign pa = is_fifo ? fa : tpg.pa;
  assign pb = is_fifo ? fb : tpg.pb;

  bram_core u_ram (
    .clk, .width, .wmode, .oreg(oreg && !is_fifo), .mode, .pa, .pb,
    .doa(ra), .dob(rb), .casc_in_a, .casc_in_b, .casc_out_a, .casc_out_b
  );

  assign doa   = is_fifo ? fdout : ra;
  assign dob   = is_fifo ? '0 : rb;
  assign flags = is_fifo ? {2'b00, rderr, wrerr, aempty, afull, empty, full} : '0;

endmodule
