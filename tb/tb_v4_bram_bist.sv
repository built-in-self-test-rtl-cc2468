// tb_v4_bram_bist: end-to-end test of the block RAM BIST with 8 sites.
// See bist_tb_body.svh for what is run and checked.
module tb_v4_bram_bist;
  localparam int NS = 8;
  `include "bist_tb_body.svh"
  v4_bram_bist #(.NUM_SITES(NS)) dut (.clk, .rst, .cfg_id, .start, .done, .fail, .ora_pass);
endmodule
