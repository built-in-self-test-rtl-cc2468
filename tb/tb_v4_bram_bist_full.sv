// tb_v4_bram_bist_full: end-to-end test of the block RAM BIST at its default
// size (48 sites, two TPG copies). See bist_tb_body.svh.
module tb_v4_bram_bist_full;
  localparam int NS = 48;
  `include "bist_tb_body.svh"
  v4_bram_bist dut (.clk, .rst, .cfg_id, .start, .done, .fail, .ora_pass);
endmodule
