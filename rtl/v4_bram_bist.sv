// v4_bram_bist: circular-comparison BIST of the block RAMs of one FPGA.
//
// NUM_SITES block RAM sites (bram_site) are all configured alike and receive
// identical test patterns from NUM_TPG identical copies of the active test
// pattern generator, copy t driving sites t, t+NUM_TPG, ... (alternating rows
// with two copies). Every compared output bit i of site j is checked by one
// ORA against output bit i of site (j + d) mod NUM_SITES, so each site is
// watched by two ORAs and compared with two different neighbours around the
// ring. d = 1 in the normal RAM and FIFO configurations (adjacent RAMs) and
// d = 2 in the cascade and ECC configurations, where two adjacent RAMs form one
// RAM and like must be compared with like. The ORAs' pass/fail flip-flops are
// chained through carry multiplexers into one `fail` bit; their individual
// contents come out on `ora_pass` for diagnosis (a 0 names the RAM pair, output
// and, through cfg_id, the mode of operation that failed).
//
// `cfg_id` (1..15) selects the BIST configuration (bist_pkg::cfg_decode),
// standing for the configuration that would be downloaded; hold it steady
// during a run. A one-clock `start` resets the ORAs and starts the TPG;
// `done` rises when the TPG has issued its last operation, and `fail` is valid
// two clocks later (RAM read latency plus the ORA register).
//
// Compared per site (OUTW = 80 bits): {flags[7:0], dob[35:0], doa[35:0]}. In
// the ECC configurations doa carries the ECC RAM's output half (data[31:0] for
// the lower site of a pair, data[63:32] for the upper) and flags its
// {sbiterr, dbiterr}. In the cascade configurations the sites of a pair are
// LOWER and UPPER RAM; configuration 8 swaps the roles, so the bottom site is
// an UPPER RAM with an open cascade input, and the ORAs watching it are gated
// by the cascade TPG's clock enable. The ring, the adjacent/alternating
// pairing, the TPG-gated ORAs and the carry-chain result follow the method;
// one ring over all sites (rather than one per column) is this design's
// choice. NUM_SITES = 48 is the block RAM count of the smallest devices (LX15,
// FX12) and must be even.
module v4_bram_bist
  import bist_pkg::*;
#(
  parameter int unsigned NUM_SITES = 48,
  parameter int unsigned NUM_TPG   = 2
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] cfg_id,
  input  logic       start,
  output logic       done,
  output logic       fail,
  output logic [OUTW-1:0] ora_pass [NUM_SITES]
);

  cfg_t cfg;
  assign cfg = cfg_decode(cfg_id);

  // ---------------------------------------------------------------- TPGs
  tpg_out_t tout [NUM_TPG];

  for (genvar t = 0; t < int'(NUM_TPG); t++) begin : g_tpg
    tpg_out_t ob, oc, oe, of;
    logic [DW-1:0] exp_unused;
    logic exp_vld_unused, exp_on_b_unused;
    tpg_bram u_bram (
      .clk, .rst, .start(start && cfg.kind == TK_BRAM), .alg(cfg.alg), .width(cfg.width),
      .use_port_b(cfg.use_port_b), .tpg(ob), .exp(exp_unused), .exp_vld(exp_vld_unused),
      .exp_on_b(exp_on_b_unused)
    );
    tpg_casc u_casc (.clk, .rst, .start(start && cfg.kind == TK_CASC), .tpg(oc));
    tpg_ecc  u_ecc  (.clk, .rst, .start(start && cfg.kind == TK_ECC),
                     .wr_byp(cfg.ecc_wr_byp), .tpg(oe));
    tpg_fifo u_fifo (.clk, .rst, .start(start && cfg.kind == TK_FIFO), .width(cfg.width),
                     .tpg(of));
    always_comb begin
      unique case (cfg.kind)
        TK_BRAM: tout[t] = ob;
        TK_CASC: tout[t] = oc;
        TK_ECC:  tout[t] = oe;
        default: tout[t] = of;
      endcase
    end
  end

  assign done = tout[0].done;

  // ---------------------------------------------------------------- sites
  localparam int unsigned NP = NUM_SITES / 2;

  logic [DW-1:0]    doa [NUM_SITES];
  logic [DW-1:0]    dob [NUM_SITES];
  logic [FLAGW-1:0] flg [NUM_SITES];
  logic             cca [NUM_SITES];   // cascade outputs, port A / B
  logic             ccb [NUM_SITES];
  logic [DW-1:0]    ecc_di  [NUM_SITES];
  logic [DW-1:0]    ecc_out [NUM_SITES];
  logic [FLAGW-1:0] ecc_flg [NP];
  logic [OUTW-1:0]  vec [NUM_SITES];

  for (genvar j = 0; j < int'(NUM_SITES); j++) begin : g_site
    site_mode_e mode;
    tpg_out_t   tin;
    always_comb begin
      unique case (cfg.kind)
        TK_BRAM: mode = SM_NORMAL;
        TK_FIFO: mode = SM_FIFO;
        TK_ECC:  mode = SM_ECC;
        default: mode = ((j % 2 == 0) != cfg.casc_swap) ? SM_CASC_LOWER : SM_CASC_UPPER;
      endcase
      // an ECC pair is driven as one RAM, by the TPG copy of its pair index
      tin = (cfg.kind == TK_ECC) ? tout[(j / 2) % NUM_TPG] : tout[j % NUM_TPG];
      if (cfg.kind == TK_ECC) tin.pa.di = ecc_di[j];
    end

    bram_site u_site (
      .clk, .mode, .width(cfg.width), .wmode(cfg.wmode), .oreg(cfg.oreg),
      .fwft(cfg.fwft), .almost(cfg.almost), .tpg(tin),
      .casc_in_a((j == 0) ? 1'b0 : cca[(j + NUM_SITES - 1) % NUM_SITES]),
      .casc_in_b((j == 0) ? 1'b0 : ccb[(j + NUM_SITES - 1) % NUM_SITES]),
      .casc_out_a(cca[j]), .casc_out_b(ccb[j]),
      .doa(doa[j]), .dob(dob[j]), .flags(flg[j])
    );

    assign vec[j] = (cfg.kind == TK_ECC) ? {ecc_flg[j / 2], dob[j], ecc_out[j]}
                                         : {flg[j], dob[j], doa[j]};
  end

  for (genvar p = 0; p < int'(NP); p++) begin : g_ecc
    tpg_out_t tp;
    assign tp = tout[p % NUM_TPG];
    ecc_logic u_ecc (
      .wr_byp(cfg.ecc_wr_byp), .rd_byp(cfg.ecc_rd_byp), .din(tp.ecc_di), .chk_in(tp.ecc_chk),
      .lo_di(ecc_di[2*p]), .hi_di(ecc_di[2*p+1]), .lo_do(doa[2*p]), .hi_do(doa[2*p+1]),
      .lo_out(ecc_out[2*p]), .hi_out(ecc_out[2*p+1]), .flags(ecc_flg[p])
    );
  end

  // ---------------------------------------------------------------- ORAs
  logic [NUM_SITES*OUTW:0] chain;
  logic ce_bottom;
  assign chain[0]  = 1'b0;
  assign ce_bottom = (cfg.kind == TK_CASC) ? tout[0].ora_ce_bottom : 1'b1;

  for (genvar j = 0; j < int'(NUM_SITES); j++) begin : g_ora_site
    logic [OUTW-1:0] nb1, nb2, other;
    logic            touches_bottom;
    assign nb1   = vec[(j + 1) % NUM_SITES];
    assign nb2   = vec[(j + 2) % NUM_SITES];
    assign other = (cfg.cmp_dist == 2'd2) ? nb2 : nb1;
    assign touches_bottom = (j == 0) ||
        ((cfg.cmp_dist == 2'd2) ? ((j + 2) % NUM_SITES == 0) : ((j + 1) % NUM_SITES == 0));
    for (genvar i = 0; i < int'(OUTW); i++) begin : g_ora
      ora u_ora (
        .clk, .rst(rst || start), .ce(!touches_bottom || ce_bottom),
        .a(vec[j][i]), .b(other[i]),
        .cin(chain[j*OUTW + i]), .pass(ora_pass[j][i]), .cout(chain[j*OUTW + i + 1])
      );
    end
  end

  assign fail = chain[NUM_SITES*OUTW];

endmodule
