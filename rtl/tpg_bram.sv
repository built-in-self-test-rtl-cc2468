// tpg_bram: test pattern generator for the block RAM configurations 1-6.
//
// A finite state machine that plays march algorithms on the two ports of the
// RAMs under test, one read or write per clock on each port:
//   ALG_MLR_BDS  March LR, 16N: {c(w0); d(r0,w1); u(r1,w0,r0,r0,w1); u(r1,w0);
//                u(r0,w1,r1,r1,w0); u(r0)}, repeated once per data background
//                (BDS). A port of b bits gets 1 + ceil(log2 b) backgrounds:
//                all zeros, then background k with bit i = bit (k-1) of i.
//                For 512x36 that is 7 backgrounds, 112N clocks. Runs on port A,
//                or on port B when `use_port_b` is set.
//   ALG_2PF      March s2pf- (14N), port A : port B on the same address:
//                {c(w0:n); u(r0:r0,r0:-,w1:r0); u(r1:r1,r1:-,w0:r1);
//                 d(r0:r0,r0:-,w1:r0); d(r1:r1,r1:-,w0:r1); c(r0:-)},
//                then March d2pf (9N), port B reading the neighbour address:
//                {c(w0:n); u(w1:r0[a+1], r1:r0[a+1]); d(w0:r1[a-1], r0:r1[a-1]);
//                 u(w1:r0[a+1], r1:r0[a+1]); d(w0:r1[a-1], r0:r1[a-1])}; 23N.
//   ALG_MATS     MATS+, 5N: {c(w0); u(r0,w1); d(r1,w0)}, on port A and then on
//                port B, 10N.
// (u = ascending, d = descending, c = either; "0" = background, "1" = its
// inverse.) N = 16K / 2^width is the number of locations of the port shape.
//
// `start` (one clock) begins the run; the first operation is on the ports in
// the next clock; `done` rises after the last operation and stays high until
// the next start. `exp` / `exp_vld` / `exp_on_b` give the value the algorithm
// expects from a read issued this clock (the ORAs do not need it; it serves
// checking). The algorithm names, their 16N/5N orders and the use of BDS only
// with March LR follow the method; the element lists are the published forms
// of these algorithms, and the number and form of the backgrounds, running
// MATS+ once per port and the d2pf neighbour scheme are this design's choices.
module tpg_bram
  import bist_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     start,
  input  alg_e     alg,
  input  width_e   width,
  input  logic     use_port_b,
  output tpg_out_t tpg,
  output logic [DW-1:0] exp,
  output logic     exp_vld,
  output logic     exp_on_b
);

  typedef enum logic [1:0] {K_NONE = 2'd0, K_RD = 2'd1, K_WR = 2'd2} kind_e;
  typedef enum logic [1:0] {OFF_0 = 2'd0, OFF_P1 = 2'd1, OFF_M1 = 2'd2} off_e;

  typedef struct packed {
    kind_e a; logic av;   // port A operation and value
    kind_e b; logic bv;   // port B operation and value
    off_e  boff;          // port B address offset
  } op_t;

  typedef struct packed {
    logic     down;
    logic [2:0] nops;
    logic     last;       // last element of the algorithm
    op_t [4:0] ops;
  } elem_t;

  localparam op_t NOP = '{a: K_NONE, av: 1'b0, b: K_NONE, bv: 1'b0, boff: OFF_0};

  function automatic op_t oa(kind_e k, logic v);       // port A only
    return '{a: k, av: v, b: K_NONE, bv: 1'b0, boff: OFF_0};
  endfunction
  function automatic op_t o2(kind_e ka, logic va, kind_e kb, logic vb, off_e f);
    return '{a: ka, av: va, b: kb, bv: vb, boff: f};
  endfunction

  function automatic elem_t element(input alg_e al, input logic [3:0] idx);
    elem_t e;
    e.down = 1'b0; e.nops = 3'd1; e.last = 1'b0;
    e.ops = {NOP, NOP, NOP, NOP, NOP};
    unique case (al)
      ALG_MLR_BDS: unique case (idx)
        4'd0: e.ops[0] = oa(K_WR, 0);
        4'd1: begin e.down = 1'b1; e.nops = 3'd2;
                    e.ops[0] = oa(K_RD, 0); e.ops[1] = oa(K_WR, 1); end
        4'd2: begin e.nops = 3'd5; e.ops[0] = oa(K_RD, 1); e.ops[1] = oa(K_WR, 0);
                    e.ops[2] = oa(K_RD, 0); e.ops[3] = oa(K_RD, 0); e.ops[4] = oa(K_WR, 1); end
        4'd3: begin e.nops = 3'd2; e.ops[0] = oa(K_RD, 1); e.ops[1] = oa(K_WR, 0); end
        4'd4: begin e.nops = 3'd5; e.ops[0] = oa(K_RD, 0); e.ops[1] = oa(K_WR, 1);
                    e.ops[2] = oa(K_RD, 1); e.ops[3] = oa(K_RD, 1); e.ops[4] = oa(K_WR, 0); end
        default: begin e.ops[0] = oa(K_RD, 0); e.last = 1'b1; end
      endcase
      ALG_2PF: unique case (idx)
        4'd0, 4'd6: e.ops[0] = oa(K_WR, 0);
        4'd1, 4'd3: begin e.down = (idx == 4'd3); e.nops = 3'd3;
                    e.ops[0] = o2(K_RD, 0, K_RD, 0, OFF_0); e.ops[1] = oa(K_RD, 0);
                    e.ops[2] = o2(K_WR, 1, K_RD, 0, OFF_0); end
        4'd2, 4'd4: begin e.down = (idx == 4'd4); e.nops = 3'd3;
                    e.ops[0] = o2(K_RD, 1, K_RD, 1, OFF_0); e.ops[1] = oa(K_RD, 1);
                    e.ops[2] = o2(K_WR, 0, K_RD, 1, OFF_0); end
        4'd5: e.ops[0] = oa(K_RD, 0);
        4'd7, 4'd9: begin e.nops = 3'd2;
                    e.ops[0] = o2(K_WR, 1, K_RD, 0, OFF_P1);
                    e.ops[1] = o2(K_RD, 1, K_RD, 0, OFF_P1); end
        default: begin e.down = 1'b1; e.nops = 3'd2; e.last = (idx >= 4'd10);
                    e.ops[0] = o2(K_WR, 0, K_RD, 1, OFF_M1);
                    e.ops[1] = o2(K_RD, 0, K_RD, 1, OFF_M1); end
      endcase
      default: unique case (idx)   // ALG_MATS
        4'd0: e.ops[0] = oa(K_WR, 0);
        4'd1: begin e.nops = 3'd2; e.ops[0] = oa(K_RD, 0); e.ops[1] = oa(K_WR, 1); end
        default: begin e.down = 1'b1; e.nops = 3'd2; e.last = 1'b1;
                    e.ops[0] = oa(K_RD, 1); e.ops[1] = oa(K_WR, 0); end
      endcase
    endcase
    return e;
  endfunction

  // Number of passes: backgrounds for March LR, ports for MATS+, one for 2PF.
  function automatic logic [2:0] passes(input alg_e al, input width_e w);
    unique case (al)
      ALG_MLR_BDS: unique case (w)
        W1: return 3'd1;  W2: return 3'd2;  W4: return 3'd3;
        W9: return 3'd5;  W18: return 3'd6; default: return 3'd7;
      endcase
      ALG_MATS: return 3'd2;
      default:  return 3'd1;
    endcase
  endfunction

  function automatic logic [DW-1:0] background(input logic [2:0] k);
    logic [DW-1:0] b;
    for (int i = 0; i < int'(DW); i++)
      b[i] = (k == 3'd0) ? 1'b0 : 1'(i >> (int'(k) - 1));
    return b;
  endfunction

  logic        run;
  logic [2:0]  pass;
  logic [3:0]  eidx;
  logic [2:0]  oidx;
  logic [13:0] cnt;          // address step within the element
  logic [13:0] last_addr;
  elem_t       e;
  op_t         op;
  logic [DW-1:0] bg;
  logic        swap;         // operations of "port A" go to port B

  assign last_addr = 14'((1 << depth_log2(width)) - 1);
  assign e    = element(alg, eidx);
  assign op   = e.ops[oidx];
  assign bg   = (alg == ALG_MLR_BDS) ? background(pass) : '0;
  assign swap = (alg == ALG_MLR_BDS) ? use_port_b : (alg == ALG_MATS && pass == 3'd1);

  always_ff @(posedge clk) begin
    if (rst) begin
      run <= 1'b0; pass <= '0; eidx <= '0; oidx <= '0; cnt <= '0;
      tpg.done <= 1'b0;
    end else if (start) begin
      run <= 1'b1; pass <= '0; eidx <= '0; oidx <= '0; cnt <= '0;
      tpg.done <= 1'b0;
    end else if (run) begin
      if (oidx != e.nops - 3'd1) oidx <= oidx + 3'd1;
      else begin
        oidx <= '0;
        if (cnt != last_addr) cnt <= cnt + 14'd1;
        else begin
          cnt <= '0;
          if (!e.last) eidx <= eidx + 4'd1;
          else begin
            eidx <= '0;
            if (pass != passes(alg, width) - 3'd1) pass <= pass + 3'd1;
            else begin
              run <= 1'b0;
              tpg.done <= 1'b1;
            end
          end
        end
      end
    end
  end

  logic [13:0] addr, baddr;
  assign addr = e.down ? (last_addr - cnt) : cnt;
  always_comb begin
    unique case (op.boff)
      OFF_P1:  baddr = (addr + 14'd1) & last_addr;
      OFF_M1:  baddr = (addr - 14'd1) & last_addr;
      default: baddr = addr;
    endcase
  end

  bram_port_t p1, p2;        // the algorithm's first and second port
  always_comb begin
    p1 = '0; p2 = '0;
    if (run) begin
      p1.en   = (op.a != K_NONE);
      p1.we   = (op.a == K_WR);
      p1.addr = AW'(addr);
      p1.di   = (op.av ? ~bg : bg) & width_mask(width);
      p2.en   = (op.b != K_NONE);
      p2.we   = (op.b == K_WR);
      p2.addr = AW'(baddr);
      p2.di   = (op.bv ? ~bg : bg) & width_mask(width);
    end
    tpg.pa = swap ? p2 : p1;
    tpg.pb = swap ? p1 : p2;
    exp      = (op.av ? ~bg : bg) & width_mask(width);
    exp_vld  = run && (op.a == K_RD);
    exp_on_b = swap;
  end

  // Fields of the TPG bundle this generator does not use.
  assign tpg.fifo_rst      = 1'b0;
  assign tpg.fifo_wr       = 1'b0;
  assign tpg.fifo_rd       = 1'b0;
  assign tpg.fifo_di       = '0;
  assign tpg.ecc_di        = '0;
  assign tpg.ecc_chk       = '0;
  assign tpg.ora_ce_bottom = 1'b1;

endmodule
