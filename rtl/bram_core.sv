// bram_core: model of one 18K-bit dual-port block RAM, the block under test.
//
// The storage is 512 rows of 36 bits: bits 31:0 of a row hold data, bits 35:32
// parity. Each port sees it with one of the six aspect ratios 16Kx1, 8Kx2,
// 4Kx4, 2Kx9, 1Kx18 and 512x36; only the x9, x18 and x36 shapes reach the
// parity bits. A port moves data in the low bits of its 36-bit bus and parity
// from bit 32 up. Location `a` of a port of 2^k data bits is row a >> (5-k),
// data bits starting at (a mod 2^(5-k)) * 2^k.
//
// Reads and writes take one clock: the output changes on the clock edge after
// the port is enabled. On a write the output follows the write mode:
// WRITE_FIRST shows the new data, READ_FIRST the old data, NO_CHANGE keeps the
// previous output. With `oreg` set an output register adds one clock.
//
// Cascade: two 16Kx1 RAMs form a 32Kx1 RAM, addressed with 15 bits. The LOWER
// RAM stores the locations with address bit 14 clear and always drives its
// read bit on casc_out; the UPPER RAM stores the locations with bit 14 set and
// outputs either its own bit or casc_in, chosen by the registered bit 14.
//
// The aspect ratios, write modes, output register and cascade scheme follow the
// FPGA's block RAM; both ports sharing one width, and port A winning a write
// collision, are this model's simplifications. The contents start at zero, as
// after a configuration with no initial values.
module bram_core
  import bist_pkg::*;
(
  input  logic        clk,
  input  width_e      width,
  input  wmode_e      wmode,
  input  logic        oreg,
  input  site_mode_e  mode,      // SM_CASC_LOWER / SM_CASC_UPPER select cascade
  input  bram_port_t  pa,
  input  bram_port_t  pb,
  output logic [DW-1:0] doa,
  output logic [DW-1:0] dob,
  input  logic        casc_in_a,
  input  logic        casc_in_b,
  output logic        casc_out_a,
  output logic        casc_out_b
);

  logic [DW-1:0] mem [ROWS];
  // Output latches start at zero, as after configuration with no INIT value.
  logic [DW-1:0] lat_a = '0, lat_b = '0;   // first-stage output latches
  logic [DW-1:0] reg_a = '0, reg_b = '0;   // optional output registers
  logic          msb_a = 1'b0, msb_b = 1'b0; // registered address bit 14 (cascade)

  // Contents as after configuration with no initial values.
  initial for (int i = 0; i < int'(ROWS); i++) mem[i] = '0;

  logic casc, upper, lower;
  assign upper = (mode == SM_CASC_UPPER);
  assign lower = (mode == SM_CASC_LOWER);
  assign casc  = upper | lower;

  width_e w;
  assign w = casc ? W1 : width;

  function automatic logic [8:0] row_of(input width_e wd, input logic [AW-1:0] a);
    return 9'(a[13:0] >> (5 - int'(wd)));
  endfunction

  function automatic logic [DW-1:0] rd_word(input width_e wd, input logic [DW-1:0] r,
                                            input logic [AW-1:0] a);
    logic [4:0] col;
    logic [DW-1:0] o;
    col = 5'(a[4:0] & 5'((32 >> int'(wd)) - 1));
    o = '0;
    o[31:0] = r[31:0] >> (int'(col) << int'(wd));
    if (int'(wd) >= 3) o[35:32] = r[35:32] >> (int'(col) << (int'(wd) - 3));
    return o & width_mask(wd);
  endfunction

  function automatic logic [DW-1:0] wr_word(input width_e wd, input logic [DW-1:0] r,
                                            input logic [AW-1:0] a, input logic [DW-1:0] d);
    logic [4:0] col;
    logic [DW-1:0] m, o;
    logic [31:0] dm;
    logic [3:0] pm;
    col = 5'(a[4:0] & 5'((32 >> int'(wd)) - 1));
    m = width_mask(wd);
    dm = m[31:0] << (int'(col) << int'(wd));
    pm = (int'(wd) >= 3) ? 4'(m[35:32] << (int'(col) << (int'(wd) - 3))) : 4'b0;
    o = r;
    o[31:0]  = (r[31:0]  & ~dm) | ((d[31:0] << (int'(col) << int'(wd))) & dm);
    if (int'(wd) >= 3)
      o[35:32] = (r[35:32] & ~pm) | (4'(d[35:32] << (int'(col) << (int'(wd) - 3))) & pm);
    return o;
  endfunction

  // A cascaded RAM only owns the half of the 32K space given by bit 14.
  logic own_a, own_b, wr_a, wr_b;
  assign own_a = !casc || (pa.addr[14] == upper);
  assign own_b = !casc || (pb.addr[14] == upper);
  assign wr_a  = pa.en && pa.we && own_a;
  assign wr_b  = pb.en && pb.we && own_b && !(wr_a && row_of(w, pa.addr) == row_of(w, pb.addr));

  logic [8:0] row_a, row_b;
  logic [DW-1:0] old_a, old_b, new_a, new_b;
  assign row_a = row_of(w, pa.addr);
  assign row_b = row_of(w, pb.addr);
  assign old_a = rd_word(w, mem[row_a], pa.addr);
  assign old_b = rd_word(w, mem[row_b], pb.addr);
  assign new_a = pa.di & width_mask(w);
  assign new_b = pb.di & width_mask(w);

  always_ff @(posedge clk) begin
    if (wr_a) mem[row_a] <= wr_word(w, mem[row_a], pa.addr, pa.di);
    if (wr_b) mem[row_b] <= wr_word(w, mem[row_b], pb.addr, pb.di);
  end

  // Output latch per port, following the write mode.
  always_ff @(posedge clk) begin
    if (pa.en) begin
      msb_a <= pa.addr[14];
      if (!pa.we)                      lat_a <= old_a;
      else if (wmode == WM_READ_FIRST) lat_a <= old_a;
      else if (wmode == WM_WRITE_FIRST) lat_a <= own_a ? new_a : old_a;
    end
    if (pb.en) begin
      msb_b <= pb.addr[14];
      if (!pb.we)                      lat_b <= old_b;
      else if (wmode == WM_READ_FIRST) lat_b <= old_b;
      else if (wmode == WM_WRITE_FIRST) lat_b <= own_b ? new_b : old_b;
    end
    reg_a <= lat_a;
    reg_b <= lat_b;
  end

  // Cascade output of a LOWER RAM is its read bit; an UPPER RAM selects.
  logic [DW-1:0] sel_a, sel_b;
  assign casc_out_a = lat_a[0];
  assign casc_out_b = lat_b[0];
  always_comb begin
    sel_a = lat_a;
    sel_b = lat_b;
    if (upper && !msb_a) sel_a = {{(DW-1){1'b0}}, casc_in_a};
    if (upper && !msb_b) sel_b = {{(DW-1){1'b0}}, casc_in_b};
  end

  assign doa = oreg ? reg_a : sel_a;
  assign dob = oreg ? reg_b : sel_b;

endmodule
