// Run-Level Engine (RLE): hardwired zigzag scan and run-level coding.
//
// Wires together the parts of the engine: the RLE controller (with its
// control register), the address counter, the four zigzag tables and the zero
// counter. The iBuf and oBuf it works between sit outside, at the BSP level,
// and are reached through the two buffer ports below. The coefficient address
// in iBuf is the block base from the address counter plus the raster offset
// that the selected zigzag table gives for the current scan position.
//
// The STP programs the zigzag tables and the control register through the
// `zz_*` and `ctrl_*` ports. See rle_ctrl for the turn schedule.
module rle
  import bsp_pkg::*;
#(
  parameter int unsigned IBUF_W = IBUF_WORDS,
  parameter int unsigned OBUF_W = OBUF_WORDS,
  localparam int unsigned IAW   = $clog2(IBUF_W),
  localparam int unsigned OAW   = $clog2(OBUF_W),
  localparam int unsigned PW    = $clog2(ZZ_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // STP access
  input  logic              ctrl_we,
  input  logic [31:0]       ctrl_wdata,
  output rle_ctrl_t         ctrl,
  input  logic              zz_we,
  input  logic [1:0]        zz_tbl,
  input  logic [PW-1:0]     zz_pos,
  input  logic [PW-1:0]     zz_wdata,
  output logic [PW-1:0]     zz_rdata,
  // iBuf RLE port
  input  logic [1:0]        ib_full,
  input  logic              ib_sel,
  output logic              ib_re,
  output logic              ib_we,
  output logic [IAW-1:0]    ib_addr,
  output logic [COEF_W-1:0] ib_wdata,
  input  logic [COEF_W-1:0] ib_rdata,
  output logic              ib_release,
  // oBuf RLE port
  input  logic [1:0]        ob_nzr_flag,
  input  logic [15:0]       ob_nzr_cnt [2],
  input  logic              ob_sel,
  output logic              ob_we,
  output logic              ob_re,
  output logic [OAW-1:0]    ob_addr,
  output logic [31:0]       ob_wdata,
  input  logic [31:0]       ob_rdata,
  output logic              ob_done,
  output logic [15:0]       ob_count,
  output logic              ob_release,
  // status
  output logic              active,
  output logic              busy
);

  logic           ac_clr, ac_inc, ac_blk_end, ac_turn_end;
  logic [PW-1:0]  pos, scan_off;
  logic [IAW-1:0] base;
  logic [15:0]    blk;

  logic              zc_clr, zc_coef_valid, zc_coef_blk_end;
  logic              zc_pair_valid, zc_pair_last, zc_flushing;
  logic [14:0]       zc_pair_run, zc_run_val;
  logic [COEF_W-1:0] zc_pair_level;
  logic              zc_run_ld, zc_run_dn, zc_run_zero;

  rle_ctrl #(.OBUF_AW(OAW)) u_ctrl (
    .clk, .rst_n, .ctrl_we, .ctrl_wdata, .ctrl,
    .ac_clr, .ac_inc, .ac_blk_end, .ac_turn_end,
    .zc_clr, .zc_coef_valid, .zc_coef_blk_end,
    .zc_pair_valid, .zc_pair_run, .zc_pair_level, .zc_pair_last, .zc_flushing,
    .zc_run_ld, .zc_run_val, .zc_run_dn, .zc_run_zero,
    .ib_full, .ib_sel, .ib_re, .ib_we, .ib_wdata, .ib_release,
    .ob_nzr_flag, .ob_nzr_cnt, .ob_sel, .ob_rdata,
    .ob_we, .ob_re, .ob_addr, .ob_wdata, .ob_done, .ob_count, .ob_release,
    .active, .busy
  );

  rle_addr_cnt #(.POS_W(PW), .ADDR_W(IAW), .BLK_W(16)) u_addr_cnt (
    .clk, .rst_n, .clr(ac_clr), .inc(ac_inc),
    .len_m1(ctrl.blk_len_m1), .nblk(ctrl.nblk),
    .pos, .base, .blk, .blk_end(ac_blk_end), .turn_end(ac_turn_end)
  );

  zigzag_tbl u_zigzag (
    .clk, .rst_n,
    .wr_en(zz_we), .wr_tbl(zz_tbl), .wr_pos(zz_pos), .wr_off(zz_wdata),
    .rb_tbl(zz_tbl), .rb_pos(zz_pos), .rb_off(zz_rdata),
    .sel_tbl(ctrl.prog), .scan_pos(pos), .scan_off(scan_off)
  );

  rle_zero_cnt u_zero_cnt (
    .clk, .rst_n, .clr(zc_clr),
    .coef_valid(zc_coef_valid), .coef(ib_rdata), .coef_blk_end(zc_coef_blk_end),
    .pair_valid(zc_pair_valid), .pair_run(zc_pair_run), .pair_level(zc_pair_level),
    .pair_last(zc_pair_last), .flushing(zc_flushing),
    .run_ld(zc_run_ld), .run_val(zc_run_val), .run_dn(zc_run_dn), .run_zero(zc_run_zero)
  );

  assign ib_addr = base + IAW'(scan_off);

endmodule
