// Bit Stream Processor (BSP): the lossless-coding half of a video codec.
//
// The BSP does the entropy coding and run-level coding of a video codec; the
// lossy signal processing runs on an external microprocessor. Two engines
// work in a pipeline through dual buffers:
//   * the Run-Level Engine (RLE), hardwired, turns blocks of transform
//     coefficients in iBuf into (run, level, last) entries in oBuf, in a
//     programmable zigzag order, or expands oBuf entries back into iBuf;
//   * the Syntax Processor (STP), a two-stage RISC core with bitstream
//     instructions, turns oBuf entries into a bitstream in sBuf (encoding) or
//     parses sBuf into oBuf entries (decoding), using VLC tables in its data
//     memory, parameters from pBuf and the SPS/PPS buffer.
// The external microprocessor fills/drains iBuf, writes pBuf, loads the STP
// program and controls it through the command decoder, system controller and
// interrupt controller. An external DMA moves the bitstream in and out of sBuf
// and writes the SPS/PPS buffer. The NZR flags of oBuf and the full flags of
// iBuf let each side know when the other has finished a buffer half.
//
// STP address map (word addresses, region in bits 19:16): 0 data memory,
// 1 sBuf, 2 pBuf, 3 SPS/PPS, 4 oBuf, 5 zigzag tables (table in 7:6, position
// in 5:0), 6 registers (see bsp_pkg). Reads return one cycle later.
//
// The block structure and buffer connections follow the design; sizes other
// than sBuf's and the 64-macroblock buffer turn, and all maps and encodings,
// are this implementation's choices.
module bsp_top
  import bsp_pkg::*;
#(
  parameter int unsigned IBUF_W = IBUF_WORDS,
  parameter int unsigned OBUF_W = OBUF_WORDS,
  parameter int unsigned IMEM_W = IMEM_WORDS,
  parameter int unsigned DMEM_W = DMEM_WORDS,
  parameter int unsigned SBUF_W = SBUF_WORDS,
  parameter int unsigned PBUF_W = PBUF_WORDS,
  parameter int unsigned SPS_W  = SPS_WORDS,
  localparam int unsigned IMAW  = $clog2(IMEM_W),
  localparam int unsigned DMAW  = $clog2(DMEM_W),
  localparam int unsigned SBAW  = $clog2(SBUF_W),
  localparam int unsigned PBAW  = $clog2(PBUF_W),
  localparam int unsigned SPAW  = $clog2(SPS_W),
  localparam int unsigned IBAW  = $clog2(IBUF_W),
  localparam int unsigned OBAW  = $clog2(OBUF_W)
) (
  input  logic        clk,
  input  logic        rst_n,
  // external microprocessor
  input  logic [19:0] h_addr,
  input  logic        h_we,
  input  logic        h_re,
  input  logic [31:0] h_wdata,
  output logic [31:0] h_rdata,
  output logic        irq,
  output logic        busy,
  // external DMA: dma_sel 0 = sBuf, 1 = SPS/PPS
  input  logic        dma_sel,
  input  logic [SBAW-1:0] dma_addr,
  input  logic        dma_we,
  input  logic        dma_re,
  input  logic [31:0] dma_wdata,
  output logic [31:0] dma_rdata,
  // observation
  output logic        stp_running,
  output logic        stp_halted,
  output logic [31:0] stp_instret
);

  // ------------------------------------------------------------ STP core
  logic            stp_start;
  logic [IMAW-1:0] stp_start_pc, im_addr;
  logic [31:0]     im_rdata;
  logic            d_re, d_we;
  logic [31:0]     d_addr, d_wdata, d_rdata;

  stp #(.IMEM_AW(IMAW)) u_stp (
    .clk, .rst_n, .start(stp_start), .start_pc(stp_start_pc),
    .running(stp_running), .halted(stp_halted),
    .im_addr, .im_rdata,
    .d_re, .d_we, .d_addr, .d_wdata, .d_rdata,
    .instret(stp_instret)
  );

  // ----------------------------------------------------- address decode
  logic [3:0] region;
  assign region = d_addr[19:16];
  logic sel_dm, sel_sb, sel_pb, sel_sp, sel_ob, sel_zz, sel_rg;
  assign sel_dm = region == SR_DMEM;
  assign sel_sb = region == SR_SBUF;
  assign sel_pb = region == SR_PBUF;
  assign sel_sp = region == SR_SPS;
  assign sel_ob = region == SR_OBUF;
  assign sel_zz = region == SR_ZZ;
  assign sel_rg = region == SR_REG;

  // ------------------------------------------------------ host decoder
  logic            h_dm_we;
  logic [DMAW-1:0] h_dm_addr;
  logic            h_im_we, h_ib_we, h_ib_re, h_ib_full, h_ib_done;
  logic [IMAW-1:0] h_im_addr;
  logic [IBAW-1:0] h_ib_addr;
  logic [COEF_W-1:0] h_ib_rdata;
  logic            h_pb_we, h_pb_re;
  logic [PBAW-1:0] h_pb_addr;
  logic [31:0]     h_pb_rdata;
  logic            h_cmd_set, h_jump, h_int_ack;
  logic [31:0]     status;
  logic [7:0]      int_pending;
  logic [5:0]      buf_status;

  cmd_dec #(.IMEM_AW(IMAW), .IBUF_AW(IBAW), .PBUF_AW(PBAW), .DMEM_AW(DMAW)) u_cmd_dec (
    .clk, .rst_n, .h_addr, .h_we, .h_re, .h_wdata, .h_rdata,
    .im_we(h_im_we), .im_addr(h_im_addr), .dm_we(h_dm_we), .dm_addr(h_dm_addr),
    .ib_we(h_ib_we), .ib_re(h_ib_re), .ib_addr(h_ib_addr), .ib_rdata(h_ib_rdata),
    .ib_full(h_ib_full), .ib_done(h_ib_done),
    .pb_we(h_pb_we), .pb_re(h_pb_re), .pb_addr(h_pb_addr), .pb_rdata(h_pb_rdata),
    .cmd_set(h_cmd_set), .jump(h_jump), .int_ack(h_int_ack),
    .status, .int_pending, .buf_status
  );

  // ------------------------------------------------- system / interrupt
  logic [31:0] syscmd;
  logic        s_reg_we;
  logic [3:0]  s_reg_off;
  assign s_reg_we  = d_we && sel_rg;
  assign s_reg_off = d_addr[3:0];

  sys_ctrl #(.PC_W(IMAW)) u_sys_ctrl (
    .clk, .rst_n,
    .h_cmd_set, .h_jump, .h_wdata, .status,
    .syscmd, .s_cmd_clr(s_reg_we && s_reg_off == RG_SYSCMD),
    .s_status_we(s_reg_we && s_reg_off == RG_STATUS), .s_wdata(d_wdata),
    .stp_start, .stp_start_pc
  );

  logic int_ack_flag;
  int_ctrl #(.N(8)) u_int_ctrl (
    .clk, .rst_n,
    .raise(s_reg_we && s_reg_off == RG_INT), .cause(d_wdata[7:0]),
    .ack(h_int_ack), .ack_mask(h_wdata[7:0]),
    .pending(int_pending), .irq, .int_ack(int_ack_flag)
  );

  // ------------------------------------------------------- memories
  logic [31:0] dm_rdata, sb_rdata, pb_rdata, sp_rdata;
  logic [31:0] dma_sb_rdata, dma_sp_rdata;
  logic [31:0] im_b_rdata, dm_b_rdata;

  bsp_ram #(.WORDS(IMEM_W), .W(32)) u_imem (
    .clk,
    .a_re(1'b1), .a_we(1'b0), .a_addr(im_addr), .a_wdata('0), .a_rdata(im_rdata),
    .b_re(1'b0), .b_we(h_im_we), .b_addr(h_im_addr), .b_wdata(h_wdata), .b_rdata(im_b_rdata)
  );

  // the host loads the VLC tables through the data memory's second port
  bsp_ram #(.WORDS(DMEM_W), .W(32)) u_dmem (
    .clk,
    .a_re(d_re && sel_dm), .a_we(d_we && sel_dm), .a_addr(d_addr[DMAW-1:0]),
    .a_wdata(d_wdata), .a_rdata(dm_rdata),
    .b_re(1'b0), .b_we(h_dm_we), .b_addr(h_dm_addr), .b_wdata(h_wdata), .b_rdata(dm_b_rdata)
  );

  bsp_ram #(.WORDS(SBUF_W), .W(32)) u_sbuf (
    .clk,
    .a_re(d_re && sel_sb), .a_we(d_we && sel_sb), .a_addr(d_addr[SBAW-1:0]),
    .a_wdata(d_wdata), .a_rdata(sb_rdata),
    .b_re(dma_re && !dma_sel), .b_we(dma_we && !dma_sel), .b_addr(dma_addr),
    .b_wdata(dma_wdata), .b_rdata(dma_sb_rdata)
  );

  bsp_ram #(.WORDS(PBUF_W), .W(32)) u_pbuf (
    .clk,
    .a_re(d_re && sel_pb), .a_we(d_we && sel_pb), .a_addr(d_addr[PBAW-1:0]),
    .a_wdata(d_wdata), .a_rdata(pb_rdata),
    .b_re(h_pb_re), .b_we(h_pb_we), .b_addr(h_pb_addr),
    .b_wdata(h_wdata), .b_rdata(h_pb_rdata)
  );

  bsp_ram #(.WORDS(SPS_W), .W(32)) u_sps_pps (
    .clk,
    .a_re(d_re && sel_sp), .a_we(d_we && sel_sp), .a_addr(d_addr[SPAW-1:0]),
    .a_wdata(d_wdata), .a_rdata(sp_rdata),
    .b_re(dma_re && dma_sel), .b_we(dma_we && dma_sel), .b_addr(dma_addr[SPAW-1:0]),
    .b_wdata(dma_wdata), .b_rdata(dma_sp_rdata)
  );

  logic dma_sel_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      dma_sel_q <= 1'b0;
    else if (dma_re) dma_sel_q <= dma_sel;
  end
  assign dma_rdata = dma_sel_q ? dma_sp_rdata : dma_sb_rdata;

  // --------------------------------------------------------- buffers
  logic              ib_r_re, ib_r_we, ib_r_release;
  logic [IBAW-1:0]   ib_r_addr;
  logic [COEF_W-1:0] ib_r_wdata, ib_r_rdata;
  logic [1:0]        ib_full;
  logic              ib_h_sel, ib_r_sel;

  ibuf #(.WORDS(IBUF_W)) u_ibuf (
    .clk, .rst_n,
    .h_we(h_ib_we), .h_re(h_ib_re), .h_addr(h_ib_addr), .h_wdata(h_wdata[COEF_W-1:0]),
    .h_rdata(h_ib_rdata), .h_full(h_ib_full), .h_done(h_ib_done),
    .r_we(ib_r_we), .r_re(ib_r_re), .r_addr(ib_r_addr), .r_wdata(ib_r_wdata),
    .r_rdata(ib_r_rdata), .r_release(ib_r_release),
    .full(ib_full), .h_sel(ib_h_sel), .r_sel(ib_r_sel)
  );

  logic            ob_r_we, ob_r_re, ob_r_done, ob_r_release;
  logic [OBAW-1:0] ob_r_addr;
  logic [31:0]     ob_r_wdata, ob_r_rdata, ob_s_rdata;
  logic [15:0]     ob_r_count;
  logic [1:0]      nzr_flag;
  logic [15:0]     nzr_cnt [2];
  logic            ob_r_sel, ob_s_sel;
  rle_ctrl_t       rle_ctrl_q;
  logic            ob_cmd_we;
  assign ob_cmd_we = s_reg_we && s_reg_off == RG_OBUF_CMD;

  obuf #(.WORDS(OBUF_W)) u_obuf (
    .clk, .rst_n,
    .r_we(ob_r_we), .r_re(ob_r_re), .r_addr(ob_r_addr), .r_wdata(ob_r_wdata),
    .r_rdata(ob_r_rdata), .r_done(ob_r_done), .r_count(ob_r_count), .r_release(ob_r_release),
    .s_wide(rle_ctrl_q.stp_wide), .s_we(d_we && sel_ob), .s_re(d_re && sel_ob),
    .s_addr(d_addr[OBAW:0]), .s_wdata(d_wdata), .s_rdata(ob_s_rdata),
    .s_switch(ob_cmd_we && d_wdata[0]), .s_clr(ob_cmd_we && d_wdata[1]),
    .s_set(ob_cmd_we && d_wdata[2]), .s_count(d_wdata[31:16]),
    .nzr_flag, .nzr_cnt, .r_sel(ob_r_sel), .s_sel(ob_s_sel)
  );

  // ------------------------------------------------------------- RLE
  logic       rle_active, rle_busy;
  logic [5:0] zz_rdata;

  rle #(.IBUF_W(IBUF_W), .OBUF_W(OBUF_W)) u_rle (
    .clk, .rst_n,
    .ctrl_we(s_reg_we && s_reg_off == RG_RLE_CTRL), .ctrl_wdata(d_wdata), .ctrl(rle_ctrl_q),
    .zz_we(d_we && sel_zz), .zz_tbl(d_addr[7:6]), .zz_pos(d_addr[5:0]),
    .zz_wdata(d_wdata[5:0]), .zz_rdata,
    .ib_full, .ib_sel(ib_r_sel), .ib_re(ib_r_re), .ib_we(ib_r_we), .ib_addr(ib_r_addr),
    .ib_wdata(ib_r_wdata), .ib_rdata(ib_r_rdata), .ib_release(ib_r_release),
    .ob_nzr_flag(nzr_flag), .ob_nzr_cnt(nzr_cnt), .ob_sel(ob_r_sel),
    .ob_we(ob_r_we), .ob_re(ob_r_re), .ob_addr(ob_r_addr), .ob_wdata(ob_r_wdata),
    .ob_rdata(ob_r_rdata), .ob_done(ob_r_done), .ob_count(ob_r_count), .ob_release(ob_r_release),
    .active(rle_active), .busy(rle_busy)
  );

  assign busy       = rle_busy;
  assign buf_status = {stp_halted, stp_running, rle_busy, ib_full, ib_h_sel};

  // --------------------------------------------------- STP read data
  logic [3:0]  rd_region;
  logic [31:0] rg_rd, zz_rd;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_region <= '0;
      rg_rd     <= '0;
      zz_rd     <= '0;
    end else if (d_re) begin
      rd_region <= region;
      zz_rd     <= 32'(zz_rdata);
      unique case (s_reg_off)
        RG_RLE_CTRL: rg_rd <= 32'(rle_ctrl_q);
        RG_OBUF_CMD: rg_rd <= {nzr_flag[ob_s_sel], nzr_flag[~ob_s_sel], ob_s_sel, 13'h0,
                               nzr_cnt[ob_s_sel]};
        RG_NXT_CNT:  rg_rd <= 32'(nzr_cnt[~ob_s_sel]);
        RG_SYSCMD:   rg_rd <= syscmd;
        RG_STATUS:   rg_rd <= status;
        RG_INT:      rg_rd <= 32'(int_ack_flag);
        RG_IBUF_ST:  rg_rd <= {28'h0, rle_busy, rle_active, ib_full};
        default:     rg_rd <= '0;
      endcase
    end
  end

  always_comb begin
    unique case (rd_region)
      SR_DMEM: d_rdata = dm_rdata;
      SR_SBUF: d_rdata = sb_rdata;
      SR_PBUF: d_rdata = pb_rdata;
      SR_SPS:  d_rdata = sp_rdata;
      SR_OBUF: d_rdata = ob_s_rdata;
      SR_ZZ:   d_rdata = zz_rd;
      SR_REG:  d_rdata = rg_rd;
      default: d_rdata = '0;
    endcase
  end

endmodule
