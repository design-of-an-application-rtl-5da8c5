// Controller of the Run-Level Engine (RLE).
//
// Holds the RLE control register written by the STP and sequences one buffer
// turn at a time, i.e. NBLK blocks of BLK_LEN coefficients:
//
//  Encoding (dec = 0), iBuf -> oBuf. Starts when the RLE's iBuf half is full
//  and the RLE's oBuf half has its NZR flag clear. One initialisation cycle,
//  then one coefficient per cycle: the address counter gives the scan
//  position, the zigzag table the raster offset, iBuf returns the coefficient
//  a cycle later and the zero counter forms (run, level, last) entries that
//  are written to oBuf in order. After a two-cycle drain, one buffer-change
//  cycle sets the NZR register {flag = 1, entry count}, releases the iBuf half
//  and moves both RLE pointers. A turn therefore takes NBLK*BLK_LEN + 4 cycles
//  from the initialisation cycle to the NZR flag.
//
//  Decoding (dec = 1), oBuf -> iBuf. Starts when the RLE's oBuf half has its
//  NZR flag set (written by the STP) and the RLE's iBuf half is empty. Entries
//  are prefetched from oBuf; each expands into `run` zeros and the level, and
//  after an entry marked last the rest of the block is filled with zeros. One
//  coefficient is written per cycle in zigzag order. At the end the NZR flag
//  is reset, the iBuf half is marked full for the host and the pointers move.
//
//  When work is waiting but the target half is still owned by the other side
//  (both buffers full), the RLE stops and raises `busy`.
//
// The design gives the RLE's parts, the control register's program field,
// NZR flag handling and the busy signal; the exact cycle schedule, register
// layout and entry format are this implementation's choices.
module rle_ctrl
  import bsp_pkg::*;
#(
  parameter int unsigned OBUF_AW = $clog2(OBUF_WORDS)
) (
  input  logic               clk,
  input  logic               rst_n,
  // control register (STP)
  input  logic               ctrl_we,
  input  logic [31:0]        ctrl_wdata,
  output rle_ctrl_t          ctrl,
  // address counter
  output logic               ac_clr,
  output logic               ac_inc,
  input  logic               ac_blk_end,
  input  logic               ac_turn_end,
  // zero counter
  output logic               zc_clr,
  output logic               zc_coef_valid,
  output logic               zc_coef_blk_end,
  input  logic               zc_pair_valid,
  input  logic [14:0]        zc_pair_run,
  input  logic [COEF_W-1:0]  zc_pair_level,
  input  logic               zc_pair_last,
  input  logic               zc_flushing,
  output logic               zc_run_ld,
  output logic [14:0]        zc_run_val,
  output logic               zc_run_dn,
  input  logic               zc_run_zero,
  // iBuf RLE port (address from the address counter + zigzag table)
  input  logic [1:0]         ib_full,
  input  logic               ib_sel,
  output logic               ib_re,
  output logic               ib_we,
  output logic [COEF_W-1:0]  ib_wdata,
  output logic               ib_release,
  // oBuf RLE port
  input  logic [1:0]         ob_nzr_flag,
  input  logic [15:0]        ob_nzr_cnt [2],
  input  logic               ob_sel,
  input  logic [31:0]        ob_rdata,
  output logic               ob_we,
  output logic               ob_re,
  output logic [OBUF_AW-1:0] ob_addr,
  output logic [31:0]        ob_wdata,
  output logic               ob_done,
  output logic [15:0]        ob_count,
  output logic               ob_release,
  // status
  output logic               active,
  output logic               busy
);

  typedef enum logic [2:0] {
    S_IDLE, S_ENC_INIT, S_ENC_RUN, S_ENC_DRAIN, S_ENC_SWITCH,
    S_DEC_INIT, S_DEC_RUN, S_DEC_SWITCH
  } state_e;

  state_e state, state_n;

  // ------------------------------------------------------------ register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       ctrl <= '0;
    else if (ctrl_we) ctrl <= rle_ctrl_t'(ctrl_wdata);
  end

  // --------------------------------------------------------- start logic
  logic enc_ready, dec_ready, enc_blocked, dec_blocked;
  assign enc_ready   = ctrl.enable && !ctrl.dec && ib_full[ib_sel];
  assign enc_blocked = ob_nzr_flag[ob_sel];
  assign dec_ready   = ctrl.enable &&  ctrl.dec && ob_nzr_flag[ob_sel];
  assign dec_blocked = ib_full[ib_sel];

  assign active = (state != S_IDLE);
  assign busy   = (state == S_IDLE) &&
                  ((enc_ready && enc_blocked) || (dec_ready && dec_blocked));

  // ------------------------------------------------------- encode state
  logic               s1_valid, s1_blk_end;
  logic [OBUF_AW-1:0] wr_ptr;

  // ------------------------------------------------------- decode state
  logic [OBUF_AW-1:0] rd_ptr;
  logic [15:0]        fetch_left;
  logic               nxt_avail;
  logic               cur_v, cur_last, fill;
  logic [COEF_W-1:0]  cur_lvl;

  run_word_t          ent_run;
  logic [COEF_W-1:0]  ent_lvl;
  assign ent_run = ctrl.order ? run_word_t'(ob_rdata[15:0]) : run_word_t'(ob_rdata[31:16]);
  assign ent_lvl = ctrl.order ? ob_rdata[31:16] : ob_rdata[15:0];

  logic dec_wr, dec_wr_zero, cur_consume, load_cur, issue;

  always_comb begin
    dec_wr      = 1'b0;
    dec_wr_zero = 1'b1;
    cur_consume = 1'b0;
    zc_run_dn   = 1'b0;
    if (state == S_DEC_RUN) begin
      if (fill) begin
        dec_wr = 1'b1;
      end else if (cur_v) begin
        dec_wr = 1'b1;
        if (!zc_run_zero) begin
          zc_run_dn = 1'b1;
        end else begin
          dec_wr_zero = 1'b0;
          cur_consume = 1'b1;
        end
      end else if (!nxt_avail && fetch_left == '0) begin
        dec_wr = 1'b1;               // out of entries: zeros to the end
      end
    end
  end

  assign load_cur = (state == S_DEC_RUN) && nxt_avail && (!cur_v || cur_consume);
  assign issue    = (state == S_DEC_RUN) && (fetch_left != '0) && (!nxt_avail || load_cur);

  assign zc_run_ld  = load_cur;
  assign zc_run_val = ent_run.run;

  // ------------------------------------------------------------- outputs
  assign ac_clr          = (state == S_ENC_INIT) || (state == S_DEC_INIT);
  assign ac_inc          = (state == S_ENC_RUN) || dec_wr;
  assign zc_clr          = (state == S_ENC_INIT);
  assign zc_coef_valid   = s1_valid;
  assign zc_coef_blk_end = s1_blk_end;

  assign ib_re    = (state == S_ENC_RUN);
  assign ib_we    = dec_wr;
  assign ib_wdata = dec_wr_zero ? '0 : cur_lvl;

  assign ob_we    = zc_pair_valid;
  assign ob_wdata = ctrl.order ? {zc_pair_level, zc_pair_last, zc_pair_run}
                               : {zc_pair_last, zc_pair_run, zc_pair_level};
  assign ob_re    = issue;
  assign ob_addr  = ctrl.dec ? rd_ptr : wr_ptr;
  assign ob_count = 16'(wr_ptr);

  assign ob_done    = (state == S_ENC_SWITCH);
  assign ob_release = (state == S_DEC_SWITCH);
  assign ib_release = (state == S_ENC_SWITCH) || (state == S_DEC_SWITCH);

  // ---------------------------------------------------------- next state
  always_comb begin
    state_n = state;
    unique case (state)
      S_IDLE: begin
        if (enc_ready && !enc_blocked)      state_n = S_ENC_INIT;
        else if (dec_ready && !dec_blocked) state_n = S_DEC_INIT;
      end
      S_ENC_INIT:   state_n = S_ENC_RUN;
      S_ENC_RUN:    if (ac_turn_end) state_n = S_ENC_DRAIN;
      S_ENC_DRAIN:  if (!s1_valid && zc_flushing) state_n = S_ENC_SWITCH;
      S_ENC_SWITCH: state_n = S_IDLE;
      S_DEC_INIT:   state_n = S_DEC_RUN;
      S_DEC_RUN:    if (dec_wr && ac_turn_end) state_n = S_DEC_SWITCH;
      S_DEC_SWITCH: state_n = S_IDLE;
      default:      state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      s1_valid   <= 1'b0;
      s1_blk_end <= 1'b0;
      wr_ptr     <= '0;
      rd_ptr     <= '0;
      fetch_left <= '0;
      nxt_avail  <= 1'b0;
      cur_v      <= 1'b0;
      cur_last   <= 1'b0;
      cur_lvl    <= '0;
      fill       <= 1'b0;
    end else begin
      state      <= state_n;
      // encode pipeline
      s1_valid   <= (state == S_ENC_RUN);
      s1_blk_end <= ac_blk_end;
      if (state == S_ENC_INIT)  wr_ptr <= '0;
      else if (zc_pair_valid)   wr_ptr <= wr_ptr + 1'b1;
      // decode
      if (state == S_DEC_INIT) begin
        rd_ptr     <= '0;
        fetch_left <= ob_nzr_cnt[ob_sel];
        nxt_avail  <= 1'b0;
        cur_v      <= 1'b0;
        fill       <= 1'b0;
      end else if (state == S_DEC_RUN) begin
        if (issue) begin
          rd_ptr     <= rd_ptr + 1'b1;
          fetch_left <= fetch_left - 16'd1;
        end
        nxt_avail <= issue || (nxt_avail && !load_cur);
        if (load_cur) begin
          cur_v    <= 1'b1;
          cur_last <= ent_run.last;
          cur_lvl  <= ent_lvl;
        end else if (cur_consume) begin
          cur_v <= 1'b0;
        end
        if (dec_wr && ac_blk_end)            fill <= 1'b0;
        else if (cur_consume && cur_last)    fill <= 1'b1;
      end
    end
  end

  // the iBuf port is either read (encoding) or written (decoding), never both
  property p_ibuf_one_direction;
    @(posedge clk) disable iff (!rst_n) !(ib_we && ib_re);
  endproperty
  assert property (p_ibuf_one_direction);

endmodule
