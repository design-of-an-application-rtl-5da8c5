// Self-checking testbench of the Run-Level Engine together with iBuf and oBuf.
//
// Encodes random sparse blocks (4x4 with a zigzag order in table 1, 8x8 with
// the 8x8 zigzag in table 2) and compares the oBuf entries and NZR counts with
// a reference run-level coder written here; checks the turn time of
// NBLK*BLK_LEN + 4 cycles; decodes the entries back and compares iBuf with the
// original coefficients; fills both oBuf halves to provoke `busy`; and reads
// entries in the narrow (16-bit) mode with the swapped run/level order.
module tb_rle;
  import bsp_pkg::*;

  localparam int unsigned IW = 256;
  localparam int unsigned OW = 288;
  localparam int unsigned IAW = $clog2(IW);
  localparam int unsigned OAW = $clog2(OW);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------------------------------------------------------- DUT
  logic        ctrl_we = 0;
  logic [31:0] ctrl_wdata = '0;
  rle_ctrl_t   ctrl;
  logic        zz_we = 0;
  logic [1:0]  zz_tbl = '0;
  logic [5:0]  zz_pos = '0, zz_wdata = '0, zz_rdata;

  logic              h_we = 0, h_re = 0, h_full = 0, h_done = 0;
  logic [IAW-1:0]    h_addr = '0;
  logic [COEF_W-1:0] h_wdata = '0, h_rdata;
  logic              ib_re, ib_we, ib_release, ib_h_sel, ib_r_sel;
  logic [IAW-1:0]    ib_addr;
  logic [COEF_W-1:0] ib_wdata, ib_rdata;
  logic [1:0]        ib_full;

  logic              ob_we, ob_re, ob_done, ob_release, ob_r_sel, ob_s_sel;
  logic [OAW-1:0]    ob_addr;
  logic [31:0]       ob_wdata, ob_rdata, s_rdata;
  logic [15:0]       ob_count;
  logic [1:0]        nzr_flag;
  logic [15:0]       nzr_cnt [2];
  logic              s_wide = 1, s_we = 0, s_re = 0, s_switch = 0, s_set = 0, s_clr = 0;
  logic [OAW:0]      s_addr = '0;
  logic [31:0]       s_wdata = '0;
  logic [15:0]       s_count = '0;
  logic              active, busy;

  rle #(.IBUF_W(IW), .OBUF_W(OW)) dut (
    .clk, .rst_n, .ctrl_we, .ctrl_wdata, .ctrl,
    .zz_we, .zz_tbl, .zz_pos, .zz_wdata, .zz_rdata,
    .ib_full, .ib_sel(ib_r_sel), .ib_re, .ib_we, .ib_addr, .ib_wdata, .ib_rdata, .ib_release,
    .ob_nzr_flag(nzr_flag), .ob_nzr_cnt(nzr_cnt), .ob_sel(ob_r_sel),
    .ob_we, .ob_re, .ob_addr, .ob_wdata, .ob_rdata, .ob_done, .ob_count, .ob_release,
    .active, .busy
  );

  ibuf #(.WORDS(IW)) u_ibuf (
    .clk, .rst_n, .h_we, .h_re, .h_addr, .h_wdata, .h_rdata, .h_full, .h_done,
    .r_we(ib_we), .r_re(ib_re), .r_addr(ib_addr), .r_wdata(ib_wdata), .r_rdata(ib_rdata),
    .r_release(ib_release), .full(ib_full), .h_sel(ib_h_sel), .r_sel(ib_r_sel)
  );

  obuf #(.WORDS(OW)) u_obuf (
    .clk, .rst_n,
    .r_we(ob_we), .r_re(ob_re), .r_addr(ob_addr), .r_wdata(ob_wdata), .r_rdata(ob_rdata),
    .r_done(ob_done), .r_count(ob_count), .r_release(ob_release),
    .s_wide, .s_we, .s_re, .s_addr, .s_wdata, .s_rdata, .s_switch, .s_set, .s_clr, .s_count,
    .nzr_flag, .nzr_cnt, .r_sel(ob_r_sel), .s_sel(ob_s_sel)
  );

  // ---------------------------------------------------------- watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ----------------------------------------------------- reference data
  int zz4 [64];
  int zz8 [64];
  logic [15:0] coefs [IW];
  logic [31:0] expq [$];      // expected entries, order 0 layout

  function automatic void make_zigzag(int n, ref int zz [64]);
    int k = 0;
    for (int s = 0; s <= 2 * n - 2; s++) begin
      if (s % 2 == 0) begin
        for (int r = (s < n ? s : n - 1); r >= 0 && s - r < n; r--) begin
          zz[k] = r * n + (s - r); k++;
        end
      end else begin
        for (int r = (s < n ? 0 : s - n + 1); r <= s && r < n; r++) begin
          zz[k] = r * n + (s - r); k++;
        end
      end
    end
    for (int i = k; i < 64; i++) zz[i] = i;
  endfunction

  function automatic void reference(int blk_len, int nblk, ref int zz [64]);
    expq.delete();
    for (int b = 0; b < nblk; b++) begin
      int run = 0;
      int npairs = 0;
      int base = b * blk_len;
      logic [31:0] last_e;
      for (int k = 0; k < blk_len; k++) begin
        logic [15:0] c = coefs[base + zz[k]];
        if (c == 0) run++;
        else begin
          expq.push_back({1'b0, 15'(run), c});
          run = 0;
          npairs++;
        end
      end
      if (npairs == 0) expq.push_back({1'b1, 15'd0, 16'd0});
      else begin
        last_e = expq.pop_back();
        last_e[31] = 1'b1;
        expq.push_back(last_e);
      end
    end
  endfunction

  // --------------------------------------------------------- bus tasks
  task automatic fill_ibuf(int n, int density);
    for (int i = 0; i < n; i++) begin
      if (($urandom % 100) < density) begin
        logic [15:0] v = 16'($urandom_range(1, 300));
        coefs[i] = ($urandom % 2) ? v : -v;
      end else coefs[i] = '0;
      @(negedge clk);
      h_we = 1; h_addr = IAW'(i); h_wdata = coefs[i];
    end
    @(negedge clk); h_we = 0; h_full = 1;
    @(negedge clk); h_full = 0;
  endtask

  task automatic write_ctrl(bit dec, int prog, int blk_len, int nblk, bit order);
    rle_ctrl_t c;
    c = '0;
    c.enable = 1; c.dec = dec; c.prog = 2'(prog); c.blk_len_m1 = 6'(blk_len - 1);
    c.nblk = 16'(nblk); c.order = order;
    @(negedge clk); ctrl_we = 1; ctrl_wdata = 32'(c);
    @(negedge clk); ctrl_we = 0;
  endtask

  task automatic program_table(int t, ref int zz [64]);
    for (int p = 0; p < 64; p++) begin
      @(negedge clk); zz_we = 1; zz_tbl = 2'(t); zz_pos = 6'(p); zz_wdata = 6'(zz[p]);
    end
    @(negedge clk); zz_we = 0;
    for (int p = 0; p < 64; p += 9) begin
      zz_pos = 6'(p); #1;
      check(zz_rdata == 6'(zz[p]), "zigzag read-back");
    end
  endtask

  task automatic stp_read(int a, output logic [31:0] d);
    @(negedge clk); s_re = 1; s_addr = (OAW+1)'(a);
    @(negedge clk); s_re = 0; d = s_rdata;
  endtask

  task automatic stp_cmd(bit sw, bit clr);
    @(negedge clk); s_switch = sw; s_clr = clr;
    @(negedge clk); s_switch = 0; s_clr = 0;
  endtask

  // compares the STP's current oBuf half with expq
  task automatic compare_obuf(bit narrow_swapped, string tag);
    logic [31:0] d, e, lo, hi;
    int errs = 0;
    check(nzr_flag[ob_s_sel] == 1'b1, {tag, ": NZR flag"});
    check(nzr_cnt[ob_s_sel] == 16'(expq.size()), {tag, ": NZR count"});
    for (int i = 0; i < expq.size(); i++) begin
      e = expq[i];
      if (!narrow_swapped) begin
        s_wide = 1; stp_read(i, d);
      end else begin
        s_wide = 0;
        stp_read(2 * i, hi);      // upper SRAM: level with order = 1
        stp_read(2 * i + 1, lo);  // lower SRAM: run word
        d = {lo[15:0], hi[15:0]};
        if (hi[31:16] != 0 || lo[31:16] != 0) errs++;
        s_wide = 1;
      end
      if (d != e) begin
        if (errs < 5) $display("%s entry %0d got %h exp %h", tag, i, d, e);
        errs++;
      end
    end
    check(errs == 0, {tag, ": oBuf entries"});
  endtask

  int t_start, t_end, n_busy;
  always @(posedge clk) if (busy) n_busy++;

  task automatic encode_turn(int prog, int blk_len, int nblk, int density, bit order, ref int zz [64],
                             input string tag, input bit expect_blocked);
    int n = blk_len * nblk;
    int act_cycles = 0;
    fill_ibuf(n, density);
    reference(blk_len, nblk, zz);
    write_ctrl(0, prog, blk_len, nblk, order);
    if (expect_blocked) begin
      repeat (5) @(negedge clk);
      check(busy && !active, {tag, ": busy while both oBuf halves are full"});
      // STP side: move to the full half and release it
      stp_cmd(1, 1);
    end
    while (!active) @(posedge clk);
    while (active) begin @(posedge clk); act_cycles++; end
    check(act_cycles == n + 4, $sformatf("%s: turn took %0d cycles, expected %0d", tag, act_cycles, n + 4));
  endtask

  initial begin
    logic [31:0] d;
    n_busy = 0;
    make_zigzag(4, zz4);
    make_zigzag(8, zz8);
    repeat (3) @(negedge clk);
    rst_n = 1;
    program_table(1, zz4);
    program_table(2, zz8);

    // ---- encode 4x4 blocks through table 1
    encode_turn(1, 16, 16, 30, 0, zz4, "enc4x4", 0);
    compare_obuf(0, "enc4x4");
    check(ib_full == 2'b00, "iBuf half released after encoding");

    // ---- decode the same entries back (STP writes them into its other half)
    stp_cmd(1, 1);                        // clear NZR of half 0, move STP to half 1
    for (int i = 0; i < expq.size(); i++) begin
      @(negedge clk); s_we = 1; s_wide = 1; s_addr = (OAW+1)'(i); s_wdata = expq[i];
    end
    @(negedge clk); s_we = 0; s_set = 1; s_count = 16'(expq.size());
    @(negedge clk); s_set = 0;
    write_ctrl(1, 1, 16, 16, 0);
    while (ib_full[ib_h_sel] == 1'b0) @(negedge clk);
    check(nzr_flag[ob_s_sel] == 1'b0, "decode reset the NZR flag");
    begin
      int errs = 0;
      for (int i = 0; i < 256; i++) begin
        @(negedge clk); h_re = 1; h_addr = IAW'(i);
        @(negedge clk); h_re = 0;
        if (h_rdata != coefs[i]) errs++;
      end
      check(errs == 0, "decoded coefficients equal the originals");
    end
    @(negedge clk); h_done = 1;
    @(negedge clk); h_done = 0;
    stp_cmd(1, 0);                        // STP back to half 0

    // ---- 8x8 blocks, two turns filling both oBuf halves, third one blocks
    begin
      logic [31:0] exp_a [$];
      encode_turn(2, 64, 4, 15, 0, zz8, "enc8x8a", 0);
      compare_obuf(0, "enc8x8a");
      encode_turn(2, 64, 4, 5, 0, zz8, "enc8x8b", 0);
      encode_turn(2, 64, 4, 20, 1, zz8, "enc8x8c", 1);
      // STP now on half 1 (enc8x8b still there); move to half 0 for enc8x8c
      stp_cmd(1, 0);
      compare_obuf(1, "enc8x8c narrow/swapped");
    end
    // an all-zero turn gives one marker per block
    stp_cmd(1, 1);
    stp_cmd(1, 1);
    encode_turn(1, 16, 2, 0, 0, zz4, "zero", 0);
    stp_cmd(1, 0);
    compare_obuf(0, "zero blocks");
    check(n_busy > 0, "busy seen");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
