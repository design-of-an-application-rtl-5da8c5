// End-to-end test body for the BSP top, shared by the short and the
// full-size testbench. The testbench plays the external microprocessor and
// the DMA; the STP runs a program (assembled below) that:
//   phase A (encoding): copies a 4x4 zigzag order from pBuf into zigzag table 1,
//     reads the blocks-per-turn and turn count from the SPS/PPS buffer, starts
//     the RLE (level stored in the upper SRAM, STP reading oBuf 16 bits at a
//     time, H.264 style), and for each turn waits for the NZR flag of its oBuf
//     half, codes every (run, level, last) entry with Exp-Golomb codes through
//     TLE/STC into sBuf, clears the NZR flag and switches oBuf; then flushes
//     with STS, reports the word count in the status register and interrupts
//     the host;
//   phase B (decoding), after Int_Ack and a system command: parses the
//     bitstream back with TLD/LBC through a class-number indexed table, writes
//     the entries into its oBuf half 32 bits at a time (MPEG-1/2 style, run in
//     the upper SRAM), sets NZR and switches; the RLE expands them into iBuf,
//     which the host drains with MB_done.
// The host fills iBuf turns as halves free up, so with three turns the RLE
// finds both oBuf halves full and raises busy. Checked: the bitstream against
// a reference coder written here, the decoded coefficients against the
// originals, the RLE's encoding turn time, and that every mechanism happened.
module bsp_e2e #(
  parameter int NB   = 8,     // blocks of 16 coefficients per turn
  parameter int NT   = 3,     // turns
  parameter int DENS = 25,    // percent of non-zero coefficients
  parameter int WATCHDOG = 2000000,
  // 0: the bitstream must fit sBuf; the DMA reads it after the STP is done and
  //    writes it back before decoding.
  // 1: streaming; the DMA takes each word as the STP stores it and, while
  //    decoding, keeps sBuf (used as a ring) at most SB_AHEAD words ahead of
  //    the STP's reads, so a bitstream of any length passes through.
  parameter bit STREAM = 0,
  parameter int SB_AHEAD = 1000
);
  import bsp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [19:0] h_addr = '0;
  logic        h_we = 0, h_re = 0;
  logic [31:0] h_wdata = '0, h_rdata;
  logic        irq, busy;
  logic        dma_sel = 0, dma_we = 0, dma_re = 0;
  logic [9:0]  dma_addr = '0;
  logic [31:0] dma_wdata = '0, dma_rdata;
  logic        stp_running, stp_halted;
  logic [31:0] stp_instret;

  bsp_top dut (.clk, .rst_n, .h_addr, .h_we, .h_re, .h_wdata, .h_rdata, .irq, .busy,
               .dma_sel, .dma_addr, .dma_we, .dma_re, .dma_wdata, .dma_rdata,
               .stp_running, .stp_halted, .stp_instret);

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------ mechanism counters
  int n_enc_turn = 0, n_dec_turn = 0, n_busy = 0, n_switch = 0, n_nzr_set = 0, n_nzr_clr = 0;
  int n_irq_rise = 0, n_int_ack = 0;
  int n_tld = 0, n_tle = 0, n_lbc_load = 0, n_stc_store = 0, n_dma_rd = 0, n_dma_wr = 0;
  int n_sps_rd = 0, n_zz_we = 0, n_jump = 0, n_ibuf_rls = 0, n_ob_narrow = 0, n_ob_wide = 0;
  int enc_len [$];
  int act_cnt = 0;
  logic irq_q;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_rle.ob_done)    n_enc_turn++;
    if (dut.u_rle.ob_release) n_dec_turn++;
    if (busy)                 n_busy++;
    if (dut.u_obuf.s_switch)  n_switch++;
    if (dut.u_obuf.s_set)     n_nzr_set++;
    if (dut.u_obuf.s_clr)     n_nzr_clr++;
    if (irq && !irq_q)        n_irq_rise++;
    if (dut.h_int_ack) n_int_ack++;
    if (dut.u_stp.ex && dut.u_stp.op == OP_TLD) n_tld++;
    if (dut.u_stp.ex && dut.u_stp.op == OP_TLE) n_tle++;
    if (dut.u_stp.ex && dut.u_stp.op == OP_LBC && dut.u_stp.d_re) n_lbc_load++;
    if (dut.u_stp.ex && dut.u_stp.op == OP_STC && dut.u_stp.d_we) n_stc_store++;
    if (dma_re) n_dma_rd++;
    if (dma_we) n_dma_wr++;
    if (dut.u_stp.d_re && dut.u_stp.d_addr[19:16] == SR_SPS) n_sps_rd++;
    if (dut.u_stp.d_we && dut.u_stp.d_addr[19:16] == SR_ZZ) n_zz_we++;
    if (dut.h_jump) n_jump++;
    if (dut.u_rle.ib_release) n_ibuf_rls++;
    if ((dut.u_stp.d_re || dut.u_stp.d_we) && dut.u_stp.d_addr[19:16] == SR_OBUF) begin
      if (dut.rle_ctrl_q.stp_wide) n_ob_wide++; else n_ob_narrow++;
    end
    irq_q <= irq;
    // length of each encoding turn of the RLE
    if (dut.u_rle.active && !dut.rle_ctrl_q.dec) act_cnt++;
    if (!dut.u_rle.active && act_cnt != 0) begin enc_len.push_back(act_cnt); act_cnt = 0; end
  end

  // ------------------------------------------- streaming DMA: sBuf as a ring
  // While encoding, the DMA is told the address of each word the STP stores
  // (as a DMA request line would) and reads it out through its own port.
  logic [31:0] captured [$];
  int          sb_pending [$];
  bit          dma_busy_rd = 0;
  int sb_reads = 0;
  always @(posedge clk) if (rst_n) begin
    if (STREAM && dut.u_sbuf.a_we) sb_pending.push_back(int'(dut.u_sbuf.a_addr));
    if (dut.u_sbuf.a_re) sb_reads++;
  end

  // ------------------------------------------------------- host bus
  task automatic hwrite(logic [19:0] a, logic [31:0] d);
    @(negedge clk); h_we = 1; h_addr = a; h_wdata = d;
    @(negedge clk); h_we = 0;
  endtask
  task automatic hread(logic [19:0] a, output logic [31:0] d);
    @(negedge clk); h_re = 1; h_addr = a;
    @(negedge clk); h_re = 0; d = h_rdata;
  endtask
  task automatic dwrite(bit sel, int a, logic [31:0] d);
    @(negedge clk); dma_we = 1; dma_sel = sel; dma_addr = 10'(a); dma_wdata = d;
    @(negedge clk); dma_we = 0;
  endtask
  task automatic dread(int a, output logic [31:0] d);
    @(negedge clk); dma_re = 1; dma_sel = 0; dma_addr = 10'(a);
    @(negedge clk); dma_re = 0; d = dma_rdata;
  endtask

  // ---------------------------------------------------------- assembler
  logic [31:0] prog [$];
  function automatic void R(opcode_e op, int rd, int rs, int rt);
    prog.push_back({op, 4'(rd), 4'(rs), 4'(rt), 14'd0});
  endfunction
  function automatic void I(opcode_e op, int rd, int rs, int imm);
    prog.push_back({op, 4'(rd), 4'(rs), 4'd0, 14'(imm)});
  endfunction
  function automatic void Bk(opcode_e op, int rs, int rt, int label);
    prog.push_back({op, 4'd0, 4'(rs), 4'(rt), 14'(label - prog.size())});
  endfunction
  function automatic void S(int rt, int rs, int imm);
    prog.push_back({OP_ST, 4'd0, 4'(rs), 4'(rt), 14'(imm)});
  endfunction
  function automatic int here();
    return prog.size();
  endfunction

  function automatic void assemble();
    int l_zz, l_turn, l_poll, l_vlc, l_ack, l_cmd, l_turn2, l_free, l_vld, l_fin;
    I(OP_LUI, 9, 0, 6);                       // r9 = register region
    I(OP_LUI, 5, 0, 3);
    I(OP_LD, 6, 5, 0);                        // r6 = blocks per turn (SPS/PPS)
    I(OP_LD, 11, 5, 1);                       // r11 = turns
    I(OP_LUI, 1, 0, 2);                       // zigzag order from pBuf
    I(OP_LUI, 2, 0, 5); I(OP_ORI, 2, 2, 64);  // -> zigzag table 1
    I(OP_ADDI, 3, 0, 16);
    l_zz = here();
    I(OP_LD, 4, 1, 0); S(4, 2, 0); I(OP_ADDI, 1, 1, 1); I(OP_ADDI, 2, 2, 1);
    I(OP_ADDI, 3, 3, -1); Bk(OP_BNE, 3, 0, l_zz);
    I(OP_SLLI, 8, 6, 16); I(OP_ORI, 8, 8, 'h0F25); S(8, 9, 0);   // RLE: encode, table 1, 16/block, narrow, level in upper SRAM
    I(OP_LUI, 14, 0, 1); I(OP_ADDI, 1, 0, 0); I(OP_ADDI, 5, 0, 16);
    I(OP_ADDI, 12, 0, 'h100); R(OP_ADD, 7, 11, 0);
    l_turn = here();
    l_poll = here();
    I(OP_LD, 10, 9, 1); I(OP_SRLI, 8, 10, 31); Bk(OP_BEQ, 8, 0, l_poll);
    I(OP_ANDI, 15, 10, 'h3FFF); S(15, 12, 0); I(OP_ADDI, 12, 12, 1);
    I(OP_LUI, 13, 0, 4);
    l_vlc = here();
    I(OP_LD, 4, 13, 0); I(OP_LD, 2, 13, 1);   // 16-bit reads: level (upper), {last, run} (lower)
    I(OP_ANDI, 3, 2, 'h3FFF); R(OP_TLE, 0, 1, 3); I(OP_STC, 0, 14, 1);
    I(OP_SLLI, 4, 4, 16); R(OP_SRA, 4, 4, 5); I(OP_ADDI, 4, 4, 8); R(OP_TLE, 0, 1, 4); I(OP_STC, 0, 14, 1);
    I(OP_SRLI, 3, 2, 15); R(OP_TLE, 0, 1, 3); I(OP_STC, 0, 14, 1);
    I(OP_ADDI, 13, 13, 2); I(OP_ADDI, 15, 15, -1); Bk(OP_BNE, 15, 0, l_vlc);
    I(OP_ADDI, 8, 0, 3); S(8, 9, 1);          // clear NZR, switch oBuf
    I(OP_ADDI, 7, 7, -1); Bk(OP_BNE, 7, 0, l_turn);
    I(OP_STS, 0, 14, 1);
    I(OP_LUI, 8, 0, 1); R(OP_SUB, 8, 14, 8); S(8, 9, 4);   // status = words
    I(OP_ADDI, 8, 0, 1); S(8, 9, 5);          // interrupt: data ready
    l_ack = here();
    I(OP_LD, 10, 9, 5); Bk(OP_BEQ, 10, 0, l_ack);
    l_cmd = here();
    I(OP_LD, 10, 9, 3); Bk(OP_BEQ, 10, 0, l_cmd);
    S(10, 9, 3);                              // clear the handled command
    I(OP_SLLI, 8, 6, 16); I(OP_ORI, 8, 8, 'h0F47); S(8, 9, 0);   // RLE: decode, wide, run in upper SRAM
    I(OP_LUI, 14, 0, 1); I(OP_LBS, 0, 14, 1); I(OP_LBS, 0, 14, 1);
    I(OP_ADDI, 1, 0, 'h400); I(OP_ADDI, 12, 0, 'h100); R(OP_ADD, 7, 11, 0);
    l_turn2 = here();
    l_free = here();
    I(OP_LD, 10, 9, 1); I(OP_SRLI, 8, 10, 31); Bk(OP_BNE, 8, 0, l_free);
    I(OP_LD, 15, 12, 0); I(OP_ADDI, 12, 12, 1); I(OP_LUI, 13, 0, 4); R(OP_ADD, 11, 15, 0);
    l_vld = here();
    I(OP_TLD, 3, 1, 4); I(OP_LBC, 0, 14, 1);
    I(OP_TLD, 4, 1, 4); I(OP_LBC, 0, 14, 1);
    I(OP_ADDI, 4, 4, -8); I(OP_SLLI, 4, 4, 16); I(OP_SRLI, 4, 4, 16);
    I(OP_TLD, 2, 1, 4); I(OP_LBC, 0, 14, 1);
    I(OP_SLLI, 2, 2, 31); I(OP_SLLI, 3, 3, 16); R(OP_OR, 3, 3, 2); R(OP_OR, 3, 3, 4); S(3, 13, 0);
    I(OP_ADDI, 13, 13, 1); I(OP_ADDI, 15, 15, -1); Bk(OP_BNE, 15, 0, l_vld);
    I(OP_SLLI, 8, 11, 16); I(OP_ORI, 8, 8, 5); S(8, 9, 1);    // set NZR with count, switch
    I(OP_ADDI, 7, 7, -1); Bk(OP_BNE, 7, 0, l_turn2);
    l_fin = here();
    I(OP_LD, 10, 9, 1); I(OP_SRLI, 8, 10, 30); I(OP_ANDI, 8, 8, 1); Bk(OP_BNE, 8, 0, l_fin);
    I(OP_ADDI, 8, 0, 2); S(8, 9, 5);          // interrupt: done
    I(OP_HALT, 0, 0, 0);
  endfunction

  // --------------------------------------------------- reference data
  int zz [16];
  logic [15:0] coefs [NT][NB * 16];
  int ref_run [$], ref_lvl [$], ref_last [$];

  function automatic void make_zigzag();
    int k = 0;
    for (int s = 0; s <= 6; s++)
      if (s % 2 == 0) begin
        for (int r = (s < 4 ? s : 3); r >= 0 && s - r < 4; r--) begin zz[k] = r * 4 + s - r; k++; end
      end else begin
        for (int r = (s < 4 ? 0 : s - 3); r <= s && r < 4; r++) begin zz[k] = r * 4 + s - r; k++; end
      end
  endfunction

  function automatic void reference();
    for (int t = 0; t < NT; t++)
      for (int b = 0; b < NB; b++) begin
        automatic int run = 0, np = 0;
        for (int k = 0; k < 16; k++) begin
          automatic int c = $signed(coefs[t][b * 16 + zz[k]]);
          if (c == 0) run++;
          else begin
            ref_run.push_back(run); ref_lvl.push_back(c); ref_last.push_back(0);
            run = 0; np++;
          end
        end
        if (np == 0) begin ref_run.push_back(0); ref_lvl.push_back(0); ref_last.push_back(1); end
        else ref_last[$] = 1;
      end
  endfunction

  // Exp-Golomb reader over the words fetched by the DMA
  logic [31:0] words [$];
  int bitpos;
  function automatic int getbit();
    int w = bitpos / 32, b = 31 - bitpos % 32;
    bitpos++;
    return (w < words.size()) ? int'(words[w][b]) : 0;
  endfunction
  function automatic int ue();
    int n = 0, v = 1;
    while (getbit() == 0 && n < 32) n++;
    for (int i = 0; i < n; i++) v = v * 2 + getbit();
    return v - 1;
  endfunction

  // --------------------------------------------------------------- run
  initial begin
    logic [31:0] d;
    int nwords;
    irq_q = 0;
    make_zigzag();
    for (int t = 0; t < NT; t++)
      for (int i = 0; i < NB * 16; i++)
        coefs[t][i] = (($urandom % 100) < DENS) ? 16'($urandom_range(1, 7)) * (($urandom % 2) ? 16'd1 : -16'd1) : 16'd0;
    reference();
    assemble();
    repeat (3) @(negedge clk);
    rst_n = 1;
    if (STREAM)
      fork
        forever begin
          logic [31:0] w;
          while (sb_pending.size() == 0) @(negedge clk);
          dma_busy_rd = 1;
          dread(sb_pending.pop_front(), w);
          captured.push_back(w);
          dma_busy_rd = 0;
        end
      join_none

    // tables, parameters, program
    for (int v = 0; v <= 16; v++) begin
      automatic int n = $clog2(v + 2) - 1;
      hwrite({HR_DMEM, 16'(v)}, {6'(2 * n + 1), 26'(v + 1)});
    end
    for (int idx = 0; idx < 1024; idx++) begin
      automatic int cls = idx >> 7, f = idx & 127;
      int off, L, n;
      off = cls[2] ? 0 : cls[1] ? 4 : cls[0] ? 8 : 12;
      L = off + 7;
      n = off;
      while (n < L && ((f >> (L - 1 - n)) & 1) == 0) n++;
      if (2 * n + 1 <= L) hwrite({HR_DMEM, 16'('h400 + idx)}, {6'(2 * n + 1), 26'((f >> (L - 2 * n - 1)) - 1)});
      else hwrite({HR_DMEM, 16'('h400 + idx)}, '0);
    end
    for (int k = 0; k < 16; k++) hwrite({HR_PBUF, 16'(k)}, zz[k]);
    dwrite(1, 0, NB);
    dwrite(1, 1, NT);
    foreach (prog[i]) hwrite({HR_IMEM, 16'(i)}, prog[i]);
    hwrite({HR_REG, 12'h0, HG_JUMP}, 0);

    // phase A: feed the turns as iBuf halves free up
    for (int t = 0; t < NT; t++) begin
      logic [31:0] st;
      do begin
        hread({HR_REG, 12'h0, HG_IBUF_ST}, st);
      end while (st[1 + st[0]] == 1'b1);
      for (int i = 0; i < NB * 16; i++) hwrite({HR_IBUF, 16'(i)}, 32'(coefs[t][i]));
      hwrite({HR_REG, 12'h0, HG_IBUF}, 32'h1);        // iBuf_Full
    end
    while (!irq) @(negedge clk);
    hread({HR_REG, 12'h0, HG_INT}, d);
    check(d == 1, "data-ready interrupt");
    hread({HR_REG, 12'h0, HG_STATUS}, d);
    nwords = int'(d);
    if (STREAM) begin
      while (sb_pending.size() != 0 || dma_busy_rd) @(negedge clk);
      words = captured;
      check(nwords > 1024, "bitstream longer than sBuf streamed out");
    end else
      for (int w = 0; w < nwords; w++) begin dread(w, d); words.push_back(d); end
    begin
      automatic int errs = 0;
      bitpos = 0;
      foreach (ref_run[i]) begin
        automatic int r = ue(), l = ue() - 8, z = ue();
        if (r != ref_run[i] || l != ref_lvl[i] || z != ref_last[i]) begin
          if (errs < 5) $display("entry %0d: got (%0d,%0d,%0d) exp (%0d,%0d,%0d)", i, r, l, z,
                                 ref_run[i], ref_lvl[i], ref_last[i]);
          errs++;
        end
      end
      check(errs == 0, $sformatf("bitstream holds the %0d reference entries", ref_run.size()));
      check(nwords == (bitpos + 31) / 32, "status word count");
    end
    foreach (enc_len[i]) check(enc_len[i] == NB * 16 + 4, $sformatf("RLE turn %0d cycles", enc_len[i]));
    // the DMA brings the bitstream back for decoding
    if (STREAM) begin
      int base_reads;
      base_reads = sb_reads;
      for (int w = 0; w < nwords && w < SB_AHEAD; w++) dwrite(0, w % 1024, words[w]);
      fork
        for (int w = SB_AHEAD; w < nwords; w++) begin
          while (w >= sb_reads - base_reads + SB_AHEAD) @(negedge clk);
          dwrite(0, w % 1024, words[w]);
        end
      join_none
    end else
      for (int w = 0; w < nwords; w++) dwrite(0, w, words[w]);
    hwrite({HR_REG, 12'h0, HG_INT_ACK}, 1);
    hwrite({HR_REG, 12'h0, HG_SYSCMD}, 1);

    // phase B: drain decoded turns
    for (int t = 0; t < NT; t++) begin
      logic [31:0] st;
      automatic int errs = 0;
      do hread({HR_REG, 12'h0, HG_IBUF_ST}, st); while (st[1 + st[0]] == 1'b0);
      for (int i = 0; i < NB * 16; i++) begin
        hread({HR_IBUF, 16'(i)}, d);
        if (d[15:0] != coefs[t][i]) begin
          if (errs < 4) $display("turn %0d coef %0d: got %h exp %h", t, i, d[15:0], coefs[t][i]);
          errs++;
        end
      end
      check(errs == 0, $sformatf("turn %0d decoded back to the original coefficients", t));
      hwrite({HR_REG, 12'h0, HG_IBUF}, 32'h2);        // MB_done
    end
    while (!stp_halted) @(negedge clk);
    hread({HR_REG, 12'h0, HG_INT}, d);
    check(d == 2, "done interrupt");

    check(n_enc_turn == NT, "encoding turns");
    check(n_dec_turn == NT, "decoding turns");
    check(n_busy > 0 || NT < 3, "RLE busy with both oBuf halves full");
    check(n_switch == 2 * NT, "oBuf switches");
    check(n_nzr_set == NT && n_nzr_clr == NT, "NZR set/clear by the STP");
    check(n_irq_rise == 2 && n_int_ack > 0, "interrupts and Int_Ack");
    check(n_tld > 0 && n_tle > 0 && n_lbc_load > 0 && n_stc_store > 0, "bitstream instructions");
    check(n_dma_rd > 0 && n_dma_wr > 0, "DMA transfers");
    check(n_sps_rd == 2, "STP reads SPS/PPS parameters");
    check(n_zz_we == 16, "STP loads a zigzag table");
    check(n_jump == 1, "host JUMP");
    check(n_ob_narrow > 0 && n_ob_wide > 0, "STP uses oBuf both 16 and 32 bits wide");
    check(n_ibuf_rls == 2 * NT, "RLE hands iBuf halves back (consumed or filled)");
    $display("turns enc %0d dec %0d, busy cycles %0d, entries %0d, words %0d, STP instructions %0d",
             n_enc_turn, n_dec_turn, n_busy, ref_run.size(), nwords, stp_instret);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
