// Self-checking testbench of the Syntax Processor with its bitstream unit.
//
// Runs small programs out of an instruction memory and checks results the
// testbench works out on its own:
//   1. general instructions: a summing loop, shifts, compares, loads/stores;
//   2. encoding: TLE + STC turn symbols into Exp-Golomb codes through a code
//      table and pack them into the bitstream buffer, STS flushes the tail;
//   3. decoding: LBS fills the window, TLD decodes each symbol through a
//      class-number indexed table, LBC refills when a word is used up;
//   4. LZS / LOS / REM on a known word.
// Also checks that a program takes one cycle per instruction plus one per read.
module tb_stp;
  import bsp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        start = 0;
  logic [9:0]  start_pc = '0, im_addr;
  logic [31:0] im_rdata;
  logic        running, halted;
  logic        d_re, d_we;
  logic [31:0] d_addr, d_wdata, d_rdata, instret;

  stp dut (.clk, .rst_n, .start, .start_pc, .running, .halted,
           .im_addr, .im_rdata, .d_re, .d_we, .d_addr, .d_wdata, .d_rdata, .instret);

  // instruction memory, loaded through port B
  logic        im_we = 0;
  logic [9:0]  im_waddr = '0;
  logic [31:0] im_wdata = '0, im_b;
  bsp_ram #(.WORDS(1024), .W(32)) u_imem (
    .clk, .a_re(1'b1), .a_we(1'b0), .a_addr(im_addr), .a_wdata('0), .a_rdata(im_rdata),
    .b_re(1'b0), .b_we(im_we), .b_addr(im_waddr), .b_wdata(im_wdata), .b_rdata(im_b));

  // data memory (region 0) and bitstream buffer (region 1)
  logic [31:0] dm_rd, sb_rd, dm_b, sb_b;
  logic        tb_we = 0;
  logic        tb_sel = 0;
  logic [11:0] tb_addr = '0;
  logic [31:0] tb_wdata = '0;
  logic        rsel_q;
  bsp_ram #(.WORDS(4096), .W(32)) u_dmem (
    .clk, .a_re(d_re && d_addr[19:16] == 0), .a_we(d_we && d_addr[19:16] == 0),
    .a_addr(d_addr[11:0]), .a_wdata(d_wdata), .a_rdata(dm_rd),
    .b_re(1'b1), .b_we(tb_we && !tb_sel), .b_addr(tb_addr), .b_wdata(tb_wdata), .b_rdata(dm_b));
  bsp_ram #(.WORDS(1024), .W(32)) u_sbuf (
    .clk, .a_re(d_re && d_addr[19:16] == 1), .a_we(d_we && d_addr[19:16] == 1),
    .a_addr(d_addr[9:0]), .a_wdata(d_wdata), .a_rdata(sb_rd),
    .b_re(1'b1), .b_we(tb_we && tb_sel), .b_addr(tb_addr[9:0]), .b_wdata(tb_wdata), .b_rdata(sb_b));
  always_ff @(posedge clk) if (d_re) rsel_q <= d_addr[16];
  assign d_rdata = rsel_q ? sb_rd : dm_rd;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------------------ assembler
  function automatic logic [31:0] R(opcode_e op, int rd, int rs, int rt);
    return {op, 4'(rd), 4'(rs), 4'(rt), 14'd0};
  endfunction
  function automatic logic [31:0] I(opcode_e op, int rd, int rs, int imm);
    return {op, 4'(rd), 4'(rs), 4'd0, 14'(imm)};
  endfunction
  function automatic logic [31:0] B(opcode_e op, int rs, int rt, int off);
    return {op, 4'd0, 4'(rs), 4'(rt), 14'(off)};
  endfunction
  function automatic logic [31:0] ST(int rt, int rs, int imm);
    return {OP_ST, 4'd0, 4'(rs), 4'(rt), 14'(imm)};
  endfunction

  logic [31:0] prog [$];
  task automatic load_and_run(output int cycles, output int reads);
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk); im_we = 1; im_waddr = 10'(i); im_wdata = prog[i];
    end
    @(negedge clk); im_we = 0; start = 1; start_pc = 0;
    @(negedge clk); start = 0;
    cycles = 0; reads = 0;
    while (running) begin
      if (d_re) reads++;
      cycles++;
      @(negedge clk);
    end
    prog.delete();
  endtask

  task automatic poke(bit sel, int a, logic [31:0] d);
    @(negedge clk); tb_we = 1; tb_sel = sel; tb_addr = 12'(a); tb_wdata = d;
    @(negedge clk); tb_we = 0;
  endtask

  int sym [20];
  logic [31:0] exp_words [4];

  initial begin
    int cyc, rds, n0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---------------------------------------------------- 1. general
    prog.push_back(I(OP_ADDI, 1, 0, 0));        // r1 = sum
    prog.push_back(I(OP_ADDI, 2, 0, 10));       // r2 = i
    prog.push_back(R(OP_ADD, 1, 1, 2));         // loop: sum += i
    prog.push_back(I(OP_ADDI, 2, 2, -1));
    prog.push_back(B(OP_BNE, 2, 0, -2));
    prog.push_back(ST(1, 0, 100));              // dmem[100] = 55
    prog.push_back(I(OP_LUI, 3, 0, 5));         // r3 = 0x50000
    prog.push_back(I(OP_ORI, 3, 3, 12));        // r3 = 0x5000c
    prog.push_back(I(OP_ADDI, 4, 0, -8));       // r4 = -8
    prog.push_back(I(OP_ADDI, 5, 0, 2));
    prog.push_back(R(OP_SRA, 6, 4, 5));         // -2
    prog.push_back(R(OP_SLT, 7, 4, 0));         // 1
    prog.push_back(R(OP_SUB, 8, 3, 4));         // 0x50014
    prog.push_back(ST(3, 0, 101));
    prog.push_back(ST(6, 0, 102));
    prog.push_back(ST(7, 0, 103));
    prog.push_back(ST(8, 0, 104));
    prog.push_back(I(OP_LD, 9, 0, 100));        // r9 = 55
    prog.push_back(R(OP_XOR, 10, 9, 5));        // 53 (uses the load at once)
    prog.push_back(ST(10, 0, 105));
    prog.push_back(B(OP_BEQ, 0, 0, 2));         // skip next
    prog.push_back(ST(0, 0, 100));              // must not execute
    prog.push_back(I(OP_HALT, 0, 0, 0));
    load_and_run(cyc, rds);
    check(u_dmem.mem[100] == 55, "loop sum");
    check(u_dmem.mem[101] == 32'h5000c, "LUI/ORI");
    check(u_dmem.mem[102] == 32'hffff_fffe, "SRA");
    check(u_dmem.mem[103] == 1, "SLT");
    check(u_dmem.mem[104] == 32'h50014, "SUB");
    check(u_dmem.mem[105] == 53, "load then use");
    // 3 + 10*3 loop + 15 straight + halt, one read
    check(instret == 2 + 30 + 16 + 1, $sformatf("instret %0d", instret));
    check(cyc == instret + rds && rds == 1, $sformatf("cycles %0d instr %0d reads %0d", cyc, instret, rds));

    // ---------------------------------------------------- 2. encoding
    // code table at 0x200: symbol s -> Exp-Golomb code s+1 of 2*floor(log2(s+1))+1 bits
    for (int s = 0; s < 8; s++) begin
      automatic int n = $clog2(s + 2) - 1;
      poke(0, 'h200 + s, {6'(2 * n + 1), 26'(s + 1)});
    end
    for (int i = 0; i < 20; i++) begin
      sym[i] = $urandom_range(0, 7);
      poke(0, 'h300 + i, sym[i]);
    end
    begin
      automatic logic [127:0] bits = '0;
      automatic int pos = 0;
      for (int i = 0; i < 20; i++) begin
        automatic int n = $clog2(sym[i] + 2) - 1;
        automatic int len = 2 * n + 1;
        for (int b = len - 1; b >= 0; b--) begin
          bits[127 - pos] = ((sym[i] + 1) >> b) & 1;
          pos++;
        end
      end
      for (int w = 0; w < 4; w++) exp_words[w] = bits[127 - 32 * w -: 32];
      n0 = (pos + 31) / 32;
    end
    prog.push_back(I(OP_ADDI, 1, 0, 'h200));    // table
    prog.push_back(I(OP_ADDI, 2, 0, 'h300));    // symbols
    prog.push_back(I(OP_LUI, 3, 0, 1));         // sBuf pointer
    prog.push_back(I(OP_ADDI, 4, 0, 20));
    prog.push_back(I(OP_LD, 5, 2, 0));          // loop
    prog.push_back(R(OP_TLE, 0, 1, 5));
    prog.push_back(I(OP_STC, 0, 3, 1));
    prog.push_back(I(OP_ADDI, 2, 2, 1));
    prog.push_back(I(OP_ADDI, 4, 4, -1));
    prog.push_back(B(OP_BNE, 4, 0, -5));
    prog.push_back(I(OP_STS, 0, 3, 1));         // flush
    prog.push_back(ST(3, 0, 110));
    prog.push_back(I(OP_HALT, 0, 0, 0));
    load_and_run(cyc, rds);
    begin
      automatic int errs = 0;
      for (int w = 0; w < n0; w++) if (u_sbuf.mem[w] != exp_words[w]) begin
        errs++; $display("sbuf[%0d] %h exp %h", w, u_sbuf.mem[w], exp_words[w]);
      end
      check(errs == 0, "encoded bitstream");
      check(u_dmem.mem[110] == 32'h10000 + 32'(n0), "STC/STS auto-indexing");
    end

    // ---------------------------------------------------- 3. decoding
    // decode table at 0x400, imm1 = 0, imm2 = 4: index = {class, 7-bit field}
    for (int idx = 0; idx < 1024; idx++) begin
      automatic int f = idx & 127;
      automatic int n = 0;
      while (n < 7 && ((f >> (6 - n)) & 1) == 0) n++;
      if (2 * n + 1 <= 7) poke(0, 'h400 + idx, {6'(2 * n + 1), 26'((f >> (6 - 2 * n)) - 1)});
      else poke(0, 'h400 + idx, '0);
    end
    prog.push_back(I(OP_LUI, 3, 0, 1));         // sBuf pointer
    prog.push_back(I(OP_LBS, 0, 3, 1));
    prog.push_back(I(OP_LBS, 0, 3, 1));
    prog.push_back(I(OP_ADDI, 1, 0, 'h400));
    prog.push_back(I(OP_ADDI, 2, 0, 'h500));    // output
    prog.push_back(I(OP_ADDI, 4, 0, 20));
    prog.push_back(I(OP_TLD, 5, 1, 'h04));      // loop: imm1 = 0, imm2 = 4
    prog.push_back(ST(5, 2, 0));
    prog.push_back(I(OP_LBC, 0, 3, 1));
    prog.push_back(I(OP_ADDI, 2, 2, 1));
    prog.push_back(I(OP_ADDI, 4, 4, -1));
    prog.push_back(B(OP_BNE, 4, 0, -5));
    prog.push_back(I(OP_HALT, 0, 0, 0));
    load_and_run(cyc, rds);
    begin
      automatic int errs = 0;
      for (int i = 0; i < 20; i++) if (u_dmem.mem['h500 + i] != sym[i]) begin errs++; if (errs < 4) $display("sym %0d got %0d exp %0d", i, u_dmem.mem['h500 + i], sym[i]); end
      check(errs == 0, "TLD decoding");
    end

    // ---------------------------------------------------- 4. LZS / LOS / REM
    poke(1, 0, 32'h00F0_0000);
    poke(1, 1, 32'h0003_FFFF);
    poke(1, 2, 32'h8000_0000);
    prog.push_back(I(OP_LUI, 3, 0, 1));
    prog.push_back(I(OP_LBS, 0, 3, 1));
    prog.push_back(I(OP_LBS, 0, 3, 1));
    prog.push_back(R(OP_LZS, 1, 0, 0));         // 8
    prog.push_back(R(OP_LOS, 2, 0, 0));         // 4
    prog.push_back(I(OP_ADDI, 5, 0, 20));
    prog.push_back(R(OP_REM, 0, 5, 0));         // rem = 32 -> rc
    prog.push_back(I(OP_LBC, 0, 3, 1));         // loads word 2
    prog.push_back(R(OP_LZS, 6, 0, 0));         // 14 zeros of word 1
    prog.push_back(R(OP_LOS, 7, 0, 0));         // 18 ones + first bit of word 2
    prog.push_back(ST(1, 0, 120));
    prog.push_back(ST(2, 0, 121));
    prog.push_back(ST(6, 0, 122));
    prog.push_back(ST(7, 0, 123));
    prog.push_back(ST(3, 0, 124));
    prog.push_back(I(OP_HALT, 0, 0, 0));
    load_and_run(cyc, rds);
    check(u_dmem.mem[120] == 8,  "LZS");
    check(u_dmem.mem[121] == 4,  "LOS");
    check(u_dmem.mem[122] == 14, "LZS after REM/LBC");
    check(u_dmem.mem[123] == 19, "LOS across words");
    check(u_dmem.mem[124] == 32'h10003, "LBC auto-indexing");
    check(halted && !running, "halted");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
