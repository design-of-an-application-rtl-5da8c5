// Self-checking testbench of the STP bitstream unit, driven directly.
//
// Loads known words with LBS, then checks the TLD table index for each class
// number (000, 001, 01x, 1xx) and imm1/imm2 against an index computed here,
// the length update of TLD write-back, LZS/LOS/REM with the RC carry, LBC's
// conditional refill, and TLE/STC/STS bit packing.
module tb_bs_unit;
  import bsp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        clr = 0, ex_en = 0, wb = 0;
  opcode_e     ex_op = OP_NOP, wb_op = OP_NOP;
  logic [31:0] a = '0, b = '0, mem_rdata = '0;
  logic [13:0] imm = '0;
  logic        mem_re, mem_we, rd_we, rs_we, rc;
  logic [31:0] mem_addr, mem_wdata, rd_val, rs_val, wb_val, bs;
  logic [4:0]  rem;

  bs_unit dut (.clk, .rst_n, .clr, .ex_en, .ex_op, .a, .b, .imm,
               .mem_re, .mem_we, .mem_addr, .mem_wdata, .rd_we, .rd_val, .rs_we, .rs_val,
               .wb, .wb_op, .mem_rdata, .wb_val, .bs, .rem, .rc);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one EX cycle, optionally followed by a write-back with `data`
  task automatic exec(opcode_e op, logic [31:0] va, logic [31:0] vb, logic [13:0] im);
    @(negedge clk); ex_en = 1; ex_op = op; a = va; b = vb; imm = im;
  endtask
  task automatic finish_ex();
    @(negedge clk); ex_en = 0;
  endtask
  task automatic writeback(opcode_e op, logic [31:0] data);
    ex_en = 0; wb = 1; wb_op = op; mem_rdata = data;
    @(negedge clk); wb = 0;
  endtask
  task automatic load_word(logic [31:0] w);
    exec(OP_LBS, 32'h100, 0, 14'd1);
    #1 check(mem_re && mem_addr == 32'h100 && rs_we && rs_val == 32'h101, "LBS address / auto-index");
    @(negedge clk); writeback(OP_LBS, w);
  endtask

  // reference TLD index
  function automatic logic [31:0] ref_idx(logic [31:0] w, int imm1, int imm2);
    int off, fw;
    logic [2:0] c = {|w[31:28], |w[27:24], |w[23:20]};
    off = c[2] ? 0 : c[1] ? 4 : c[0] ? 8 : 12;
    fw = imm2 + 3;
    return (imm1 << (3 + fw)) | (c << fw) | ((w << off) >> (32 - fw));
  endfunction

  logic [31:0] words [6] = '{32'h9ABC_DEF0, 32'h0123_4567, 32'h0081_0000, 32'h0000_5000,
                             32'h0000_0000, 32'h7000_0001};

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---- TLD index per class
    foreach (words[i]) begin
      for (int m = 1; m <= 8; m += 3) begin
        load_word(words[i]);
        load_word(32'h0);
        exec(OP_TLD, 32'h1000, 0, 14'((i % 3) << 4 | m));
        #1 check(mem_re && mem_addr == 32'h1000 + ref_idx(words[i], i % 3, m),
                 $sformatf("TLD index w=%h m=%0d got %h", words[i], m, mem_addr));
        finish_ex();
      end
    end

    // ---- TLD write-back: length 5, then LZS/LOS and REM carry
    clr = 1; @(negedge clk); clr = 0;
    load_word(32'hF800_0FFF);   // 11111 0000000 ... then ones
    load_word(32'hA000_0000);
    exec(OP_TLD, 0, 0, 14'h4);
    @(negedge clk);
    mem_rdata = {6'd3, 26'd42}; #1 check(wb_val == 42, "TLD returns the code");
    writeback(OP_TLD, {6'd3, 26'd42});
    check(rem == 3 && !rc, "TLD adds the entry length to REM");
    exec(OP_LOS, 0, 0, 0); #1 check(rd_we && rd_val == 2, "LOS"); finish_ex();
    exec(OP_LZS, 0, 0, 0); #1 check(rd_val == 15, "LZS"); finish_ex();
    check(rem == 20, "REM after LZS");
    exec(OP_LOS, 0, 0, 0); #1 check(rd_val == 13, "LOS across the word end"); finish_ex();
    check(rc && rem == 1, "RC set past the word end");
    exec(OP_LBC, 32'h200, 0, 14'd1); #1 check(mem_re && rs_we, "LBC loads when RC");
    @(negedge clk); writeback(OP_LBC, 32'h5555_5555);
    check(!rc && bs == 32'h4000_0000, "LBC shifted the window");
    exec(OP_LBC, 32'h200, 0, 14'd1); #1 check(!mem_re && !rs_we, "LBC idle without RC"); finish_ex();
    exec(OP_REM, 32'd33, 0, 0); finish_ex();
    check(rc && rem == 2, "REM carries into RC");

    // ---- encoding: 20 + 15 + 5 bits
    clr = 1; @(negedge clk); clr = 0;
    exec(OP_TLE, 32'h300, 32'h4, 0); #1 check(mem_re && mem_addr == 32'h304, "TLE index");
    @(negedge clk); writeback(OP_TLE, {6'd20, 26'hABCDE});
    exec(OP_STC, 32'h10000, 0, 14'd1); #1 check(!mem_we, "STC idle without RC"); finish_ex();
    exec(OP_TLE, 32'h300, 32'h5, 0);
    @(negedge clk); writeback(OP_TLE, {6'd15, 26'h7FFF});
    check(rc && rem == 3, "TLE carry");
    exec(OP_STC, 32'h10000, 0, 14'd1);
    #1 check(mem_we && mem_addr == 32'h10000 && mem_wdata == 32'hABCDE_FFF, "STC stores a full word");
    finish_ex();
    exec(OP_TLE, 32'h300, 32'h6, 0);
    @(negedge clk); writeback(OP_TLE, {6'd5, 26'h15});
    exec(OP_STS, 32'h10001, 0, 14'd1);
    #1 check(mem_we && mem_wdata == 32'hF500_0000 && rs_val == 32'h10002, "STS flushes the tail");
    finish_ex();
    check(rem == 0 && !rc && bs == 0, "STS empties the bitstream state");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
