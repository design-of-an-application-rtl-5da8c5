// Syntax Processor (STP): a two-stage RISC core with bitstream instructions.
//
// Stage 1 presents the fetch address to the synchronous instruction memory;
// stage 2 decodes, reads the 16 x 32-bit register file (r0 reads as zero),
// executes, accesses data memory and writes the result back. Branches are
// resolved in stage 2 and steer the very next fetch address, so they cost no
// bubble. A read (LD, TLD, TLE, LBS, LBC) returns its data one cycle later;
// that cycle is a write-back slot in which no instruction executes, so every
// read takes two cycles and all other instructions one.
//
// Instruction word: [31:26] opcode, [25:22] rd, [21:18] rs, [17:14] rt,
// [13:0] imm (sign-extended for ADDI, loads, stores and branches; zero-extended
// for ANDI/ORI/XORI; LUI loads imm << 16). Branch targets are pc + imm, J is
// absolute. The bitstream instructions TLD, TLE, LZS, LOS, REM, LBS, LBC, STS
// and STC are carried out by bs_unit; TLD takes imm1 from imm[5:4] and the
// mode imm2 from imm[3:0].
//
// All data accesses go through one port with a 1-cycle read latency; the BSP
// decodes the address into data memory, the buffers and the control
// registers. The core starts at `start_pc` on `start` (the host's JUMP
// command) and stops on HALT.
//
// The two pipeline stages, the mix of general RISC and bitstream
// instructions, and the list of bitstream instructions follow the design. The
// register count, the instruction encoding and the general instruction set
// are this implementation's choices.
module stp
  import bsp_pkg::*;
#(
  parameter int unsigned IMEM_AW = $clog2(IMEM_WORDS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [IMEM_AW-1:0] start_pc,
  output logic               running,
  output logic               halted,
  // instruction memory
  output logic [IMEM_AW-1:0] im_addr,
  input  logic [31:0]        im_rdata,
  // data port
  output logic               d_re,
  output logic               d_we,
  output logic [31:0]        d_addr,
  output logic [31:0]        d_wdata,
  input  logic [31:0]        d_rdata,
  // number of executed instructions
  output logic [31:0]        instret
);

  logic [IMEM_AW-1:0] pc_f;
  logic               ex_valid;
  logic               wb_pend;
  opcode_e            wb_op;
  logic [3:0]         wb_rd;

  logic [31:0] rf [16];

  // ---------------------------------------------------------------- decode
  opcode_e     op;
  logic [3:0]  rd, rs, rt;
  logic [13:0] imm;
  logic [31:0] simm, zimm, va, vb;
  assign op   = opcode_e'(im_rdata[31:26]);
  assign rd   = im_rdata[25:22];
  assign rs   = im_rdata[21:18];
  assign rt   = im_rdata[17:14];
  assign imm  = im_rdata[13:0];
  assign simm = 32'(signed'(imm));
  assign zimm = 32'(imm);
  assign va   = (rs == 4'd0) ? 32'h0 : rf[rs];
  assign vb   = (rt == 4'd0) ? 32'h0 : rf[rt];

  logic ex;
  assign ex = running && ex_valid && !wb_pend;

  logic is_bs;
  always_comb begin
    unique case (op)
      OP_TLD, OP_TLE, OP_LZS, OP_LOS, OP_REM,
      OP_LBS, OP_LBC, OP_STS, OP_STC: is_bs = 1'b1;
      default:                        is_bs = 1'b0;
    endcase
  end

  // ----------------------------------------------------------- bitstream
  logic        bs_re, bs_we, bs_rd_we, bs_rs_we;
  logic [31:0] bs_addr, bs_wdata, bs_rd_val, bs_rs_val, bs_wb_val;
  logic [31:0] bs_win;
  logic [4:0]  bs_rem;
  logic        bs_rc;

  bs_unit u_bs (
    .clk, .rst_n, .clr(start),
    .ex_en(ex && is_bs), .ex_op(op), .a(va), .b(vb), .imm,
    .mem_re(bs_re), .mem_we(bs_we), .mem_addr(bs_addr), .mem_wdata(bs_wdata),
    .rd_we(bs_rd_we), .rd_val(bs_rd_val), .rs_we(bs_rs_we), .rs_val(bs_rs_val),
    .wb(wb_pend), .wb_op, .mem_rdata(d_rdata), .wb_val(bs_wb_val),
    .bs(bs_win), .rem(bs_rem), .rc(bs_rc)
  );

  // ------------------------------------------------------------- execute
  logic        alu_we, branch, halt;
  logic [31:0] alu;
  logic [IMEM_AW-1:0] target;

  always_comb begin
    alu_we = 1'b1;
    alu    = '0;
    branch = 1'b0;
    halt   = 1'b0;
    target = pc_f + IMEM_AW'(simm);
    unique case (op)
      OP_ADD:  alu = va + vb;
      OP_SUB:  alu = va - vb;
      OP_AND:  alu = va & vb;
      OP_OR:   alu = va | vb;
      OP_XOR:  alu = va ^ vb;
      OP_SLL:  alu = va << vb[4:0];
      OP_SRL:  alu = va >> vb[4:0];
      OP_SRA:  alu = 32'($signed(va) >>> vb[4:0]);
      OP_SLT:  alu = 32'($signed(va) < $signed(vb));
      OP_SLTU: alu = 32'(va < vb);
      OP_ADDI: alu = va + simm;
      OP_ANDI: alu = va & zimm;
      OP_ORI:  alu = va | zimm;
      OP_XORI: alu = va ^ zimm;
      OP_SLLI: alu = va << imm[4:0];
      OP_SRLI: alu = va >> imm[4:0];
      OP_LUI:  alu = zimm << 16;
      OP_BEQ:  begin alu_we = 1'b0; branch = (va == vb); end
      OP_BNE:  begin alu_we = 1'b0; branch = (va != vb); end
      OP_BLT:  begin alu_we = 1'b0; branch = ($signed(va) < $signed(vb)); end
      OP_J:    begin alu_we = 1'b0; branch = 1'b1; target = IMEM_AW'(imm); end
      OP_HALT: begin alu_we = 1'b0; halt = 1'b1; end
      default: alu_we = 1'b0;
    endcase
  end

  logic ld;
  assign ld = (op == OP_LD);

  // data port
  always_comb begin
    d_re    = 1'b0;
    d_we    = 1'b0;
    d_addr  = va + simm;
    d_wdata = vb;
    if (ex) begin
      if (is_bs) begin
        d_re    = bs_re;
        d_we    = bs_we;
        d_addr  = bs_addr;
        d_wdata = bs_wdata;
      end else if (ld) begin
        d_re = 1'b1;
      end else if (op == OP_ST) begin
        d_we = 1'b1;
      end
    end
  end

  // ----------------------------------------------------------- fetch
  always_comb begin
    if (start)                 im_addr = start_pc;
    else if (wb_pend)          im_addr = pc_f;
    else if (ex && branch)     im_addr = target;
    else if (ex && !halt)      im_addr = pc_f + IMEM_AW'(1);
    else                       im_addr = pc_f;
  end

  // ----------------------------------------------------- state / write
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running  <= 1'b0;
      halted   <= 1'b0;
      pc_f     <= '0;
      ex_valid <= 1'b0;
      wb_pend  <= 1'b0;
      wb_op    <= OP_NOP;
      wb_rd    <= '0;
      instret  <= '0;
      for (int i = 0; i < 16; i++) rf[i] <= '0;
    end else if (start) begin
      running  <= 1'b1;
      halted   <= 1'b0;
      pc_f     <= start_pc;
      ex_valid <= 1'b1;
      wb_pend  <= 1'b0;
    end else begin
      pc_f <= im_addr;
      if (wb_pend) begin
        wb_pend <= 1'b0;
        if (wb_op == OP_LD && wb_rd != 4'd0) rf[wb_rd] <= d_rdata;
        if (wb_op == OP_TLD && wb_rd != 4'd0) rf[wb_rd] <= bs_wb_val;
      end else if (ex) begin
        instret <= instret + 32'd1;
        if (halt) begin
          running <= 1'b0;
          halted  <= 1'b1;
        end
        if (d_re) begin
          wb_pend <= 1'b1;
          wb_op   <= op;
          wb_rd   <= rd;
        end
        if (alu_we && rd != 4'd0)    rf[rd] <= alu;
        if (bs_rd_we && rd != 4'd0)  rf[rd] <= bs_rd_val;
        if (bs_rs_we && rs != 4'd0)  rf[rs] <= bs_rs_val;
      end
    end
  end

endmodule
