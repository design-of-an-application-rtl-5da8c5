// Shared types and constants of the Bit Stream Processor (BSP).
//
// The BSP couples a Syntax Processor (STP, a small RISC core with bitstream
// instructions) to a hardwired Run-Level Engine (RLE) through dual buffers.
// This package holds what several modules agree on: the buffer sizes, the
// run/level entry format stored in oBuf, the layout of the RLE control
// register, the STP instruction set and the address maps seen by the STP and
// by the external microprocessor.
//
// From the design description: 64 macroblocks per buffer turn, a 32-bit x
// 1024-word sBuf, oBuf built from two 16-bit SRAMs, four zigzag tables, the
// bitstream instruction list. Everything else here (coefficient width,
// 384 coefficients per macroblock, the instruction encoding, the address maps,
// register layouts) is this implementation's own choice.
package bsp_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned COEF_W      = 16;   // one coefficient / one oBuf half word
  localparam int unsigned MB_COEFS    = 384;  // 16x16 luma + 2 x 8x8 chroma (4:2:0)
  localparam int unsigned MB_PER_TURN = 64;   // macroblocks per buffer half
  localparam int unsigned ZZ_DEPTH    = 64;   // positions per zigzag table (8x8 block)
  localparam int unsigned ZZ_TABLES   = 4;    // T0..T3
  localparam int unsigned IBUF_WORDS  = MB_PER_TURN * MB_COEFS;         // per half
  // worst case: every coefficient non-zero plus one end marker per 16-coefficient block
  localparam int unsigned OBUF_WORDS  = IBUF_WORDS + IBUF_WORDS / 16;   // per half
  localparam int unsigned SBUF_WORDS  = 1024;
  localparam int unsigned PBUF_WORDS  = 1024;
  localparam int unsigned SPS_WORDS   = 256;
  localparam int unsigned IMEM_WORDS  = 1024;
  localparam int unsigned DMEM_WORDS  = 4096;

  // ------------------------------------------------- oBuf run/level entry
  // Logical 32-bit entry {hi, lo}. With order = 0 the run word is in hi
  // (upper SRAM) and the level in lo (lower SRAM); order = 1 swaps them.
  // Run word: bit 15 = last flag (last pair of a block), bits 14:0 = run.
  // A level of zero marks a block without non-zero coefficients (last = 1).
  typedef struct packed {
    logic        last;
    logic [14:0] run;
  } run_word_t;

  // ------------------------------------------------- RLE control register
  typedef struct packed {
    logic [15:0] nblk;        // [31:16] blocks per turn
    logic [1:0]  rsvd;        // [15:14]
    logic [5:0]  blk_len_m1;  // [13:8]  coefficients per block minus one
    logic        rsvd2;       // [7]
    logic        stp_wide;    // [6] STP reads oBuf 32 bits at a time (MPEG-1/2 style)
    logic        order;       // [5] 0: run in upper SRAM, 1: level in upper SRAM
    logic        rsvd3;       // [4]
    logic [1:0]  prog;        // [3:2] zigzag table / codec program field
    logic        dec;         // [1] 0: encode iBuf->oBuf, 1: decode oBuf->iBuf
    logic        enable;      // [0]
  } rle_ctrl_t;

  // ----------------------------------------------- VLC table entry format
  // Entry in data memory used by TLD / TLE: [31:26] length, [25:0] code.
  localparam int unsigned VLC_LEN_LSB = 26;

  // ------------------------------------------------------ STP instructions
  // 32-bit word: [31:26] opcode, [25:22] rd, [21:18] rs, [17:14] rt,
  // [13:0] imm (sign-extended unless noted).
  typedef enum logic [5:0] {
    OP_NOP  = 6'd0,
    OP_ADD  = 6'd1,  OP_SUB  = 6'd2,  OP_AND  = 6'd3,  OP_OR   = 6'd4,
    OP_XOR  = 6'd5,  OP_SLL  = 6'd6,  OP_SRL  = 6'd7,  OP_SRA  = 6'd8,
    OP_SLT  = 6'd9,  OP_SLTU = 6'd10,
    OP_ADDI = 6'd16, OP_ANDI = 6'd17, OP_ORI  = 6'd18, OP_XORI = 6'd19,
    OP_SLLI = 6'd20, OP_SRLI = 6'd21, OP_LUI  = 6'd22,
    OP_LD   = 6'd24, OP_ST   = 6'd25,
    OP_BEQ  = 6'd28, OP_BNE  = 6'd29, OP_BLT  = 6'd30, OP_J    = 6'd31,
    OP_TLD  = 6'd40, OP_TLE  = 6'd41, OP_LZS  = 6'd42, OP_LOS  = 6'd43,
    OP_REM  = 6'd44, OP_LBS  = 6'd45, OP_LBC  = 6'd46, OP_STS  = 6'd47,
    OP_STC  = 6'd48,
    OP_HALT = 6'd63
  } opcode_e;

  // ------------------------------------------------------ STP address map
  // Word addresses; region in bits [19:16].
  localparam logic [3:0] SR_DMEM = 4'h0;
  localparam logic [3:0] SR_SBUF = 4'h1;
  localparam logic [3:0] SR_PBUF = 4'h2;
  localparam logic [3:0] SR_SPS  = 4'h3;
  localparam logic [3:0] SR_OBUF = 4'h4;
  localparam logic [3:0] SR_ZZ   = 4'h5;
  localparam logic [3:0] SR_REG  = 4'h6;

  // STP register-region offsets
  localparam logic [3:0] RG_RLE_CTRL = 4'd0; // rw: rle_ctrl_t
  localparam logic [3:0] RG_OBUF_CMD = 4'd1; // w: bit0 switch oBuf, bit1 clear NZR, bit2 set NZR (count in [31:16])
                                             // r: {cur_flag, nxt_flag, stp_sel, 13'b0, cur_count}
  localparam logic [3:0] RG_NXT_CNT  = 4'd2; // r: NZR count of the other half
  localparam logic [3:0] RG_SYSCMD   = 4'd3; // r: system command register, w: write-1-to-clear
  localparam logic [3:0] RG_STATUS   = 4'd4; // rw: status register read by the host
  localparam logic [3:0] RG_INT      = 4'd5; // w: raise interrupt causes, r: {31'b0, int_ack}
  localparam logic [3:0] RG_IBUF_ST  = 4'd6; // r: {rle_busy, rle_active, full[1], full[0]}

  // ------------------------------------------- host (microprocessor) map
  localparam logic [3:0] HR_IMEM = 4'h0;
  localparam logic [3:0] HR_IBUF = 4'h1;
  localparam logic [3:0] HR_PBUF = 4'h2;
  localparam logic [3:0] HR_REG  = 4'h3;
  localparam logic [3:0] HR_DMEM = 4'h4;

  localparam logic [3:0] HG_SYSCMD  = 4'd0; // w: set bits of the system command register
  localparam logic [3:0] HG_IBUF    = 4'd1; // w: bit0 iBuf_Full, bit1 MB_done
  localparam logic [3:0] HG_JUMP    = 4'd2; // w: start the STP at address wdata
  localparam logic [3:0] HG_INT_ACK = 4'd3; // w: acknowledge interrupt causes wdata
  localparam logic [3:0] HG_STATUS  = 4'd4; // r: STP status register
  localparam logic [3:0] HG_INT     = 4'd5; // r: pending interrupt causes
  localparam logic [3:0] HG_IBUF_ST = 4'd6; // r: {halted, running, rle_busy, full[1], full[0], host_sel}

endpackage
