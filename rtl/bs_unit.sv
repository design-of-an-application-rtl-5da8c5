// Bitstream unit of the Syntax Processor (STP).
//
// Holds the bitstream state used by the special instructions:
//   cur, nxt : two 32-bit words of the bitstream, cur first, MSB first;
//   rem      : bits of `cur` already consumed (decoding) or filled (encoding);
//   rc       : carry out of rem, set when `cur` is used up / complete.
// For decoding, BS is the 32-bit window starting `rem` bits into {cur, nxt};
// for encoding, new codes are appended at bit `rem` and BS is `cur`.
//
// Instructions (decoded by the STP, executed here):
//   TLD rd,rs,imm1,imm2  index = rs + {imm1, class, field}; in write-back
//                        rd = code(entry), {rc,rem} += length(entry).
//                        class = OR of each of the three leading nibbles of
//                        BS; field = the 3+imm2 bits of BS starting at the
//                        first non-zero nibble (at bit 12 for class 000).
//   TLE rs,rt            index = rs + rt; in write-back the entry's code is
//                        appended at bit rem, {rc,rem} += length.
//   LZS rd / LOS rd      rd = leading zeros / ones of BS; {rc,rem} += that.
//   REM rs               {rc,rem} += rs[5:0].
//   LBS rs,imm           read mem[rs]; write-back: cur = nxt, nxt = data,
//                        rc = 0; rs += imm.
//   LBC rs,imm           as LBS, only when rc is set.
//   STS rs,imm           mem[rs] = cur; rs += imm; then the state is
//                        emptied (cur, nxt, rem, rc = 0), ending a stream.
//   STC rs,imm           only when rc is set: mem[rs] = cur, cur = nxt,
//                        nxt = 0, rc = 0; rs += imm.
// Table entries are 32 bits: [31:26] length, [25:0] code (right aligned).
// The instruction list, the class-number index and the RC/REM register follow
// the design; the two-word window, the field width 3+imm2, the 2-bit imm1 and
// the entry layout are this implementation's choices.
//
// Timing: EX-stage outputs are combinational from the state and operands.
// Reads return one cycle later; the STP then asserts `wb` with the same op.
// The lower half of the shifted window (dw_lo) is not needed and is left open.
module bs_unit
  import bsp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,          // STP start: empty bitstream state
  // execute stage
  input  logic        ex_en,
  input  opcode_e     ex_op,
  input  logic [31:0] a,            // rs value
  input  logic [31:0] b,            // rt value
  input  logic [13:0] imm,
  output logic        mem_re,
  output logic        mem_we,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata,
  output logic        rd_we,        // LZS / LOS result
  output logic [31:0] rd_val,
  output logic        rs_we,        // auto-indexing of rs
  output logic [31:0] rs_val,
  // write-back of a read
  input  logic        wb,
  input  opcode_e     wb_op,
  input  logic [31:0] mem_rdata,
  output logic [31:0] wb_val,       // TLD result for rd
  // state visible to the STP
  output logic [31:0] bs,
  output logic [4:0]  rem,
  output logic        rc
);

  logic [31:0] cur, nxt;

  // 32-bit window at the current bit position
  logic [31:0] dw_lo;
  assign {bs, dw_lo} = {cur, nxt} << rem;

  // leading zeros / ones of the window
  function automatic logic [5:0] lead(input logic [31:0] w, input logic one);
    lead = 6'd32;
    for (int i = 31; i >= 0; i--) begin
      if (w[i] != one) begin
        lead = 6'(31 - i);
        break;
      end
    end
  endfunction

  logic [5:0] lz, lo;
  assign lz = lead(bs, 1'b0);
  assign lo = lead(bs, 1'b1);

  // TLD index: class number and field
  logic [2:0]  cls;
  logic [4:0]  off;
  logic [3:0]  fw;
  logic [31:0] field, tld_idx;
  logic [31:0] sh;
  always_comb begin
    cls   = {|bs[31:28], |bs[27:24], |bs[23:20]};
    off   = cls[2] ? 5'd0 : cls[1] ? 5'd4 : cls[0] ? 5'd8 : 5'd12;
    fw    = imm[3:0] + 4'd3;
    sh    = bs << off;
    field = sh >> (6'd32 - 6'(fw));
    tld_idx = (32'(imm[5:4]) << (5'd3 + 5'(fw))) | (32'(cls) << fw) | field;
  end

  // EX-stage decisions
  always_comb begin
    mem_re    = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = a;
    mem_wdata = cur;
    rd_we     = 1'b0;
    rd_val    = '0;
    rs_we     = 1'b0;
    rs_val    = a + 32'(signed'(imm));
    if (ex_en) begin
      unique case (ex_op)
        OP_TLD: begin mem_re = 1'b1; mem_addr = a + tld_idx; end
        OP_TLE: begin mem_re = 1'b1; mem_addr = a + b; end
        OP_LZS: begin rd_we = 1'b1; rd_val = 32'(lz); end
        OP_LOS: begin rd_we = 1'b1; rd_val = 32'(lo); end
        OP_LBS: begin mem_re = 1'b1; rs_we = 1'b1; end
        OP_LBC: begin mem_re = rc;   rs_we = rc;   end
        OP_STS: begin mem_we = 1'b1; rs_we = 1'b1; end
        OP_STC: begin mem_we = rc;   rs_we = rc;   end
        default: ;
      endcase
    end
  end

  // write-back value of TLD
  logic [5:0]  ent_len;
  logic [25:0] ent_code;
  assign ent_len  = mem_rdata[31:26];
  assign ent_code = mem_rdata[25:0];
  assign wb_val   = 32'(ent_code);

  // code placed at bit `rem` of {cur, nxt}
  logic [63:0] ins;
  always_comb begin
    ins = '0;
    if (ent_len != '0)
      ins = ({32'h0, 32'(ent_code)} << (7'd64 - 7'(ent_len))) >> rem;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur <= '0;
      nxt <= '0;
      rem <= '0;
      rc  <= 1'b0;
    end else if (clr) begin
      cur <= '0;
      nxt <= '0;
      rem <= '0;
      rc  <= 1'b0;
    end else if (wb) begin
      unique case (wb_op)
        OP_TLD: {rc, rem} <= {rc, rem} + ent_len;
        OP_TLE: begin
          {cur, nxt} <= {cur, nxt} | ins;
          {rc, rem}  <= {rc, rem} + ent_len;
        end
        OP_LBS, OP_LBC: begin
          cur <= nxt;
          nxt <= mem_rdata;
          rc  <= 1'b0;
        end
        default: ;
      endcase
    end else if (ex_en) begin
      unique case (ex_op)
        OP_LZS: {rc, rem} <= {rc, rem} + lz;
        OP_LOS: {rc, rem} <= {rc, rem} + lo;
        OP_REM: {rc, rem} <= {rc, rem} + a[5:0];
        OP_STC: if (rc) begin
          cur <= nxt;
          nxt <= '0;
          rc  <= 1'b0;
        end
        OP_STS: begin
          cur <= '0;
          nxt <= '0;
          rem <= '0;
          rc  <= 1'b0;
        end
        default: ;
      endcase
    end
  end

endmodule
