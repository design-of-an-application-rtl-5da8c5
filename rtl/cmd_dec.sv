// Command decoder: the external microprocessor's port into the BSP.
//
// Decodes a simple synchronous bus (address, write/read strobes, 32-bit data,
// read data one cycle after the read) by address region [19:16]:
//   0 instruction memory (write), 1 iBuf host half (coefficients in bits 15:0),
//   2 pBuf, 4 data memory (write, for the VLC tables), 3 registers: system command set, iBuf_Full / MB_done, JUMP,
//   interrupt acknowledge, STP status, pending interrupts, buffer status.
// The design names the block and its commands (JUMP, iBuf_Full, MB_done,
// Int_Ack); the bus and the address map are this implementation's choices.
module cmd_dec
  import bsp_pkg::*;
#(
  parameter int unsigned IMEM_AW = $clog2(IMEM_WORDS),
  parameter int unsigned IBUF_AW = $clog2(IBUF_WORDS),
  parameter int unsigned PBUF_AW = $clog2(PBUF_WORDS),
  parameter int unsigned DMEM_AW = $clog2(DMEM_WORDS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [19:0]        h_addr,
  input  logic               h_we,
  input  logic               h_re,
  input  logic [31:0]        h_wdata,
  output logic [31:0]        h_rdata,
  // instruction memory load
  output logic               im_we,
  output logic [IMEM_AW-1:0] im_addr,
  // data memory load
  output logic               dm_we,
  output logic [DMEM_AW-1:0] dm_addr,
  // iBuf host port
  output logic               ib_we,
  output logic               ib_re,
  output logic [IBUF_AW-1:0] ib_addr,
  input  logic [COEF_W-1:0]  ib_rdata,
  output logic               ib_full,
  output logic               ib_done,
  // pBuf host port
  output logic               pb_we,
  output logic               pb_re,
  output logic [PBUF_AW-1:0] pb_addr,
  input  logic [31:0]        pb_rdata,
  // registers
  output logic               cmd_set,
  output logic               jump,
  output logic               int_ack,
  input  logic [31:0]        status,
  input  logic [7:0]         int_pending,
  input  logic [5:0]         buf_status
);

  logic [3:0] region;
  logic [3:0] off;
  logic [3:0] rd_region;
  assign region = h_addr[19:16];
  assign off    = h_addr[3:0];

  assign im_we   = h_we && region == HR_IMEM;
  assign im_addr = h_addr[IMEM_AW-1:0];
  assign dm_we   = h_we && region == HR_DMEM;
  assign dm_addr = h_addr[DMEM_AW-1:0];
  assign ib_we   = h_we && region == HR_IBUF;
  assign ib_re   = h_re && region == HR_IBUF;
  assign ib_addr = h_addr[IBUF_AW-1:0];
  assign pb_we   = h_we && region == HR_PBUF;
  assign pb_re   = h_re && region == HR_PBUF;
  assign pb_addr = h_addr[PBUF_AW-1:0];

  logic reg_we;
  assign reg_we  = h_we && region == HR_REG;
  assign cmd_set = reg_we && off == HG_SYSCMD;
  assign ib_full = reg_we && off == HG_IBUF && h_wdata[0];
  assign ib_done = reg_we && off == HG_IBUF && h_wdata[1];
  assign jump    = reg_we && off == HG_JUMP;
  assign int_ack = reg_we && off == HG_INT_ACK;

  // register reads are captured in the read cycle, buffer reads come from the RAMs
  logic [31:0] reg_rd;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_region <= '0;
      reg_rd    <= '0;
    end else if (h_re) begin
      rd_region <= region;
      unique case (off)
        HG_STATUS:  reg_rd <= status;
        HG_INT:     reg_rd <= 32'(int_pending);
        HG_IBUF_ST: reg_rd <= 32'(buf_status);
        default:    reg_rd <= '0;
      endcase
    end
  end

  always_comb begin
    unique case (rd_region)
      HR_IBUF: h_rdata = 32'(ib_rdata);
      HR_PBUF: h_rdata = pb_rdata;
      HR_REG:  h_rdata = reg_rd;
      default: h_rdata = '0;
    endcase
  end

endmodule
