// Two-port synchronous RAM used for the BSP's local memories: instruction
// memory, data memory (VLC tables), sBuf (bitstream, 32 bits x 1024 words),
// pBuf (parameters) and the SPS/PPS buffer.
//
// Port A belongs to the STP, port B to the outside (host or DMA). Each port
// reads or writes one word per cycle; read data appear one cycle after the
// read and hold until the next read on that port. If both ports write the
// same word in one cycle, port B wins. Only sBuf's size is given by the
// design; the other sizes are parameters chosen at the BSP level.
module bsp_ram #(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned W     = 32,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          a_re,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [W-1:0]  a_wdata,
  output logic [W-1:0]  a_rdata,
  input  logic          b_re,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [W-1:0]  b_wdata,
  output logic [W-1:0]  b_rdata
);

  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    if (b_we) mem[b_addr] <= b_wdata;
  end

  always_ff @(posedge clk) begin
    if (a_re) a_rdata <= mem[a_addr];
    if (b_re) b_rdata <= mem[b_addr];
  end

endmodule
