// iBuf: dual coefficient buffer between the external microprocessor and the RLE.
//
// Two halves of WORDS coefficients each (64 macroblocks of 384 coefficients by
// default). The host side and the RLE side each keep their own half pointer,
// so the host can fill (encoding) or drain (decoding) one half while the RLE
// works on the other. A full flag per half carries the hand-over:
//   encoding: host writes a half, then `h_full` (iBuf_Full) sets its flag and
//             moves the host pointer; the RLE clears the flag with `r_release`
//             when it has scanned the half, and moves its own pointer.
//   decoding: the RLE fills a half and sets its flag with `r_release`; the host
//             reads it and clears the flag with `h_done` (MB_done).
// So `r_release` toggles the flag of the RLE's half, and both host commands
// act on the host's half. The dual-buffer principle and the iBuf_Full and
// MB_done flags come from the design; the pointer/flag mechanics are this
// implementation's choice.
//
// Timing: both ports are synchronous, read data one cycle after the read.
// If both ports write the same word in one cycle, the RLE's write wins.
module ibuf
  import bsp_pkg::*;
#(
  parameter int unsigned WORDS = IBUF_WORDS,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // host (external microprocessor) port
  input  logic              h_we,
  input  logic              h_re,
  input  logic [AW-1:0]     h_addr,
  input  logic [COEF_W-1:0] h_wdata,
  output logic [COEF_W-1:0] h_rdata,
  input  logic              h_full,     // iBuf_Full: host half is written
  input  logic              h_done,     // MB_done: host half has been read
  // RLE port
  input  logic              r_we,
  input  logic              r_re,
  input  logic [AW-1:0]     r_addr,
  input  logic [COEF_W-1:0] r_wdata,
  output logic [COEF_W-1:0] r_rdata,
  input  logic              r_release,  // RLE finished its half
  // status
  output logic [1:0]        full,
  output logic              h_sel,
  output logic              r_sel
);

  localparam int unsigned IW = $clog2(2 * WORDS);

  logic [COEF_W-1:0] mem [2 * WORDS];

  logic [IW-1:0] h_idx, r_idx;
  assign h_idx = h_sel ? IW'(WORDS) + IW'(h_addr) : IW'(h_addr);
  assign r_idx = r_sel ? IW'(WORDS) + IW'(r_addr) : IW'(r_addr);

  always_ff @(posedge clk) begin
    if (h_we) mem[h_idx] <= h_wdata;
    if (r_we) mem[r_idx] <= r_wdata;
  end

  always_ff @(posedge clk) begin
    if (h_re) h_rdata <= mem[h_idx];
    if (r_re) r_rdata <= mem[r_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full  <= '0;
      h_sel <= 1'b0;
      r_sel <= 1'b0;
    end else begin
      logic [1:0] f;
      f = full;
      if (h_full) begin
        f[h_sel] = 1'b1;
      end
      if (h_done) begin
        f[h_sel] = 1'b0;
      end
      if (r_release) begin
        f[r_sel] = ~full[r_sel];
      end
      full <= f;
      if (h_full || h_done) h_sel <= ~h_sel;
      if (r_release)        r_sel <= ~r_sel;
    end
  end

endmodule
