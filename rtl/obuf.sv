// oBuf: dual run/level buffer between the RLE and the STP, with NZR registers.
//
// Each half is built, as in the design, from two 16-bit SRAMs sharing one
// address: an upper and a lower SRAM. A port can use them in two ways:
//   wide   (MPEG-1/2 style): one 32-bit access, upper = bits 31:16, lower = 15:0;
//   narrow (H.264 style)   : one 16-bit access to one SRAM, picked by address
//                            bit 0 (0 = upper, 1 = lower); write data comes from
//                            bits 15:0 and read data returns zero-extended.
// This is the multiplexing of the two SRAMs' data inputs and outputs; the
// address-bit selection of the SRAM is this implementation's choice. The RLE
// always writes and reads whole entries (wide); the STP picks its width.
//
// NZR register, one per half: a completion flag and an entry count. The RLE
// sets it after encoding a turn into its half (`r_done`) and clears it after
// decoding a half (`r_release`); both also move the RLE's half pointer. The
// STP moves its own pointer (`s_switch`), and sets (`s_set`) or clears
// (`s_clr`) the NZR of its half. `nzr_*[s_sel]` is the STP's current half and
// `nzr_*[~s_sel]` the other one (nxt_NZR).
//
// Timing: synchronous SRAMs, read data one cycle after the read; flags update
// at the clock edge. If both sides write the same word, the RLE wins.
module obuf
  import bsp_pkg::*;
#(
  parameter int unsigned WORDS = OBUF_WORDS,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // RLE port (wide)
  input  logic          r_we,
  input  logic          r_re,
  input  logic [AW-1:0] r_addr,
  input  logic [31:0]   r_wdata,
  output logic [31:0]   r_rdata,
  input  logic          r_done,     // encoding turn complete: set NZR{1,r_count}, switch
  input  logic [15:0]   r_count,
  input  logic          r_release,  // decoding turn complete: clear NZR, switch
  // STP port
  input  logic          s_wide,
  input  logic          s_we,
  input  logic          s_re,
  input  logic [AW:0]   s_addr,     // narrow: {entry, sram select}; wide: entry
  input  logic [31:0]   s_wdata,
  output logic [31:0]   s_rdata,
  input  logic          s_switch,
  input  logic          s_set,
  input  logic          s_clr,
  input  logic [15:0]   s_count,
  // NZR and pointers
  output logic [1:0]    nzr_flag,
  output logic [15:0]   nzr_cnt [2],
  output logic          r_sel,
  output logic          s_sel
);

  localparam int unsigned IW = $clog2(2 * WORDS);

  logic [15:0] mem_u [2 * WORDS];
  logic [15:0] mem_l [2 * WORDS];

  // ---- address / data steering of the two SRAMs
  logic [IW-1:0] r_idx, s_idx;
  logic [AW-1:0] s_ent;
  logic          s_low;
  assign s_ent = s_wide ? s_addr[AW-1:0] : s_addr[AW:1];
  assign s_low = ~s_wide & s_addr[0];
  assign r_idx = r_sel ? IW'(WORDS) + IW'(r_addr) : IW'(r_addr);
  assign s_idx = s_sel ? IW'(WORDS) + IW'(s_ent)  : IW'(s_ent);

  logic        s_we_u, s_we_l;
  logic [15:0] s_di_u;
  assign s_we_u = s_we & (s_wide | ~s_low);
  assign s_we_l = s_we & (s_wide |  s_low);
  assign s_di_u = s_wide ? s_wdata[31:16] : s_wdata[15:0];   // upper DI mux

  always_ff @(posedge clk) begin
    if (s_we_u) mem_u[s_idx] <= s_di_u;
    if (s_we_l) mem_l[s_idx] <= s_wdata[15:0];
    if (r_we) begin
      mem_u[r_idx] <= r_wdata[31:16];
      mem_l[r_idx] <= r_wdata[15:0];
    end
  end

  logic [15:0] s_do_u, s_do_l;
  logic        s_wide_q, s_low_q;
  always_ff @(posedge clk) begin
    if (r_re) r_rdata <= {mem_u[r_idx], mem_l[r_idx]};
    if (s_re) begin
      s_do_u   <= mem_u[s_idx];
      s_do_l   <= mem_l[s_idx];
      s_wide_q <= s_wide;
      s_low_q  <= s_low;
    end
  end

  // output muxes: upper half is the upper SRAM or 0, lower half either SRAM
  assign s_rdata = {s_wide_q ? s_do_u : 16'h0,
                    (s_wide_q || s_low_q) ? s_do_l : s_do_u};

  // ---- NZR registers and half pointers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nzr_flag   <= '0;
      nzr_cnt[0] <= '0;
      nzr_cnt[1] <= '0;
      r_sel      <= 1'b0;
      s_sel      <= 1'b0;
    end else begin
      if (s_set) begin
        nzr_flag[s_sel] <= 1'b1;
        nzr_cnt[s_sel]  <= s_count;
      end else if (s_clr) begin
        nzr_flag[s_sel] <= 1'b0;
      end
      if (r_done) begin
        nzr_flag[r_sel] <= 1'b1;
        nzr_cnt[r_sel]  <= r_count;
      end else if (r_release) begin
        nzr_flag[r_sel] <= 1'b0;
      end
      if (r_done || r_release) r_sel <= ~r_sel;
      if (s_switch)            s_sel <= ~s_sel;
    end
  end

endmodule
