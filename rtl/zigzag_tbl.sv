// Zigzag scan-order tables of the Run-Level Engine.
//
// Four programmable tables T0..T3, each holding for every scan position the
// raster offset of the coefficient inside its block. The STP writes them
// (one entry per write); the RLE reads the table picked by the program field
// of its control register, addressed by the address counter. This follows
// the four-table arrangement of the design; the per-table depth of 64
// entries (one 8x8 block, 4x4 scans use the first 16) is this design's choice.
//
// Timing: writes take effect at the rising clock edge; both read ports are
// combinational (the tables are small register files). After reset every
// table holds the identity order (position k -> offset k).
module zigzag_tbl
  import bsp_pkg::*;
#(
  parameter int unsigned DEPTH  = ZZ_DEPTH,
  parameter int unsigned NTBL   = ZZ_TABLES,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned TW    = $clog2(NTBL)
) (
  input  logic          clk,
  input  logic          rst_n,
  // STP programming port
  input  logic          wr_en,
  input  logic [TW-1:0] wr_tbl,
  input  logic [AW-1:0] wr_pos,
  input  logic [AW-1:0] wr_off,
  input  logic [TW-1:0] rb_tbl,     // STP read-back
  input  logic [AW-1:0] rb_pos,
  output logic [AW-1:0] rb_off,
  // RLE scan port
  input  logic [TW-1:0] sel_tbl,    // program field of the RLE control register
  input  logic [AW-1:0] scan_pos,   // from the address counter
  output logic [AW-1:0] scan_off
);

  logic [AW-1:0] tbl [NTBL][DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NTBL; t++)
        for (int p = 0; p < DEPTH; p++)
          tbl[t][p] <= AW'(p);
    end else if (wr_en) begin
      tbl[wr_tbl][wr_pos] <= wr_off;
    end
  end

  assign scan_off = tbl[sel_tbl][scan_pos];
  assign rb_off   = tbl[rb_tbl][rb_pos];

endmodule
