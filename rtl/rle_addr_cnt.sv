// Address counter (Addr CNT) of the Run-Level Engine.
//
// Steps through the scan positions of a block (the address into the zigzag
// table) and, at each block end, advances the block base address inside the
// buffer half by the block length. It also flags the last position of a block
// and the last block of the turn. The design names the counter and its job;
// the base-address accumulation is this implementation's own choice.
//
// Interface: `clr` restarts at position 0 of block 0; `inc` advances by one
// position. Outputs are registered state, valid in the same cycle.
module rle_addr_cnt #(
  parameter int unsigned POS_W  = 6,    // scan position width (64-entry tables)
  parameter int unsigned ADDR_W = 15,   // buffer-half address width
  parameter int unsigned BLK_W  = 16    // block count width
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              inc,
  input  logic [POS_W-1:0]  len_m1,     // block length minus one
  input  logic [BLK_W-1:0]  nblk,       // blocks per turn (>= 1)
  output logic [POS_W-1:0]  pos,
  output logic [ADDR_W-1:0] base,
  output logic [BLK_W-1:0]  blk,
  output logic              blk_end,    // pos is the last position of its block
  output logic              turn_end    // ... and the block is the last of the turn
);

  assign blk_end  = (pos == len_m1);
  assign turn_end = blk_end && (blk == nblk - BLK_W'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos  <= '0;
      base <= '0;
      blk  <= '0;
    end else if (clr) begin
      pos  <= '0;
      base <= '0;
      blk  <= '0;
    end else if (inc) begin
      if (blk_end) begin
        pos  <= '0;
        base <= base + ADDR_W'(len_m1) + ADDR_W'(1);
        blk  <= blk + BLK_W'(1);
      end else begin
        pos  <= pos + POS_W'(1);
      end
    end
  end

endmodule
