// Zero counter of the Run-Level Engine.
//
// Encoding: counts consecutive zero coefficients arriving in scan order and
// turns each non-zero coefficient into a (run, level) pair. The last pair of
// every block is marked with `last`, which gives the three-element
// (run, level, last) form; a block with no non-zero coefficient yields one
// marker entry (run 0, level 0, last 1). To know which pair is the last one,
// a pair is held back until the next non-zero coefficient or the block end;
// the last pair of a block is written in the cycle after the block end. At
// most one pair leaves per cycle, so a coefficient enters every cycle.
//
// Decoding: a down counter loaded with the run of a pair; `run_zero` tells the
// controller that the zeros before the level have all been written.
//
// The design gives the counter's role (counting consecutive zeros between
// non-zero coefficients); the hold-back scheme and the end-of-block marker are
// this implementation's own choices.
module rle_zero_cnt
  import bsp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  // encoding side
  input  logic              coef_valid,
  input  logic [COEF_W-1:0] coef,
  input  logic              coef_blk_end,
  output logic              pair_valid,
  output logic [14:0]       pair_run,
  output logic [COEF_W-1:0] pair_level,
  output logic              pair_last,
  output logic              flushing,     // a block's last pair is still to be written
  // decoding side
  input  logic              run_ld,
  input  logic [14:0]       run_val,
  input  logic              run_dn,
  output logic              run_zero
);

  logic [14:0]       zeros;
  logic              pend_v;
  logic [14:0]       pend_run;
  logic [COEF_W-1:0] pend_lvl;
  logic              fl_v;
  logic [14:0]       fl_run;
  logic [COEF_W-1:0] fl_lvl;
  logic [14:0]       run_left;

  logic nz;
  assign nz = coef_valid && (coef != '0);

  // write selection: flush slot first, else a pending pair displaced by a new one
  always_comb begin
    pair_valid = 1'b0;
    pair_run   = '0;
    pair_level = '0;
    pair_last  = 1'b0;
    if (fl_v) begin
      pair_valid = 1'b1;
      pair_run   = fl_run;
      pair_level = fl_lvl;
      pair_last  = 1'b1;
    end else if (nz && pend_v) begin
      pair_valid = 1'b1;
      pair_run   = pend_run;
      pair_level = pend_lvl;
    end
  end

  assign flushing = fl_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      zeros    <= '0;
      pend_v   <= 1'b0;
      pend_run <= '0;
      pend_lvl <= '0;
      fl_v     <= 1'b0;
      fl_run   <= '0;
      fl_lvl   <= '0;
    end else if (clr) begin
      zeros  <= '0;
      pend_v <= 1'b0;
      fl_v   <= 1'b0;
    end else begin
      fl_v <= 1'b0;
      if (coef_valid) begin
        if (coef_blk_end) begin
          fl_v <= 1'b1;
          if (nz) begin
            fl_run <= zeros;
            fl_lvl <= coef;
          end else if (pend_v) begin
            fl_run <= pend_run;
            fl_lvl <= pend_lvl;
          end else begin
            fl_run <= '0;
            fl_lvl <= '0;
          end
          pend_v <= 1'b0;
          zeros  <= '0;
        end else if (nz) begin
          pend_v   <= 1'b1;
          pend_run <= zeros;
          pend_lvl <= coef;
          zeros    <= '0;
        end else begin
          zeros <= zeros + 15'd1;
        end
      end
    end
  end

  // decoding run counter
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        run_left <= '0;
    else if (run_ld)   run_left <= run_val;
    else if (run_dn && run_left != '0) run_left <= run_left - 15'd1;
  end
  assign run_zero = (run_left == '0);

endmodule
