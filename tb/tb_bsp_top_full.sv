// Full-size end-to-end testbench: the BSP top at its default sizes and one
// complete buffer turn of 64 macroblocks (1536 blocks of 4x4 coefficients,
// filling a whole iBuf half) encoded to a bitstream, brought back through the
// DMA and decoded again. The coefficients are sparse (2 % non-zero) so that
// the whole bitstream of the turn fits the 1024-word sBuf.
module tb_bsp_top_full;
  bsp_e2e #(.NB(1536), .NT(1), .DENS(2), .WATCHDOG(20000000)) e2e ();
  // outer time limit, beyond the body's own cycle watchdog
  initial begin
    #300_000_000;
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
