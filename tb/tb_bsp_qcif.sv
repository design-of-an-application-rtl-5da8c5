// Workload testbench: one QCIF frame (176x144 = 99 macroblocks, 4:2:0) through
// the BSP at its default sizes, encoded and decoded again. The frame's
// 99 x 384 coefficients are coded as 2376 blocks of 16, in two buffer turns of
// 1188 blocks. About 18 % of the coefficients are non-zero, which gives some
// 6700 run/level symbols per frame, as in a fast-moving sequence. The
// bitstream is about three times the size of sBuf, so the DMA streams it out
// while the STP encodes and back in while it decodes, with sBuf as a ring.
module tb_bsp_qcif;
  bsp_e2e #(.NB(1188), .NT(2), .DENS(18), .WATCHDOG(20000000), .STREAM(1)) e2e ();
  // outer time limit, beyond the body's own cycle watchdog
  initial begin
    #300_000_000;
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
