// End-to-end testbench of the BSP top at its default sizes with a short
// workload: three turns of 8 blocks of 4x4 coefficients each, so that both
// oBuf halves fill and the RLE raises busy. See bsp_e2e for what is checked.
module tb_bsp_top;
  bsp_e2e #(.NB(8), .NT(3), .DENS(25), .WATCHDOG(2000000)) e2e ();
  // outer time limit, beyond the body's own cycle watchdog
  initial begin
    #30_000_000;
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
