// Self-checking testbench of the interrupt controller: causes raised by the
// STP stay pending and drive irq until acknowledged; Int_Ack rises when the
// last pending cause is acknowledged and falls on the next raise.
module tb_int_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic       raise = 0, ack = 0, irq, int_ack;
  logic [7:0] cause = '0, ack_mask = '0, pending;

  int_ctrl dut (.clk, .rst_n, .raise, .cause, .ack, .ack_mask, .pending, .irq, .int_ack);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!irq && !int_ack, "idle after reset");
    @(negedge clk); raise = 1; cause = 8'h01;
    @(negedge clk); cause = 8'h04;
    @(negedge clk); raise = 0;
    check(irq && pending == 8'h05 && !int_ack, "two causes pending");
    @(negedge clk); ack = 1; ack_mask = 8'h01;
    @(negedge clk); ack = 0;
    check(irq && pending == 8'h04 && !int_ack, "partial acknowledge");
    @(negedge clk); ack = 1; ack_mask = 8'h04;
    @(negedge clk); ack = 0;
    check(!irq && int_ack, "Int_Ack after the last acknowledge");
    @(negedge clk); raise = 1; cause = 8'h02;
    @(negedge clk); raise = 0;
    check(irq && !int_ack, "new interrupt clears Int_Ack");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
