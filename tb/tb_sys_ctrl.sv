// Self-checking testbench of the system controller registers: host sets
// command bits, STP clears them (write 1 to clear), status register, JUMP.
module tb_sys_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic        h_cmd_set = 0, h_jump = 0, s_cmd_clr = 0, s_status_we = 0;
  logic [31:0] h_wdata = '0, s_wdata = '0, status, syscmd;
  logic        stp_start;
  logic [9:0]  stp_start_pc;

  sys_ctrl dut (.clk, .rst_n, .h_cmd_set, .h_jump, .h_wdata, .status, .syscmd, .s_cmd_clr,
                .s_status_we, .s_wdata, .stp_start, .stp_start_pc);

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
    @(negedge clk); h_cmd_set = 1; h_wdata = 32'h5;
    @(negedge clk); h_wdata = 32'h100;
    @(negedge clk); h_cmd_set = 0;
    check(syscmd == 32'h105, "host sets command bits");
    @(negedge clk); s_cmd_clr = 1; s_wdata = 32'h4;
    @(negedge clk); s_cmd_clr = 0;
    check(syscmd == 32'h101, "STP clears a handled bit");
    @(negedge clk); s_cmd_clr = 1; s_wdata = 32'h1; h_cmd_set = 1; h_wdata = 32'h1;
    @(negedge clk); s_cmd_clr = 0; h_cmd_set = 0;
    check(syscmd == 32'h101, "set wins over clear");
    @(negedge clk); s_status_we = 1; s_wdata = 32'hCAFE;
    @(negedge clk); s_status_we = 0;
    check(status == 32'hCAFE, "status register");
    @(negedge clk); h_jump = 1; h_wdata = 32'd77;
    @(negedge clk); h_jump = 0;
    check(stp_start && stp_start_pc == 77, "JUMP starts the STP");
    @(negedge clk);
    check(!stp_start, "start is one cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
