// Self-checking testbench of the two-port RAM: random traffic on both ports
// against an array model, one-cycle read latency, read data held between reads.
module tb_bsp_ram;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic        a_re = 0, a_we = 0, b_re = 0, b_we = 0;
  logic [9:0]  a_addr = '0, b_addr = '0;
  logic [31:0] a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;
  logic [31:0] model [1024];
  logic [31:0] ea, eb;
  logic        pa, pb;

  bsp_ram #(.WORDS(1024), .W(32)) dut (.clk, .a_re, .a_we, .a_addr, .a_wdata, .a_rdata,
                                       .b_re, .b_we, .b_addr, .b_wdata, .b_rdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); a_we = 1; a_addr = 10'(i); a_wdata = 32'($urandom); model[i] = a_wdata;
    end
    @(negedge clk); a_we = 0;
    pa = 0; pb = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (pa) check(a_rdata == ea, "port A read");
      if (pb) check(b_rdata == eb, "port B read");
      a_re = $urandom % 2; b_re = $urandom % 2;
      a_addr = 10'($urandom); b_addr = 10'($urandom % 64);
      a_we = !a_re && ($urandom % 3 == 0); b_we = !b_re && ($urandom % 3 == 0);
      if (a_we && b_we && a_addr == b_addr) a_we = 0;
      a_wdata = 32'($urandom); b_wdata = 32'($urandom);
      pa = a_re; pb = b_re;
      if (a_re) ea = model[a_addr];
      if (b_re) eb = model[b_addr];
      if (a_we) model[a_addr] = a_wdata;
      if (b_we) model[b_addr] = b_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
