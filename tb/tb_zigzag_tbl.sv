// Self-checking testbench of the zigzag tables: identity order after reset,
// independent programming of the four tables, table selection on the scan port.
module tb_zigzag_tbl;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic       wr_en = 0;
  logic [1:0] wr_tbl = '0, rb_tbl = '0, sel_tbl = '0;
  logic [5:0] wr_pos = '0, wr_off = '0, rb_pos = '0, rb_off, scan_pos = '0, scan_off;
  logic [5:0] model [4][64];

  zigzag_tbl dut (.clk, .rst_n, .wr_en, .wr_tbl, .wr_pos, .wr_off, .rb_tbl, .rb_pos, .rb_off,
                  .sel_tbl, .scan_pos, .scan_off);

  initial begin
    repeat (5000) @(posedge clk);
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
    for (int t = 0; t < 4; t++) for (int p = 0; p < 64; p++) model[t][p] = 6'(p);
    sel_tbl = 2; scan_pos = 17; #1 check(scan_off == 17, "identity after reset");
    for (int i = 0; i < 150; i++) begin
      @(negedge clk);
      wr_en = 1; wr_tbl = 2'($urandom); wr_pos = 6'($urandom); wr_off = 6'($urandom);
      model[wr_tbl][wr_pos] = wr_off;
    end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 4; t++) for (int p = 0; p < 64; p += 3) begin
      sel_tbl = 2'(t); scan_pos = 6'(p); rb_tbl = 2'(3 - t); rb_pos = 6'(63 - p);
      #1;
      check(scan_off == model[t][p], "scan port");
      check(rb_off == model[3 - t][63 - p], "read-back port");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
