// System controller registers of the BSP.
//
// The external microprocessor tells the STP that data are available by
// setting bits of the STP's system command register; the STP reads the
// register and clears the bits it has handled (write 1 to clear). The STP
// reports back through a status register that the host reads. A JUMP command
// from the host starts the STP at a given instruction address.
//
// The system command register, the status registers and the JUMP command are
// named by the design; their widths, the write-1-to-clear rule and the
// one-cycle start pulse are this implementation's choices. If the host sets
// and the STP clears the same bit in one cycle, the bit stays set.
module sys_ctrl #(
  parameter int unsigned PC_W = 10
) (
  input  logic            clk,
  input  logic            rst_n,
  // host side
  input  logic            h_cmd_set,     // set bits h_wdata in the command register
  input  logic            h_jump,        // start the STP at h_wdata
  input  logic [31:0]     h_wdata,
  output logic [31:0]     status,
  // STP side
  output logic [31:0]     syscmd,
  input  logic            s_cmd_clr,     // clear bits s_wdata
  input  logic            s_status_we,
  input  logic [31:0]     s_wdata,
  // STP start
  output logic            stp_start,
  output logic [PC_W-1:0] stp_start_pc
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      syscmd       <= '0;
      status       <= '0;
      stp_start    <= 1'b0;
      stp_start_pc <= '0;
    end else begin
      logic [31:0] c;
      c = syscmd;
      if (s_cmd_clr) c = c & ~s_wdata;
      if (h_cmd_set) c = c | h_wdata;
      syscmd <= c;
      if (s_status_we) status <= s_wdata;
      stp_start <= h_jump;
      if (h_jump) stp_start_pc <= h_wdata[PC_W-1:0];
    end
  end

endmodule
