// Interrupt controller between the STP and the external microprocessor.
//
// The STP raises interrupt causes ("request more data", "data ready",
// "done"); they stay pending and drive `irq` until the host acknowledges
// them. When an acknowledge leaves nothing pending, the Int_Ack flag that the
// STP polls is set; raising a new interrupt clears it.
//
// The design names the interrupt controller and the Int_Ack handshake; the
// eight cause bits and the flag rules are this implementation's choices.
module int_ctrl #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         raise,     // STP: raise causes `cause`
  input  logic [N-1:0] cause,
  input  logic         ack,       // host: acknowledge causes `ack_mask`
  input  logic [N-1:0] ack_mask,
  output logic [N-1:0] pending,
  output logic         irq,
  output logic         int_ack
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= '0;
      int_ack <= 1'b0;
    end else begin
      logic [N-1:0] p;
      p = pending;
      if (ack)   p = p & ~ack_mask;
      if (raise) p = p | cause;
      pending <= p;
      if (raise)                 int_ack <= 1'b0;
      else if (ack && p == '0)   int_ack <= 1'b1;
    end
  end

  assign irq = |pending;

endmodule
