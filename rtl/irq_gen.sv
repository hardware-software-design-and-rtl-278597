// irq_gen -- interrupt generator of the modem interface unit.
//
// Three interrupt sources acknowledge the protocol software's requests:
// bit 0 synchronisation found, bit 1 end of receive, bit 2 end of transmit.
// A one-clock event sets its status bit; the processor clears bits by writing ones
// (`clr`), and `mask` selects which status bits drive the interrupt lines.
// `irq_any` is the OR of the enabled lines. The sources follow the design; the
// status/mask/clear scheme is this design's choice.
module irq_gen (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] evt,
  input  logic [2:0] clr,
  input  logic [2:0] mask,
  output logic [2:0] status,
  output logic [2:0] irq,
  output logic       irq_any
);
  assign irq     = status & mask;
  assign irq_any = |irq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) status <= '0;
    else        status <= (status & ~clr) | evt;
  end
endmodule
