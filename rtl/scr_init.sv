// scr_init -- scrambler initialisation of the modem interface unit.
//
// Initialises the data scrambler (transmit) or descrambler (receive) at the start of
// every burst, and again whenever the link mode changes within a burst (`mode_set`
// with a mode different from the one in use). The seed is {1,1,1, frame counter},
// so successive MAC frames use different scrambling sequences.
// The trigger conditions follow the design; the seed format is HIPERLAN/2's.
module scr_init
  import h2_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       burst_start,
  input  logic       mode_set,
  input  mode_e      mode,
  input  logic [3:0] frame,
  output logic [6:0] seed,
  output logic       load
);
  mode_e cur;

  assign seed = {3'b111, frame};
  assign load = burst_start || (mode_set && mode != cur);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       cur <= M_BPSK12;
    else if (burst_start || mode_set) cur <= mode;
  end
endmodule
