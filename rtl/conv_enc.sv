// conv_enc -- rate 1/2 convolutional encoder, constraint length 7.
//
// Generators 133 and 171 (octal), the mother code of HIPERLAN/2; the design names the
// block only as forward error correction encoding. For every accepted input bit one
// pair (a = g0 output, b = g1 output) is produced. `clear` empties the shift register
// at the start of a burst. Valid/ready stream, combinational from input to output.
module conv_enc (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic in_bit,
  input  logic in_valid,
  output logic in_ready,
  output logic out_a,
  output logic out_b,
  output logic out_valid,
  input  logic out_ready
);
  logic [5:0] sr;            // sr[5] is the most recent past bit
  logic [6:0] r;

  assign r         = {in_bit, sr};
  assign out_a     = ^(r & 7'o133);
  assign out_b     = ^(r & 7'o171);
  assign out_valid = in_valid;
  assign in_ready  = out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       sr <= '0;
    else if (clear)                   sr <= '0;
    else if (in_valid && out_ready)   sr <= {in_bit, sr[5:1]};
  end
endmodule
