// scrambler -- data scrambler and descrambler, x^7 + x^4 + 1.
//
// A 7-bit LFSR is loaded with `seed` on `load`; each accepted bit is XORed with the
// generator output and the LFSR advances. Scrambling and descrambling are the same
// operation, so one module serves both paths. With `in_bypass` high a bit passes
// unchanged and the LFSR holds (used for tail and pad bits, which the encoder needs as
// zeros). The scrambler's place in both paths follows the design; the polynomial and
// seed width are those of HIPERLAN/2.
// Interface: valid/ready bit stream, combinational path from input to output.
module scrambler (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic [6:0] seed,
  input  logic       in_bit,
  input  logic       in_bypass,
  input  logic       in_valid,
  output logic       in_ready,
  output logic       out_bit,
  output logic       out_valid,
  input  logic       out_ready
);
  logic [6:0] s;
  logic       fb;

  assign fb        = s[6] ^ s[3];
  assign out_bit   = in_bypass ? in_bit : (in_bit ^ fb);
  assign out_valid = in_valid;
  assign in_ready  = out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                   s <= 7'h7f;
    else if (load)                                s <= seed;
    else if (in_valid && out_ready && !in_bypass) s <= {s[5:0], fb};
  end
endmodule
