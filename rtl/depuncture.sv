// depuncture -- rebuilds encoder output pairs from the punctured coded-bit stream.
//
// Using the same puncturing control as the transmitter (punct_ctrl), each pair takes
// its kept bits from the input in order (a, then b); a deleted position is filled
// with an erasure flag that the Viterbi decoder scores as neutral.
// Interface: valid/ready bit stream in, valid/ready pair {a, b, erase_a, erase_b} out.
module depuncture (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic [1:0] rate,
  input  logic       in_bit,
  input  logic       in_valid,
  output logic       in_ready,
  output logic       out_a,
  output logic       out_b,
  output logic       out_ea,
  output logic       out_eb,
  output logic       out_valid,
  input  logic       out_ready
);
  logic ka, kb;
  logic got_a, have;
  logic adv;

  punct_ctrl u_pc (.clk, .rst_n, .clear, .rate, .adv, .keep_a(ka), .keep_b(kb));

  assign adv       = out_valid && out_ready;
  assign out_ea    = !ka;
  assign out_eb    = !kb;
  // a pair is complete when every kept bit has arrived
  assign out_valid = have;
  assign in_ready  = !have;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_a <= 1'b0; out_b <= 1'b0; got_a <= 1'b0; have <= 1'b0;
    end else if (clear) begin
      got_a <= 1'b0; have <= 1'b0;
    end else if (have) begin
      if (out_ready) begin have <= 1'b0; got_a <= 1'b0; end
    end else if (in_valid) begin
      if (ka && !got_a) begin
        out_a <= in_bit;
        got_a <= 1'b1;
        if (!kb) begin out_b <= 1'b0; have <= 1'b1; end
      end else begin
        if (!ka) out_a <= 1'b0;
        out_b <= in_bit;
        have  <= 1'b1;
      end
    end
  end
endmodule
