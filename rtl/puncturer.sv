// puncturer -- turns encoder pairs into the punctured serial coded-bit stream.
//
// An accepted pair is held while its kept bits (a first, then b) leave one per clock;
// the pattern comes from punct_ctrl, instantiated here and stepped once per pair.
// Valid/ready on both sides. A new pair is accepted in the cycle the last kept bit of
// the previous pair leaves, so one coded bit per clock is sustained.
module puncturer (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic [1:0] rate,
  input  logic       in_a,
  input  logic       in_b,
  input  logic       in_valid,
  output logic       in_ready,
  output logic       out_bit,
  output logic       out_valid,
  input  logic       out_ready
);
  logic       ka, kb;
  logic       ha, hb;       // held bits
  logic       pa, pb;       // still pending
  logic       take;

  punct_ctrl u_pc (.clk, .rst_n, .clear, .rate, .adv(take), .keep_a(ka), .keep_b(kb));

  assign out_valid = pa | pb;
  assign out_bit   = pa ? ha : hb;
  // the pair in flight is done when nothing pends or only its last bit leaves now
  assign in_ready  = !(pa | pb) || (out_ready && (pa ^ pb));
  assign take      = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {ha, hb, pa, pb} <= '0;
    end else if (clear) begin
      pa <= 1'b0; pb <= 1'b0;
    end else begin
      if (take) begin
        ha <= in_a; hb <= in_b; pa <= ka; pb <= kb;
      end else if (out_valid && out_ready) begin
        if (pa) pa <= 1'b0;
        else    pb <= 1'b0;
      end
    end
  end
endmodule
