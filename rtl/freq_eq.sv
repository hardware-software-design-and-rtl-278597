// freq_eq -- frequency-domain equaliser.
//
// Takes the 64 FFT bins of a symbol in bin order. Bins of the training symbol are
// written into the channel estimator (chan_est, instantiated here). For a data symbol
// each of the 48 data bins is equalised without a divider: Z = Y * conj(H) and
// P = |H|^2 are stored, and the demapper compares Z with thresholds scaled by P, which
// is the same decision as comparing Y/H with fixed thresholds. Pilots are dropped
// (no residual phase tracking). The 48 results leave in carrier order -26..26, one per
// handshake, while the FFT is free for the next symbol.
// The equaliser follows the design's receive path; the division-free form is this
// design's choice. Interface: valid/ready in (with tag) and out (with `last`).
module freq_eq
  import h2_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic signed [SW-1:0] in_i,
  input  logic signed [SW-1:0] in_q,
  input  logic [1:0]           in_tag,     // {training, last}
  input  logic                 in_valid,
  output logic                 in_ready,
  output logic signed [31:0]   z_i,
  output logic signed [31:0]   z_q,
  output logic [31:0]          p,
  output logic                 out_last,
  output logic                 out_valid,
  input  logic                 out_ready
);
  logic [5:0] bin;
  logic [5:0] ocnt;
  logic       hold, hold_last;
  logic signed [31:0] zi [NSD];
  logic signed [31:0] zq [NSD];
  logic [31:0]        pp [NSD];
  logic signed [SW-1:0] h_i, h_q;
  logic [5:0] d;

  chan_est u_ce (.clk, .rst_n, .wr(in_valid && in_ready && in_tag[1]), .wr_bin(bin),
    .y_i(in_i), .y_q(in_q), .rd_bin(bin), .h_i, .h_q);

  function automatic logic [5:0] bin2d(logic [5:0] b);
    int c;
    c = (b >= 32) ? int'(b) - 64 : int'(b);
    if (c >= -26 && c <= -22) return 6'(c + 26);
    if (c >= -20 && c <= -8)  return 6'(c + 25);
    if (c >= -6  && c <= -1)  return 6'(c + 24);
    if (c >= 1   && c <= 6)   return 6'(c + 23);
    if (c >= 8   && c <= 20)  return 6'(c + 22);
    if (c >= 22  && c <= 26)  return 6'(c + 21);
    return 6'd63;
  endfunction

  assign d         = bin2d(bin);
  assign in_ready  = !hold;
  assign out_valid = hold;
  assign z_i       = zi[ocnt];
  assign z_q       = zq[ocnt];
  assign p         = pp[ocnt];
  assign out_last  = hold_last && (ocnt == 6'(NSD - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bin <= '0; ocnt <= '0; hold <= 1'b0; hold_last <= 1'b0;
    end else if (clear) begin
      bin <= '0; ocnt <= '0; hold <= 1'b0; hold_last <= 1'b0;
    end else begin
      if (in_valid && in_ready) begin
        if (!in_tag[1] && d != 6'd63) begin
          zi[d] <= 32'(in_i * h_i + in_q * h_q);
          zq[d] <= 32'(in_q * h_i - in_i * h_q);
          pp[d] <= 32'(h_i * h_i + h_q * h_q);
        end
        bin <= bin + 1'b1;
        if (bin == 6'd63 && !in_tag[1]) begin
          hold <= 1'b1; hold_last <= in_tag[0]; ocnt <= '0;
        end
      end
      if (hold && out_ready) begin
        ocnt <= ocnt + 1'b1;
        if (ocnt == 6'(NSD - 1)) hold <= 1'b0;
      end
    end
  end
endmodule
