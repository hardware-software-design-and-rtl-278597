// interleaver -- per-OFDM-symbol block interleaver (DEINT=0) or deinterleaver (DEINT=1).
//
// One symbol holds N_CBPS coded bits (48, 96, 192 or 288, set by the mode). The
// permutation is the two-step one of HIPERLAN/2: i = (N/16)(k mod 16) + floor(k/16),
// then j = s*floor(i/s) + (i + N - floor(16 i / N)) mod s with s = max(N_BPSC/2, 1).
// The interleaver writes input bit k at position j(k) and reads in order; the
// deinterleaver writes in order and reads position j(k) for output k.
// Two banks (ping-pong) let one symbol fill while the previous drains, so one bit per
// clock flows through. The mode is sampled with the first bit of every symbol.
// Interface: valid/ready bit streams; `clear` empties both banks.
module interleaver
  import h2_pkg::*;
#(
  parameter bit DEINT = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  mode_e mode,
  input  logic  in_bit,
  input  logic  in_valid,
  output logic  in_ready,
  output logic  out_bit,
  output logic  out_valid,
  input  logic  out_ready
);
  logic [287:0] mem [2];
  logic [1:0]   full;
  logic [8:0]   ncb   [2];      // bits per symbol, per bank
  logic [1:0]   sbank [2];      // s, per bank
  logic         wb, rb;
  logic [8:0]   wcnt, rcnt;
  logic [8:0]   wpos, rpos;
  logic [8:0]   n_now;
  logic [1:0]   s_now;

  always_comb begin
    n_now = 9'(48 * nbpsc(mode));
    s_now = (nbpsc(mode) > 1) ? 2'(nbpsc(mode) / 2) : 2'd1;
  end

  function automatic logic [8:0] perm(logic [8:0] k, logic [8:0] n, logic [1:0] s);
    int unsigned i, j, nn, ss;
    nn = n; ss = s;
    i = (nn / 16) * (k % 16) + k / 16;
    j = ss * (i / ss) + (i + nn - (16 * i) / nn) % ss;
    return 9'(j);
  endfunction

  // bank being written uses the mode latched for it (first bit) or the current mode
  logic [8:0] wn;
  logic [1:0] ws;
  assign wn = (wcnt == 0) ? n_now : ncb[wb];
  assign ws = (wcnt == 0) ? s_now : sbank[wb];

  assign wpos = DEINT ? wcnt : perm(wcnt, wn, ws);
  assign rpos = DEINT ? perm(rcnt, ncb[rb], sbank[rb]) : rcnt;

  assign in_ready  = !full[wb];
  assign out_valid = full[rb];
  assign out_bit   = mem[rb][rpos];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= '0; wb <= 1'b0; rb <= 1'b0; wcnt <= '0; rcnt <= '0;
      ncb[0] <= 9'd48; ncb[1] <= 9'd48; sbank[0] <= 2'd1; sbank[1] <= 2'd1;
    end else if (clear) begin
      full <= '0; wb <= 1'b0; rb <= 1'b0; wcnt <= '0; rcnt <= '0;
    end else begin
      if (in_valid && in_ready) begin
        mem[wb][wpos] <= in_bit;
        if (wcnt == 0) begin
          ncb[wb] <= n_now; sbank[wb] <= s_now;
        end
        if (wcnt == wn - 1) begin
          wcnt     <= '0;
          full[wb] <= 1'b1;
          wb       <= ~wb;
        end else begin
          wcnt <= wcnt + 1'b1;
        end
      end
      if (out_valid && out_ready) begin
        if (rcnt == ncb[rb] - 1) begin
          rcnt     <= '0;
          full[rb] <= 1'b0;
          rb       <= ~rb;
        end else begin
          rcnt <= rcnt + 1'b1;
        end
      end
    end
  end
endmodule
