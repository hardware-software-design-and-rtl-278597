// demapper -- hard-decision constellation decoder.
//
// For an equalised point Z = Y*conj(H) with P = |H|^2, and H estimated from a training
// symbol of the same amplitude as one mapper level step, Z/P is the transmitted level
// (+-1, 3, 5, 7). Decisions therefore use thresholds that are multiples of P:
//   first bit of an axis  : x > 0
//   16-QAM second bit     : |x| < 2P
//   64-QAM second, third  : |x| < 4P ; 2P < |x| < 6P
// which inverts the Gray tables of the mapper. Bits leave serially, b0 first.
// The schemes follow the design; hard decisions are this design's choice.
module demapper
  import h2_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  mode_e              mode,
  input  logic signed [31:0] z_i,
  input  logic signed [31:0] z_q,
  input  logic [31:0]        p,
  input  logic               in_valid,
  output logic               in_ready,
  output logic               out_bit,
  output logic               out_valid,
  input  logic               out_ready
);
  logic [5:0] bits;
  logic [2:0] cnt, nb;
  logic       have;
  logic [5:0] dec;

  assign nb = 3'(nbpsc(mode));

  function automatic logic [2:0] axis(logic signed [31:0] x, logic [31:0] pw, int n);
    logic signed [47:0] ax, u;
    ax = (x < 0) ? -48'(x) : 48'(x);
    u  = 48'(pw);
    case (n)
      2: return {x > 0, ax < 2 * u, 1'b0};
      3: return {x > 0, ax < 4 * u, (ax > 2 * u) && (ax < 6 * u)};
      default: return {x > 0, 2'b00};
    endcase
  endfunction

  always_comb begin
    logic [2:0] ai, aq;
    dec = '0;
    case (nb)
      3'd1: begin ai = axis(z_i, p, 1); dec[0] = ai[2]; end
      3'd2: begin ai = axis(z_i, p, 1); aq = axis(z_q, p, 1); dec[1:0] = {aq[2], ai[2]}; end
      3'd4: begin
        ai = axis(z_i, p, 2); aq = axis(z_q, p, 2);
        dec[3:0] = {aq[1], aq[2], ai[1], ai[2]};
      end
      default: begin
        ai = axis(z_i, p, 3); aq = axis(z_q, p, 3);
        dec = {aq[0], aq[1], aq[2], ai[0], ai[1], ai[2]};
      end
    endcase
  end

  assign in_ready  = !have;
  assign out_valid = have;
  assign out_bit   = bits[cnt];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits <= '0; cnt <= '0; have <= 1'b0;
    end else if (clear) begin
      cnt <= '0; have <= 1'b0;
    end else if (in_valid && in_ready) begin
      bits <= dec; cnt <= '0; have <= 1'b1;
    end else if (have && out_ready) begin
      if (cnt == nb - 1) begin cnt <= '0; have <= 1'b0; end
      else                      cnt <= cnt + 1'b1;
    end
  end
endmodule
