// tx_path -- transmit path of the baseband modem.
//
// Chain, as in the modem's transmit path: burst formation (tx_ctrl) -> scrambler ->
// convolutional encoder -> puncturer -> interleaver -> constellation mapper ->
// pilot insertion / training symbols -> 64-point IFFT -> cyclic prefix insertion.
// Every link is a valid/ready stream, so the chain runs as fast as its slowest stage
// (the IFFT, 320 clocks per symbol) and the cyclic-prefix stage releases one sample
// per `smp_en`. Payload bytes are pulled from the modem interface unit.
// `start` with a burst description begins a burst; `busy` falls and `done` pulses
// when its last sample has left. `flush` (the END command) flushes the chain.
module tx_path
  import h2_pkg::*;
#(
  parameter int AMP = 512
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 smp_en,
  input  logic                 start,
  input  burst_t               burst,
  input  logic                 flush,
  output logic                 busy,
  output logic                 done,
  input  logic [7:0]           byte_in,
  input  logic                 byte_valid,
  output logic                 byte_ready,
  output logic signed [SW-1:0] iq_i,
  output logic signed [SW-1:0] iq_q,
  output logic                 iq_valid
);
  mode_e      mode;
  logic       clr, clear, scr_load;
  logic [6:0] scr_seed;
  logic       b_bit, b_byp, b_v, b_r;
  logic       s_bit, s_v, s_r;
  logic       e_a, e_b, e_v, e_r;
  logic       p_bit, p_v, p_r;
  logic       i_bit, i_v, i_r;
  logic signed [SW-1:0] m_i, m_q, f_i, f_q, t_i, t_q;
  logic       m_v, m_r, f_v, f_r, t_v, t_r;
  logic [1:0] f_tag, t_tag, sym_kind;
  logic       sym_last, sym_v, sym_r;

  assign clear = clr | flush;

  tx_ctrl u_ctrl (.clk, .rst_n, .start, .burst, .flush, .busy, .mode, .clear(clr),
    .scr_load, .scr_seed, .byte_in, .byte_valid, .byte_ready,
    .bit_out(b_bit), .bit_bypass(b_byp), .bit_valid(b_v), .bit_ready(b_r),
    .sym_kind, .sym_last, .sym_valid(sym_v), .sym_ready(sym_r), .tx_done(done));

  scrambler u_scr (.clk, .rst_n, .load(scr_load), .seed(scr_seed), .in_bit(b_bit),
    .in_bypass(b_byp), .in_valid(b_v), .in_ready(b_r), .out_bit(s_bit), .out_valid(s_v),
    .out_ready(s_r));

  conv_enc u_enc (.clk, .rst_n, .clear, .in_bit(s_bit), .in_valid(s_v), .in_ready(s_r),
    .out_a(e_a), .out_b(e_b), .out_valid(e_v), .out_ready(e_r));

  puncturer u_pun (.clk, .rst_n, .clear, .rate(rate_of(mode)), .in_a(e_a), .in_b(e_b),
    .in_valid(e_v), .in_ready(e_r), .out_bit(p_bit), .out_valid(p_v), .out_ready(p_r));

  interleaver #(.DEINT(1'b0)) u_il (.clk, .rst_n, .clear, .mode, .in_bit(p_bit),
    .in_valid(p_v), .in_ready(p_r), .out_bit(i_bit), .out_valid(i_v), .out_ready(i_r));

  mapper #(.AMP(AMP)) u_map (.clk, .rst_n, .clear, .mode, .in_bit(i_bit), .in_valid(i_v),
    .in_ready(i_r), .out_i(m_i), .out_q(m_q), .out_valid(m_v), .out_ready(m_r));

  pilot_insert #(.AMP(AMP)) u_pil (.clk, .rst_n, .clear, .sym_kind, .sym_last,
    .sym_valid(sym_v), .sym_ready(sym_r), .in_i(m_i), .in_q(m_q), .in_valid(m_v),
    .in_ready(m_r), .out_i(f_i), .out_q(f_q), .out_tag(f_tag), .out_valid(f_v),
    .out_ready(f_r));

  fft64 #(.INVERSE(1'b1)) u_ifft (.clk, .rst_n, .clear, .in_i(f_i), .in_q(f_q),
    .in_tag(f_tag), .in_valid(f_v), .in_ready(f_r), .out_i(t_i), .out_q(t_q),
    .out_tag(t_tag), .out_valid(t_v), .out_ready(t_r));

  cp_insert u_cp (.clk, .rst_n, .clear, .smp_en, .in_i(t_i), .in_q(t_q), .in_tag(t_tag),
    .in_valid(t_v), .in_ready(t_r), .out_i(iq_i), .out_q(iq_q), .out_valid(iq_valid),
    .done);
endmodule
