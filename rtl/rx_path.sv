// rx_path -- receive path of the baseband modem.
//
// Chain, as in the modem's receive path: cyclic prefix extraction and symbol framing
// (cp_remove) -> 64-point FFT -> channel estimation and frequency equalisation
// (freq_eq with chan_est) -> constellation decoder (demapper) -> deinterleaver ->
// depuncturing -> Viterbi decoder -> descrambler -> byte packing (LSB first).
// `start` with a burst description arms the path; the burst's samples are the valid
// input samples that follow. Received bytes leave on `byte_out`/`byte_valid` towards
// the receive memory; `done` pulses after the last byte. `flush` (END command) clears
// the chain. Symbol synchronisation for the BCH search is in rx_sync, outside.
module rx_path
  import h2_pkg::*;
#(
  parameter int VIT_DEPTH = 48
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  burst_t               burst,
  input  logic                 flush,
  output logic                 busy,
  output logic                 done,
  input  logic signed [SW-1:0] rx_i,
  input  logic signed [SW-1:0] rx_q,
  input  logic                 rx_valid,
  output logic [7:0]           byte_out,
  output logic                 byte_valid,
  output logic                 ovf
);
  mode_e       mode;
  logic [8:0]  nsym;
  logic [15:0] nsteps, nout;
  logic [12:0] nbytes, bcnt;
  logic        clear;
  logic signed [SW-1:0] c_i, c_q, f_i, f_q;
  logic [1:0]  c_tag, f_tag;
  logic        c_v, c_r, f_v, f_r;
  logic signed [31:0] z_i, z_q;
  logic [31:0] pw;
  logic        z_last, z_v, z_r;
  logic        d_bit, d_v, d_r, i_bit, i_v, i_r;
  logic        v_a, v_b, v_ea, v_eb, v_v, v_r;
  logic        o_bit, o_v, o_r, s_bit, s_v;
  logic [2:0]  bpos;
  logic [7:0]  sh;
  logic        active, vdone;

  function automatic logic [8:0] calc_nsym(logic [12:0] nb, mode_e m);
    int unsigned t;
    t = 32'(nb) * 8 + 6;
    return 9'((t + ndbps(m) - 1) / ndbps(m));
  endfunction

  assign clear = start | flush;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode <= M_BPSK12; nsym <= '0; nsteps <= '0; nout <= '0; nbytes <= '0;
    end else if (start) begin
      mode   <= burst.mode;
      nsym   <= calc_nsym(burst.nbytes, burst.mode);
      nsteps <= 16'(calc_nsym(burst.nbytes, burst.mode)) * 16'(ndbps(burst.mode));
      nout   <= 16'(burst.nbytes) * 16'd8;
      nbytes <= burst.nbytes;
    end
  end

  cp_remove u_cpr (.clk, .rst_n, .clear(flush), .start, .pre(burst.pre),
    .nsym(calc_nsym(burst.nbytes, burst.mode)), .in_i(rx_i), .in_q(rx_q),
    .in_valid(rx_valid), .out_i(c_i), .out_q(c_q), .out_tag(c_tag), .out_valid(c_v),
    .out_ready(c_r), .active, .ovf);

  fft64 #(.INVERSE(1'b0)) u_fft (.clk, .rst_n, .clear, .in_i(c_i), .in_q(c_q),
    .in_tag(c_tag), .in_valid(c_v), .in_ready(c_r), .out_i(f_i), .out_q(f_q),
    .out_tag(f_tag), .out_valid(f_v), .out_ready(f_r));

  freq_eq u_eq (.clk, .rst_n, .clear, .in_i(f_i), .in_q(f_q), .in_tag(f_tag),
    .in_valid(f_v), .in_ready(f_r), .z_i, .z_q, .p(pw), .out_last(z_last),
    .out_valid(z_v), .out_ready(z_r));

  demapper u_dm (.clk, .rst_n, .clear, .mode, .z_i, .z_q, .p(pw), .in_valid(z_v),
    .in_ready(z_r), .out_bit(d_bit), .out_valid(d_v), .out_ready(d_r));

  interleaver #(.DEINT(1'b1)) u_dil (.clk, .rst_n, .clear, .mode, .in_bit(d_bit),
    .in_valid(d_v), .in_ready(d_r), .out_bit(i_bit), .out_valid(i_v), .out_ready(i_r));

  depuncture u_dp (.clk, .rst_n, .clear, .rate(rate_of(mode)), .in_bit(i_bit),
    .in_valid(i_v), .in_ready(i_r), .out_a(v_a), .out_b(v_b), .out_ea(v_ea),
    .out_eb(v_eb), .out_valid(v_v), .out_ready(v_r));

  viterbi #(.DEPTH(VIT_DEPTH)) u_vit (.clk, .rst_n, .start(clear), .nsteps, .nout,
    .in_a(v_a), .in_b(v_b), .in_ea(v_ea), .in_eb(v_eb), .in_valid(v_v), .in_ready(v_r),
    .out_bit(o_bit), .out_valid(o_v), .out_ready(o_r), .done(vdone));

  scrambler u_dsc (.clk, .rst_n, .load(start), .seed(burst.seed), .in_bit(o_bit),
    .in_bypass(1'b0), .in_valid(o_v), .in_ready(o_r), .out_bit(s_bit), .out_valid(s_v),
    .out_ready(1'b1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; bpos <= '0; sh <= '0; bcnt <= '0;
      byte_out <= '0; byte_valid <= 1'b0;
    end else begin
      done       <= 1'b0;
      byte_valid <= 1'b0;
      if (flush) begin
        busy <= 1'b0;
      end else if (start) begin
        busy <= 1'b1; bpos <= '0; bcnt <= '0;
      end else if (s_v && busy) begin
        sh[bpos] <= s_bit;
        bpos     <= bpos + 1'b1;
        if (bpos == 3'd7) begin
          byte_out   <= {s_bit, sh[6:0]};
          byte_valid <= 1'b1;
          bcnt       <= bcnt + 1'b1;
          if (bcnt == nbytes - 1) begin busy <= 1'b0; done <= 1'b1; end
        end
      end
    end
  end
endmodule
