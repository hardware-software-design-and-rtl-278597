// tx_ctrl -- burst formation of the transmit path.
//
// On `start` it takes the burst description (mode, preamble kind, payload bytes,
// scrambler seed), clears the pipeline and loads the scrambler, then runs two
// sequencers side by side:
//  * the bit sequencer turns payload bytes (LSB first) into bits for the scrambler,
//    then appends 6 tail bits and the pad bits that fill the last OFDM symbol, all zero
//    and marked `bypass` so they skip the scrambler and return the encoder to state 0;
//  * the symbol sequencer asks pilot_insert for the preamble symbols (long preamble:
//    short training then long training; short preamble: long training only) and then
//    for N_SYM = ceil((8*bytes + 6) / N_DBPS) data symbols, the last one tagged.
// `busy` stays high until the cyclic-prefix stage reports the last sample sent.
// The burst structure (preamble, data, cyclic prefix) follows the design; tail/pad
// layout and byte order are this design's choices taken from HIPERLAN/2 practice.
module tx_ctrl
  import h2_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  burst_t     burst,
  input  logic       flush,
  output logic       busy,
  output mode_e      mode,
  output logic       clear,
  output logic       scr_load,
  output logic [6:0] scr_seed,
  input  logic [7:0] byte_in,
  input  logic       byte_valid,
  output logic       byte_ready,
  output logic       bit_out,
  output logic       bit_bypass,
  output logic       bit_valid,
  input  logic       bit_ready,
  output logic [1:0] sym_kind,
  output logic       sym_last,
  output logic       sym_valid,
  input  logic       sym_ready,
  input  logic       tx_done
);
  logic [15:0] nbits, nbits_tot, bcnt;
  logic [8:0]  nsym, scnt;
  logic [1:0]  npre, pcnt;
  logic [2:0]  bpos;
  logic [7:0]  cur;
  logic        have_byte;
  logic        bits_on, syms_on;
  pre_e        pre;

  function automatic logic [8:0] calc_nsym(logic [12:0] nb, mode_e m);
    int unsigned t;
    t = 32'(nb) * 8 + 6;
    return 9'((t + ndbps(m) - 1) / ndbps(m));
  endfunction

  assign clear    = start;
  assign scr_load = start;
  assign scr_seed = burst.seed;

  // bit sequencer
  assign bit_bypass = (bcnt >= nbits);
  assign bit_out    = bit_bypass ? 1'b0 : cur[bpos];
  assign bit_valid  = bits_on && (bit_bypass || have_byte);
  assign byte_ready = bits_on && !have_byte && (bcnt < nbits);

  // symbol sequencer
  assign sym_valid = syms_on;
  assign sym_kind  = (pcnt < npre) ? ((pre == PRE_LONG && pcnt == 2'd0) ? 2'd1 : 2'd2) : 2'd0;
  assign sym_last  = (pcnt == npre) && (scnt == nsym - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; mode <= M_BPSK12; pre <= PRE_NONE; nbits <= '0; nbits_tot <= '0;
      bcnt <= '0; nsym <= '0; scnt <= '0; npre <= '0; pcnt <= '0; bpos <= '0; cur <= '0;
      have_byte <= 1'b0; bits_on <= 1'b0; syms_on <= 1'b0;
    end else if (flush) begin
      busy <= 1'b0; bits_on <= 1'b0; syms_on <= 1'b0; have_byte <= 1'b0;
    end else if (start) begin
      busy      <= 1'b1;
      mode      <= burst.mode;
      pre       <= burst.pre;
      nbits     <= 16'(burst.nbytes) * 16'd8;
      nsym      <= calc_nsym(burst.nbytes, burst.mode);
      nbits_tot <= 16'(calc_nsym(burst.nbytes, burst.mode)) * 16'(ndbps(burst.mode));
      npre      <= (burst.pre == PRE_LONG) ? 2'd2 : (burst.pre == PRE_SHORT) ? 2'd1 : 2'd0;
      bcnt <= '0; scnt <= '0; pcnt <= '0; bpos <= '0; have_byte <= 1'b0;
      bits_on <= 1'b1; syms_on <= 1'b1;
    end else begin
      if (byte_valid && byte_ready) begin
        cur <= byte_in; have_byte <= 1'b1; bpos <= '0;
      end
      if (bit_valid && bit_ready) begin
        bcnt <= bcnt + 1'b1;
        if (!bit_bypass) begin
          bpos <= bpos + 1'b1;
          if (bpos == 3'd7) have_byte <= 1'b0;
        end
        if (bcnt == nbits_tot - 1) bits_on <= 1'b0;
      end
      if (sym_valid && sym_ready) begin
        if (pcnt < npre) pcnt <= pcnt + 1'b1;
        else begin
          scnt <= scnt + 1'b1;
          if (scnt == nsym - 1) syms_on <= 1'b0;
        end
      end
      if (tx_done) busy <= 1'b0;
    end
  end
endmodule
