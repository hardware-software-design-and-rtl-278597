// rx_sync -- preamble detection (symbol synchronisation) for the BCH search.
//
// Delayed autocorrelation over the 16-sample period of the short training field:
//   C(n) = sum_{m=0..15} r(n-m) conj(r(n-m-16)),  E(n) = sum_{m=0..15} |r(n-m-16)|^2.
// Inside the short training field C equals E in a clean channel (its angle is 16 times
// the carrier-frequency-offset phase step). The preamble counts as found when
// Re C > 3/4 E and E > `thr` hold for PLATEAU consecutive samples while `en` is high;
// `found` then pulses once and `corr_i/corr_q` hold C at that moment, the raw
// frequency offset estimate, from which cfo_corr derives the correction.
// The block's role follows the design; the detector is this design's choice.
module rx_sync
  import h2_pkg::*;
#(
  parameter int PLATEAU = 48
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [39:0]          thr,
  input  logic signed [SW-1:0] rx_i,
  input  logic signed [SW-1:0] rx_q,
  input  logic                 rx_valid,
  output logic                 found,
  output logic signed [39:0]   corr_i,
  output logic signed [39:0]   corr_q
);
  logic signed [SW-1:0] di [32];
  logic signed [SW-1:0] dq [32];
  logic signed [32:0]   pi_d [16];
  logic signed [32:0]   pq_d [16];
  logic signed [39:0]   ci, cq, e;
  logic signed [32:0]   pr, pq;
  logic [32:0]          en_new, en_old;
  logic [7:0]           run_len;
  logic                 done;

  always_comb begin
    // r(n) * conj(r(n-16))
    pr     = 33'(rx_i * di[15] + rx_q * dq[15]);
    pq     = 33'(rx_q * di[15] - rx_i * dq[15]);
    en_new = 33'(di[15] * di[15] + dq[15] * dq[15]);
    en_old = 33'(di[31] * di[31] + dq[31] * dq[31]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 32; k++) begin di[k] <= '0; dq[k] <= '0; end
      for (int k = 0; k < 16; k++) begin pi_d[k] <= '0; pq_d[k] <= '0; end
      ci <= '0; cq <= '0; e <= '0; run_len <= '0; done <= 1'b0; found <= 1'b0;
      corr_i <= '0; corr_q <= '0;
    end else begin
      found <= 1'b0;
      if (!en) begin
        done    <= 1'b0;
        run_len <= '0;
      end
      if (rx_valid) begin
        di[0] <= rx_i; dq[0] <= rx_q;
        for (int k = 1; k < 32; k++) begin di[k] <= di[k-1]; dq[k] <= dq[k-1]; end
        pi_d[0] <= pr; pq_d[0] <= pq;
        for (int k = 1; k < 16; k++) begin pi_d[k] <= pi_d[k-1]; pq_d[k] <= pq_d[k-1]; end
        ci <= ci + 40'(pr) - 40'(pi_d[15]);
        cq <= cq + 40'(pq) - 40'(pq_d[15]);
        e  <= e + 40'(en_new) - 40'(en_old);
        if (en && !done) begin
          if (4 * ci > 3 * e && e > $signed(thr)) begin
            run_len <= run_len + 1'b1;
            if (run_len == 8'(PLATEAU - 1)) begin
              found <= 1'b1; done <= 1'b1; corr_i <= ci; corr_q <= cq;
            end
          end else begin
            run_len <= '0;
          end
        end
      end
    end
  end
endmodule
