// cp_insert -- cyclic prefix insertion and sample pacing of the transmit path.
//
// Each 64-sample IFFT output symbol is stored in one of two banks. A data symbol
// leaves as its last 16 samples (the cyclic prefix) followed by all 64 (80 samples,
// 4 us at 20 MS/s); a training symbol leaves as its last 32 samples followed by two
// copies (160 samples, 8 us), which gives the 10 x 16 short-training field or the
// long-training field with its double-length guard. One sample leaves per `smp_en`
// strobe once a bank is full, so the output runs at the sample rate while the next
// symbol is computed. `done` pulses after the last sample of a symbol tagged last.
// The prefix length follows the design's OFDM modem (HIPERLAN/2, 16 samples);
// the training layout and pacing are this design's choices.
module cp_insert
  import h2_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 smp_en,
  input  logic signed [SW-1:0] in_i,
  input  logic signed [SW-1:0] in_q,
  input  logic [1:0]           in_tag,       // {training, last}
  input  logic                 in_valid,
  output logic                 in_ready,
  output logic signed [SW-1:0] out_i,
  output logic signed [SW-1:0] out_q,
  output logic                 out_valid,
  output logic                 done
);
  logic signed [SW-1:0] bi [2][64];
  logic signed [SW-1:0] bq [2][64];
  logic [1:0] btag [2];
  logic [1:0] full;
  logic       wb, rb;
  logic [5:0] wcnt;
  logic [7:0] rcnt;
  logic [7:0] rlen;
  logic [5:0] ridx;

  assign in_ready = !full[wb];
  assign rlen     = btag[rb][1] ? 8'd160 : 8'd80;

  always_comb begin
    if (btag[rb][1]) ridx = (rcnt < 8'd32) ? 6'(rcnt + 8'd32) : 6'(rcnt - 8'd32);
    else             ridx = (rcnt < 8'd16) ? 6'(rcnt + 8'd48) : 6'(rcnt - 8'd16);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= '0; wb <= 1'b0; rb <= 1'b0; wcnt <= '0; rcnt <= '0;
      out_valid <= 1'b0; done <= 1'b0; out_i <= '0; out_q <= '0;
      btag[0] <= '0; btag[1] <= '0;
    end else if (clear) begin
      full <= '0; wb <= 1'b0; rb <= 1'b0; wcnt <= '0; rcnt <= '0;
      out_valid <= 1'b0; done <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      if (in_valid && in_ready) begin
        bi[wb][wcnt] <= in_i;
        bq[wb][wcnt] <= in_q;
        if (wcnt == 0) btag[wb] <= in_tag;
        wcnt <= wcnt + 1'b1;
        if (wcnt == 6'd63) begin full[wb] <= 1'b1; wb <= ~wb; end
      end
      if (smp_en && full[rb]) begin
        out_i     <= bi[rb][ridx];
        out_q     <= bq[rb][ridx];
        out_valid <= 1'b1;
        if (rcnt == rlen - 1) begin
          rcnt     <= '0;
          full[rb] <= 1'b0;
          rb       <= ~rb;
          done     <= btag[rb][0];
        end else begin
          rcnt <= rcnt + 1'b1;
        end
      end
    end
  end
endmodule
