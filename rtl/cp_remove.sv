// cp_remove -- cyclic prefix extraction and symbol framing of the receive path.
//
// Armed by `start` with the burst's preamble kind and number of data symbols, it
// counts the valid input samples of the burst: a short-training field (160 samples) is
// skipped; of a long-training field (160) the 32-sample guard is dropped, the first
// 64-sample copy is passed on tagged as training and the second copy is dropped; each
// data symbol loses its 16-sample prefix and passes 64 samples. Passed samples are
// stored in one of two banks and sent to the FFT at full clock rate, so the FFT can
// run faster than samples arrive. `ovf` flags a symbol lost because both banks were
// still full. The prefix length follows HIPERLAN/2; the framing is this design's.
// Output tag: {training, last data symbol}.
module cp_remove
  import h2_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 start,
  input  pre_e                 pre,
  input  logic [8:0]           nsym,
  input  logic signed [SW-1:0] in_i,
  input  logic signed [SW-1:0] in_q,
  input  logic                 in_valid,
  output logic signed [SW-1:0] out_i,
  output logic signed [SW-1:0] out_q,
  output logic [1:0]           out_tag,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic                 active,
  output logic                 ovf
);
  typedef enum logic [1:0] {F_IDLE, F_STS, F_LTS, F_DATA} fld_e;
  fld_e       fld;
  logic [7:0] scnt;
  logic [8:0] dcnt;
  logic [8:0] nsym_q;
  logic signed [SW-1:0] bi [2][64];
  logic signed [SW-1:0] bq [2][64];
  logic [1:0] btag [2];
  logic [1:0] full;
  logic       wb, rb;
  logic [5:0] rcnt;
  logic       keep;
  logic [5:0] widx;

  always_comb begin
    keep = 1'b0;
    widx = '0;
    case (fld)
      F_LTS:  begin keep = (scnt >= 8'd32) && (scnt < 8'd96); widx = 6'(scnt - 8'd32); end
      F_DATA: begin keep = (scnt >= 8'd16);                   widx = 6'(scnt - 8'd16); end
      default: ;
    endcase
  end

  assign active    = (fld != F_IDLE);
  assign out_valid = full[rb];
  assign out_i     = bi[rb][rcnt];
  assign out_q     = bq[rb][rcnt];
  assign out_tag   = btag[rb];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fld <= F_IDLE; scnt <= '0; dcnt <= '0; full <= '0; wb <= 1'b0; rb <= 1'b0;
      rcnt <= '0; ovf <= 1'b0; btag[0] <= '0; btag[1] <= '0; nsym_q <= '0;
    end else if (clear) begin
      fld <= F_IDLE; scnt <= '0; dcnt <= '0; full <= '0; wb <= 1'b0; rb <= 1'b0;
      rcnt <= '0; ovf <= 1'b0;
    end else begin
      if (start) begin
        fld  <= (pre == PRE_LONG) ? F_STS : (pre == PRE_SHORT) ? F_LTS : F_DATA;
        scnt <= '0; dcnt <= '0; ovf <= 1'b0; nsym_q <= nsym;
      end else if (in_valid && fld != F_IDLE) begin
        if (keep) begin
          if (full[wb]) ovf <= 1'b1;
          else begin
            bi[wb][widx] <= in_i;
            bq[wb][widx] <= in_q;
            btag[wb]     <= {fld == F_LTS, fld == F_DATA && dcnt == nsym_q - 1};
            if (widx == 6'd63) begin full[wb] <= 1'b1; wb <= ~wb; end
          end
        end
        scnt <= scnt + 1'b1;
        case (fld)
          F_STS: if (scnt == 8'd159) begin scnt <= '0; fld <= F_LTS; end
          F_LTS: if (scnt == 8'd159) begin scnt <= '0; fld <= (nsym_q == 0) ? F_IDLE : F_DATA; end
          F_DATA: if (scnt == 8'd79) begin
            scnt <= '0;
            dcnt <= dcnt + 1'b1;
            if (dcnt == nsym_q - 1) fld <= F_IDLE;
          end
          default: ;
        endcase
      end
      if (out_valid && out_ready) begin
        rcnt <= rcnt + 1'b1;
        if (rcnt == 6'd63) begin full[rb] <= 1'b0; rb <= ~rb; end
      end
    end
  end
endmodule
