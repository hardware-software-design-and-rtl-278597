// pilot_insert -- builds the 64-point frequency vector of each OFDM symbol.
//
// For a data symbol it collects the 48 mapped points (carrier order -26..26) and then
// emits all 64 FFT bins in bin order 0..63: data points on their carriers, the four
// pilots on carriers -21, -7, 7, 21 with values (1, 1, 1, -1) times the polarity p_n,
// zeros on DC and the guard carriers. p_n comes from the x^7+x^4+1 sequence started
// from all ones at each burst (`clear`) and steps once per data symbol.
// For a training symbol (burst formation) it emits the short (STS) or long (LTS)
// training vector instead and consumes no data. Pilot and training values follow
// HIPERLAN/2; the design lists pilot insertion and burst formation without detail.
// Interface: symbol requests (kind, last) and mapped points in, valid/ready; 64 points
// out with a tag {training, last} that stays constant through the symbol.
module pilot_insert
  import h2_pkg::*;
#(
  parameter int AMP = 512
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic [1:0]           sym_kind,    // 0 data, 1 short training, 2 long training
  input  logic                 sym_last,
  input  logic                 sym_valid,
  output logic                 sym_ready,
  input  logic signed [SW-1:0] in_i,
  input  logic signed [SW-1:0] in_q,
  input  logic                 in_valid,
  output logic                 in_ready,
  output logic signed [SW-1:0] out_i,
  output logic signed [SW-1:0] out_q,
  output logic [1:0]           out_tag,     // {training symbol, last symbol of burst}
  output logic                 out_valid,
  input  logic                 out_ready
);
  typedef enum logic [1:0] {S_IDLE, S_COLL, S_EMIT} st_e;
  st_e st;
  logic [1:0]  kind;
  logic        last;
  logic [5:0]  cnt;
  logic [6:0]  pol;
  logic signed [SW-1:0] di [NSD];
  logic signed [SW-1:0] dq [NSD];

  // data index of an FFT bin, or 63 when the bin carries no data
  function automatic logic [5:0] bin2d(logic [5:0] bin);
    int c;
    c = (bin >= 32) ? int'(bin) - 64 : int'(bin);
    if (c >= -26 && c <= -22) return 6'(c + 26);
    if (c >= -20 && c <= -8)  return 6'(c + 25);
    if (c >= -6  && c <= -1)  return 6'(c + 24);
    if (c >= 1   && c <= 6)   return 6'(c + 23);
    if (c >= 8   && c <= 20)  return 6'(c + 22);
    if (c >= 22  && c <= 26)  return 6'(c + 21);
    return 6'd63;
  endfunction

  assign sym_ready = (st == S_IDLE);
  assign in_ready  = (st == S_COLL);
  assign out_valid = (st == S_EMIT);
  assign out_tag   = {kind != 2'd0, last};

  always_comb begin
    logic [5:0] d;
    logic       pneg;
    d     = bin2d(cnt);
    pneg  = pol[6] ^ pol[3];
    out_i = '0;
    out_q = '0;
    case (kind)
      2'd1: begin
        out_i = SW'(sts_val(cnt) * AMP);
        out_q = SW'(sts_val(cnt) * AMP);
      end
      2'd2: out_i = SW'(lts_val(cnt) * AMP);
      default: begin
        if (d != 6'd63) begin
          out_i = di[d];
          out_q = dq[d];
        end else if (cnt == 6'd7 || cnt == 6'd21 || cnt == 6'd43 || cnt == 6'd57) begin
          // carrier 21 (bin 21) carries -1, the others +1; times the polarity
          out_i = SW'(((cnt == 6'd21) ^ pneg) ? -AMP : AMP);
        end
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; kind <= '0; last <= 1'b0; cnt <= '0; pol <= 7'h7f;
    end else if (clear) begin
      st <= S_IDLE; cnt <= '0; pol <= 7'h7f;
    end else begin
      case (st)
        S_IDLE: if (sym_valid) begin
          kind <= sym_kind;
          last <= sym_last;
          cnt  <= '0;
          st   <= (sym_kind == 2'd0) ? S_COLL : S_EMIT;
        end
        S_COLL: if (in_valid) begin
          di[cnt] <= in_i;
          dq[cnt] <= in_q;
          if (cnt == 6'(NSD - 1)) begin cnt <= '0; st <= S_EMIT; end
          else                           cnt <= cnt + 1'b1;
        end
        S_EMIT: if (out_ready) begin
          if (cnt == 6'd63) begin
            st <= S_IDLE;
            if (kind == 2'd0) pol <= {pol[5:0], pol[6] ^ pol[3]};
          end
          cnt <= cnt + 1'b1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
