// punct_ctrl -- puncturing control of the modem interface unit.
//
// For the code rate of the current physical mode it says, for each encoder output
// pair, whether bit a and bit b are kept. Rate 1/2 keeps all; rate 3/4 uses the period-3
// pattern a:110 b:101; rate 9/16 the period-9 pattern a:111101111 b:111111110
// (patterns of HIPERLAN/2; the design gives only the block's function).
// `clear` restarts the pattern at a burst start, `adv` steps it after each pair.
module punct_ctrl (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic [1:0] rate,       // 0 = 1/2, 1 = 3/4, 2 = 9/16
  input  logic       adv,
  output logic       keep_a,
  output logic       keep_b
);
  logic [3:0] ph;

  always_comb begin
    keep_a = 1'b1;
    keep_b = 1'b1;
    case (rate)
      2'd1: begin keep_a = (ph != 4'd2); keep_b = (ph != 4'd1); end
      2'd2: begin keep_a = (ph != 4'd4); keep_b = (ph != 4'd8); end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     ph <= '0;
    else if (clear) ph <= '0;
    else if (adv) begin
      case (rate)
        2'd1:    ph <= (ph >= 4'd2) ? 4'd0 : ph + 4'd1;
        2'd2:    ph <= (ph >= 4'd8) ? 4'd0 : ph + 4'd1;
        default: ph <= '0;
      endcase
    end
  end
endmodule
