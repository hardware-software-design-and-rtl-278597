// mapper -- constellation encoder: BPSK, QPSK, 16-QAM, 64-QAM with Gray coding.
//
// Collects N_BPSC coded bits (first bit = b0) and emits one complex point. The first
// half of the bits selects the in-phase level, the second half the quadrature level,
// with the Gray tables of HIPERLAN/2 / IEEE 802.11a. Levels are the odd integers
// +-1, +-3, +-5, +-7 times AMP and are not power-normalised: the receiver scales its
// decision thresholds with the channel estimate instead. The schemes follow the
// design; level scaling is this design's choice.
// Interface: valid/ready bit stream in, valid/ready point stream out.
module mapper
  import h2_pkg::*;
#(
  parameter int AMP = 512
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  mode_e                mode,
  input  logic                 in_bit,
  input  logic                 in_valid,
  output logic                 in_ready,
  output logic signed [SW-1:0] out_i,
  output logic signed [SW-1:0] out_q,
  output logic                 out_valid,
  input  logic                 out_ready
);
  logic [5:0] bits;
  logic [2:0] cnt;
  logic       have;
  logic [2:0] nb;

  assign nb = 3'(nbpsc(mode));

  // Gray level of a 1..3 bit group, first bit most significant
  function automatic int lvl(logic [2:0] g, int n);
    case (n)
      1: return g[0] ? 1 : -1;
      2: case (g[1:0]) 2'b00: return -3; 2'b01: return -1; 2'b11: return 1; default: return 3; endcase
      default:
        case (g) 3'b000: return -7; 3'b001: return -5; 3'b011: return -3; 3'b010: return -1;
                 3'b110: return 1;  3'b111: return 3;  3'b101: return 5;  default: return 7; endcase
    endcase
  endfunction

  always_comb begin
    int li, lq;
    li = 0; lq = 0;
    case (nb)
      3'd1: begin li = lvl({2'b0, bits[0]}, 1); lq = 0; end
      3'd2: begin li = lvl({2'b0, bits[0]}, 1); lq = lvl({2'b0, bits[1]}, 1); end
      3'd4: begin li = lvl({1'b0, bits[0], bits[1]}, 2); lq = lvl({1'b0, bits[2], bits[3]}, 2); end
      default: begin li = lvl({bits[0], bits[1], bits[2]}, 3); lq = lvl({bits[3], bits[4], bits[5]}, 3); end
    endcase
    out_i = SW'(li * AMP);
    out_q = SW'(lq * AMP);
  end

  assign out_valid = have;
  assign in_ready  = !have;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits <= '0; cnt <= '0; have <= 1'b0;
    end else if (clear) begin
      cnt <= '0; have <= 1'b0;
    end else begin
      if (have && out_ready) have <= 1'b0;
      if (in_valid && in_ready) begin
        bits[cnt] <= in_bit;
        if (cnt == nb - 1) begin cnt <= '0; have <= 1'b1; end
        else                      cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
