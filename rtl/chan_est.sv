// chan_est -- channel estimation from the long training symbol.
//
// While the FFT output of the training symbol streams past (`train` high), each bin's
// value is multiplied by the known training value L_k = +-1 (so H_k = Y_k * L_k, the
// channel scaled by the training amplitude) and stored in a 64-entry table. The
// equaliser reads the table through `rd_bin`. One estimate per burst, from the first
// copy of the long training symbol; the design names the block only, the
// least-squares estimate from the HIPERLAN/2 training symbol is this design's choice.
module chan_est
  import h2_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr,          // one bin of the training symbol
  input  logic [5:0]           wr_bin,
  input  logic signed [SW-1:0] y_i,
  input  logic signed [SW-1:0] y_q,
  input  logic [5:0]           rd_bin,
  output logic signed [SW-1:0] h_i,
  output logic signed [SW-1:0] h_q
);
  logic signed [SW-1:0] hi [64];
  logic signed [SW-1:0] hq [64];

  assign h_i = hi[rd_bin];
  assign h_q = hq[rd_bin];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 64; k++) begin hi[k] <= '0; hq[k] <= '0; end
    end else if (wr) begin
      case (lts_val(wr_bin))
        2'sd1:   begin hi[wr_bin] <= y_i;  hq[wr_bin] <= y_q;  end
        -2'sd1:  begin hi[wr_bin] <= -y_i; hq[wr_bin] <= -y_q; end
        default: begin hi[wr_bin] <= '0;   hq[wr_bin] <= '0;   end
      endcase
    end
  end
endmodule
