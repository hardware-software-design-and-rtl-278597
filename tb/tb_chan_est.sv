// tb_chan_est -- writes random received training bins and reads the whole table back:
// every bin must hold Y_k * L_k with the HIPERLAN/2 long-training sign L_k written out
// here, and zero on the unused bins (DC and guard carriers). Two rounds, so the second
// estimate must fully replace the first.
module tb_chan_est;
  import h2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr;
  logic [5:0] wr_bin, rd_bin;
  logic signed [SW-1:0] yi, yq, hi, hq;
  int checks = 0, failures = 0;

  chan_est dut (.clk, .rst_n, .wr, .wr_bin, .y_i(yi), .y_q(yq), .rd_bin, .h_i(hi), .h_q(hq));

  int lts[53] = '{1,1,-1,-1,1,1,-1,1,-1,1,1,1,1,1,1,-1,-1,1,1,-1,1,-1,1,1,1,1,0,
                  1,-1,-1,1,1,-1,1,-1,1,-1,-1,-1,-1,-1,1,1,-1,-1,1,-1,1,-1,1,1,1,1};

  initial begin
    int vi[64], vq[64], l[64];
    for (int k = 0; k < 64; k++) l[k] = 0;
    for (int c = -26; c <= 26; c++) l[c & 63] = lts[c + 26];
    repeat (2) @(negedge clk);
    rst_n = 1; wr = 0; rd_bin = 0;
    for (int r = 0; r < 2; r++) begin
      for (int k = 0; k < 64; k++) begin
        vi[k] = int'($urandom % 30001) - 15000; vq[k] = int'($urandom % 30001) - 15000;
        wr = 1; wr_bin = 6'(k); yi = SW'(vi[k]); yq = SW'(vq[k]);
        @(negedge clk);
      end
      wr = 0;
      for (int k = 0; k < 64; k++) begin
        rd_bin = 6'(k); #1;
        checks++;
        if (hi != SW'(vi[k] * l[k]) || hq != SW'(vq[k] * l[k])) begin
          failures++; $display("bin %0d got %0d %0d", k, hi, hq);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
