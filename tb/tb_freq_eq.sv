// tb_freq_eq -- a training symbol Y_k = L_k * H_k followed by three data symbols with
// random bins, for a random channel H; for each data carrier (in order -26..26) the
// outputs must be Z = Y * conj(H) and P = |H|^2, pilots must be dropped, and `last`
// must mark the final point of the symbol tagged last. Random stalls on both sides.
module tb_freq_eq;
  import h2_pkg::*;
  import h2_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, iv, ir, olast, ov, ordy;
  logic [1:0] itag;
  logic signed [SW-1:0] ii, iq;
  logic signed [31:0] zi, zq;
  logic [31:0] p;
  int checks = 0, failures = 0;

  freq_eq dut (.clk, .rst_n, .clear, .in_i(ii), .in_q(iq), .in_tag(itag), .in_valid(iv),
    .in_ready(ir), .z_i(zi), .z_q(zq), .p, .out_last(olast), .out_valid(ov), .out_ready(ordy));

  int lts[53] = '{1,1,-1,-1,1,1,-1,1,-1,1,1,1,1,1,1,-1,-1,1,1,-1,1,-1,1,1,1,1,0,
                  1,-1,-1,1,1,-1,1,-1,1,-1,-1,-1,-1,-1,1,1,-1,-1,1,-1,1,-1,1,1,1,1};
  longint ezi[$], ezq[$], ep[$];
  int el[$], got;
  always @(posedge clk) if (rst_n && ov && ordy) begin
    checks++;
    if (got >= ezi.size() || zi != 32'(ezi[got]) || zq != 32'(ezq[got]) || p != 32'(ep[got]) || olast != el[got][0]) begin
      failures++;
      if (failures < 10) $display("out %0d got %0d %0d %0d", got, zi, zq, p);
    end
    got++;
  end

  task automatic send(int vi, int vq, bit [1:0] tag);
    ii = SW'(vi); iq = SW'(vq); itag = tag; iv = 1;
    while (!ir || ($urandom % 4) == 0) begin iv = ir ? 0 : 1; @(negedge clk); iv = 1; end
    @(negedge clk); iv = 0;
  endtask

  initial begin
    int hi[64], hq[64];
    fork
      forever begin ordy = ($urandom % 3) != 0; @(negedge clk); end
    join_none
    repeat (2) @(negedge clk);
    rst_n = 1; iv = 0; clear = 1; @(negedge clk); clear = 0; got = 0;
    for (int k = 0; k < 64; k++) begin hi[k] = int'($urandom % 1001) - 500; hq[k] = int'($urandom % 1001) - 500; end
    for (int k = 0; k < 64; k++) begin
      int c, l;
      c = (k >= 32) ? k - 64 : k;
      l = (c >= -26 && c <= 26) ? lts[c + 26] : 0;
      send(hi[k] * l, hq[k] * l, 2'b10);
    end
    for (int s = 0; s < 3; s++) begin
      int yi[64], yq[64];
      for (int k = 0; k < 64; k++) begin yi[k] = int'($urandom % 4001) - 2000; yq[k] = int'($urandom % 4001) - 2000; end
      for (int d = 0; d < 48; d++) begin
        int k, c;
        c = ref_carrier(d); k = c & 63;
        if (c == 0 || c < -26 || c > 26) k = 0;
        ezi.push_back(longint'(yi[k]) * hi[k] + longint'(yq[k]) * hq[k]);
        ezq.push_back(longint'(yq[k]) * hi[k] - longint'(yi[k]) * hq[k]);
        ep.push_back(longint'(hi[k]) * hi[k] + longint'(hq[k]) * hq[k]);
        el.push_back(s == 2 && d == 47);
      end
      for (int k = 0; k < 64; k++) send(yi[k], yq[k], {1'b0, s == 2});
    end
    repeat (300) @(negedge clk);
    checks++; if (got != 3 * 48) begin failures++; $display("count %0d", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
