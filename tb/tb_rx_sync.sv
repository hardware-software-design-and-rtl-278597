// tb_rx_sync -- random (noise-like) samples, then a short training field built from a
// random 16-sample period, then noise again, one sample per five clocks. `found` must
// pulse exactly once, inside the training field and after at least the plateau length;
// never during noise only, never while `en` is low, and not at all when the signal
// energy is below `thr`. With a small frequency offset the sign of the held correlation's
// imaginary part must follow the offset.
module tb_rx_sync;
  import h2_pkg::*;
  localparam int PLATEAU = 48;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en, rv, found;
  logic [39:0] thr;
  logic signed [SW-1:0] ri, rq;
  logic signed [39:0] ci, cq;
  int checks = 0, failures = 0;

  rx_sync #(.PLATEAU(PLATEAU)) dut (.clk, .rst_n, .en, .thr, .rx_i(ri), .rx_q(rq), .rx_valid(rv),
    .found, .corr_i(ci), .corr_q(cq));

  int nfound, at;
  always @(posedge clk) if (found) nfound++;

  // n_noise noise samples, n_sts training samples, then 100 noise samples; returns the
  // sample index at which found was seen (or -1)
  task automatic run(int n_noise, int n_sts, int amp, real cfo, output int hit);
    int per_i[16], per_q[16];
    hit = -1;
    for (int k = 0; k < 16; k++) begin per_i[k] = int'($urandom % 2001) - 1000; per_q[k] = int'($urandom % 2001) - 1000; end
    for (int n = 0; n < n_noise + n_sts + 100; n++) begin
      int si, sq;
      if (n >= n_noise && n < n_noise + n_sts) begin
        real a, c, s;
        a = cfo * n; c = $cos(a); s = $sin(a);
        si = int'((per_i[n % 16] * c - per_q[n % 16] * s) * amp / 1000.0);
        sq = int'((per_i[n % 16] * s + per_q[n % 16] * c) * amp / 1000.0);
      end else begin
        si = int'($urandom % 2001) - 1000; sq = int'($urandom % 2001) - 1000;
      end
      ri = SW'(si); rq = SW'(sq); rv = 1; @(negedge clk);
      rv = 0;
      repeat (4) begin if (found && hit < 0) hit = n; @(negedge clk); end
      if (found && hit < 0) hit = n;
    end
  endtask

  initial begin
    int hit;
    repeat (2) @(negedge clk);
    rst_n = 1; rv = 0; en = 0; thr = 40'd1000000; nfound = 0;
    @(negedge clk); en = 1;
    run(300, 160, 1000, 0.0, hit);
    checks++; if (nfound != 1) begin failures++; $display("found %0d times", nfound); end
    checks++; if (hit < 300 + 16 + PLATEAU - 1 || hit >= 300 + 160) begin failures++; $display("hit at %0d", hit); end
    checks++; if (ci <= 0) failures++;
    // still armed but already found: no second pulse
    run(50, 160, 1000, 0.0, hit);
    checks++; if (nfound != 1) failures++;
    // disabled
    en = 0; nfound = 0;
    run(50, 160, 1000, 0.0, hit);
    checks++; if (nfound != 0) failures++;
    // below threshold
    en = 1; thr = 40'd1 << 38; nfound = 0;
    run(50, 160, 1000, 0.0, hit);
    checks++; if (nfound != 0) failures++;
    // noise only
    en = 0; @(negedge clk); en = 1; thr = 40'd1000000; nfound = 0;
    run(600, 0, 1000, 0.0, hit);
    checks++; if (nfound != 0) failures++;
    // frequency offset, both signs
    en = 0; @(negedge clk); en = 1; nfound = 0;
    run(100, 160, 1000, 0.02, hit);
    checks++; if (nfound != 1 || cq <= 0) begin failures++; $display("cfo+ %0d %0d", nfound, cq); end
    en = 0; @(negedge clk); en = 1; nfound = 0;
    run(100, 160, 1000, -0.02, hit);
    checks++; if (nfound != 1 || cq >= 0) begin failures++; $display("cfo- %0d %0d", nfound, cq); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
