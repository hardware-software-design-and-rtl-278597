// tb_cfo_corr -- self-checking testbench for the frequency offset estimator/corrector.
//
// Each trial draws a random frequency offset f (turns per sample, up to +-1/40 so that
// 16 f stays inside half a turn) and a random magnitude and hands the block the
// autocorrelation C = A e^{j 2 pi 16 f}, as rx_sync would produce it. It checks that the
// stored step equals f in 2**20 units per turn within 2 units, and that the estimation
// takes ITER+1 clocks. It then sends samples s_n e^{j 2 pi f n}, one every five clocks,
// and compares each output, one clock later, with s_n e^{j 2 pi (f - step) n} worked
// out in real arithmetic (within 3 LSB), and with s_n itself within the error
// the step's rounding allows. A first phase without an estimate checks that the
// samples pass unchanged.
module tb_cfo_corr;
  import h2_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int  PW = 20;

  logic clk = 1'b0, rst_n = 1'b0;
  logic est_valid;
  logic signed [39:0] est_i, est_q;
  logic signed [SW-1:0] rx_i, rx_q, y_i, y_q;
  logic rx_valid, y_valid, est_busy;
  logic signed [PW-1:0] step;
  int checks = 0, failures = 0;

  cfo_corr dut (.clk, .rst_n, .tick(rx_valid), .est_valid, .est_i, .est_q, .rx_i, .rx_q, .rx_valid,
    .y_i, .y_q, .y_valid, .step, .est_busy);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic real urand(real lo, real hi);
    return lo + (hi - lo) * real'($urandom % 1000001) / 1000000.0;
  endfunction

  // send samples s_n e^{j 2 pi f n} and check the outputs
  task automatic run_samples(real f, int n_smp, real tol_s);
    real sr, si, ph, rr, ri, er, ei, cr, ci, stp;
    stp = real'(step) / real'(1 << PW);
    for (int n = 0; n < n_smp; n++) begin
      sr = urand(-9000.0, 9000.0);
      si = urand(-9000.0, 9000.0);
      ph = 2.0 * PI * f * n;
      rr = sr * $cos(ph) - si * $sin(ph);
      ri = sr * $sin(ph) + si * $cos(ph);
      rx_i = SW'($rtoi(rr >= 0 ? rr + 0.5 : rr - 0.5));
      rx_q = SW'($rtoi(ri >= 0 ? ri + 0.5 : ri - 0.5));
      rx_valid = 1'b1;
      @(negedge clk);
      rx_valid = 1'b0;
      chk(y_valid, "y_valid one clock after rx_valid");
      // expected: the input rotated back by n steps
      cr = $cos(2.0 * PI * stp * n);
      ci = -$sin(2.0 * PI * stp * n);
      er = real'(rx_i) * cr - real'(rx_q) * ci;
      ei = real'(rx_i) * ci + real'(rx_q) * cr;
      chk((real'(y_i) - er) ** 2 + (real'(y_q) - ei) ** 2 <= 9.0,
          $sformatf("sample %0d: got %0d,%0d expected %0.1f,%0.1f", n, y_i, y_q, er, ei));
      chk((real'(y_i) - sr) ** 2 + (real'(y_q) - si) ** 2 <= tol_s * tol_s,
          $sformatf("sample %0d not derotated: got %0d,%0d sent %0.1f,%0.1f", n, y_i, y_q,
                    sr, si));
      repeat (4) begin
        @(negedge clk);
        chk(!y_valid, "y_valid only for valid samples");
      end
    end
  endtask

  initial begin
    real f, a, th;
    int lat;
    est_valid = 1'b0; est_i = '0; est_q = '0; rx_i = '0; rx_q = '0; rx_valid = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(step == 0 && !est_busy, "no estimate after reset");
    // without an estimate samples pass through
    run_samples(0.0, 50, 3.0);

    for (int t = 0; t < 60; t++) begin
      f  = urand(-1.0 / 40.0, 1.0 / 40.0);
      if (t == 0) f = 0.0;
      a  = urand(1.0e4, 4.0e11);
      th = 2.0 * PI * 16.0 * f;
      est_i = 40'(longint'(a * $cos(th)));
      est_q = 40'(longint'(a * $sin(th)));
      est_valid = 1'b1;
      @(negedge clk);
      est_valid = 1'b0;
      lat = 1;
      while (est_busy && lat < 100) begin @(negedge clk); lat++; end
      chk(lat == 17, $sformatf("estimate took %0d clocks", lat));
      chk(step - $rtoi(f * real'(1 << PW)) <= 2 && $rtoi(f * real'(1 << PW)) - step <= 2,
          $sformatf("f %0.6f: step %0d expected %0.1f", f, step, f * real'(1 << PW)));
      // 2 units of step error over 40 samples is under 2e-3 rad
      run_samples(f, 40, 30.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
