// tb_tx_path -- transmit path test against the reference model.
//
// For every physical mode (and both preamble kinds) a random payload is sent. The
// testbench checks the number of samples of the burst, that the burst leaves without
// gaps at the sample rate, the cyclic prefix of every symbol, and, through a DFT of
// each symbol body, every data subcarrier, pilot and long-training value against
// h2_ref_pkg (IFFT output is the transform / 8, so DFT/8 must give the points).
module tb_tx_path;
  import h2_pkg::*;
  import h2_ref_pkg::*;

  localparam int AMP = 512;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic smp_en, start, busy, done, byte_valid, byte_ready, iq_valid;
  logic [2:0] div;
  burst_t burst;
  logic [7:0] byte_in;
  logic signed [SW-1:0] iq_i, iq_q;
  int checks = 0, failures = 0;

  tx_path #(.AMP(AMP)) dut (.clk, .rst_n, .smp_en, .start, .burst, .flush(1'b0), .busy,
    .done, .byte_in, .byte_valid, .byte_ready, .iq_i, .iq_q, .iq_valid);

  always @(posedge clk) div <= (div == 4) ? 3'd0 : div + 3'd1;
  assign smp_en = (div == 4);

  byte unsigned payload[$];
  int bidx;
  assign byte_valid = busy && bidx < payload.size();
  assign byte_in    = (bidx < payload.size()) ? payload[bidx] : 8'h00;
  always @(posedge clk) if (start) bidx <= 0; else if (byte_valid && byte_ready) bidx <= bidx + 1;

  int si[$], sq[$];
  int gaps;
  logic capturing, in_burst, prev_smp;
  always @(posedge clk) begin
    prev_smp <= smp_en;
    if (iq_valid) begin si.push_back(iq_i); sq.push_back(iq_q); end
    // between the first and the last sample every strobe must carry a sample
    if (iq_valid && !done) in_burst <= 1'b1;
    if (done || !capturing) in_burst <= 1'b0;
    if (in_burst && prev_smp && !iq_valid) gaps <= gaps + 1;
  end

  function automatic real fabs(real x);
    return (x < 0) ? -x : x;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic dft(int base, int k, output real yr, output real yi);
    yr = 0; yi = 0;
    for (int n = 0; n < 64; n++) begin
      real a;
      a  = -2.0 * 3.14159265358979 * n * k / 64.0;
      yr += si[base + n] * $cos(a) - sq[base + n] * $sin(a);
      yi += si[base + n] * $sin(a) + sq[base + n] * $cos(a);
    end
    yr /= 8.0; yi /= 8.0;
  endtask

  task automatic run_burst(int mode, int nbytes, pre_e pre);
    int pi[$], pq[$];
    int npre, nsym, base, seed;
    real yr, yi, tol;
    payload.delete();
    for (int i = 0; i < nbytes; i++) payload.push_back(8'($urandom));
    seed = 7'h70 | ($urandom % 16);
    ref_points(payload, mode, seed, pi, pq);
    nsym = ref_nsym(nbytes, mode);
    npre = (pre == PRE_LONG) ? 2 : (pre == PRE_SHORT) ? 1 : 0;
    si.delete(); sq.delete(); gaps = 0;
    burst.mode = mode_e'(mode); burst.pre = pre; burst.nbytes = 13'(nbytes); burst.seed = 7'(seed);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0; capturing = 1;
    wait (done);
    @(negedge clk) capturing = 0;
    repeat (3) @(negedge clk);
    chk(si.size() == npre * 160 + nsym * 80, $sformatf("mode %0d sample count %0d", mode, si.size()));
    chk(gaps == 0, $sformatf("mode %0d burst has %0d gaps", mode, gaps));
    if (si.size() != npre * 160 + nsym * 80) return;
    tol = 0.06 * AMP;
    base = 0;
    if (pre == PRE_LONG) begin
      // short training: period 16
      for (int n = 16; n < 160; n++) chk(si[n] == si[n-16] && sq[n] == sq[n-16], "STS period");
      base = 160;
    end
    if (pre != PRE_NONE) begin
      for (int n = 0; n < 32; n++) chk(si[base+n] == si[base+n+64] && sq[base+n] == sq[base+n+64], "LTS guard");
      for (int k = 0; k < 64; k++) begin
        int e;
        e = int'(lts_val(6'(k))) * AMP;
        dft(base + 32, k, yr, yi);
        chk(fabs(yr - e) < tol && fabs(yi) < tol, $sformatf("LTS bin %0d got %f %f exp %0d", k, yr, yi, lts_val(6'(k)) * AMP));
      end
      base += 160;
    end
    for (int s = 0; s < nsym; s++) begin
      for (int n = 0; n < 16; n++)
        chk(si[base+n] == si[base+n+64] && sq[base+n] == sq[base+n+64], "cyclic prefix");
      for (int d = 0; d < 48; d++) begin
        int c, k;
        c = ref_carrier(d);
        k = (c < 0) ? c + 64 : c;
        dft(base + 16, k, yr, yi);
        chk(fabs(yr - pi[s*48+d] * AMP) < tol && fabs(yi - pq[s*48+d] * AMP) < tol,
            $sformatf("mode %0d sym %0d carrier %0d got %f,%f exp %0d,%0d", mode, s, c, yr, yi,
                      pi[s*48+d] * AMP, pq[s*48+d] * AMP));
      end
      begin
        int pv[4] = '{1, 1, 1, -1};
        int pk[4] = '{43, 57, 7, 21};
        for (int p = 0; p < 4; p++) begin
          dft(base + 16, pk[p], yr, yi);
          chk(fabs(yr - pv[p] * ref_pol(s) * AMP) < tol && fabs(yi) < tol, "pilot");
        end
      end
      base += 80;
    end
  endtask

  initial begin
    start = 0; burst = '0; capturing = 0; div = 0; in_burst = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_burst(0, 15, PRE_LONG);
    run_burst(1, 9, PRE_SHORT);
    run_burst(2, 9, PRE_NONE);
    run_burst(3, 54, PRE_SHORT);
    run_burst(4, 27, PRE_NONE);
    run_burst(5, 54, PRE_NONE);
    run_burst(6, 108, PRE_SHORT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
