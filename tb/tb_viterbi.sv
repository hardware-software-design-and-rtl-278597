// tb_viterbi -- random messages with 6 zero tail bits are encoded by the reference
// (133,171) encoder, punctured positions are marked as erasures for rate 1/2, 3/4 and
// 9/16, and isolated bit errors are injected; the decoder must return the message
// exactly, deliver exactly `nout` bits and raise `done`. Lengths go from shorter to
// much longer than the survivor depth, with random input and output stalls.
module tb_viterbi;
  import h2_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, ia, ib, iea, ieb, iv, ir, ob, ov, ordy, done;
  logic [15:0] nsteps, nout;
  int checks = 0, failures = 0;

  viterbi dut (.clk, .rst_n, .start, .nsteps, .nout, .in_a(ia), .in_b(ib), .in_ea(iea),
    .in_eb(ieb), .in_valid(iv), .in_ready(ir), .out_bit(ob), .out_valid(ov), .out_ready(ordy),
    .done);

  bit msg[$], got[$];
  bit a[$], b[$], ea[$], eb[$];
  int pi_;
  assign ia  = (pi_ < a.size()) ? a[pi_] : 1'b0;
  assign ib  = (pi_ < a.size()) ? b[pi_] : 1'b0;
  assign iea = (pi_ < a.size()) ? ea[pi_] : 1'b0;
  assign ieb = (pi_ < a.size()) ? eb[pi_] : 1'b0;
  always @(posedge clk) begin
    if (iv && ir) pi_ <= pi_ + 1;
    if (ov && ordy) got.push_back(ob);
  end

  task automatic one(int n, int rate, int err_every, bit stall);
    bit src[$];
    int cyc, ndone;
    msg.delete(); got.delete(); ea.delete(); eb.delete();
    for (int i = 0; i < n; i++) msg.push_back(1'($urandom));
    src = msg;
    for (int i = 0; i < 6; i++) src.push_back(1'b0);
    ref_encode(src, a, b);
    foreach (a[i]) begin
      bit ka, kb;
      ka = 1; kb = 1;
      if (rate == 1) begin ka = (i % 3) != 2; kb = (i % 3) != 1; end
      if (rate == 2) begin ka = (i % 9) != 4; kb = (i % 9) != 8; end
      ea.push_back(!ka); eb.push_back(!kb);
      if (!ka) a[i] = 1'($urandom);
      if (!kb) b[i] = 1'($urandom);
      if (err_every > 0 && i % err_every == err_every / 2) begin
        if (ka) a[i] = !a[i]; else if (kb) b[i] = !b[i];
      end
    end
    nsteps = 16'(a.size()); nout = 16'(n);
    start = 1; @(negedge clk); start = 0; pi_ = 0;
    cyc = 0; ndone = 0;
    while (got.size() < n + 2 && cyc < 20000) begin
      iv = (pi_ < a.size()) && (!stall || ($urandom % 3) != 0);
      ordy = !stall || ($urandom % 3) != 0;
      @(negedge clk); cyc++;
      if (done) ndone++;
      if (ndone > 0 && got.size() >= n) break;
    end
    iv = 0; ordy = 1;
    repeat (4) begin @(negedge clk); if (done) ndone++; end
    checks++; if (got.size() != n) begin failures++; $display("n %0d got %0d bits", n, got.size()); end
    checks++; if (ndone != 1) begin failures++; $display("done %0d", ndone); end
    for (int i = 0; i < n; i++) begin
      checks++;
      if (i >= got.size() || got[i] != msg[i]) begin
        failures++;
        if (failures < 10) $display("n %0d rate %0d bit %0d wrong", n, rate, i);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1; iv = 0; ordy = 1; start = 0;
    one(10, 0, 0, 0);
    one(72, 0, 0, 1);
    one(426, 0, 30, 0);
    one(426, 1, 60, 1);
    one(858, 2, 90, 1);
    one(300, 1, 0, 0);
    for (int r = 0; r < 6; r++) one(40 + $urandom % 500, $urandom % 3, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
