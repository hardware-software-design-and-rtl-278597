// tb_fft64 -- forward and inverse 64-point transforms of random vectors and of single
// tones against a DFT computed in the testbench with real arithmetic (result / 8 with
// the default scaling); checks the tag and the latency of 64 + 192 + 64 clocks.
module tb_fft64;
  import h2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic iv[2], ir[2], ov[2], ordy;
  logic signed [SW-1:0] xi, xq, yi[2], yq[2];
  logic [1:0] tin, tout[2];
  int checks = 0, failures = 0;

  fft64 #(.INVERSE(1'b0)) f0 (.clk, .rst_n, .clear(1'b0), .in_i(xi), .in_q(xq), .in_tag(tin),
    .in_valid(iv[0]), .in_ready(ir[0]), .out_i(yi[0]), .out_q(yq[0]), .out_tag(tout[0]),
    .out_valid(ov[0]), .out_ready(ordy));
  fft64 #(.INVERSE(1'b1)) f1 (.clk, .rst_n, .clear(1'b0), .in_i(xi), .in_q(xq), .in_tag(tin),
    .in_valid(iv[1]), .in_ready(ir[1]), .out_i(yi[1]), .out_q(yq[1]), .out_tag(tout[1]),
    .out_valid(ov[1]), .out_ready(ordy));

  task automatic run(int inv, int kind);
    int ar[64], ai[64];
    int cyc;
    for (int n = 0; n < 64; n++) begin
      if (kind == 0) begin ar[n] = int'($urandom % 4001) - 2000; ai[n] = int'($urandom % 4001) - 2000; end
      else begin
        real a;
        a = 2.0 * 3.14159265358979 * kind * n / 64.0;
        ar[n] = int'(3000.0 * $cos(a)); ai[n] = int'(3000.0 * $sin(a));
      end
    end
    tin = 2'(kind + inv);
    cyc = 0;
    for (int n = 0; n < 64; n++) begin
      xi = SW'(ar[n]); xq = SW'(ai[n]);
      iv[inv] = 1; @(negedge clk); cyc++;
    end
    iv[inv] = 0;
    while (!ov[inv]) begin @(negedge clk); cyc++; end
    checks++; if (cyc < 64 + 192 || cyc > 64 + 192 + 3) begin failures++; $display("latency %0d", cyc); end
    for (int k = 0; k < 64; k++) begin
      real er, ei, s;
      er = 0; ei = 0;
      s = inv ? 1.0 : -1.0;
      for (int n = 0; n < 64; n++) begin
        real a;
        a = s * 2.0 * 3.14159265358979 * n * k / 64.0;
        er += ar[n] * $cos(a) - ai[n] * $sin(a);
        ei += ar[n] * $sin(a) + ai[n] * $cos(a);
      end
      er /= 8.0; ei /= 8.0;
      checks++;
      if ((yi[inv] - er) > 12.0 || (er - yi[inv]) > 12.0 || (yq[inv] - ei) > 12.0 || (ei - yq[inv]) > 12.0) begin
        failures++;
        if (failures < 10) $display("inv %0d kind %0d bin %0d got %0d %0d exp %f %f", inv, kind, k, yi[inv], yq[inv], er, ei);
      end
      checks++; if (tout[inv] != 2'(kind + inv)) failures++;
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1; iv[0] = 0; iv[1] = 0; ordy = 1;
    for (int inv = 0; inv < 2; inv++) begin
      run(inv, 0); run(inv, 0); run(inv, 1); run(inv, 3);
    end
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
