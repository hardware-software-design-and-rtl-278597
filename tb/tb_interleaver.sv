// tb_interleaver -- interleaver and deinterleaver against the permutation formula of
// h2_ref_pkg for every bits-per-subcarrier value, several symbols back to back with
// random stalls; the deinterleaver must restore the interleaver's input. Also checks
// that one bit per clock passes when nothing stalls.
module tb_interleaver;
  import h2_pkg::*;
  import h2_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, ib, iv, ir, mb, mv, mr, ob, ov, ordy;
  mode_e mode;
  int checks = 0, failures = 0;

  interleaver #(.DEINT(1'b0)) dut (.clk, .rst_n, .clear, .mode, .in_bit(ib), .in_valid(iv),
    .in_ready(ir), .out_bit(mb), .out_valid(mv), .out_ready(mr));
  interleaver #(.DEINT(1'b1)) dei (.clk, .rst_n, .clear, .mode, .in_bit(mb), .in_valid(mv),
    .in_ready(mr), .out_bit(ob), .out_valid(ov), .out_ready(ordy));

  bit src[$], mid[$], got[$], exp[$];
  int ii;
  assign ib = (ii < src.size()) ? src[ii] : 1'b0;
  always @(posedge clk) begin
    if (iv && ir) ii <= ii + 1;
    if (mv && mr) mid.push_back(mb);
    if (ov && ordy) got.push_back(ob);
  end

  initial begin
    int ms[4] = '{0, 2, 4, 6};
    repeat (2) @(negedge clk);
    rst_n = 1; iv = 0; ordy = 1;
    foreach (ms[m]) for (int st = 0; st < 2; st++) begin
      int n, cyc, first_out;
      n = 48 * ref_nbpsc(ms[m]);
      src.delete(); mid.delete(); got.delete();
      for (int i = 0; i < 3 * n; i++) src.push_back(1'($urandom));
      ref_interleave(src, ms[m], exp);
      mode = mode_e'(ms[m]); clear = 1; ii = 0; @(negedge clk); clear = 0;
      cyc = 0;
      while (got.size() < src.size() && cyc < 20000) begin
        iv   = (ii < src.size()) && (st == 0 || ($urandom % 4) != 0);
        ordy = (st == 0) || ($urandom % 4) != 0;
        @(negedge clk); cyc++;
      end
      iv = 0;
      foreach (exp[i]) begin checks++; if (i >= mid.size() || mid[i] !== exp[i]) failures++; end
      foreach (src[i]) begin checks++; if (i >= got.size() || got[i] !== src[i]) failures++; end
      // three symbols through two ping-pong stages: 3n + 2n clocks plus a few
      if (st == 0) begin checks++; if (cyc > 5 * n + 8) begin failures++; $display("slow %0d", cyc); end end
    end
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
