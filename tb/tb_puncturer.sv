// tb_puncturer -- feeds random encoder pairs for each rate with random stalls on both
// sides and compares the serial output with the punctured stream of h2_ref_pkg. Also
// checks the rate: one output bit per clock when never stalled.
module tb_puncturer;
  import h2_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, a, b, iv, ir, ob, ov, ordy;
  logic [1:0] rate;
  int checks = 0, failures = 0;

  puncturer dut (.clk, .rst_n, .clear, .rate, .in_a(a), .in_b(b), .in_valid(iv),
    .in_ready(ir), .out_bit(ob), .out_valid(ov), .out_ready(ordy));

  bit qa[$], qb[$], exp[$], got[$];
  int ia;
  bit stall;
  assign a  = (ia < qa.size()) ? qa[ia] : 1'b0;
  assign b  = (ia < qb.size()) ? qb[ia] : 1'b0;
  always @(posedge clk) begin
    if (iv && ir) ia <= ia + 1;
    if (ov && ordy) got.push_back(ob);
  end

  initial begin
    int modes[3] = '{0, 1, 4};
    repeat (2) @(negedge clk);
    rst_n = 1; iv = 0; ordy = 1;
    for (int r = 0; r < 3; r++) for (int st = 0; st < 2; st++) begin
      int cyc;
      qa.delete(); qb.delete(); got.delete();
      for (int i = 0; i < 180; i++) begin qa.push_back(1'($urandom)); qb.push_back(1'($urandom)); end
      ref_puncture(qa, qb, modes[r], exp);
      rate = 2'(r); clear = 1; ia = 0; @(negedge clk); clear = 0;
      cyc = 0;
      while (got.size() < exp.size() && cyc < 5000) begin
        iv   = (ia < qa.size()) && (st == 0 || ($urandom % 3) != 0);
        ordy = (st == 0) || ($urandom % 3) != 0;
        @(negedge clk); cyc++;
      end
      iv = 0;
      checks++; if (got.size() != exp.size()) failures++;
      foreach (exp[i]) begin checks++; if (i >= got.size() || got[i] !== exp[i]) failures++; end
      if (st == 0) begin checks++; if (cyc > exp.size() + 2) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
