// tb_depuncture -- for each code rate, random encoder pairs are punctured by the
// reference function and fed to the depuncturer with random stalls; every output pair
// must carry the original kept bits, and the erasure flags must sit exactly on the
// deleted positions (3/4: a at phase 2, b at phase 1; 9/16: a at phase 4, b at 8).
module tb_depuncture;
  import h2_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, ib, iv, ir, oa, ob, ea, eb, ov, ordy;
  logic [1:0] rate;
  int checks = 0, failures = 0;

  depuncture dut (.clk, .rst_n, .clear, .rate, .in_bit(ib), .in_valid(iv), .in_ready(ir),
    .out_a(oa), .out_b(ob), .out_ea(ea), .out_eb(eb), .out_valid(ov), .out_ready(ordy));

  bit a[$], b[$], s[$];
  int si, np;
  assign ib = (si < s.size()) ? s[si] : 1'b0;
  always @(posedge clk) if (rst_n && !clear) begin
    if (iv && ir) si <= si + 1;
    if (ov && ordy) begin
      bit ka, kb;
      ka = 1; kb = 1;
      if (rate == 1) begin ka = (np % 3) != 2; kb = (np % 3) != 1; end
      if (rate == 2) begin ka = (np % 9) != 4; kb = (np % 9) != 8; end
      checks++;
      if (ea != !ka || eb != !kb || (ka && oa != a[np]) || (kb && ob != b[np])) begin
        failures++;
        if (failures < 10) $display("rate %0d pair %0d got %b%b e%b%b exp %b%b k%b%b", rate, np, oa, ob, ea, eb, a[np], b[np], ka, kb);
      end
      np <= np + 1;
    end
  end

  initial begin
    int modes[3] = '{0, 1, 4};
    repeat (2) @(negedge clk);
    rst_n = 1; iv = 0; ordy = 1;
    for (int r = 0; r < 3; r++) begin
      int cyc;
      a.delete(); b.delete();
      for (int i = 0; i < 9 * 40; i++) begin a.push_back(1'($urandom)); b.push_back(1'($urandom)); end
      ref_puncture(a, b, modes[r], s);
      rate = 2'(r); clear = 1; @(negedge clk); clear = 0; si = 0; np = 0;
      cyc = 0;
      while (np < a.size() && cyc < 10000) begin
        iv = (si < s.size()) && ($urandom % 4) != 0;
        ordy = ($urandom % 4) != 0;
        @(negedge clk); cyc++;
      end
      iv = 0;
      checks++; if (np != a.size() || si != s.size()) begin failures++; $display("count %0d %0d", np, si); end
    end
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
