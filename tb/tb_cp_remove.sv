// tb_cp_remove -- numbered samples arrive one per sample strobe for bursts with a long
// preamble, a short preamble and none; the output must be exactly the first copy of the
// long training symbol (tagged training) and the 64 useful samples of every data symbol
// (the last one tagged last), with nothing taken from the short training field, guards
// or prefixes. A second part holds the output back so both banks fill and checks `ovf`.
module tb_cp_remove;
  import h2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, start, iv, ov, ordy, active, ovf;
  pre_e pre;
  logic [8:0] nsym;
  logic [1:0] otag;
  logic signed [SW-1:0] ii, iq, oi, oq;
  int checks = 0, failures = 0;

  cp_remove dut (.clk, .rst_n, .clear, .start, .pre, .nsym, .in_i(ii), .in_q(iq), .in_valid(iv),
    .out_i(oi), .out_q(oq), .out_tag(otag), .out_valid(ov), .out_ready(ordy), .active, .ovf);

  int exp_v[$], exp_t[$], got;
  always @(posedge clk) if (rst_n && ov && ordy) begin
    checks++;
    if (got >= exp_v.size() || oi != SW'(exp_v[got]) || oq != SW'(-exp_v[got]) || otag != 2'(exp_t[got])) begin
      failures++;
      if (failures < 10) $display("out %0d got %0d tag %0d", got, oi, otag);
    end
    got++;
  end

  task automatic burst(int p, int ns, bit hold);
    int len, n;
    exp_v.delete(); exp_t.delete(); got = 0;
    n = 0;
    if (p == 2) n += 160;
    if (p >= 1) begin
      for (int k = 0; k < 64; k++) begin exp_v.push_back(n + 32 + k); exp_t.push_back(2); end
      n += 160;
    end
    for (int s = 0; s < ns; s++) begin
      for (int k = 0; k < 64; k++) begin exp_v.push_back(n + 16 + k); exp_t.push_back(s == ns - 1); end
      n += 80;
    end
    len = n;
    pre = pre_e'(p); nsym = 9'(ns); start = 1; @(negedge clk); start = 0;
    ordy = !hold;
    for (int i = 0; i < len + 20; i++) begin
      ii = SW'(i); iq = SW'(-i); iv = 1; @(negedge clk);
      iv = 0; repeat (4) @(negedge clk);
    end
    if (!hold) begin
      checks++; if (got != exp_v.size()) begin failures++; $display("count %0d of %0d", got, exp_v.size()); end
      checks++; if (active || ovf) failures++;
    end else begin
      checks++; if (!ovf) failures++;
      ordy = 1;
      clear = 1; @(negedge clk); clear = 0;
      checks++; if (ovf || ov) failures++;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1; iv = 0; ordy = 1; start = 0; clear = 0;
    burst(2, 3, 0);
    burst(1, 5, 0);
    burst(0, 2, 0);
    burst(2, 1, 0);
    burst(0, 4, 1);
    burst(1, 2, 0);
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
