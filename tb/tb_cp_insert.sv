// tb_cp_insert -- feeds a training symbol and three data symbols of random samples and
// checks the output stream: 32-sample guard plus two copies for training, 16-sample
// prefix plus the symbol for data, one sample per sample strobe (every fifth clock),
// no gap between symbols, and `done` exactly after the last sample of the last symbol.
module tb_cp_insert;
  import h2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, smp_en, iv, ir, ov, done;
  logic [1:0] itag;
  logic signed [SW-1:0] ii, iq, oi, oq;
  int checks = 0, failures = 0;

  cp_insert dut (.clk, .rst_n, .clear, .smp_en, .in_i(ii), .in_q(iq), .in_tag(itag),
    .in_valid(iv), .in_ready(ir), .out_i(oi), .out_q(oq), .out_valid(ov), .done);

  int si[4][64], sq[4][64];
  int ei[$], eq[$];
  int got, ndone, stray, last_out_clk, gaps, clk_n;
  int s5;
  always @(posedge clk) begin
    s5 <= (s5 == 4) ? 0 : s5 + 1;
    clk_n <= clk_n + 1;
  end
  assign smp_en = (s5 == 4);
  always @(posedge clk) if (rst_n) begin
    if (ov) begin
      checks++;
      if (got >= ei.size() || oi != ei[got] || oq != eq[got]) begin
        failures++;
        if (failures < 10) $display("sample %0d got %0d %0d", got, oi, oq);
      end
      if (got > 0 && clk_n - last_out_clk != 5) gaps++;
      last_out_clk = clk_n;
      got++;
    end
    if (done) begin
      ndone++;
      if (got != ei.size()) stray++;
    end
  end

  initial begin
    s5 = 0; clk_n = 0; got = 0; ndone = 0; stray = 0; gaps = 0;
    for (int s = 0; s < 4; s++) for (int n = 0; n < 64; n++) begin
      si[s][n] = int'($urandom % 60001) - 30000; sq[s][n] = int'($urandom % 60001) - 30000;
    end
    for (int n = 0; n < 160; n++) begin
      int k;
      k = (n < 32) ? n + 32 : (n - 32) % 64;
      ei.push_back(si[0][k]); eq.push_back(sq[0][k]);
    end
    for (int s = 1; s < 4; s++) for (int n = 0; n < 80; n++) begin
      int k;
      k = (n < 16) ? n + 48 : n - 16;
      ei.push_back(si[s][k]); eq.push_back(sq[s][k]);
    end
    repeat (2) @(negedge clk);
    rst_n = 1; iv = 0; clear = 1; @(negedge clk); clear = 0;
    for (int s = 0; s < 4; s++) for (int n = 0; n < 64; n++) begin
      ii = SW'(si[s][n]); iq = SW'(sq[s][n]); itag = {s == 0, s == 3}; iv = 1;
      while (!ir) @(negedge clk);
      @(negedge clk);
    end
    iv = 0;
    repeat (400 * 5) @(negedge clk);
    checks++; if (got != ei.size()) begin failures++; $display("count %0d", got); end
    checks++; if (ndone != 1 || stray != 0) begin failures++; $display("done %0d %0d", ndone, stray); end
    checks++; if (gaps != 0) begin failures++; $display("gaps %0d", gaps); end
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
