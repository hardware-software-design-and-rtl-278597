// tb_tx_ctrl -- runs bursts of random mode, preamble kind and length through the burst
// controller with random handshakes and checks: the payload bits (LSB first, not
// bypassed), 6 tail bits plus pad as bypassed zeros up to N_SYM * N_DBPS, the symbol
// request order (short then long training for the long preamble, long only for the
// short one, none without), N_SYM from ceil((8*bytes + 6) / N_DBPS), the last-symbol
// tag, scrambler load with the seed, busy until done, and that flush stops a burst.
module tb_tx_ctrl;
  import h2_pkg::*;
  import h2_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, flush, busy, clear, scr_load, bv, br, bit_out, bit_bypass, bit_valid, bit_ready;
  logic sym_last, sym_valid, sym_ready, tx_done;
  logic [1:0] sym_kind;
  logic [6:0] scr_seed;
  logic [7:0] byte_in;
  mode_e mode;
  burst_t burst;
  int checks = 0, failures = 0;

  tx_ctrl dut (.clk, .rst_n, .start, .burst, .flush, .busy, .mode, .clear, .scr_load, .scr_seed,
    .byte_in, .byte_valid(bv), .byte_ready(br), .bit_out, .bit_bypass, .bit_valid, .bit_ready,
    .sym_kind, .sym_last, .sym_valid, .sym_ready, .tx_done);

  byte unsigned data[$];
  int bi;
  bit gb[$], gy[$];
  int gk[$], gl[$];
  assign byte_in = (bi < data.size()) ? data[bi] : 8'h00;
  always @(posedge clk) begin
    if (bv && br) bi <= bi + 1;
    if (bit_valid && bit_ready) begin gb.push_back(bit_out); gy.push_back(bit_bypass); end
    if (sym_valid && sym_ready) begin gk.push_back(sym_kind); gl.push_back(sym_last); end
  end

  task automatic one(int m, int pre, int nbytes, bit do_flush);
    int ns, nd, cyc, npre;
    data.delete(); gb.delete(); gy.delete(); gk.delete(); gl.delete();
    for (int i = 0; i < nbytes; i++) data.push_back(8'($urandom));
    bi = 0;
    burst.mode = mode_e'(m); burst.pre = pre_e'(pre); burst.nbytes = 13'(nbytes);
    burst.seed = 7'($urandom | 1);
    start = 1; #1;
    checks++; if (!scr_load || scr_seed != burst.seed || !clear) failures++;
    @(negedge clk); start = 0;
    checks++; if (!busy || mode != mode_e'(m)) failures++;
    nd = ref_ndbps(m); ns = ref_nsym(nbytes, m);
    npre = (pre_e'(pre) == PRE_LONG) ? 2 : (pre_e'(pre) == PRE_SHORT) ? 1 : 0;
    cyc = 0;
    while ((gb.size() < ns * nd || gk.size() < npre + ns) && cyc < 100000) begin
      bv = ($urandom % 3) != 0; bit_ready = ($urandom % 3) != 0; sym_ready = ($urandom % 5) == 0;
      if (do_flush && cyc == 40) begin flush = 1; @(negedge clk); flush = 0; break; end
      @(negedge clk); cyc++;
    end
    bv = 0; bit_ready = 1; sym_ready = 1;
    repeat (5) @(negedge clk);
    if (do_flush) begin
      checks++; if (busy || bit_valid || sym_valid) failures++;
      return;
    end
    checks++; if (gb.size() != ns * nd || gk.size() != npre + ns) begin
      failures++; $display("sizes %0d/%0d %0d/%0d", gb.size(), ns * nd, gk.size(), npre + ns);
    end
    for (int i = 0; i < gb.size(); i++) begin
      checks++;
      if (i < 8 * nbytes) begin
        if (gy[i] || gb[i] != data[i / 8][i % 8]) failures++;
      end else if (!gy[i] || gb[i]) failures++;
    end
    for (int i = 0; i < gk.size(); i++) begin
      int ek;
      ek = (i >= npre) ? 0 : (npre == 2 && i == 0) ? 1 : 2;
      checks++;
      if (gk[i] != ek || gl[i] != (i == npre + ns - 1)) begin failures++; $display("sym %0d kind %0d last %0d", i, gk[i], gl[i]); end
    end
    checks++; if (!busy) failures++;
    tx_done = 1; @(negedge clk); tx_done = 0;
    checks++; if (busy) failures++;
  endtask

  initial begin
    int ms[7] = '{0, 1, 2, 3, 4, 5, 6};
    int nb[4] = '{9, 15, 27, 54};
    repeat (2) @(negedge clk);
    rst_n = 1; start = 0; flush = 0; bv = 0; bit_ready = 0; sym_ready = 0; tx_done = 0;
    for (int r = 0; r < 40; r++) one(ms[$urandom % 7], $urandom % 3, nb[$urandom % 4] * (1 + $urandom % 3), 0);
    one(6, 2, 54, 1);
    one(3, 1, 27, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
