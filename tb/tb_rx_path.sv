// tb_rx_path -- receive path test: transmit path -> two-tap channel -> receive path.
//
// The transmit path (checked on its own against the reference model) produces a
// burst; the channel applies y(n) = g0 x(n) + g1 x(n-1) with complex taps, a
// frequency-selective channel inside the cyclic prefix. The receive path must return
// exactly the payload bytes, raise `done` once, and never overflow. All seven modes
// and all three preamble kinds are used; the receive path is armed before the burst.
module tb_rx_path;
  import h2_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic smp_en, start, tbusy, tdone, byte_valid, byte_ready, iq_valid;
  logic rbusy, rdone, rbv, ovf;
  logic [7:0] rbyte;
  logic [2:0] div;
  burst_t burst;
  logic [7:0] byte_in;
  logic signed [SW-1:0] iq_i, iq_q, ch_i, ch_q, prev_i, prev_q;
  int checks = 0, failures = 0;
  int g0r = 800, g0i = 300, g1r = 150, g1i = -100;    // taps in 1/1024

  tx_path u_tx (.clk, .rst_n, .smp_en, .start, .burst, .flush(1'b0), .busy(tbusy),
    .done(tdone), .byte_in, .byte_valid, .byte_ready, .iq_i, .iq_q, .iq_valid);

  rx_path dut (.clk, .rst_n, .start, .burst, .flush(1'b0), .busy(rbusy), .done(rdone),
    .rx_i(ch_i), .rx_q(ch_q), .rx_valid(iq_valid), .byte_out(rbyte), .byte_valid(rbv), .ovf);

  always @(posedge clk) div <= (div == 4) ? 3'd0 : div + 3'd1;
  assign smp_en = (div == 4);

  always_comb begin
    int yr, yi;
    yr = (g0r * iq_i - g0i * iq_q + g1r * prev_i - g1i * prev_q) / 1024;
    yi = (g0r * iq_q + g0i * iq_i + g1r * prev_q + g1i * prev_i) / 1024;
    ch_i = SW'(yr);
    ch_q = SW'(yi);
  end
  always @(posedge clk) if (start) begin prev_i <= '0; prev_q <= '0; end
                           else if (iq_valid) begin prev_i <= iq_i; prev_q <= iq_q; end

  byte unsigned payload[$], got[$];
  int bidx, ndone;
  assign byte_valid = tbusy && bidx < payload.size();
  assign byte_in    = (bidx < payload.size()) ? payload[bidx] : 8'h00;
  always @(posedge clk) begin
    if (start) bidx <= 0; else if (byte_valid && byte_ready) bidx <= bidx + 1;
    if (rbv) got.push_back(rbyte);
    if (rdone) ndone <= ndone + 1;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic run_burst(int mode, int nbytes, pre_e pre);
    int errs;
    payload.delete(); got.delete(); ndone = 0;
    for (int i = 0; i < nbytes; i++) payload.push_back(8'($urandom));
    burst.mode = mode_e'(mode); burst.pre = pre; burst.nbytes = 13'(nbytes);
    burst.seed = 7'h70 | 7'($urandom % 16);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (tdone);
    fork
      wait (rdone);
      repeat (20000) @(negedge clk);
    join_any
    disable fork;
    repeat (5) @(negedge clk);
    chk(got.size() == nbytes, $sformatf("mode %0d: %0d bytes received", mode, got.size()));
    errs = 0;
    for (int i = 0; i < nbytes && i < got.size(); i++) if (got[i] != payload[i]) errs++;
    chk(errs == 0, $sformatf("mode %0d: %0d byte errors", mode, errs));
    chk(ndone == 1, "one done pulse");
    chk(!ovf, "no overflow");
    chk(!rbusy, "receive path idle");
  endtask

  initial begin
    start = 0; burst = '0; div = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_burst(0, 15, PRE_LONG);
    run_burst(1, 9, PRE_SHORT);
    run_burst(2, 27, PRE_SHORT);
    run_burst(3, 54, PRE_LONG);
    run_burst(4, 54, PRE_SHORT);
    run_burst(5, 54, PRE_SHORT);
    run_burst(6, 108, PRE_SHORT);
    // no preamble: the channel estimate of the previous burst is reused
    run_burst(3, 9, PRE_NONE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
