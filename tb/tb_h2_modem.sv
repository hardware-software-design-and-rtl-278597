// tb_h2_modem -- end-to-end test of two modems, an access point (AP) and a mobile
// terminal (MT), at the default parameters (2 ms frame of 5000 slots of 400 ns).
//
// Both are programmed over their APB ports, like the processor would, with a command
// program modelled on a MAC frame: the AP sends a broadcast burst (BCH, long
// preamble) that the MT finds with BCH_SRCH, re-timing its slot counter; then a
// frame-control burst (short preamble), a train of 4 short and 12 long packets (no
// preamble, QPSK 3/4); the MT answers with uplink bursts with short and long
// preambles in 16-QAM and 64-QAM. A two-tap channel joins the modems. The test
// checks every received byte in both receive memories, the interrupt counts, the
// halt of both programs, and that each mechanism happened: every command type,
// every preamble kind, the synchronisation, the RF gating of the receiver, the
// pointer reset and the flush.
module tb_h2_modem;
  import h2_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  typedef struct packed {
    logic psel, penable, pwrite;
    logic [15:0] paddr;
    logic [31:0] pwdata;
  } apb_t;
  apb_t ab, mb;
  logic [31:0] ap_rd, mt_rd;
  logic ap_rdy, mt_rdy, ap_err, mt_err, ap_iqen, mt_iqen, ap_txv, mt_txv, ap_ovf, mt_ovf;
  logic [2:0] ap_irq, mt_irq;
  logic signed [SW-1:0] ap_ti, ap_tq, mt_ti, mt_tq, a2m_i, a2m_q, m2a_i, m2a_q;
  logic signed [SW-1:0] ap_pi, ap_pq, mt_pi, mt_pq;
  int checks = 0, failures = 0;
  logic last_err;

  h2_modem u_ap (.clk, .rst_n, .psel(ab.psel), .penable(ab.penable), .pwrite(ab.pwrite),
    .paddr(ab.paddr), .pwdata(ab.pwdata), .prdata(ap_rd), .pready(ap_rdy), .pslverr(ap_err),
    .irq(ap_irq), .iq_en(ap_iqen), .tx_i(ap_ti), .tx_q(ap_tq), .tx_valid(ap_txv),
    .rx_i(m2a_i), .rx_q(m2a_q), .rx_valid(mt_txv), .rx_ovf(ap_ovf));

  h2_modem u_mt (.clk, .rst_n, .psel(mb.psel), .penable(mb.penable), .pwrite(mb.pwrite),
    .paddr(mb.paddr), .pwdata(mb.pwdata), .prdata(mt_rd), .pready(mt_rdy), .pslverr(mt_err),
    .irq(mt_irq), .iq_en(mt_iqen), .tx_i(mt_ti), .tx_q(mt_tq), .tx_valid(mt_txv),
    .rx_i(a2m_i), .rx_q(a2m_q), .rx_valid(ap_txv), .rx_ovf(mt_ovf));

  // two-tap channel in each direction, taps in 1/1024
  function automatic logic signed [SW-1:0] tap(int ar, int ai, int br, int bi, int x0r,
                                                int x0i, int x1r, int x1i, bit im);
    int r;
    r = im ? (ar * x0i + ai * x0r + br * x1i + bi * x1r) : (ar * x0r - ai * x0i + br * x1r - bi * x1i);
    return SW'(r / 1024);
  endfunction
  logic signed [SW-1:0] a2m_ci, a2m_cq;
  assign a2m_ci = tap(850, 250, 120, -90, ap_ti, ap_tq, ap_pi, ap_pq, 0);
  assign a2m_cq = tap(850, 250, 120, -90, ap_ti, ap_tq, ap_pi, ap_pq, 1);
  // carrier frequency offset on the downlink: cfo_f turns per sample, the phase running
  // with time (five clocks per sample)
  real cfo_f;
  longint clk_n;
  always @(posedge clk) clk_n <= clk_n + 1;
  always_comb begin
    real ph, xr, xi;
    ph = 2.0 * 3.14159265358979 * cfo_f * real'(clk_n) / 5.0;
    xr = real'(a2m_ci) * $cos(ph) - real'(a2m_cq) * $sin(ph);
    xi = real'(a2m_ci) * $sin(ph) + real'(a2m_cq) * $cos(ph);
    a2m_i = SW'($rtoi(xr >= 0.0 ? xr + 0.5 : xr - 0.5));
    a2m_q = SW'($rtoi(xi >= 0.0 ? xi + 0.5 : xi - 0.5));
  end
  assign m2a_i = tap(700, -400, -100, 80, mt_ti, mt_tq, mt_pi, mt_pq, 0);
  assign m2a_q = tap(700, -400, -100, 80, mt_ti, mt_tq, mt_pi, mt_pq, 1);
  always @(posedge clk) begin
    if (ap_txv) begin ap_pi <= ap_ti; ap_pq <= ap_tq; end else if (!ap_txv && !u_ap.tx_busy) begin ap_pi <= '0; ap_pq <= '0; end
    if (mt_txv) begin mt_pi <= mt_ti; mt_pq <= mt_tq; end else if (!mt_txv && !u_mt.tx_busy) begin mt_pi <= '0; mt_pq <= '0; end
  end

  // ---------------- APB access ----------------
  task automatic apb_wr(bit mt, logic [15:0] a, logic [31:0] d);
    apb_t t;
    t = '{psel: 1, penable: 0, pwrite: 1, paddr: a, pwdata: d};
    @(negedge clk) if (mt) mb = t; else ab = t;
    @(negedge clk) if (mt) mb.penable = 1; else ab.penable = 1;
    @(negedge clk) if (mt) mb = '0; else ab = '0;
  endtask

  task automatic apb_rd(bit mt, logic [15:0] a, output logic [31:0] d);
    apb_t t;
    t = '{psel: 1, penable: 0, pwrite: 0, paddr: a, pwdata: 0};
    @(negedge clk) if (mt) mb = t; else ab = t;
    @(negedge clk) if (mt) mb.penable = 1; else ab.penable = 1;
    #1 d = mt ? mt_rd : ap_rd;
    last_err = mt ? mt_err : ap_err;
    @(negedge clk) if (mt) mb = '0; else ab = '0;
  endtask

  function automatic logic [31:0] cmd(op_e op, int slot, bit p1 = 0, ptype_e pt = PT_BCH,
                                      int npkt = 0, mode_e m = M_BPSK12, int arg = 0);
    cmd_t c;
    c = '{op: op, slot: 13'(slot), p1: p1, ptype: pt, npkt: 4'(npkt), mode: m, arg: 4'(arg)};
    return 32'(c);
  endfunction

  function automatic logic [31:0] cmd_reset(int slot, int frames, int sync_slot);
    return {OP_RESET, 13'(slot), 2'(frames), 13'(sync_slot)};
  endfunction

  // ---------------- payloads ----------------
  byte unsigned ap_tx[$], mt_tx[$];      // bytes in transmit-memory order (word aligned)
  int ap_off[$], ap_len[$], mt_off[$], mt_len[$];

  task automatic add_payload(bit mt, int nbytes);
    int off;
    if (mt) begin
      while (mt_tx.size() % 4) mt_tx.push_back(8'h00);
      off = mt_tx.size(); mt_off.push_back(off); mt_len.push_back(nbytes);
      for (int i = 0; i < nbytes; i++) mt_tx.push_back(8'($urandom));
    end else begin
      while (ap_tx.size() % 4) ap_tx.push_back(8'h00);
      off = ap_tx.size(); ap_off.push_back(off); ap_len.push_back(nbytes);
      for (int i = 0; i < nbytes; i++) ap_tx.push_back(8'($urandom));
    end
  endtask

  task automatic load_tx_mem(bit mt);
    int n;
    n = mt ? mt_tx.size() : ap_tx.size();
    for (int w = 0; w < (n + 3) / 4; w++) begin
      logic [31:0] d;
      d = '0;
      for (int b = 0; b < 4; b++)
        if (4 * w + b < n) d[8*b +: 8] = mt ? mt_tx[4*w+b] : ap_tx[4*w+b];
      apb_wr(mt, 16'h1000 + 16'(4 * w), d);
    end
  endtask

  task automatic load_prog(bit mt, logic [31:0] p[$]);
    foreach (p[i]) apb_wr(mt, 16'(4 * i), p[i]);
  endtask

  // ---------------- mechanism counters ----------------
  int op_seen[12];
  int pre_seen[3];
  int ap_irq_cnt[3], mt_irq_cnt[3];
  int gated_samples, sync_found, flushes, ptr_resets, leaked;
  logic [2:0] ap_irq_q, mt_irq_q;

  always @(posedge clk) if (rst_n) begin
    // a command is executed when the translator leaves its wait state
    if (u_ap.u_if.u_ct.st == 3'd4 && u_ap.u_if.u_ct.cur_op <= OP_CFG &&
        !(((u_ap.u_if.u_ct.cur_op inside {OP_TX, OP_TX_S, OP_TX_L}) && u_ap.tx_busy) ||
          ((u_ap.u_if.u_ct.cur_op inside {OP_RX, OP_RX_S, OP_RX_L}) && u_ap.rx_busy)))
      op_seen[u_ap.u_if.u_ct.cur_op] <= op_seen[u_ap.u_if.u_ct.cur_op] + 1;
    if (u_mt.u_if.u_ct.st == 3'd4 && u_mt.u_if.u_ct.cur_op <= OP_CFG &&
        !(((u_mt.u_if.u_ct.cur_op inside {OP_TX, OP_TX_S, OP_TX_L}) && u_mt.tx_busy) ||
          ((u_mt.u_if.u_ct.cur_op inside {OP_RX, OP_RX_S, OP_RX_L}) && u_mt.rx_busy)))
      op_seen[u_mt.u_if.u_ct.cur_op] <= op_seen[u_mt.u_if.u_ct.cur_op] + 1;
    if (u_mt.u_if.u_ct.search && u_mt.u_if.u_ct.st == 3'd5 && u_mt.u_if.found) begin
      op_seen[OP_BCH_SRCH] <= op_seen[OP_BCH_SRCH] + 1;
      sync_found <= sync_found + 1;
    end
    if (u_ap.tx_start) pre_seen[u_ap.tx_burst.pre] <= pre_seen[u_ap.tx_burst.pre] + 1;
    if (u_mt.tx_start) pre_seen[u_mt.tx_burst.pre] <= pre_seen[u_mt.tx_burst.pre] + 1;
    if ((ap_txv && !mt_iqen) || (mt_txv && !ap_iqen)) gated_samples <= gated_samples + 1;
    if ((u_mt.rxv && !mt_iqen) || (u_ap.rxv && !ap_iqen)) leaked <= leaked + 1;
    if (u_ap.tx_flush || u_mt.rx_flush || u_ap.rx_flush || u_mt.tx_flush) flushes <= flushes + 1;
    if (u_ap.u_if.ptr_reset || u_mt.u_if.ptr_reset) ptr_resets <= ptr_resets + 1;
    ap_irq_q <= ap_irq; mt_irq_q <= mt_irq;
    for (int k = 0; k < 3; k++) begin
      if (u_ap.u_if.u_irq.evt[k]) ap_irq_cnt[k] <= ap_irq_cnt[k] + 1;
      if (u_mt.u_if.u_irq.evt[k]) mt_irq_cnt[k] <= mt_irq_cnt[k] + 1;
    end
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s", what); end
  endtask

  task automatic check_rx(bit mt, int off_rx, int tx_off, int len, string name);
    byte unsigned src[$];
    int errs;
    src = mt ? ap_tx : mt_tx;     // the MT receives what the AP sent and vice versa
    errs = 0;
    for (int w = off_rx / 4; w < (off_rx + len + 3) / 4; w++) begin
      logic [31:0] d;
      apb_rd(mt, 16'h2000 + 16'(4 * w), d);
      for (int b = 0; b < 4; b++) begin
        int i;
        i = 4 * w + b - off_rx;
        if (i >= 0 && i < len && d[8*b +: 8] != src[tx_off + i]) errs++;
      end
    end
    chk(errs == 0, $sformatf("%s: %0d byte errors in %0d bytes", name, errs, len));
  endtask

  localparam int SYNC_SLOT = 34;

  initial begin
    logic [31:0] p[$], d;
    ab = '0; mb = '0;
    cfo_f = (0.001 + 0.003 * real'($urandom % 1001) / 1000.0) * (($urandom % 2) ? 1.0 : -1.0);
    repeat (3) @(negedge clk);
    rst_n = 1;

    // AP payloads: BCH, FCH, 4 SCH, 12 LCH
    add_payload(0, 15); add_payload(0, 27); add_payload(0, 36); add_payload(0, 648);
    // MT payloads: LCH, 2 SCH, SCH
    add_payload(1, 54); add_payload(1, 18); add_payload(1, 9);
    load_tx_mem(0);
    load_tx_mem(1);

    // configuration: frame counter and search threshold
    apb_wr(0, 16'h0200, 32'd3);  apb_wr(0, 16'h0204, 32'd500000);
    apb_wr(1, 16'h0200, 32'd3);  apb_wr(1, 16'h0204, 32'd500000);
    apb_wr(0, 16'h0108, 32'h7);  apb_wr(1, 16'h0108, 32'h7);

    p = '{cmd(OP_CFG, 6), cmd(OP_NOP, 8), cmd_reset(10, 0, 0),
          cmd(OP_TX,   20, 1, PT_BCH, 1, M_BPSK12),
          cmd(OP_TX,  150, 1, PT_FCH, 1, M_BPSK12),
          cmd(OP_TX,  300, 0, PT_SCH, 4, M_QPSK34),
          cmd(OP_TX,  420, 0, PT_LCH, 12, M_QPSK34),
          cmd(OP_END, 1170, .arg(1)),
          cmd(OP_IQ_EN, 1180, .arg(1)),
          cmd(OP_RX_S, 1250, 1, PT_LCH, 1, M_QPSK34),
          cmd(OP_RX_L, 1390, 1, PT_SCH, 2, M_QAM16_916),
          cmd(OP_RX_S, 1500, 1, PT_SCH, 1, M_QAM64_34),
          cmd(OP_END, 1600, .arg(2)),
          cmd(OP_IQ_EN, 1610, .arg(0)),
          cmd(OP_TX, 1620, 1, PT_ACH, 1, M_BPSK34)};
    load_prog(0, p);
    apb_wr(0, 16'h0100, {17'd0, 7'(p.size()), 7'd0, 1'b1});

    p = '{cmd(OP_CFG, 2), cmd_reset(4, 0, SYNC_SLOT), cmd(OP_IQ_EN, 6, .arg(1)),
          cmd(OP_BCH_SRCH, 0),
          cmd(OP_RX,  145, 1, PT_FCH, 1, M_BPSK12),
          cmd(OP_RX,  295, 0, PT_SCH, 4, M_QPSK34),
          cmd(OP_RX,  415, 0, PT_LCH, 12, M_QPSK34),
          cmd(OP_END, 1200, .arg(2)),
          cmd(OP_IQ_EN, 1205, .arg(0)),
          cmd(OP_TX_S, 1255, 1, PT_LCH, 1, M_QPSK34),
          cmd(OP_TX_L, 1395, 1, PT_SCH, 2, M_QAM16_916),
          cmd(OP_TX_S, 1505, 1, PT_SCH, 1, M_QAM64_34),
          cmd(OP_END, 1590, .arg(1))};
    load_prog(1, p);
    apb_wr(1, 16'h0100, {17'd0, 7'(p.size()), 7'd0, 1'b1});

    // wait for both programs to halt
    do begin
      repeat (2000) @(negedge clk);
      apb_rd(0, 16'h010C, d);
    end while (!d[18] || d[16]);
    do begin
      repeat (200) @(negedge clk);
      apb_rd(1, 16'h010C, d);
    end while (!d[18] || d[16]);

    // received data: MT got FCH, SCH train, LCH train; AP got the three uplink bursts
    check_rx(1, 0,  ap_off[1], 27,  "MT FCH");
    check_rx(1, 28, ap_off[2], 36,  "MT SCH train");
    check_rx(1, 64, ap_off[3], 648, "MT LCH train");
    check_rx(0, 0,  mt_off[0], 54,  "AP LCH uplink QPSK 3/4");
    check_rx(0, 56, mt_off[1], 18,  "AP SCH uplink 16-QAM 9/16, long preamble");
    check_rx(0, 76, mt_off[2], 9,   "AP SCH uplink 64-QAM 3/4");

    // interrupts
    apb_rd(0, 16'h0104, d); chk(d[2:0] == 3'b110, $sformatf("AP irq status %b", d[2:0]));
    apb_rd(1, 16'h0104, d); chk(d[2:0] == 3'b111, $sformatf("MT irq status %b", d[2:0]));
    chk(ap_irq[2] && mt_irq[0], "interrupt lines");
    apb_wr(1, 16'h0104, 32'h1);
    apb_rd(1, 16'h0104, d); chk(d[2:0] == 3'b110, "MT irq clear");
    chk(ap_irq_cnt[2] == 5 && ap_irq_cnt[1] == 3, $sformatf("AP end events tx %0d rx %0d", ap_irq_cnt[2], ap_irq_cnt[1]));
    chk(mt_irq_cnt[2] == 3 && mt_irq_cnt[1] == 3 && mt_irq_cnt[0] == 1,
        $sformatf("MT events tx %0d rx %0d sync %0d", mt_irq_cnt[2], mt_irq_cnt[1], mt_irq_cnt[0]));
    chk(!ap_ovf && !mt_ovf, "no receive overflow");
    chk(!ap_err && !mt_err, "no bus error");
    apb_rd(0, 16'h3000, d); chk(last_err, "bus error for an unmapped address");

    // mechanisms
    foreach (op_seen[i]) begin
      op_e o;
      o = op_e'(i);
      chk(op_seen[i] > 0, $sformatf("command %s executed %0d times", o.name(), op_seen[i]));
      $display("command %-12s executed %0d times", o.name(), op_seen[i]);
    end
    foreach (pre_seen[i]) begin
      pre_e pk;
      pk = pre_e'(i);
      chk(pre_seen[i] > 0, $sformatf("preamble kind %s used %0d times", pk.name(), pre_seen[i]));
      $display("preamble %-10s used %0d times", pk.name(), pre_seen[i]);
    end
    $display("sync found %0d, samples ignored with RF receive off %0d, flushes %0d, pointer resets %0d",
             sync_found, gated_samples, flushes, ptr_resets);
    chk(sync_found == 1, "synchronisation found once");
    $display("downlink frequency offset %0.1f, estimate %0d (2**20 per turn per sample)",
             cfo_f * 1048576.0, u_mt.u_cfo.step);
    chk(u_mt.u_cfo.step - $rtoi(cfo_f * 1048576.0) <= 16 && $rtoi(cfo_f * 1048576.0) - u_mt.u_cfo.step <= 16,
        "frequency offset estimated in the mobile");
    chk(gated_samples > 0, "RF receive gating happened");
    chk(leaked == 0, $sformatf("%0d samples reached a receiver whose RF interface was off", leaked));
    chk(flushes > 0, "flush happened");
    chk(ptr_resets == 2, "pointer reset in both modems");

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
