// tb_cmd_translator -- runs a program covering every command against a command-memory
// model (one clock read latency) and a test slot counter (one slot per 4 clocks).
// Checks: each action happens at the command's slot (or after the busy path frees),
// the burst description (bytes = packets x packet size, mode, preamble rule), IQ_EN,
// END flush bits, RESET pointer reset and synchronisation fields, CFG load, BCH_SRCH
// waiting for `found`, halting after `ncmd` commands, and a restart from word 0.
module tb_cmd_translator;
  import h2_pkg::*;
  localparam int CAW = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic run, cm_en, tx_busy, rx_busy, tx_start, rx_start, iq_en, flush_tx, flush_rx, ptr_reset;
  logic slot_set_en, search, found, cfg_load, halted;
  logic [CAW:0] ncmd, pc;
  logic [CAW-1:0] cm_addr;
  logic [31:0] cm_rdata;
  logic [12:0] slot, sync_slot;
  logic [1:0] sync_frames;
  burst_t burst;
  op_e cur_op;
  int checks = 0, failures = 0;

  cmd_translator #(.CAW(CAW)) dut (.clk, .rst_n, .run, .ncmd, .cm_en, .cm_addr, .cm_rdata, .slot,
    .tx_busy, .rx_busy, .tx_start, .rx_start, .burst, .iq_en, .flush_tx, .flush_rx, .ptr_reset,
    .slot_set_en, .sync_slot, .sync_frames, .search, .found, .cfg_load, .halted, .pc, .cur_op);

  logic [31:0] cmem [1 << CAW];
  always @(posedge clk) if (cm_en) cm_rdata <= cmem[cm_addr];

  int div;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin slot <= '0; div <= 0; end
    else if (div == 3) begin div <= 0; slot <= (slot == 13'd4999) ? '0 : slot + 1'b1; end
    else div <= div + 1;

  function automatic logic [31:0] mk(op_e op, int sl, bit p1, ptype_e pt, int np, mode_e m, int arg);
    return {op, 13'(sl), p1, pt, 4'(np), m, 4'(arg)};
  endfunction

  // expected events: kind, slot, value
  typedef struct { string what; int sl; longint v; } ev_t;
  ev_t got[$];
  always @(posedge clk) if (rst_n) begin
    if (tx_start)  got.push_back('{"tx", slot, {burst.mode, burst.pre, burst.nbytes}});
    if (rx_start)  got.push_back('{"rx", slot, {burst.mode, burst.pre, burst.nbytes}});
    if (flush_tx || flush_rx) got.push_back('{"end", slot, {flush_rx, flush_tx}});
    if (ptr_reset) got.push_back('{"reset", slot, 0});
    if (cfg_load)  got.push_back('{"cfg", slot, 0});
    if (slot_set_en) got.push_back('{"found", slot, 0});
  end
  logic iq_q;
  always @(posedge clk) begin
    iq_q <= iq_en;
    if (rst_n && iq_en != iq_q) got.push_back('{"iq", slot, iq_en});
  end

  function automatic longint bd(mode_e m, pre_e p, int n);
    burst_t b;
    b = '0; b.mode = m; b.pre = p; b.nbytes = 13'(n);
    return {b.mode, b.pre, b.nbytes};
  endfunction

  initial begin
    ev_t exp[$];
    int n;
    repeat (2) @(negedge clk);
    rst_n = 1; run = 0; tx_busy = 0; rx_busy = 0; found = 0;
    n = 0;
    cmem[n++] = mk(OP_CFG, 10, 0, PT_BCH, 0, M_BPSK12, 0);              exp.push_back('{"cfg", 10, 0});
    cmem[n++] = mk(OP_RESET, 12, 1, ptype_e'(3'b110), 4'hA, mode_e'(3'd5), 4'hC);
    exp.push_back('{"reset", 12, 0});
    cmem[n++] = mk(OP_IQ_EN, 14, 0, PT_BCH, 0, M_BPSK12, 1);            exp.push_back('{"iq", 14, 1});
    cmem[n++] = mk(OP_TX, 20, 1, PT_BCH, 1, M_BPSK12, 0);               exp.push_back('{"tx", 20, bd(M_BPSK12, PRE_LONG, 15)});
    cmem[n++] = mk(OP_TX_S, 30, 1, PT_FCH, 2, M_QPSK34, 0);             // busy until slot 40
    exp.push_back('{"tx", 40, bd(M_QPSK34, PRE_SHORT, 54)});
    cmem[n++] = mk(OP_TX_L, 50, 1, PT_LCH, 3, M_QAM64_34, 0);           exp.push_back('{"tx", 50, bd(M_QAM64_34, PRE_LONG, 162)});
    cmem[n++] = mk(OP_TX, 55, 0, PT_SCH, 4, M_QAM16_916, 0);            exp.push_back('{"tx", 55, bd(M_QAM16_916, PRE_NONE, 36)});
    cmem[n++] = mk(OP_RX, 60, 1, PT_ACH, 1, M_BPSK34, 0);               exp.push_back('{"rx", 60, bd(M_BPSK34, PRE_SHORT, 9)});
    cmem[n++] = mk(OP_RX_S, 62, 1, PT_RCH, 2, M_QPSK12, 0);             exp.push_back('{"rx", 70, bd(M_QPSK12, PRE_SHORT, 18)});
    cmem[n++] = mk(OP_RX_L, 75, 1, PT_LCH, 1, M_QAM16_34, 0);           exp.push_back('{"rx", 75, bd(M_QAM16_34, PRE_LONG, 54)});
    cmem[n++] = mk(OP_NOP, 80, 0, PT_BCH, 0, M_BPSK12, 0);
    cmem[n++] = mk(OP_END, 85, 0, PT_BCH, 0, M_BPSK12, 3);              exp.push_back('{"end", 85, 3});
    cmem[n++] = mk(OP_IQ_EN, 90, 0, PT_BCH, 0, M_BPSK12, 0);            exp.push_back('{"iq", 90, 0});
    cmem[n++] = mk(OP_BCH_SRCH, 0, 0, PT_BCH, 0, M_BPSK12, 0);          exp.push_back('{"found", 120, 0});
    cmem[n++] = mk(OP_TX, 130, 1, PT_BCH, 1, M_BPSK12, 0);              exp.push_back('{"tx", 130, bd(M_BPSK12, PRE_LONG, 15)});
    cmem[n++] = mk(OP_TX, 20, 1, PT_BCH, 1, M_BPSK12, 0);               // beyond ncmd: never runs
    ncmd = 7'(n - 1);
    fork
      begin // TX_S finds the transmit path busy until slot 40, RX_S the receive path until 70
        wait (slot == 13'd21); tx_busy = 1; wait (slot == 13'd40); tx_busy = 0;
      end
      begin
        wait (slot == 13'd61); rx_busy = 1; wait (slot == 13'd70); rx_busy = 0;
      end
      begin
        wait (search); checks++; if (slot > 13'd100) failures++;
        wait (slot == 13'd120); @(negedge clk); found = 1; @(negedge clk); found = 0;
      end
    join_none
    @(negedge clk); run = 1;
    wait (halted);
    repeat (20) @(negedge clk);
    checks++; if (got.size() != exp.size()) begin failures++; $display("events %0d of %0d", got.size(), exp.size()); end
    foreach (exp[i]) begin
      checks++;
      if (i >= got.size() || got[i].what != exp[i].what || got[i].sl != exp[i].sl || got[i].v != exp[i].v) begin
        failures++;
        if (i < got.size()) $display("event %0d: got %s@%0d %h exp %s@%0d %h", i, got[i].what, got[i].sl, got[i].v,
                                     exp[i].what, exp[i].sl, exp[i].v);
      end
    end
    checks++; if (sync_frames != 2'b11 || sync_slot != {2'b10, 4'hA, 3'd5, 4'hC}) begin failures++; $display("sync %b %h", sync_frames, sync_slot); end
    checks++; if (pc != 7'(n - 2) || !halted) failures++;
    // restart: the program runs again from word 0
    got.delete();
    run = 0; @(negedge clk); @(negedge clk);
    ncmd = 1; run = 1;
    @(negedge clk); @(negedge clk);
    checks++; if (halted) failures++;
    wait (halted);
    checks++; if (got.size() != 1 || got[0].what != "cfg" || got[0].sl != 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    foreach (got[i]) $display("%s@%0d %h", got[i].what, got[i].sl, got[i].v);
    $display("pc %0d slot %0d op %s", pc, slot, cur_op.name());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
