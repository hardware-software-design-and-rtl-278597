// tb_modem_if -- the interface unit at its default timing (40 clocks per slot, 5000
// slots per frame), driven only through APB like the processor would. The program
// loads configuration, resets pointers and sets the synchronisation slot, enables the
// RF interface, transmits one LCH, receives one FCH, searches for a preamble,
// transmits two SCH packets without preamble and ends with a flush. Models of the
// transmit and receive paths answer in the testbench. Checks: action slots, burst
// descriptions and scrambler seed {1,1,1,frame}, transmitted bytes equal the transmit
// memory (second packet from the next word boundary), received bytes readable from
// the receive memory, the slot counter reloaded when the preamble is found, the three
// interrupt sources with mask and write-one-to-clear, the threshold register, STATUS.
module tb_modem_if;
  import h2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic psel, penable, pwrite, pready, pslverr, iq_en;
  logic [15:0] paddr;
  logic [31:0] pwdata, prdata;
  logic [2:0] irq;
  logic tx_start, tx_flush, tx_busy, tx_done, tbv, tbr;
  logic rx_start, rx_flush, rx_busy, rx_done, rbv, search, found;
  logic [7:0] tx_byte, rx_byte;
  burst_t tx_burst, rx_burst;
  logic [39:0] sync_thr;
  logic [12:0] slot;
  int checks = 0, failures = 0;

  modem_if dut (.clk, .rst_n, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready,
    .pslverr, .irq, .iq_en, .tx_start, .tx_burst, .tx_flush, .tx_busy, .tx_done, .tx_byte,
    .tx_byte_valid(tbv), .tx_byte_ready(tbr), .rx_start, .rx_burst, .rx_flush, .rx_busy,
    .rx_done, .rx_byte, .rx_byte_valid(rbv), .search, .found, .sync_thr, .slot);

  task automatic apb(bit wr, logic [15:0] a, logic [31:0] wd, output logic [31:0] r);
    psel = 1; penable = 0; pwrite = wr; paddr = a; pwdata = wd;
    @(negedge clk);
    penable = 1;
    #1; r = prdata;
    @(negedge clk);
    psel = 0; penable = 0;
  endtask

  function automatic logic [31:0] mk(op_e op, int sl, bit p1, ptype_e pt, int np, mode_e m, int arg);
    return {op, 13'(sl), p1, pt, 4'(np), m, 4'(arg)};
  endfunction

  // transmit path model: takes the bytes, reports done 50 clocks after the last one
  byte unsigned txd[$];
  int tx_need, tx_slot[$], ntx_done;
  burst_t txb[$];
  always @(posedge clk) if (rst_n) begin
    if (tx_start) begin
      tx_busy <= 1; tx_need = tx_burst.nbytes; tx_slot.push_back(slot); txb.push_back(tx_burst);
    end
    if (tbv && tbr) begin txd.push_back(tx_byte); tx_need--; end
  end
  initial begin
    tx_busy = 0; tx_done = 0; tbr = 0; ntx_done = 0;
    forever begin
      @(negedge clk);
      tbr = tx_busy && ($urandom % 3 != 0);
      if (tx_busy && tx_need == 0) begin
        tbr = 0;
        repeat (50) @(negedge clk);
        tx_done = 1; tx_busy = 0; ntx_done++; @(negedge clk); tx_done = 0;
      end
    end
  end

  // receive path model: delivers random bytes some time after being armed
  byte unsigned rxd[$];
  int rx_slot[$];
  burst_t rxb[$];
  initial begin
    rx_busy = 0; rx_done = 0; rbv = 0; rx_byte = 0;
    forever begin
      @(negedge clk);
      if (rx_start) begin
        int n;
        rx_slot.push_back(slot); rxb.push_back(rx_burst);
        n = rx_burst.nbytes;
        rx_busy = 1;
        repeat (100) @(negedge clk);
        for (int i = 0; i < n; i++) begin
          rx_byte = 8'($urandom); rxd.push_back(rx_byte); rbv = 1; @(negedge clk); rbv = 0;
          repeat (3) @(negedge clk);
        end
        rx_done = 1; rx_busy = 0; @(negedge clk); rx_done = 0;
      end
    end
  end

  int nflush;
  logic [12:0] slot_at_found;
  always @(posedge clk) if (rst_n) begin
    if (tx_flush && rx_flush) nflush++;
  end

  initial begin
    logic [31:0] r, txw[32];
    int n;
    psel = 0; penable = 0; pwrite = 0; found = 0; nflush = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    n = 0;
    apb(1, 16'h0000 + 4 * n++, mk(OP_CFG, 5, 0, PT_BCH, 0, M_BPSK12, 0), r);
    apb(1, 16'h0000 + 4 * n++, {OP_RESET, 13'd7, 2'b00, 13'd100}, r);
    apb(1, 16'h0000 + 4 * n++, mk(OP_IQ_EN, 8, 0, PT_BCH, 0, M_BPSK12, 1), r);
    apb(1, 16'h0000 + 4 * n++, mk(OP_TX, 20, 1, PT_LCH, 1, M_QPSK34, 0), r);
    apb(1, 16'h0000 + 4 * n++, mk(OP_RX, 40, 1, PT_FCH, 1, M_BPSK12, 0), r);
    apb(1, 16'h0000 + 4 * n++, mk(OP_BCH_SRCH, 0, 0, PT_BCH, 0, M_BPSK12, 0), r);
    apb(1, 16'h0000 + 4 * n++, mk(OP_TX, 110, 0, PT_SCH, 2, M_QAM16_34, 0), r);
    apb(1, 16'h0000 + 4 * n++, mk(OP_END, 120, 0, PT_BCH, 0, M_BPSK12, 3), r);
    apb(1, 16'h0200, 32'd3, r);
    apb(1, 16'h0204, 32'd54321, r);
    for (int i = 0; i < 32; i++) begin txw[i] = $urandom; apb(1, 16'(16'h1000 + 4 * i), txw[i], r); end
    apb(1, 16'h0108, 32'h7, r);                       // enable all interrupts
    apb(1, 16'h0100, {17'd0, 7'(n), 7'd0, 1'b1}, r);  // run
    wait (search);
    checks++; if (!iq_en || sync_thr != 40'd54321) begin failures++; $display("iq %b thr %0d", iq_en, sync_thr); end
    repeat (300) @(negedge clk);
    found = 1; @(negedge clk); found = 0;
    slot_at_found = slot;
    checks++; if (slot != 13'd100) begin failures++; $display("slot after found %0d", slot); end
    @(negedge clk);
    checks++; if (irq != 3'b111) begin failures++; $display("irq %b", irq); end
    apb(1, 16'h0104, 32'h7, r);
    apb(0, 16'h0104, 0, r);
    checks++; if (r != 0 || irq != 0) failures++;
    // wait for the program to halt
    do begin repeat (40) @(negedge clk); apb(0, 16'h010C, 0, r); end while (!r[18]);
    repeat (200) @(negedge clk);
    checks++; if (r[26:20] != 7'(n - 1)) failures++;
    checks++; if (tx_slot.size() != 2 || tx_slot[0] != 20 || tx_slot[1] != 110) begin failures++; $display("tx slots %p", tx_slot); end
    checks++; if (rx_slot.size() != 1 || rx_slot[0] != 40) begin failures++; $display("rx slots %p", rx_slot); end
    checks++; if (txb[0].nbytes != 54 || txb[0].pre != PRE_SHORT || txb[0].mode != M_QPSK34 || txb[0].seed != 7'h73)
      begin failures++; $display("burst 0 %p", txb[0]); end
    checks++; if (txb[1].nbytes != 18 || txb[1].pre != PRE_NONE || txb[1].mode != M_QAM16_34) failures++;
    checks++; if (rxb[0].nbytes != 27 || rxb[0].pre != PRE_SHORT || rxb[0].seed != 7'h73) failures++;
    checks++; if (txd.size() != 72) begin failures++; $display("tx bytes %0d", txd.size()); end
    foreach (txd[i]) begin
      int a;
      a = (i < 54) ? i : 56 + (i - 54);
      checks++; if (txd[i] != txw[a / 4][8 * (a % 4) +: 8]) failures++;
    end
    foreach (rxd[i]) begin
      if (i % 4 == 0) apb(0, 16'(16'h2000 + i), 0, r);
      checks++; if (rxd[i] != r[8 * (i % 4) +: 8]) failures++;
    end
    checks++; if (rxd.size() != 27) failures++;
    checks++; if (nflush != 1 || !iq_en) failures++;
    checks++; if (irq != 3'b100) begin failures++; $display("irq %b", irq); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40 * 400) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
