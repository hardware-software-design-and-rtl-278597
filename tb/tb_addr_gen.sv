// tb_addr_gen -- transmit side: packets of random length are read from a word memory
// model (one clock read latency) and must come out as the stored bytes, LSB byte of a
// word first, each packet starting on the next word boundary, under random byte
// stalls. Receive side: bytes of random-length packets must be written packed into
// words at consecutive addresses, each packet starting on a new word. A pointer reset
// must restart both sides at address 0.
module tb_addr_gen;
  localparam int TAW = 10, RAW = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ptr_reset, tx_start, txm_en, tbv, tbr, rx_start, rbv, rxm_we;
  logic [12:0] tx_nbytes;
  logic [TAW-1:0] txm_addr;
  logic [RAW-1:0] rxm_addr;
  logic [31:0] txm_rdata, rxm_wdata;
  logic [7:0] tx_byte, rx_byte;
  int checks = 0, failures = 0;

  addr_gen #(.TAW(TAW), .RAW(RAW)) dut (.clk, .rst_n, .ptr_reset, .tx_start, .tx_nbytes, .txm_en,
    .txm_addr, .txm_rdata, .tx_byte, .tx_byte_valid(tbv), .tx_byte_ready(tbr), .rx_start,
    .rx_byte, .rx_byte_valid(rbv), .rxm_we, .rxm_addr, .rxm_wdata);

  logic [31:0] tmem [1 << TAW];
  logic [31:0] rmem [1 << RAW];
  always @(posedge clk) begin
    if (txm_en) txm_rdata <= tmem[txm_addr];
    if (rxm_we) rmem[rxm_addr] <= rxm_wdata;
  end

  initial begin
    int tb0, rb0;
    repeat (2) @(negedge clk);
    for (int i = 0; i < (1 << TAW); i++) tmem[i] = $urandom;
    rst_n = 1; ptr_reset = 0; tx_start = 0; rx_start = 0; tbr = 0; rbv = 0;
    for (int r = 0; r < 2; r++) begin
      tb0 = 0; rb0 = 0;
      for (int p = 0; p < 12; p++) begin
        int n, got, cyc;
        byte unsigned rb[$];
        rb.delete();
        n = 1 + $urandom % 60;
        tx_nbytes = 13'(n); tx_start = 1; rx_start = 1; @(negedge clk); tx_start = 0; rx_start = 0;
        got = 0; cyc = 0;
        while (got < n && cyc < 2000) begin
          tbr = ($urandom % 3) != 0;
          #1;
          if (tbv && tbr) begin
            int a;
            a = tb0 + got;
            checks++;
            if (tx_byte != tmem[a / 4][8 * (a % 4) +: 8]) begin failures++; $display("tx pkt %0d byte %0d", p, got); end
            got++;
          end
          @(negedge clk); cyc++;
        end
        tbr = 0;
        repeat (3) @(negedge clk);
        checks++; if (tbv) failures++;
        tb0 = ((tb0 + n + 3) / 4) * 4;
        // receive the same number of bytes
        for (int i = 0; i < n; i++) begin
          rx_byte = 8'($urandom); rb.push_back(rx_byte); rbv = 1; @(negedge clk);
          rbv = 0; repeat ($urandom % 3) @(negedge clk);
        end
        @(negedge clk);
        for (int i = 0; i < n; i++) begin
          int a;
          a = rb0 + i;
          checks++;
          if (rmem[a / 4][8 * (a % 4) +: 8] != rb[i]) begin failures++; if (failures < 4) $display("rx pkt %0d byte %0d n %0d rb0 %0d mem %h exp %h", p, i, n, rb0, rmem[a / 4], rb[i]); end
        end
        rb0 = ((rb0 + n + 3) / 4) * 4;
      end
      ptr_reset = 1; @(negedge clk); ptr_reset = 0;
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
