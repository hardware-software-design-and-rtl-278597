// tb_bus_if -- APB transfers (setup then access phase) to every region of the map:
// random writes and reads of the command, configuration, transmit and receive
// memories (modelled here with one clock read latency) checked against a byte-address
// model; CTRL and MASK write/read-back; IRQ writes must pulse the clear lines for one
// clock; STATUS must show slot, busy flags, halted and program counter; addresses
// outside the map must raise PSLVERR and read 0.
module tb_bus_if;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic psel, penable, pwrite, pready, pslverr, mem_we, run, tx_busy, rx_busy, halted;
  logic [15:0] paddr;
  logic [31:0] pwdata, prdata, mem_wdata;
  logic [31:0] rd [4];
  logic [3:0] mem_en;
  logic [9:0] mem_addr;
  logic [6:0] ncmd, pc;
  logic [2:0] irq_mask, irq_clr, irq_status;
  logic [12:0] slot;
  int checks = 0, failures = 0;

  bus_if dut (.clk, .rst_n, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .cmd_rdata(rd[0]), .cfg_rdata(rd[1]),
    .txm_rdata(rd[2]), .rxm_rdata(rd[3]), .run, .ncmd, .irq_mask, .irq_clr, .irq_status,
    .slot, .tx_busy, .rx_busy, .halted, .pc);

  logic [31:0] mem [4][1024];
  always @(posedge clk)
    for (int m = 0; m < 4; m++)
      if (mem_en[m]) begin
        if (mem_we) mem[m][mem_addr] <= mem_wdata;
        rd[m] <= mem[m][mem_addr];
      end

  logic [2:0] clr_seen;
  always @(posedge clk) if (rst_n) clr_seen <= clr_seen | irq_clr;

  logic last_err;
  task automatic apb(bit wr, logic [15:0] a, logic [31:0] wd, output logic [31:0] r);
    psel = 1; penable = 0; pwrite = wr; paddr = a; pwdata = wd;
    @(negedge clk);
    penable = 1;
    #1; r = prdata; last_err = pslverr;
    @(negedge clk);
    psel = 0; penable = 0;
  endtask

  initial begin
    int base[4] = '{16'h0000, 16'h0200, 16'h1000, 16'h2000};
    int size[4] = '{64, 4, 1024, 1024};
    logic [31:0] model [4][1024];
    bit          written [4][1024];
    logic [31:0] r;
    psel = 0; penable = 0; pwrite = 0; irq_status = 3'b101; slot = 13'd1234;
    tx_busy = 1; rx_busy = 0; halted = 1; pc = 7'd42; clr_seen = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 4; m++) for (int i = 0; i < size[m]; i++) written[m][i] = 0;
    for (int n = 0; n < 3000; n++) begin
      int m, i;
      m = $urandom % 4; i = $urandom % size[m];
      if (($urandom % 2) || !written[m][i]) begin
        model[m][i] = $urandom; written[m][i] = 1;
        apb(1, 16'(base[m] + 4 * i), model[m][i], r);
        checks++; if (last_err) failures++;
      end else begin
        apb(0, 16'(base[m] + 4 * i), 0, r);
        checks++;
        if (r != model[m][i] || last_err) begin failures++; $display("mem %0d word %0d got %h exp %h", m, i, r, model[m][i]); end
      end
    end
    apb(1, 16'h0100, 32'h0000_1301, r);
    apb(0, 16'h0100, 0, r);
    checks++; if (r != 32'h0000_1301 || !run || ncmd != 7'h13) failures++;
    apb(1, 16'h0108, 32'h6, r);
    apb(0, 16'h0108, 0, r);
    checks++; if (r != 32'h6 || irq_mask != 3'h6) failures++;
    apb(0, 16'h0104, 0, r);
    checks++; if (r != 32'h5) failures++;
    apb(1, 16'h0104, 32'h4, r);
    checks++; if (irq_clr != 3'h4) failures++;
    @(negedge clk);
    checks++; if (clr_seen != 3'h4 || irq_clr != 0) failures++;
    apb(0, 16'h010C, 0, r);
    checks++; if (r != {5'd0, 7'd42, 1'b0, 1'b1, 1'b0, 1'b1, 3'd0, 13'd1234}) begin failures++; $display("status %h", r); end
    foreach (base[m]) begin
      int bad[6] = '{16'h0110, 16'h0300, 16'h0210, 16'h3000, 16'h4000, 16'h8004};
      apb(0, 16'(bad[m]), 0, r);
      checks++; if (!last_err || r != 0) failures++;
      apb(1, 16'(bad[m + 2]), 32'hdead_beef, r);
      checks++; if (!last_err) failures++;
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
