// tb_irq_gen -- random events, write-one-to-clear requests and masks against a model:
// status bits are sticky until cleared (a new event wins over a clear in the same
// clock), the outputs are status AND mask, and the summary line is their OR.
module tb_irq_gen;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [2:0] evt, clr, mask, status, irq;
  logic irq_any;
  int checks = 0, failures = 0;

  irq_gen dut (.clk, .rst_n, .evt, .clr, .mask, .status, .irq, .irq_any);

  initial begin
    logic [2:0] m;
    evt = 0; clr = 0; mask = 0;
    repeat (2) @(negedge clk);
    rst_n = 1; m = 0;
    for (int n = 0; n < 5000; n++) begin
      evt = 3'($urandom) & 3'($urandom); clr = 3'($urandom) & 3'($urandom); mask = 3'($urandom);
      #1;
      checks++;
      if (status != m || irq != (m & mask) || irq_any != |(m & mask)) failures++;
      @(negedge clk);
      m = (m & ~clr) | evt;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
