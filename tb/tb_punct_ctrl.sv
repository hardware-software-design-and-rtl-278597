// tb_punct_ctrl -- checks the keep patterns for rates 1/2, 3/4 and 9/16 over several
// periods, and that `clear` restarts the pattern.
module tb_punct_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, adv, ka, kb;
  logic [1:0] rate;
  int checks = 0, failures = 0;

  punct_ctrl dut (.clk, .rst_n, .clear, .rate, .adv, .keep_a(ka), .keep_b(kb));

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1; adv = 0;
    for (int r = 0; r < 3; r++) begin
      rate = 2'(r); clear = 1; @(negedge clk); clear = 0;
      for (int i = 0; i < 40; i++) begin
        bit ea, eb;
        ea = 1; eb = 1;
        if (r == 1) begin ea = (i % 3) != 2; eb = (i % 3) != 1; end
        if (r == 2) begin ea = (i % 9) != 4; eb = (i % 9) != 8; end
        adv = 1; #1;
        checks++; if (ka !== ea || kb !== eb) failures++;
        @(negedge clk);
        // a clock without advance keeps the position
        adv = 0; #1; checks++; if (ka !== ((r == 1) ? ((i + 1) % 3) != 2 : (r == 2) ? ((i + 1) % 9) != 4 : 1'b1)) failures++;
        @(negedge clk);
      end
    end
    // the kept fraction gives the code rate: 3/4 keeps 4 of 6, 9/16 keeps 16 of 18
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
