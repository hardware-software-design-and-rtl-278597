// tb_scr_init -- the seed must be {1,1,1, frame number} for every frame value; a load
// must be requested at every burst start and on a mode setting only when the mode
// actually changes.
module tb_scr_init;
  import h2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic bs, ms, load;
  mode_e mode;
  logic [3:0] frame;
  logic [6:0] seed;
  int checks = 0, failures = 0;

  scr_init dut (.clk, .rst_n, .burst_start(bs), .mode_set(ms), .mode, .frame, .seed, .load);

  initial begin
    mode_e cur;
    bs = 0; ms = 0; mode = M_BPSK12; frame = 0;
    repeat (2) @(negedge clk);
    rst_n = 1; cur = M_BPSK12;
    for (int n = 0; n < 3000; n++) begin
      frame = 4'($urandom); mode = mode_e'($urandom % 7);
      bs = ($urandom % 4) == 0; ms = !bs && ($urandom % 3) == 0;
      #1;
      checks++;
      if (seed != {3'b111, frame} || load != (bs || (ms && mode != cur))) failures++;
      @(negedge clk);
      if (bs || ms) cur = mode;
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
