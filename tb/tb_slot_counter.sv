// tb_slot_counter -- at the default 40 clocks per 400 ns slot and 5000 slots per 2 ms
// frame: the slot number must step every 40 clocks with one tick per slot, wrap from
// 4999 to 0 while the frame number steps, restart its 40-clock count on a slot load,
// and take a loaded frame number. Runs a little over two frames.
module tb_slot_counter;
  localparam int CPS = 40, SPF = 5000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load, frame_load, tick;
  logic [12:0] load_val, slot;
  logic [3:0] frame_val, frame;
  int checks = 0, failures = 0;

  slot_counter #(.CLKS_PER_SLOT(CPS), .SLOTS_PER_FRAME(SPF)) dut (.clk, .rst_n, .load, .load_val,
    .frame_load, .frame_val, .slot, .frame, .slot_tick(tick));

  initial begin
    int es, ef, ediv;
    repeat (2) @(negedge clk);
    load = 0; frame_load = 0; load_val = 0; frame_val = 0;
    rst_n = 1;
    es = 0; ef = 0; ediv = 0;
    for (int n = 0; n < 2 * CPS * SPF + 5000; n++) begin
      checks++;
      if (slot != 13'(es) || frame != 4'(ef) || tick != (ediv == CPS - 1)) begin
        failures++;
        if (failures < 10) $display("clk %0d slot %0d/%0d frame %0d/%0d", n, slot, es, frame, ef);
      end
      if (n == 1000) begin load = 1; load_val = 13'(SPF - 3); end
      else if (n == 5000) begin frame_load = 1; frame_val = 4'd9; end
      else begin load = 0; frame_load = 0; end
      @(negedge clk);
      if (load) begin es = SPF - 3; ediv = 0; end
      else if (ediv == CPS - 1) begin
        ediv = 0;
        if (es == SPF - 1) begin es = 0; ef = (ef + 1) % 16; end else es++;
      end else ediv++;
      if (frame_load) ef = 9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
