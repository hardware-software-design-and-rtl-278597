// tb_dp_ram -- random reads and writes on both ports of the dual-port memory (never
// the same address written on both ports in one clock) against an array model; read
// data is checked one clock after the access, including read-before-write on a port
// that writes.
module tb_dp_ram;
  localparam int DEPTH = 1024;
  localparam int AW = $clog2(DEPTH);
  logic clk = 0;
  always #5 clk = ~clk;
  logic ae, awe, be, bwe;
  logic [AW-1:0] aa, ba;
  logic [31:0] awd, bwd, ard, brd;
  int checks = 0, failures = 0;

  dp_ram #(.DEPTH(DEPTH), .W(32)) dut (.clk, .a_en(ae), .a_we(awe), .a_addr(aa), .a_wdata(awd),
    .a_rdata(ard), .b_en(be), .b_we(bwe), .b_addr(ba), .b_wdata(bwd), .b_rdata(brd));

  logic [31:0] model [DEPTH];

  initial begin
    logic [31:0] ea, eb;
    bit ca, cb;
    ae = 0; be = 0;
    // fill through port A
    for (int i = 0; i < DEPTH; i++) begin
      ae = 1; awe = 1; aa = AW'(i); awd = $urandom; model[i] = awd; @(negedge clk);
    end
    ae = 0;
    for (int n = 0; n < 20000; n++) begin
      ae = $urandom % 2; awe = $urandom % 2; aa = AW'($urandom); awd = $urandom;
      be = $urandom % 2; bwe = $urandom % 2; ba = AW'($urandom); bwd = $urandom;
      if (ba == aa) bwe = 0;
      if (ba == aa && ae && awe) be = 0;
      if (aa == ba && be && bwe) ae = 0;
      ca = ae; cb = be;
      ea = model[aa]; eb = model[ba];
      @(posedge clk);
      if (ae && awe) model[aa] = awd;
      if (be && bwe) model[ba] = bwd;
      @(negedge clk);
      if (ca) begin checks++; if (ard != ea) failures++; end
      if (cb) begin checks++; if (brd != eb) failures++; end
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
