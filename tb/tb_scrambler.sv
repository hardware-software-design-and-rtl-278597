// tb_scrambler -- checks the scrambler against the x^7+x^4+1 sequence computed in the
// testbench, the bypass of tail bits, seed loading, and that descrambling with the
// same seed restores the data.
module tb_scrambler;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load, in_bit, byp, ob, ov, ir, ob2, ov2, ir2;
  logic [6:0] seed;
  int checks = 0, failures = 0;

  scrambler dut (.clk, .rst_n, .load, .seed, .in_bit, .in_bypass(byp), .in_valid(1'b1),
    .in_ready(ir), .out_bit(ob), .out_valid(ov), .out_ready(1'b1));
  scrambler dsc (.clk, .rst_n, .load, .seed, .in_bit(ob), .in_bypass(byp), .in_valid(1'b1),
    .in_ready(ir2), .out_bit(ob2), .out_valid(ov2), .out_ready(1'b1));

  initial begin
    bit [6:0] s;
    repeat (2) @(negedge clk);
    rst_n = 1; byp = 0; in_bit = 0;
    for (int t = 0; t < 4; t++) begin
      seed = 7'($urandom) | 7'h01; s = seed;
      load = 1; @(negedge clk); load = 0;
      for (int n = 0; n < 300; n++) begin
        bit fb, d;
        d = 1'($urandom); byp = (n % 50) == 49;
        in_bit = d;
        #1;
        fb = s[6] ^ s[3];
        checks++; if (ob !== (byp ? d : d ^ fb)) failures++;
        checks++; if (ob2 !== d) failures++;
        if (!byp) s = {s[5:0], fb};
        @(negedge clk);
      end
    end
    // the all-ones seed gives the known start 0000111 0111...
    seed = 7'h7f; load = 1; @(negedge clk); load = 0; byp = 0; in_bit = 0;
    begin
      bit [10:0] exp = 11'b00001110111;
      for (int n = 0; n < 11; n++) begin
        #1 checks++; if (ob !== exp[10-n]) failures++;
        @(negedge clk);
      end
    end
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
