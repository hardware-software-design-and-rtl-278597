// tb_conv_enc -- checks the K=7 encoder against generator polynomials 133/171 worked
// out in the testbench, the impulse response, handshake stalls and `clear`.
module tb_conv_enc;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, in_bit, iv, ir, a, b, ov, ordy;
  int checks = 0, failures = 0;

  conv_enc dut (.clk, .rst_n, .clear, .in_bit, .in_valid(iv), .in_ready(ir), .out_a(a),
    .out_b(b), .out_valid(ov), .out_ready(ordy));

  initial begin
    bit hist[$];
    repeat (2) @(negedge clk);
    rst_n = 1; clear = 1; iv = 0; ordy = 1; in_bit = 0;
    @(negedge clk) clear = 0;
    // impulse: a single one gives the generator taps 1011011 / 1111001
    begin
      bit [6:0] ga = 7'b1011011, gb = 7'b1111001;
      for (int n = 0; n < 7; n++) begin
        in_bit = (n == 0); iv = 1; #1;
        checks++; if (a !== ga[6-n] || b !== gb[6-n]) failures++;
        @(negedge clk);
      end
    end
    clear = 1; @(negedge clk); clear = 0;
    for (int n = 0; n < 500; n++) begin
      bit d, ea, eb;
      d = 1'($urandom); in_bit = d; iv = 1; ordy = ($urandom % 4) != 0;
      #1;
      begin
        bit [6:0] r;
        r[6] = d;
        for (int k = 1; k <= 6; k++) r[6-k] = (hist.size() >= k) ? hist[hist.size()-k] : 1'b0;
        ea = r[6] ^ r[4] ^ r[3] ^ r[1] ^ r[0];
        eb = r[6] ^ r[5] ^ r[4] ^ r[3] ^ r[0];
      end
      checks++; if (a !== ea || b !== eb || ov !== 1'b1 || ir !== ordy) failures++;
      if (ordy) hist.push_back(d);
      @(negedge clk);
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
