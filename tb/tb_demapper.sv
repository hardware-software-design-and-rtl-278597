// tb_demapper -- for every mode and every constellation point, a random channel power
// P and a point Z = X * P plus noise below half a decision distance are given; the
// serial bits must be the Gray bits of X (inverse of the mapper tables, first bit
// first). Random output stalls.
module tb_demapper;
  import h2_pkg::*;
  import h2_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, iv, ir, ob, ov, ordy;
  logic signed [31:0] zi, zq;
  logic [31:0] p;
  mode_e mode;
  int checks = 0, failures = 0;

  demapper dut (.clk, .rst_n, .clear, .mode, .z_i(zi), .z_q(zq), .p, .in_valid(iv),
    .in_ready(ir), .out_bit(ob), .out_valid(ov), .out_ready(ordy));

  initial begin
    int ms[4] = '{0, 2, 4, 6};
    repeat (2) @(negedge clk);
    rst_n = 1; iv = 0; ordy = 1; clear = 0;
    foreach (ms[m]) begin
      int nb;
      nb = ref_nbpsc(ms[m]);
      mode = mode_e'(ms[m]);
      clear = 1; @(negedge clk); clear = 0;
      for (int rep = 0; rep < 4; rep++)
      for (int v = 0; v < (1 << nb); v++) begin
        int ei, eq, pw, k;
        bit b[6];
        for (int j = 0; j < nb; j++) b[j] = v[nb-1-j];
        case (nb)
          1: begin ei = ref_level(b[0], 1); eq = 0; end
          2: begin ei = ref_level(b[0], 1); eq = ref_level(b[1], 1); end
          4: begin ei = ref_level({b[0], b[1]}, 2); eq = ref_level({b[2], b[3]}, 2); end
          default: begin ei = ref_level({b[0], b[1], b[2]}, 3); eq = ref_level({b[3], b[4], b[5]}, 3); end
        endcase
        pw = 1000 + $urandom % 200000;
        zi = ei * pw + (int'($urandom % 1801) - 900) * (pw / 1000);
        zq = eq * pw + (int'($urandom % 1801) - 900) * (pw / 1000);
        p  = pw;
        iv = 1;
        while (!ir) @(negedge clk);
        @(negedge clk);
        iv = 0;
        k = 0;
        while (k < nb) begin
          ordy = ($urandom % 3) != 0;
          #1;
          if (ov && ordy) begin
            checks++;
            if (ob != b[k]) begin failures++; $display("mode %0d v %0d bit %0d", ms[m], v, k); end
            k++;
          end
          @(negedge clk);
        end
        ordy = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
