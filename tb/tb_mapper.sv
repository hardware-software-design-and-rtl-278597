// tb_mapper -- every bit pattern of BPSK, QPSK, 16-QAM and 64-QAM against the Gray
// levels of h2_ref_pkg, times the amplitude.
module tb_mapper;
  import h2_pkg::*;
  import h2_ref_pkg::*;
  localparam int AMP = 100;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, ib, iv, ir, ov, ordy;
  logic signed [SW-1:0] oi, oq;
  mode_e mode;
  int checks = 0, failures = 0;

  mapper #(.AMP(AMP)) dut (.clk, .rst_n, .clear, .mode, .in_bit(ib), .in_valid(iv),
    .in_ready(ir), .out_i(oi), .out_q(oq), .out_valid(ov), .out_ready(ordy));

  initial begin
    int ms[4] = '{0, 2, 4, 6};
    repeat (2) @(negedge clk);
    rst_n = 1; iv = 0; ordy = 1; clear = 0;
    foreach (ms[m]) begin
      int nb;
      nb = ref_nbpsc(ms[m]);
      mode = mode_e'(ms[m]);
      clear = 1; @(negedge clk); clear = 0;
      for (int v = 0; v < (1 << nb); v++) begin
        int ei, eq;
        bit b[6];
        for (int k = 0; k < nb; k++) b[k] = v[nb-1-k];
        case (nb)
          1: begin ei = ref_level(b[0], 1); eq = 0; end
          2: begin ei = ref_level(b[0], 1); eq = ref_level(b[1], 1); end
          4: begin ei = ref_level({b[0], b[1]}, 2); eq = ref_level({b[2], b[3]}, 2); end
          default: begin ei = ref_level({b[0], b[1], b[2]}, 3); eq = ref_level({b[3], b[4], b[5]}, 3); end
        endcase
        for (int k = 0; k < nb; k++) begin
          ib = b[k]; iv = 1;
          while (!ir) @(negedge clk);
          @(negedge clk);
        end
        iv = 0;
        while (!ov) @(negedge clk);
        checks++;
        if (oi != ei * AMP || oq != eq * AMP) begin
          failures++; $display("mode %0d v %0d got %0d %0d exp %0d %0d", ms[m], v, oi, oq, ei*AMP, eq*AMP);
        end
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
