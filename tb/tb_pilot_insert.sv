// tb_pilot_insert -- one short-training, one long-training and five data symbols with
// random points. Every one of the 64 output bins is compared with an independent table:
// data points on their carriers, pilots (1, 1, 1, -1) times the polarity sequence on
// carriers -21, -7, 7, 21, zeros elsewhere, and the HIPERLAN/2 training vectors written
// out here carrier by carrier. Random output stalls; the tag is checked too.
module tb_pilot_insert;
  import h2_pkg::*;
  import h2_ref_pkg::*;
  localparam int AMP = 512;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, slast, svalid, sready, iv, ir, ov, ordy;
  logic [1:0] skind, otag;
  logic signed [SW-1:0] ii, iq, oi, oq;
  int checks = 0, failures = 0;

  pilot_insert #(.AMP(AMP)) dut (.clk, .rst_n, .clear, .sym_kind(skind), .sym_last(slast),
    .sym_valid(svalid), .sym_ready(sready), .in_i(ii), .in_q(iq), .in_valid(iv), .in_ready(ir),
    .out_i(oi), .out_q(oq), .out_tag(otag), .out_valid(ov), .out_ready(ordy));

  // long training, carriers -26..26
  int lts[53] = '{1,1,-1,-1,1,1,-1,1,-1,1,1,1,1,1,1,-1,-1,1,1,-1,1,-1,1,1,1,1,0,
                  1,-1,-1,1,1,-1,1,-1,1,-1,-1,-1,-1,-1,1,1,-1,-1,1,-1,1,-1,1,1,1,1};
  // short training (real = imaginary part), carriers -26..26
  int sts[53] = '{0,0,1,0,0,0,-1,0,0,0,1,0,0,0,-1,0,0,0,-1,0,0,0,1,0,0,0,0,
                  0,0,0,-1,0,0,0,-1,0,0,0,1,0,0,0,1,0,0,0,1,0,0,0,1,0,0};

  task automatic sym(int kind, bit last, int n);
    int pi_[48], pq_[48];
    int ei[64], eq[64];
    for (int k = 0; k < 64; k++) begin ei[k] = 0; eq[k] = 0; end
    if (kind == 0) begin
      for (int d = 0; d < 48; d++) begin
        int c;
        pi_[d] = int'($urandom % 2001) - 1000; pq_[d] = int'($urandom % 2001) - 1000;
        c = ref_carrier(d);
        ei[c & 63] = pi_[d]; eq[c & 63] = pq_[d];
      end
      ei[64 - 21] = AMP * ref_pol(n); ei[64 - 7] = AMP * ref_pol(n);
      ei[7] = AMP * ref_pol(n);       ei[21] = -AMP * ref_pol(n);
    end else begin
      for (int c = -26; c <= 26; c++) begin
        if (kind == 1) begin ei[c & 63] = sts[c + 26] * AMP; eq[c & 63] = sts[c + 26] * AMP; end
        else ei[c & 63] = lts[c + 26] * AMP;
      end
    end
    skind = 2'(kind); slast = last; svalid = 1;
    while (!sready) @(negedge clk);
    @(negedge clk);
    svalid = 0;
    fork
      if (kind == 0) begin
        for (int d = 0; d < 48; d++) begin
          ii = SW'(pi_[d]); iq = SW'(pq_[d]); iv = 1;
          while (!ir) @(negedge clk);
          @(negedge clk);
        end
        iv = 0;
      end
      begin
        int k;
        k = 0;
        while (k < 64) begin
          ordy = ($urandom % 3) != 0;
          #1;
          if (ov && ordy) begin
            checks++;
            if (oi != ei[k] || oq != eq[k] || otag != {kind != 0, last}) begin
              failures++;
              if (failures < 10) $display("kind %0d n %0d bin %0d got %0d %0d exp %0d %0d", kind, n, k, oi, oq, ei[k], eq[k]);
            end
            k++;
          end
          @(negedge clk);
        end
        ordy = 0;
      end
    join
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1; svalid = 0; iv = 0; ordy = 0; clear = 1; @(negedge clk); clear = 0;
    // twice, so the pilot polarity must restart after `clear`
    for (int r = 0; r < 2; r++) begin
      sym(1, 0, 0); sym(2, 0, 0);
      for (int n = 0; n < 5; n++) sym(0, n == 4, n);
      clear = 1; @(negedge clk); clear = 0;
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
