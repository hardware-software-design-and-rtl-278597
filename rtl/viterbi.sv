// viterbi -- hard-decision Viterbi decoder for the K=7, (133,171) code.
//
// 64 states, one trellis step per clock. The state is the last six input bits (most
// recent in bit 5); the predecessors of state s are {s[4:0], 0} and {s[4:0], 1} and
// the input bit of the branch is s[5]. Branch metrics are Hamming distances, an
// erased (punctured) bit counts zero. Path metrics are renormalised every step by
// subtracting the previous minimum. Survivors are kept by register exchange, DEPTH
// bits per state: once DEPTH steps are in, every step releases the oldest bit of the
// best state's survivor. After the last of `nsteps` steps the encoder is known to be
// in state 0 (tail bits), and the remaining bits are read out of state 0's survivor.
// Exactly `nout` bits are delivered. The decoder follows the design's FEC decoder; the
// algorithm details are this design's choices.
module viterbi #(
  parameter int DEPTH = 48
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,       // clears metrics for a new burst
  input  logic [15:0] nsteps,
  input  logic [15:0] nout,
  input  logic        in_a,
  input  logic        in_b,
  input  logic        in_ea,
  input  logic        in_eb,
  input  logic        in_valid,
  output logic        in_ready,
  output logic        out_bit,
  output logic        out_valid,
  input  logic        out_ready,
  output logic        done
);
  localparam int MW = 8;
  localparam int IW = $clog2(DEPTH);
  logic [MW-1:0]    pm   [64];
  logic [DEPTH-1:0] surv [64];
  logic [MW-1:0]    pm_n [64];
  logic [DEPTH-1:0] sv_n [64];
  logic [5:0]       best;
  logic [15:0]      step, ocnt, fpos;
  logic             flushing, run;
  logic             ov, ob;

  always_comb begin
    best = '0;
    for (int s = 1; s < 64; s++) if (pm[s] < pm[best]) best = 6'(s);
  end

  always_comb begin
    for (int ns = 0; ns < 64; ns++) begin
      logic [MW+1:0] c0, c1;
      logic [6:0] r0, r1;
      logic [1:0] bm0, bm1;
      r0  = {ns[5], ns[4:0], 1'b0};
      r1  = {ns[5], ns[4:0], 1'b1};
      bm0 = 2'((!in_ea && (^(r0 & 7'o133) != in_a)) ? 1 : 0) + 2'((!in_eb && (^(r0 & 7'o171) != in_b)) ? 1 : 0);
      bm1 = 2'((!in_ea && (^(r1 & 7'o133) != in_a)) ? 1 : 0) + 2'((!in_eb && (^(r1 & 7'o171) != in_b)) ? 1 : 0);
      c0  = (MW+2)'(pm[{ns[4:0], 1'b0}]) + (MW+2)'(bm0);
      c1  = (MW+2)'(pm[{ns[4:0], 1'b1}]) + (MW+2)'(bm1);
      if (c1 < c0) begin
        pm_n[ns] = MW'(c1 - (MW+2)'(pm[best]));
        sv_n[ns] = {surv[{ns[4:0], 1'b1}][DEPTH-2:0], ns[5]};
      end else begin
        pm_n[ns] = MW'(c0 - (MW+2)'(pm[best]));
        sv_n[ns] = {surv[{ns[4:0], 1'b0}][DEPTH-2:0], ns[5]};
      end
    end
  end

  assign in_ready  = run && !flushing && (!ov || out_ready);
  assign out_valid = ov;
  assign out_bit   = ob;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < 64; s++) begin pm[s] <= '0; surv[s] <= '0; end
      step <= '0; ocnt <= '0; fpos <= '0; flushing <= 1'b0; run <= 1'b0;
      ov <= 1'b0; ob <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (ov && out_ready) ov <= 1'b0;
      if (start) begin
        for (int s = 0; s < 64; s++) begin
          pm[s]   <= (s == 0) ? '0 : MW'(64);
          surv[s] <= '0;
        end
        step <= '0; ocnt <= '0; flushing <= 1'b0; run <= 1'b1; ov <= 1'b0;
      end else if (run && !flushing) begin
        if (in_valid && in_ready) begin
          for (int s = 0; s < 64; s++) begin pm[s] <= pm_n[s]; surv[s] <= sv_n[s]; end
          if (step >= 16'(DEPTH) && ocnt < nout) begin
            ob <= surv[best][DEPTH-1]; ov <= 1'b1; ocnt <= ocnt + 1'b1;
          end
          step <= step + 1'b1;
          if (step == nsteps - 1) begin
            flushing <= 1'b1;
            fpos     <= (nsteps > 16'(DEPTH)) ? nsteps - 16'(DEPTH) : 16'd0;
          end
        end
      end else if (run && flushing) begin
        if (ocnt >= nout) begin
          run <= 1'b0; flushing <= 1'b0; done <= 1'b1;
        end else if (!ov || out_ready) begin
          ob   <= surv[0][IW'(nsteps - 16'd1 - fpos)];
          ov   <= 1'b1;
          ocnt <= ocnt + 1'b1;
          fpos <= fpos + 1'b1;
        end
      end
    end
  end
endmodule
