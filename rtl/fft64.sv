// fft64 -- 64-point radix-2 FFT (INVERSE=0) or IFFT (INVERSE=1).
//
// In-place decimation-in-time: the 64 input samples are written in bit-reversed order,
// then six stages of 32 butterflies run, one butterfly per clock, and the 64 results
// leave in natural order. A symbol therefore takes 64 + 192 + 64 clocks. Twiddles are
// Q14 values of cos/sin(2*pi*m/64) (quarter-wave table, 17 entries, round(16384*cos)).
// Stage s divides its outputs by two when SCALE_MASK[s] is set; the default scales
// three stages, i.e. the transform is divided by 8. Data inside are W bits wide and
// outputs saturate to SW bits. The FFT/IFFT blocks follow the design; the
// architecture, word widths and scaling are this design's choices.
// Interface: valid/ready in and out; a TAGW-bit tag sampled with the first input sample
// is returned with every output sample of the same symbol.
module fft64
  import h2_pkg::*;
#(
  parameter bit         INVERSE    = 1'b0,
  parameter logic [5:0] SCALE_MASK = 6'b000111,
  parameter int         W          = 22,
  parameter int         TAGW       = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic signed [SW-1:0] in_i,
  input  logic signed [SW-1:0] in_q,
  input  logic [TAGW-1:0]      in_tag,
  input  logic                 in_valid,
  output logic                 in_ready,
  output logic signed [SW-1:0] out_i,
  output logic signed [SW-1:0] out_q,
  output logic [TAGW-1:0]      out_tag,
  output logic                 out_valid,
  input  logic                 out_ready
);
  typedef enum logic [1:0] {S_LOAD, S_COMP, S_OUT} st_e;
  st_e st;
  logic signed [W-1:0] xr [64];
  logic signed [W-1:0] xi [64];
  logic [5:0] cnt;
  logic [2:0] stage;
  logic [4:0] bf;
  logic [TAGW-1:0] tag;

  function automatic logic signed [16:0] cosq(int m);   // cos(2*pi*m/64), m = 0..16
    case (m)
      0: return 17'sd16384;  1: return 17'sd16305;  2: return 17'sd16069;  3: return 17'sd15679;
      4: return 17'sd15137;  5: return 17'sd14449;  6: return 17'sd13623;  7: return 17'sd12665;
      8: return 17'sd11585;  9: return 17'sd10394; 10: return 17'sd9102;  11: return 17'sd7723;
      12: return 17'sd6270; 13: return 17'sd4756;  14: return 17'sd3196;  15: return 17'sd1606;
      default: return 17'sd0;
    endcase
  endfunction

  function automatic logic signed [16:0] cos64(int m);  // m = 0..31
    return (m <= 16) ? cosq(m) : -cosq(32 - m);
  endfunction

  function automatic logic signed [16:0] sin64(int m);  // m = 0..31
    return (m <= 16) ? cosq(16 - m) : cosq(m - 16);
  endfunction

  function automatic logic signed [W-1:0] sat_w(logic signed [W+1:0] v, bit half);
    logic signed [W+1:0] t;
    t = half ? (v >>> 1) : v;
    if (t > $signed((W+2)'({1'b0, {(W-1){1'b1}}})))  return {1'b0, {(W-1){1'b1}}};
    if (t < -$signed((W+2)'({1'b0, {(W-1){1'b1}}}))) return {1'b1, {(W-1){1'b0}}};
    return t[W-1:0];
  endfunction

  logic [5:0] i0, i1, brev;
  logic [4:0] tw;
  logic signed [16:0] wr, wi;
  logic signed [W+17:0] pr, pi;
  logic signed [W+1:0] tr, ti;

  always_comb begin
    logic [5:0] hmask;
    hmask = 6'((1 << stage) - 1);
    i0    = 6'(((6'(bf) & ~hmask) << 1) | (6'(bf) & hmask));
    i1    = i0 + 6'(1 << stage);
    tw    = 5'((6'(bf) & hmask) << (5 - stage));
    wr    = cos64(int'(tw));
    wi    = INVERSE ? sin64(int'(tw)) : -sin64(int'(tw));
    pr    = xr[i1] * wr - xi[i1] * wi + (W+18)'(8192);
    pi    = xr[i1] * wi + xi[i1] * wr + (W+18)'(8192);
    tr    = (W+2)'(pr >>> 14);
    ti    = (W+2)'(pi >>> 14);
    brev  = {cnt[0], cnt[1], cnt[2], cnt[3], cnt[4], cnt[5]};
  end

  function automatic logic signed [SW-1:0] sat_o(logic signed [W-1:0] v);
    if (v > W'(32767))  return 16'sh7fff;
    if (v < -W'(32768)) return 16'sh8000;
    return v[SW-1:0];
  endfunction

  assign in_ready  = (st == S_LOAD);
  assign out_valid = (st == S_OUT);
  assign out_i     = sat_o(xr[cnt]);
  assign out_q     = sat_o(xi[cnt]);
  assign out_tag   = tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_LOAD; cnt <= '0; stage <= '0; bf <= '0; tag <= '0;
    end else if (clear) begin
      st <= S_LOAD; cnt <= '0; stage <= '0; bf <= '0;
    end else begin
      case (st)
        S_LOAD: if (in_valid) begin
          xr[brev] <= W'(in_i);
          xi[brev] <= W'(in_q);
          if (cnt == 0) tag <= in_tag;
          cnt <= cnt + 1'b1;
          if (cnt == 6'd63) begin st <= S_COMP; stage <= '0; bf <= '0; end
        end
        S_COMP: begin
          xr[i0] <= sat_w((W+2)'(xr[i0]) + tr, SCALE_MASK[stage]);
          xi[i0] <= sat_w((W+2)'(xi[i0]) + ti, SCALE_MASK[stage]);
          xr[i1] <= sat_w((W+2)'(xr[i0]) - tr, SCALE_MASK[stage]);
          xi[i1] <= sat_w((W+2)'(xi[i0]) - ti, SCALE_MASK[stage]);
          bf <= bf + 1'b1;
          if (bf == 5'd31) begin
            stage <= stage + 1'b1;
            if (stage == 3'd5) begin st <= S_OUT; cnt <= '0; end
          end
        end
        S_OUT: if (out_ready) begin
          cnt <= cnt + 1'b1;
          if (cnt == 6'd63) st <= S_LOAD;
        end
        default: st <= S_LOAD;
      endcase
    end
  end
endmodule
