// cfo_corr -- carrier frequency offset estimation and correction for the receive path.
//
// Estimation: when rx_sync finds the preamble (`est_valid`) it hands over the delayed
// autocorrelation C over the 16-sample period of the short training symbols. Its angle
// is 16 times the phase step per sample caused by the frequency offset. A vectoring
// CORDIC (one iteration per clock, ITER clocks) turns C into that angle, and the step
// per sample, angle/16, is stored. Phases are PW-bit fractions of a full turn.
// Correction: every valid received sample is rotated by minus the accumulated phase.
// The accumulator advances by the step at every sample period (`tick`), whether or not
// a sample is received, so it follows the offset's phase through the gaps between
// bursts and bursts without a preamble can keep the previous channel estimate. The rotation is an unrolled CORDIC
// with a half-turn pre-rotation and gain compensation; its result is registered, so
// the corrected sample appears one clock after the input (y_valid follows rx_valid).
// The accumulator restarts at zero when a new step is loaded; the constant phase left
// over is taken out by the channel estimate of each burst. Before the first estimate
// the step is zero and samples pass unrotated (apart from CORDIC rounding).
// The design names frequency offset estimation and correction after symbol
// synchronisation; the CORDIC method, widths and timing are this design's choice.
module cfo_corr
  import h2_pkg::*;
#(
  parameter int PW   = 20,   // phase word: 2**PW units per full turn
  parameter int ITER = 16    // CORDIC iterations
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 tick,      // one pulse per sample period
  input  logic                 est_valid,
  input  logic signed [39:0]   est_i,
  input  logic signed [39:0]   est_q,
  input  logic signed [SW-1:0] rx_i,
  input  logic signed [SW-1:0] rx_q,
  input  logic                 rx_valid,
  output logic signed [SW-1:0] y_i,
  output logic signed [SW-1:0] y_q,
  output logic                 y_valid,
  output logic signed [PW-1:0] step,      // phase step per sample (2**PW per turn)
  output logic                 est_busy
);
  localparam int FB = 4;                  // extra fraction bits in the rotator
  localparam int RW = SW + 2 + FB;        // rotator width (CORDIC gain < 2)
  localparam int KG = 39797;              // round(2**16 / 1.64676), CORDIC gain inverse

  // atan(2**-i) as a fraction of a full turn: round(atan(2**-i) / (2*pi) * 2**40),
  // rounded down to 2**PW units per turn (PW <= 40)
  function automatic logic signed [PW-1:0] atan_t(int i);
    logic [63:0] a;
    case (i)
      0: a = 64'd137438953472;  1: a = 64'd81134951838;  2: a = 64'd42869480287;
      3: a = 64'd21761217566;   4: a = 64'd10922836750;  5: a = 64'd5466743129;
      6: a = 64'd2734038620;    7: a = 64'd1367102738;   8: a = 64'd683561799;
      9: a = 64'd341782203;    10: a = 64'd170891265;   11: a = 64'd85445653;
      12: a = 64'd42722829;    13: a = 64'd21361415;    14: a = 64'd10680707;
      15: a = 64'd5340354;     16: a = 64'd2670177;     17: a = 64'd1335088;
      default: a = 64'd0;
    endcase
    a = (a + (64'd1 << (39 - PW))) >> (40 - PW);
    return PW'(a);
  endfunction

  // ---- estimation: vectoring CORDIC on C ----
  logic signed [42:0]   vx, vy;
  logic signed [PW-1:0] vz;
  logic [4:0]           it;

  assign est_busy = (it != 5'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vx <= '0; vy <= '0; vz <= '0; it <= '0; step <= '0;
    end else if (est_valid) begin
      // bring C into the right half plane first (a half turn)
      vx <= (est_i < 0) ? -43'(est_i) : 43'(est_i);
      vy <= (est_i < 0) ? -43'(est_q) : 43'(est_q);
      vz <= (est_i < 0) ? PW'(1 << (PW - 1)) : '0;
      it <= 5'd1;
    end else if (it != 5'd0) begin
      if (vy >= 0) begin
        vx <= vx + (vy >>> (it - 1));
        vy <= vy - (vx >>> (it - 1));
        vz <= vz + atan_t(int'(it) - 1);
      end else begin
        vx <= vx - (vy >>> (it - 1));
        vy <= vy + (vx >>> (it - 1));
        vz <= vz - atan_t(int'(it) - 1);
      end
      if (it == 5'(ITER)) begin
        it   <= '0;
        step <= vz >>> 4;    // angle over the 16-sample period
      end else begin
        it <= it + 1'b1;
      end
    end
  end

  // ---- correction: phase accumulator and rotation CORDIC ----
  logic signed [PW-1:0] acc;
  logic                 new_step;
  logic signed [SW-1:0] ri, rq;

  assign new_step = (it == 5'(ITER));

  always_comb begin
    logic signed [RW-1:0] x, y, xn;
    logic signed [PW-1:0] z;
    logic signed [RW+16:0] px, py;
    z = -acc;
    x = RW'(rx_i) <<< FB;
    y = RW'(rx_q) <<< FB;
    // half-turn pre-rotation keeps the remaining angle within a quarter turn
    if (z > PW'(1 << (PW - 2)) || z < -PW'(1 << (PW - 2))) begin
      x = -x;
      y = -y;
      z = z + PW'(1 << (PW - 1));
    end
    for (int i = 0; i < ITER; i++) begin
      if (z >= 0) begin
        xn = x - (y >>> i);
        y  = y + (x >>> i);
        z  = z - atan_t(i);
      end else begin
        xn = x + (y >>> i);
        y  = y - (x >>> i);
        z  = z + atan_t(i);
      end
      x = xn;
    end
    px = (RW+17)'(x) * KG + (RW+17)'(1 << (15 + FB));
    py = (RW+17)'(y) * KG + (RW+17)'(1 << (15 + FB));
    px = px >>> (16 + FB);
    py = py >>> (16 + FB);
    ri = (px > (2 ** (SW - 1)) - 1) ? SW'((2 ** (SW - 1)) - 1) :
         (px < -(2 ** (SW - 1)))    ? SW'(-(2 ** (SW - 1)))    : SW'(px);
    rq = (py > (2 ** (SW - 1)) - 1) ? SW'((2 ** (SW - 1)) - 1) :
         (py < -(2 ** (SW - 1)))    ? SW'(-(2 ** (SW - 1)))    : SW'(py);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; y_i <= '0; y_q <= '0; y_valid <= 1'b0;
    end else begin
      y_valid <= rx_valid;
      if (rx_valid) begin
        y_i <= ri;
        y_q <= rq;
      end
      if (new_step)  acc <= '0;
      else if (tick) acc <= acc + step;
    end
  end
endmodule
