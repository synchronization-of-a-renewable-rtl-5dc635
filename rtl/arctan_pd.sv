// arctan_pd: phase detector of the TDTL, e(k) = f(atan(x(k) / y(k))), taken as
// the four-quadrant arctangent so the error covers the whole circle and the
// wrap f(g) = -pi + ((g + pi) mod 2*pi) falls out of binary-angle arithmetic.
// Because only the ratio x/y enters, the error does not depend on the grid
// amplitude (which is why a voltage sag does not disturb the gain of the loop).
//
// Implementation: an iterative CORDIC in vectoring mode, one micro-rotation
// per clock. The vector (y, x) is first turned by pi if it lies in the left
// half plane; then ITER rotations by +-atan(2^-i) drive its second component
// to zero while the rotations are summed in a 16-bit binary angle
// (pi = 2^15). The rotation angles are atan(2^-i) * 2^15 / pi, rounded.
// Inputs are widened by GUARD bits so small amplitudes keep their precision.
// atan2(0, 0) is 0.
//
// Interface/timing: `start` loads x and y (ignored while busy); `e` and
// `e_valid` appear ITER + 1 clocks later. The arctangent function is the
// published design's; the CORDIC realisation and its precision are this design's.
module arctan_pd
  import tdtl_pkg::*;
#(
  parameter int ITER = 15
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  sample_t x,
  input  sample_t y,
  output logic    busy,
  output angle_t  e,
  output logic    e_valid
);

  localparam int GUARD = 6;
  localparam int VW    = SAMPLE_W + GUARD + 3;   // sign, negation and CORDIC gain

  typedef logic signed [VW-1:0] vec_t;

  // atan(2^-i) in binary-angle units, pi = 2^15
  function automatic angle_t atan_step(int i);
    case (i)
      0:  return angle_t'(8192);
      1:  return angle_t'(4836);
      2:  return angle_t'(2555);
      3:  return angle_t'(1297);
      4:  return angle_t'(651);
      5:  return angle_t'(326);
      6:  return angle_t'(163);
      7:  return angle_t'(81);
      8:  return angle_t'(41);
      9:  return angle_t'(20);
      10: return angle_t'(10);
      11: return angle_t'(5);
      12: return angle_t'(3);
      13: return angle_t'(1);
      14: return angle_t'(1);
      default: return angle_t'(0);
    endcase
  endfunction

  vec_t          vx, vy;
  angle_t        z;
  logic [4:0]    it;
  logic          zero;          // both inputs zero: result 0
  vec_t          wx, wy;

  always_comb begin
    wx = vec_t'(y) <<< GUARD;
    wy = vec_t'(x) <<< GUARD;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vx      <= '0;
      vy      <= '0;
      z       <= '0;
      it      <= '0;
      zero    <= 1'b0;
      busy    <= 1'b0;
      e       <= '0;
      e_valid <= 1'b0;
    end else begin
      e_valid <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          it   <= '0;
          zero <= (x == 0) && (y == 0);
          if (wx < 0) begin
            vx <= -wx;
            vy <= -wy;
            z  <= angle_t'(-32768);      // rotated by pi
          end else begin
            vx <= wx;
            vy <= wy;
            z  <= '0;
          end
        end
      end else begin
        if (vy >= 0) begin
          vx <= vx + (vy >>> it);
          vy <= vy - (vx >>> it);
          z  <= z + atan_step(int'(it));
        end else begin
          vx <= vx - (vy >>> it);
          vy <= vy + (vx >>> it);
          z  <= z - atan_step(int'(it));
        end
        if (int'(it) == ITER - 1) begin
          busy    <= 1'b0;
          e_valid <= 1'b1;
          // the result is taken from the last rotation
          if (zero)          e <= '0;
          else if (vy >= 0)  e <= z + atan_step(int'(it));
          else               e <= z - atan_step(int'(it));
        end
        it <= it + 1'b1;
      end
    end
  end

endmodule
