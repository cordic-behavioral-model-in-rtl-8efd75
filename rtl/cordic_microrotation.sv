// cordic_microrotation: one rotation-mode CORDIC step.
//
// The step rotates the vector (x, y) by +/- atan(2^-k) without a multiplier
// and moves the residual angle z toward zero:
//   z >= 0 (sign bit clear):  x' = x - (y >>> k)   y' = y + (x >>> k)   z' = z - angle
//   z <  0 (sign bit set):    x' = x + (y >>> k)   y' = y - (x >>> k)   z' = z + angle
// where angle = atan(2^-k) and >>> is an arithmetic shift. Each step also
// scales the vector by sqrt(1 + 2^-2k); that gain is left in the result.
// This is the step of the original model; all sums wrap in WIDTH bits as its
// signed arithmetic does.
//
// Interface: x_in, y_in, z_in, angle and the shift k in; x_out, y_out, z_out
// out. Purely combinational; the caller registers the results.
module cordic_microrotation
  import cordic_pkg::*;
#(
  parameter int unsigned WIDTH   = CORDIC_WIDTH,
  parameter int unsigned SHIFT_W = 4
) (
  input  logic signed [WIDTH-1:0]   x_in,
  input  logic signed [WIDTH-1:0]   y_in,
  input  logic signed [WIDTH-1:0]   z_in,
  input  logic signed [WIDTH-1:0]   angle,
  input  logic        [SHIFT_W-1:0] shift,
  output logic signed [WIDTH-1:0]   x_out,
  output logic signed [WIDTH-1:0]   y_out,
  output logic signed [WIDTH-1:0]   z_out
);

  logic signed [WIDTH-1:0] x_sh, y_sh;
  logic                    z_neg;

  assign x_sh  = x_in >>> shift;
  assign y_sh  = y_in >>> shift;
  assign z_neg = z_in[WIDTH-1];

  always_comb begin
    if (!z_neg) begin
      x_out = x_in - y_sh;
      y_out = y_in + x_sh;
      z_out = z_in - angle;
    end else begin
      x_out = x_in + y_sh;
      y_out = y_in - x_sh;
      z_out = z_in + angle;
    end
  end

endmodule
