// cordic_gain: CORDIC gain compensation.
//
// N rotation-mode micro-rotations scale the vector by
// K(N) = prod_{m=0..N-1} sqrt(1 + 2^-2m) (about 1.6468 for N = 10). This
// block multiplies a result by the reciprocal, kprod = 1/K(N), taken from the
// gain table at index min(N, KPROD_LENGTH) - 1; beyond that length the
// product no longer changes at 29 fraction bits.
//
// v_out = round(v_in * kprod), both in the signed WIDTH-bit format with FRAC
// fraction bits. The constant is rounded to FRAC bits at elaboration, the
// 2*WIDTH-bit product is rounded half-up back to FRAC bits and wraps to WIDTH
// bits. The original model does the same scaling in floating point and, in
// its main configuration, leaves it switched off; the top instantiates this
// block behind a parameter for that reason.
//
// Interface: v_in in, v_out out. Purely combinational.
module cordic_gain
  import cordic_pkg::*;
#(
  parameter int unsigned WIDTH        = CORDIC_WIDTH,
  parameter int unsigned FRAC         = CORDIC_FRAC,
  parameter int unsigned N            = CORDIC_ITERS,
  parameter int unsigned KPROD_LENGTH = KPROD_TABLE_LEN
) (
  input  logic signed [WIDTH-1:0] v_in,
  output logic signed [WIDTH-1:0] v_out
);

  localparam int unsigned KIDX = ((N > KPROD_LENGTH) ? KPROD_LENGTH : ((N < 1) ? 1 : N)) - 1;
  localparam logic signed [WIDTH-1:0] KPROD = WIDTH'(kprod_fixed(KIDX, FRAC));

  localparam int unsigned PW = 2 * WIDTH;

  logic signed [PW-1:0] prod;
  logic signed [PW-1:0] rounded;

  assign prod    = PW'(v_in) * PW'(KPROD);
  assign rounded = prod + (PW'(1) <<< (FRAC - 1));
  assign v_out   = WIDTH'(rounded >>> FRAC);

endmodule
