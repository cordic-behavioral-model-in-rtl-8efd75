// cordic_atan_rom: elementary-angle table of the CORDIC rotator.
//
// For iteration index k (0-based) it returns the micro-rotation angle
// atan(2^-k) in radians, in the signed WIDTH-bit format with FRAC fraction
// bits (Q2.29 by default: k = 0 gives pi/4 = 32'h1921_FB54).
//
// The first ANGLE_LENGTH entries are a constant table computed at elaboration
// (see cordic_pkg). For k >= ANGLE_LENGTH the last table entry is shifted
// right arithmetically by (k - ANGLE_LENGTH + 1), the rule of the original
// model, which keeps halving the angle once its table runs out. At 29
// fraction bits all entries past k = 30 are already zero, so this only
// matters for much wider formats.
//
// Interface: idx in, angle out. Purely combinational, no clock. Holding the
// angle as a lookup (rather than in a register updated each iteration, as the
// model does) is this design's choice; the value seen by each iteration is
// the same.
module cordic_atan_rom
  import cordic_pkg::*;
#(
  parameter int unsigned WIDTH        = CORDIC_WIDTH,
  parameter int unsigned FRAC         = CORDIC_FRAC,
  parameter int unsigned ANGLE_LENGTH = ANGLE_TABLE_LEN,
  parameter int unsigned IDX_W        = 4
) (
  input  logic [IDX_W-1:0] idx,
  output logic [WIDTH-1:0] angle
);

  typedef logic [WIDTH-1:0] angle_tab_t [ANGLE_LENGTH];

  function automatic angle_tab_t build_table();
    angle_tab_t t;
    for (int unsigned k = 0; k < ANGLE_LENGTH; k++)
      t[k] = WIDTH'(atan_fixed(k, FRAC));
    return t;
  endfunction

  localparam angle_tab_t ANGLES = build_table();

  // Wide enough to hold any index and the table length.
  localparam int unsigned CMP_W = (IDX_W > 16) ? IDX_W + 1 : 17;

  localparam int unsigned AW = (ANGLE_LENGTH > 1) ? $clog2(ANGLE_LENGTH) : 1;

  logic [CMP_W-1:0] k_ext;
  assign k_ext = CMP_W'(idx);

  always_comb begin
    if (k_ext < CMP_W'(ANGLE_LENGTH)) begin
      angle = ANGLES[k_ext[AW-1:0]];
    end else begin
      angle = WIDTH'($signed(ANGLES[ANGLE_LENGTH-1]) >>> (k_ext - CMP_W'(ANGLE_LENGTH - 1)));
    end
  end

endmodule
