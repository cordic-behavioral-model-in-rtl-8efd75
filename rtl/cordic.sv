// cordic: iterative rotation-mode CORDIC rotator.
//
// Given a vector (xi, yi) and an angle zi in radians, the unit rotates the
// vector by zi using only shifts and additions. Each of N micro-rotations
// turns the vector by +/- atan(2^-k) (k = 0 .. N-1), choosing the sign that
// drives the residual angle z toward zero. After N steps
//   xo ~ K * (xi cos zi - yi sin zi)
//   yo ~ K * (yi cos zi + xi sin zi)
//   zo ~ 0 (the angle left over, below atan(2^-(N-1)) in magnitude)
// with the CORDIC gain K ~ 1.6468. With the default GAIN_COMP = 0 the gain is
// left in the result, as in the original model: feed xi = 1/K, yi = 0 to get
// cos zi and sin zi directly. GAIN_COMP = 1 multiplies xo and yo by 1/K on
// the way out (block cordic_gain). Convergence needs |zi| <= about 1.74 rad.
//
// Numbers are signed WIDTH-bit fixed point with FRAC fraction bits (Q2.29 by
// default: 1.0 = 32'h2000_0000).
//
// Structure: one set of x, y, z registers, one combinational micro-rotation
// (cordic_microrotation) with its angle from cordic_atan_rom, and a sequencer
// (cordic_ctrl) that counts the iterations. The result is copied to the
// output registers xo, yo, zo when the last iteration completes.
//
// Interface and timing: load is sampled on the rising clock edge while the
// unit is idle, capturing xi, yi, zi. The N iterations take the next N
// edges; ready is then high for exactly one clock, with xo, yo, zo valid from
// that clock on and held until the next result. A load in the ready clock
// starts the next operation at once; a load while busy is ignored. Latency
// from the load edge to ready is N clocks. rst_n is an asynchronous active-low
// reset that clears everything, including the outputs (the model starts all
// of them at zero and holds the unit idle until its reset input rises).
module cordic
  import cordic_pkg::*;
#(
  parameter int unsigned WIDTH        = CORDIC_WIDTH,
  parameter int unsigned FRAC         = CORDIC_FRAC,
  parameter int unsigned N            = CORDIC_ITERS,
  parameter int unsigned ANGLE_LENGTH = ANGLE_TABLE_LEN,
  parameter int unsigned KPROD_LENGTH = KPROD_TABLE_LEN,
  parameter bit          GAIN_COMP    = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] xi,
  input  logic [WIDTH-1:0] yi,
  input  logic [WIDTH-1:0] zi,
  output logic             ready,
  output logic [WIDTH-1:0] xo,
  output logic [WIDTH-1:0] yo,
  output logic [WIDTH-1:0] zo
);

  localparam int unsigned IDX_W = (N > 1) ? $clog2(N) : 1;

  logic             start, step, last;
  logic [IDX_W-1:0] idx;

  logic [WIDTH-1:0] xn, yn, zn;     // working registers
  logic [WIDTH-1:0] xt, yt, zt;     // result of this clock's micro-rotation
  logic [WIDTH-1:0] angle;
  logic [WIDTH-1:0] xg, yg;         // gain-compensated xt, yt

  cordic_ctrl #(
    .N     (N),
    .IDX_W (IDX_W)
  ) u_ctrl (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (load),
    .start (start),
    .step  (step),
    .last  (last),
    .idx   (idx),
    .ready (ready)
  );

  cordic_atan_rom #(
    .WIDTH        (WIDTH),
    .FRAC         (FRAC),
    .ANGLE_LENGTH (ANGLE_LENGTH),
    .IDX_W        (IDX_W)
  ) u_rom (
    .idx   (idx),
    .angle (angle)
  );

  cordic_microrotation #(
    .WIDTH   (WIDTH),
    .SHIFT_W (IDX_W)
  ) u_rot (
    .x_in  (xn),
    .y_in  (yn),
    .z_in  (zn),
    .angle (angle),
    .shift (idx),
    .x_out (xt),
    .y_out (yt),
    .z_out (zt)
  );

  cordic_gain #(
    .WIDTH        (WIDTH),
    .FRAC         (FRAC),
    .N            (N),
    .KPROD_LENGTH (KPROD_LENGTH)
  ) u_gain_x (
    .v_in  (xt),
    .v_out (xg)
  );

  cordic_gain #(
    .WIDTH        (WIDTH),
    .FRAC         (FRAC),
    .N            (N),
    .KPROD_LENGTH (KPROD_LENGTH)
  ) u_gain_y (
    .v_in  (yt),
    .v_out (yg)
  );

  // Working registers: capture on start, update on every iteration.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xn <= '0;
      yn <= '0;
      zn <= '0;
    end else if (start) begin
      xn <= xi;
      yn <= yi;
      zn <= zi;
    end else if (step) begin
      xn <= xt;
      yn <= yt;
      zn <= zt;
    end
  end

  // Output registers: loaded with the last iteration's result.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xo <= '0;
      yo <= '0;
      zo <= '0;
    end else if (last) begin
      xo <= GAIN_COMP ? xg : xt;
      yo <= GAIN_COMP ? yg : yt;
      zo <= zt;
    end
  end

endmodule
