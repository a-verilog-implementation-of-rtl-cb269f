// cordic_sincos: fully pipelined fixed-point CORDIC sine/cosine generator.
//
// The circular CORDIC in rotation mode turns the vector (K_c, 0) by the input
// angle theta using only shifts and adds: iteration i rotates by +/-atan(2^-i),
// the sign chosen so that the residual angle goes to zero. The ITER stages are
// unrolled into a pipeline, one cordic_stage per iteration, and the number of
// iterations equals the word length WIDTH, as in the classic formulation where
// b iterations are run on a b-bit machine. The gain of the iterations,
// 1/K_c = prod sqrt(1+2^-2i), is cancelled up front by starting from
// x0 = K_c instead of 1, so the final vector is (cos theta, sin theta).
//
// Number formats (all two's complement):
//   angle            WIDTH bits, radians, WIDTH-2 fractional bits (range -2..2)
//   cos_out, sin_out WIDTH bits, WIDTH-2 fractional bits (1.0 = 2^(WIDTH-2))
// Inside, x, y and z carry GUARD extra fractional bits and one extra integer
// bit of headroom; the outputs are rounded to nearest from the last stage.
// The angle must lie within the convergence range of the circular CORDIC,
// |theta| <= sum atan(2^-i) ~ 1.7433 rad (99.9 degrees); an assertion checks it.
// The 16/24/32-bit word lengths and "iterations = word length" follow the
// source description; the angle format, the guard bits, the output rounding,
// the reset and the valid flag are choices of this design.
//
// Timing: one angle may be accepted every clock cycle (in_valid). Each stage
// is one register, the first one capturing the angle, so an angle presented
// in clock cycle n is on cos_out/sin_out, with out_valid, in cycle n+ITER:
// a latency of ITER cycles and a throughput of one result per cycle.
// rst_n is asynchronous and active low.
module cordic_sincos #(
  parameter int unsigned WIDTH = 16,     // word length: 16, 24 or 32
  parameter int unsigned ITER  = WIDTH,  // iterations = pipeline stages
  parameter int unsigned GUARD = 4       // extra internal fractional bits
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [WIDTH-1:0] angle,
  output logic                    out_valid,
  output logic signed [WIDTH-1:0] cos_out,
  output logic signed [WIDTH-1:0] sin_out
);

  localparam int unsigned FRAC  = WIDTH - 2;       // fractional bits at the ports
  localparam int unsigned IFRAC = FRAC + GUARD;    // fractional bits inside
  localparam int unsigned DW    = IFRAC + 3;       // sign + 2 integer bits + fraction

  // Starting vector x0 = K_c (scale factor pre-applied), y0 = 0.
  localparam logic signed [DW-1:0] X0 =
      DW'(cordic_pkg::to_fixed(cordic_pkg::scale_kc(int'(ITER)), int'(IFRAC)));

  // Largest angle the iterations can reach, in port LSBs.
  function automatic longint conv_limit();
    real s;
    s = 0.0;
    for (int i = 0; i < int'(ITER); i++) s = s + cordic_pkg::atan_pow2(i);
    return cordic_pkg::to_fixed(s, int'(FRAC));
  endfunction
  localparam longint ANGLE_MAX = conv_limit();

  logic                  v [ITER+1];
  logic signed [DW-1:0]  x [ITER+1];
  logic signed [DW-1:0]  y [ITER+1];
  logic signed [DW-1:0]  z [ITER+1];

  assign v[0] = in_valid;
  assign x[0] = X0;
  assign y[0] = '0;
  assign z[0] = DW'(angle) <<< GUARD;   // sign-extend, then align the fraction

  for (genvar i = 0; i < int'(ITER); i++) begin : g_stage
    cordic_stage #(
      .XYW(DW), .ZW(DW), .FRAC(IFRAC), .N(ITER), .SHIFT(i)
    ) u_stage (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (v[i]),
      .x_in     (x[i]),
      .y_in     (y[i]),
      .z_in     (z[i]),
      .out_valid(v[i+1]),
      .x_out    (x[i+1]),
      .y_out    (y[i+1]),
      .z_out    (z[i+1])
    );
  end

  // Round the last stage to the port precision (the residual z is dropped).
  function automatic logic signed [WIDTH-1:0] round_out(logic signed [DW-1:0] a);
    logic signed [DW:0] t;
    t = {a[DW-1], a};
    if (GUARD > 0) t = t + ((DW+1)'(1) <<< (GUARD - 1));
    t = t >>> GUARD;
    return WIDTH'(t);
  endfunction

  assign out_valid = v[ITER];
  assign cos_out   = round_out(x[ITER]);
  assign sin_out   = round_out(y[ITER]);

  // The circular CORDIC only converges inside +/- sum(alpha_i).
  a_angle_range: assert property (@(posedge clk)
      in_valid |-> (longint'(angle) <= ANGLE_MAX && longint'(angle) >= -ANGLE_MAX))
    else $error("cordic_sincos: angle %0d outside the convergence range +/-%0d",
                angle, ANGLE_MAX);

endmodule
