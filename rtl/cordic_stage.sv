// cordic_stage: one registered micro-rotation of a circular, rotation-mode CORDIC.
//
// For iteration i (parameter SHIFT) the stage computes
//   sigma = +1 if z >= 0, else -1
//   x'    = x - sigma * (y >>> i)
//   y'    = y + sigma * (x >>> i)
//   z'    = z - sigma * alpha_i,        alpha_i = atan(2^-i)
// i.e. it turns the vector (x, y) by +/-alpha_i, without the cos(alpha_i)
// factor, so that the residual angle z is driven towards zero. The shift is a
// fixed rewiring (arithmetic shift, truncating), so the stage is three adders
// and one sign test; alpha_i comes from cordic_atan_rom with a constant index.
// The rotation sense is counter-clockwise for positive z, so that y ends up as
// the sine; this is the mirror of the clockwise form in which the algorithm is
// often written and gives the same magnitudes.
//
// Interface: in_valid/x_in/y_in/z_in are captured on the rising clock edge;
// out_valid/x_out/y_out/z_out are the registered results, one cycle later.
// A new input may be given every cycle. rst_n is an asynchronous, active-low
// reset that clears the valid flag and the data registers.
module cordic_stage #(
  parameter int unsigned XYW   = 21,     // width of x and y
  parameter int unsigned ZW    = 21,     // width of the residual angle z
  parameter int unsigned FRAC  = 18,     // fractional bits of z (radians)
  parameter int unsigned N     = 16,     // table size = number of iterations
  parameter int unsigned SHIFT = 0       // iteration index i of this stage
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [XYW-1:0] x_in,
  input  logic signed [XYW-1:0] y_in,
  input  logic signed [ZW-1:0]  z_in,
  output logic                  out_valid,
  output logic signed [XYW-1:0] x_out,
  output logic signed [XYW-1:0] y_out,
  output logic signed [ZW-1:0]  z_out
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic signed [ZW-1:0]  alpha;
  logic signed [XYW-1:0] x_sh, y_sh, x_nxt, y_nxt;
  logic signed [ZW-1:0]  z_nxt;
  logic                  rot_pos;

  cordic_atan_rom #(.N(N), .ZW(ZW), .FRAC(FRAC)) u_rom (
    .idx   (IW'(SHIFT)),
    .alpha (alpha)
  );

  always_comb begin
    rot_pos = !z_in[ZW-1];
    x_sh    = x_in >>> SHIFT;
    y_sh    = y_in >>> SHIFT;
    if (rot_pos) begin
      x_nxt = x_in - y_sh;
      y_nxt = y_in + x_sh;
      z_nxt = z_in - alpha;
    end else begin
      x_nxt = x_in + y_sh;
      y_nxt = y_in - x_sh;
      z_nxt = z_in + alpha;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      x_out     <= '0;
      y_out     <= '0;
      z_out     <= '0;
    end else begin
      out_valid <= in_valid;
      x_out     <= x_nxt;
      y_out     <= y_nxt;
      z_out     <= z_nxt;
    end
  end

endmodule
