// tb_cordic_stage: drives random vectors and residual angles into two
// micro-rotation stages (iterations 0 and 5) and compares the registered
// outputs, one cycle later, with the shift-add equations evaluated here with
// an independently computed atan(2^-i). It also checks the valid flag follows
// the input with one cycle of delay and that reset clears it.
module tb_cordic_stage;
  localparam int unsigned W = 21, FRAC = 18, N = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                 vin;
  logic signed [W-1:0]  xi, yi, zi;
  logic                 vo0, vo5;
  logic signed [W-1:0]  xo0, yo0, zo0, xo5, yo5, zo5;

  cordic_stage #(.XYW(W), .ZW(W), .FRAC(FRAC), .N(N), .SHIFT(0)) u0 (
    .clk, .rst_n, .in_valid(vin), .x_in(xi), .y_in(yi), .z_in(zi),
    .out_valid(vo0), .x_out(xo0), .y_out(yo0), .z_out(zo0));
  cordic_stage #(.XYW(W), .ZW(W), .FRAC(FRAC), .N(N), .SHIFT(5)) u5 (
    .clk, .rst_n, .in_valid(vin), .x_in(xi), .y_in(yi), .z_in(zi),
    .out_valid(vo5), .x_out(xo5), .y_out(yo5), .z_out(zo5));

  function automatic longint alpha(int i);
    return longint'($atan(2.0 ** (-i)) * (2.0 ** FRAC));
  endfunction

  // Expected results, worked out with integer arithmetic on 64-bit values.
  function automatic void expect_stage(int i, longint x, longint y, longint z,
                                       output longint ex, output longint ey,
                                       output longint ez);
    longint xs, ys;
    xs = x >>> i;
    ys = y >>> i;
    if (z >= 0) begin ex = x - ys; ey = y + xs; ez = z - alpha(i); end
    else        begin ex = x + ys; ey = y - xs; ez = z + alpha(i); end
  endfunction

  task automatic check(string what, longint got, longint exp, int tol);
    checks++;
    if (got > exp + tol || got < exp - tol) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint x, y, z, ex, ey, ez;
    logic v;
    vin = 0; xi = 0; yi = 0; zi = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (vo0 || vo5) begin failures++; $display("FAIL valid during reset"); end
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      // magnitudes up to 2^18 (|v| <= 1.0) so no result can overflow 21 bits
      x = longint'($signed($urandom_range(0, 2 ** 19))) - (2 ** 18);
      y = longint'($signed($urandom_range(0, 2 ** 19))) - (2 ** 18);
      z = longint'($signed($urandom_range(0, 2 ** 19))) - (2 ** 18);
      if (n == 0) z = 0;           // z = 0 counts as a positive rotation
      v = (n % 7) != 3;
      vin = v; xi = W'(x); yi = W'(y); zi = W'(z);
      @(posedge clk); #1;
      check("valid0", longint'(vo0), longint'(v), 0);
      check("valid5", longint'(vo5), longint'(v), 0);
      expect_stage(0, x, y, z, ex, ey, ez);
      check("x0", xo0, ex, 0); check("y0", yo0, ey, 0); check("z0", zo0, ez, 1);
      expect_stage(5, x, y, z, ex, ey, ez);
      check("x5", xo5, ex, 0); check("y5", yo5, ey, 0); check("z5", zo5, ez, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
