// tb_cordic_widths: runs the same end-to-end checks on the generator built
// for the other two word lengths, 24 and 32 bits (24 and 32 pipelined
// iterations), side by side.
module tb_cordic_widths;
  logic clk = 0;
  always #5 clk = ~clk;

  logic                 r24, v24, ov24, d24;
  logic signed [23:0]   a24, c24, s24;
  int                   k24, f24;
  logic                 r32, v32, ov32, d32;
  logic signed [31:0]   a32, c32, s32;
  int                   k32, f32;

  cordic_sincos #(.WIDTH(24)) dut24 (
    .clk, .rst_n(r24), .in_valid(v24), .angle(a24), .out_valid(ov24),
    .cos_out(c24), .sin_out(s24));
  cordic_sincos_checker #(.WIDTH(24)) chk24 (
    .clk, .rst_n(r24), .in_valid(v24), .angle(a24), .out_valid(ov24),
    .cos_out(c24), .sin_out(s24), .done(d24), .checks(k24), .failures(f24));

  cordic_sincos #(.WIDTH(32)) dut32 (
    .clk, .rst_n(r32), .in_valid(v32), .angle(a32), .out_valid(ov32),
    .cos_out(c32), .sin_out(s32));
  cordic_sincos_checker #(.WIDTH(32)) chk32 (
    .clk, .rst_n(r32), .in_valid(v32), .angle(a32), .out_valid(ov32),
    .cos_out(c32), .sin_out(s32), .done(d32), .checks(k32), .failures(f32));

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", k24 + k32, f24 + f32 + 1);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    wait (d24 && d32);
    $display("TB_RESULT checks=%0d failures=%0d", k24 + k32, f24 + f32);
    $finish;
  end
endmodule
