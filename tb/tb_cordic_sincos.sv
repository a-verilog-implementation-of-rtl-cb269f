// tb_cordic_sincos: end-to-end test of the sine/cosine generator at its
// default configuration (16-bit words, 16 pipelined iterations). The checker
// sends the 60-degree example, fixed angles, a back-to-back burst, a stream
// with bubbles and a reset with a full pipeline, and compares every result
// with $cos/$sin and every latency with the number of iterations.
module tb_cordic_sincos;
  localparam int unsigned WIDTH = 16;

  logic clk = 0;
  always #5 clk = ~clk;

  logic                    rst_n, in_valid, out_valid, done;
  logic signed [WIDTH-1:0] angle, cos_out, sin_out;
  int                      checks, failures;

  cordic_sincos dut (
    .clk, .rst_n, .in_valid, .angle, .out_valid, .cos_out, .sin_out
  );

  cordic_sincos_checker #(.WIDTH(WIDTH)) chk (
    .clk, .rst_n, .in_valid, .angle, .out_valid, .cos_out, .sin_out,
    .done, .checks, .failures
  );

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
