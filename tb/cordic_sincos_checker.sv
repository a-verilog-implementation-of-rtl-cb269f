// cordic_sincos_checker: stimulus and scoreboard for one cordic_sincos.
//
// It owns the reset and the input side of the generator, keeps a queue of the
// angles sent with the cycle each was accepted in, and on every out_valid
// compares cos_out/sin_out with $cos/$sin of the same (quantised) angle, to
// within TOL output LSBs, and the latency with ITER cycles. The sequence is:
// the 60-degree example angle on its own; a set of fixed angles including 0,
// both signs and the edges of the convergence range; a back-to-back burst of
// random angles (one per cycle); a random stream with bubbles; a reset while
// the pipeline is full; and a short burst after it. It counts how often each
// of these situations happened and flags any that did not.
module cordic_sincos_checker #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned ITER  = WIDTH,
  parameter int unsigned TOL   = 2,
  parameter int unsigned NRAND = 200
) (
  input  logic                    clk,
  output logic                    rst_n,
  output logic                    in_valid,
  output logic signed [WIDTH-1:0] angle,
  input  logic                    out_valid,
  input  logic signed [WIDTH-1:0] cos_out,
  input  logic signed [WIDTH-1:0] sin_out,
  output logic                    done,
  output int                      checks,
  output int                      failures
);
  localparam int unsigned FRAC = WIDTH - 2;
  localparam real SCALE = 2.0 ** FRAC;
  localparam longint LTOL = longint'(TOL);

  typedef struct { longint ang; longint cyc; } item_t;
  item_t  sb[$];
  longint cycle = 0;
  longint amax;
  longint max_err = 0;

  // how often each situation of interest occurred
  int n_single = 0, n_b2b = 0, n_bubble = 0, n_pos = 0, n_neg = 0,
      n_edge = 0, n_reset_flush = 0, n_results = 0;
  logic prev_out_valid = 0, prev_in_valid = 0, seen_gap = 0;

  task automatic fail(string msg);
    failures++;
    $display("FAIL (WIDTH=%0d) %s", WIDTH, msg);
  endtask

  // scoreboard: cycle count and output comparison
  always @(posedge clk) begin
    cycle++;
    #1;
    if (!rst_n) begin
      checks++;
      if (out_valid) fail("out_valid during reset");
    end else if (out_valid) begin
      item_t it;
      real   th;
      longint ec, es;
      checks += 3;
      if (sb.size() == 0) begin
        fail("result with no angle outstanding");
      end else begin
        it = sb.pop_front();
        th = real'(it.ang) / SCALE;
        ec = longint'($cos(th) * SCALE);
        es = longint'($sin(th) * SCALE);
        if (cycle - it.cyc != longint'(ITER))
          fail($sformatf("latency %0d, expected %0d", cycle - it.cyc, ITER));
        if (longint'(cos_out) > ec + LTOL || longint'(cos_out) < ec - LTOL)
          fail($sformatf("cos(%0d) = %0d, expected %0d", it.ang, cos_out, ec));
        if (longint'(sin_out) > es + LTOL || longint'(sin_out) < es - LTOL)
          fail($sformatf("sin(%0d) = %0d, expected %0d", it.ang, sin_out, es));
        if (n_results == 0)
          $display("WIDTH=%0d: angle %0d -> cos %0d, sin %0d (exact %0d, %0d)",
                   WIDTH, it.ang, cos_out, sin_out, ec, es);
        max_err = (longint'(cos_out) - ec > max_err) ? longint'(cos_out) - ec : max_err;
        max_err = (ec - longint'(cos_out) > max_err) ? ec - longint'(cos_out) : max_err;
        max_err = (longint'(sin_out) - es > max_err) ? longint'(sin_out) - es : max_err;
        max_err = (es - longint'(sin_out) > max_err) ? es - longint'(sin_out) : max_err;
        n_results++;
        if (prev_out_valid) n_b2b++;
      end
    end
    prev_out_valid = out_valid && rst_n;
  end

  // driver
  task automatic send(longint a);
    @(negedge clk);
    in_valid = 1;
    angle    = WIDTH'(a);
    if (prev_in_valid == 0 && seen_gap) n_bubble++;
    if (a >= 0) n_pos++; else n_neg++;
    if (a > amax * 15 / 16 || a < -amax * 15 / 16) n_edge++;
    sb.push_back('{ang: a, cyc: cycle});   // the cycle the angle is presented in
    @(posedge clk);
    prev_in_valid = 1;
    seen_gap = 1;
  endtask

  task automatic idle(int n);
    repeat (n) begin
      @(negedge clk);
      in_valid = 0;
      angle    = '0;
      prev_in_valid = 0;
    end
  endtask

  function automatic longint rand_angle();
    return longint'($urandom_range(0, 32'(2 * amax))) - amax;
  endfunction

  function automatic longint deg(real d);
    return longint'(d * 3.14159265358979323846 / 180.0 * SCALE);
  endfunction

  initial begin
    real s;
    int  seen [7];
    s = 0.0;
    for (int i = 0; i < int'(ITER); i++) s += $atan(2.0 ** (-i));
    amax = longint'(s * SCALE) - 1;
    checks = 0; failures = 0; done = 0;
    rst_n = 0; in_valid = 0; angle = '0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;
    idle(2);

    // the worked example: 60 degrees, alone in the pipeline
    send(deg(60.0));
    idle(int'(ITER) + 2);
    n_single = n_results;

    // fixed angles
    send(0); send(1); send(-1);
    send(deg(30.0));  send(deg(-30.0));
    send(deg(45.0));  send(deg(-45.0));
    send(deg(90.0));  send(deg(-90.0));
    send(amax);       send(-amax);
    idle(int'(ITER) + 2);

    // back-to-back burst
    repeat (NRAND) send(rand_angle());
    // random stream with bubbles
    repeat (NRAND) begin
      if ($urandom_range(0, 1) == 1) send(rand_angle());
      else idle(1);
    end
    // reset while the pipeline is full: every outstanding angle is lost
    repeat (int'(ITER)) send(rand_angle());
    @(negedge clk);
    in_valid = 0;
    rst_n    = 0;
    sb.delete();
    @(negedge clk);
    checks++;
    if (out_valid) fail("out_valid survived reset");
    else n_reset_flush++;
    rst_n = 1;
    idle(int'(ITER) + 2);
    checks++;
    if (n_results == 0) fail("no results");
    // a short burst after the reset
    repeat (8) send(rand_angle());
    idle(int'(ITER) + 2);
    checks++;
    if (sb.size() != 0) fail($sformatf("%0d results missing", sb.size()));

    $display("WIDTH=%0d largest error: %0d LSB", WIDTH, max_err);
    $display("WIDTH=%0d counts: results=%0d single=%0d back_to_back=%0d bubbles=%0d positive=%0d negative=%0d range_edge=%0d reset_flush=%0d",
             WIDTH, n_results, n_single, n_b2b, n_bubble, n_pos, n_neg, n_edge, n_reset_flush);
    seen[0] = n_single; seen[1] = n_b2b;  seen[2] = n_bubble; seen[3] = n_pos;
    seen[4] = n_neg;    seen[5] = n_edge; seen[6] = n_reset_flush;
    foreach (seen[k]) begin
      checks++;
      if (seen[k] == 0) fail($sformatf("situation %0d never happened", k));
    end
    done = 1;
  end
endmodule
