// tb_cordic_atan_rom: checks the elementary-angle table against atan(2^-i)
// computed here with the simulator's own $atan, for a table that fills its
// index range (16 entries) and for one that does not (12 entries), where the
// unused indices must read 0.
module tb_cordic_atan_rom;
  localparam int unsigned ZW = 21, FRAC = 18;

  int checks = 0, failures = 0;
  logic [3:0]          idx;
  logic signed [ZW-1:0] a16, a12;

  cordic_atan_rom #(.N(16), .ZW(ZW), .FRAC(FRAC)) u16 (.idx(idx), .alpha(a16));
  cordic_atan_rom #(.N(12), .ZW(ZW), .FRAC(FRAC)) u12 (.idx(idx), .alpha(a12));

  function automatic longint ref_alpha(int i);
    return longint'($atan(2.0 ** (-i)) * (2.0 ** FRAC));
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got > exp + 1 || got < exp - 1) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      idx = 4'(i);
      #1;
      check($sformatf("N=16 alpha[%0d]", i), longint'(a16), ref_alpha(i));
      if (i < 12) check($sformatf("N=12 alpha[%0d]", i), longint'(a12), ref_alpha(i));
      else        check($sformatf("N=12 unused[%0d]", i), longint'(a12), 0);
    end
    // alpha_0 is pi/4 exactly in this format: 205887.4 -> 205887
    idx = 0; #1;
    checks++;
    if (a16 != 21'sd205887) begin failures++; $display("FAIL alpha_0 = %0d", a16); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
