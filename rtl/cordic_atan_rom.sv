// cordic_atan_rom: the elementary-angle table of a circular CORDIC.
//
// Entry i holds alpha_i = atan(2^-i) in radians, as a signed ZW-bit number with
// FRAC fractional bits (rounded to nearest). The table has N entries, one per
// iteration; an index past the end reads 0. The contents are computed at
// elaboration from the series in cordic_pkg, so a change of word length or
// iteration count needs no regenerated data file.
//
// Interface: idx selects the entry, alpha is the entry. Purely combinational;
// when idx is a constant (as in an unrolled pipeline) synthesis reduces the
// table to that one constant.
module cordic_atan_rom #(
  parameter int unsigned N    = 16,                       // entries = iterations
  parameter int unsigned ZW   = 21,                       // angle word width
  parameter int unsigned FRAC = 18,                       // fractional bits of the angle
  localparam int unsigned IW  = (N > 1) ? $clog2(N) : 1
) (
  input  logic [IW-1:0]          idx,
  output logic signed [ZW-1:0]   alpha
);

  typedef logic signed [ZW-1:0] table_t [N];

  function automatic table_t build_table();
    table_t t;
    for (int i = 0; i < int'(N); i++)
      t[i] = ZW'(cordic_pkg::to_fixed(cordic_pkg::atan_pow2(i), int'(FRAC)));
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_comb begin
    if (32'(idx) < N) alpha = TABLE[idx];
    else              alpha = '0;
  end

endmodule
