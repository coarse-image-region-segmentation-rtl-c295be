// rf_lut: lookup-table memory of the resistive-fuse pixel update.
//
// Holds NTAB (1 to 3) tables of 2**NIN entries of KOUT bits each; `sel` picks the table
// and `x` (a difference magnitude) the entry. Used as LUT1 (y = sigma * x, one
// table) and as LUT2A-LUT2C (the conductance G of the nonlinear resistor, one
// table per annealing phase, selected by the phase). The contents are computed
// at elaboration by rf_pkg::lut_entry: linear with slope
// SLOPE_NUM / 2**SLOPE_SHIFT, saturated to KOUT bits, and zero for
// x >= DELTA<sel> (fuse blown). `blown` reports that last condition, which is
// the edge information of the network.
//
// Timing: purely combinational (asynchronous read), as in the published pixel
// circuit where the LUT sits between the registers. The table formula and the
// read-only implementation are this design's choices; the published design
// only states the function of each table.
module rf_lut
  import rf_pkg::*;
#(
  parameter int unsigned NIN         = SER_N,
  parameter int unsigned KOUT        = SER_K,
  parameter int unsigned NTAB        = 3,
  parameter int unsigned SLOPE_NUM   = SER_G_NUM,
  parameter int unsigned SLOPE_SHIFT = SER_G_SHIFT,
  parameter int unsigned DELTA0      = SER_DELTA_A,   // threshold of table 0
  parameter int unsigned DELTA1      = SER_DELTA_B,   // threshold of table 1
  parameter int unsigned DELTA2      = SER_DELTA_C,   // threshold of table 2
  localparam int unsigned SELW       = (NTAB > 1) ? $clog2(NTAB) : 1
) (
  input  logic [SELW-1:0] sel,
  input  logic [NIN-1:0]  x,
  output logic [KOUT-1:0] y,
  output logic            blown
);

  localparam int unsigned ENTRIES = 2 ** NIN;

  typedef logic [KOUT-1:0] rom_t [NTAB * ENTRIES];

  function automatic int unsigned delta_of(input int t);
    return (t == 0) ? DELTA0 : (t == 1) ? DELTA1 : DELTA2;
  endfunction

  function automatic rom_t build_rom();
    rom_t r;
    for (int t = 0; t < NTAB; t++)
      for (int a = 0; a < ENTRIES; a++)
        r[t * ENTRIES + a] = KOUT'(lut_entry(a, SLOPE_NUM, SLOPE_SHIFT, delta_of(t), KOUT));
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  logic in_range;
  assign in_range = (32'(sel) < NTAB);

  always_comb begin
    y     = '0;
    blown = 1'b0;
    if (in_range) begin
      y     = ROM[32'(sel) * ENTRIES + 32'(x)];
      blown = 32'(x) >= delta_of(32'(sel));
    end
  end

endmodule
