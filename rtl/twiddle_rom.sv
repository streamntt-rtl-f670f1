// twiddle_rom: constant table of butterfly twiddle factors for one butterfly
// unit, filled at elaboration time (no table file).
//
// Entry e holds psi^bitrev(2^STAGE + BASE + e*STEP) mod Q, the twiddle of
// stride group BASE + e*STEP at stage STAGE of the merged negacyclic NTT (see
// ntt_pkg). An L-stage unit walks all 2^STAGE groups (BASE = 0, STEP = 1); an
// X-stage butterfly sees one group per incoming window (BASE = its group in
// the window, STEP = groups per window). Precomputing the factors at compile
// time follows the original design; the generating formula is this design's.
//
// Interface: combinational read, tw = ROM[addr] (LUT ROM; a registered BRAM
// read would add one pipeline stage in front of the butterfly).
module twiddle_rom #(
  parameter int unsigned     W     = 32,
  parameter longint unsigned Q     = 64'd3221225473,
  parameter int unsigned     N     = 1024,
  parameter longint unsigned PSI   = 64'd1168849724,
  parameter int unsigned     STAGE = 6,
  parameter int unsigned     DEPTH = 64,
  parameter int unsigned     BASE  = 0,
  parameter int unsigned     STEP  = 1,
  localparam int unsigned    AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic [AW-1:0] addr,
  output logic [W-1:0]  tw
);
  typedef logic [DEPTH-1:0][W-1:0] rom_t;

  function automatic rom_t gen_rom();
    rom_t r;
    for (int unsigned e = 0; e < DEPTH; e++)
      r[e] = W'(ntt_pkg::twiddle(STAGE, BASE + e * STEP, N, PSI, Q));
    return r;
  endfunction

  localparam rom_t ROM = gen_rom();

  always_comb begin
    if (DEPTH == 1) tw = ROM[0];
    else            tw = ROM[addr];
  end
endmodule
