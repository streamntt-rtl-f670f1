// twiddle_rom_dp: two-port twiddle table shared by two consecutive L-stage
// butterfly units of one lane.
//
// In the merged negacyclic NTT the twiddle of stage s, stride group b is
// T[2^s + b] with T[m] = psi^bitrev(m) mod Q (bitrev over log2(n) bits), so
// stages s and s+1 together use the contiguous range T[2^s .. 2^(s+2)-1].
// This table holds that range (3*2^s entries, computed at elaboration) and
// gives each of the two units its own read port: port A serves stage s with
// address b, port B serves stage s+1 with address 2^s + b. Sharing one
// two-port table between two merged butterflies follows the original design
// (which maps it onto one dual-port BRAM); the table layout is this design's.
//
// Interface: two combinational read ports.
module twiddle_rom_dp #(
  parameter int unsigned     W     = 32,
  parameter longint unsigned Q     = 64'd3221225473,
  parameter int unsigned     N     = 1024,
  parameter longint unsigned PSI   = 64'd1168849724,
  parameter int unsigned     STAGE = 5,
  localparam int unsigned    DEPTH = 3 << STAGE,
  localparam int unsigned    AW    = $clog2(DEPTH)
) (
  input  logic [AW-1:0] addr_a,
  input  logic [AW-1:0] addr_b,
  output logic [W-1:0]  tw_a,
  output logic [W-1:0]  tw_b
);
  typedef logic [DEPTH-1:0][W-1:0] rom_t;

  function automatic rom_t gen_rom();
    rom_t r;
    for (int unsigned e = 0; e < DEPTH; e++)
      r[e] = W'(ntt_pkg::powmod(PSI, longint'(ntt_pkg::bitrev((1 << STAGE) + e, $clog2(N))), Q));
    return r;
  endfunction

  localparam rom_t ROM = gen_rom();

  assign tw_a = ROM[addr_a];
  assign tw_b = ROM[addr_b];
endmodule
