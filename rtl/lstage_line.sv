// lstage_line: merged dataflow module for one lane of all L-stages.
//
// In the early stages the stride str(s) = n/2^(s+1) exceeds NBU, so lane i
// of stage s only ever feeds lane i of stage s+1. All those butterflies of
// one lane (stages 0 .. log2(n) - log2(NBU) - 2) are therefore merged into one
// module, one icbu per stage, each with its own circular reorder buffer and
// all running concurrently. Units inside the module connect directly, without
// FIFOs, as in the original merged module. Merging also lets two units share
// one two-port twiddle table: stages 2p and 2p+1 read the same
// twiddle_rom_dp, each through its own port.
//
// Interface: input pairs at stride n/2 (lane i of stage 0), output pairs at
// stride NBU (lane i of the first X-stage). Valid/ready on both sides;
// throughput one pair per cycle.
module lstage_line #(
  parameter int unsigned     W   = 32,
  parameter longint unsigned Q   = 64'd3221225473,
  parameter int unsigned     N   = 1024,
  parameter longint unsigned PSI = 64'd1168849724,
  parameter int unsigned     NBU = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_aj,
  input  logic [W-1:0] in_ajs,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_aj,
  output logic [W-1:0] out_ajs
);
  localparam int unsigned NL = $clog2(N) - $clog2(NBU) - 1;   // L-stages

  if (NL < 1) begin : g_bad_cfg
    $error("lstage_line: needs n >= 4*NBU");
  end

  logic [NL:0]        v, r;
  logic [NL:0][W-1:0] aj, ajs;

  assign v[0]     = in_valid;
  assign in_ready = r[0];
  assign aj[0]    = in_aj;
  assign ajs[0]   = in_ajs;

  // stride group presented by each unit and the twiddle returned to it
  logic [NL-1:0][NL-1:0] grp;
  logic [NL-1:0][W-1:0]  tw;

  for (genvar s = 0; s < NL; s++) begin : g_stage
    localparam int unsigned GW = (s > 0) ? s : 1;
    logic [GW-1:0] g;
    icbu #(.W(W), .Q(Q), .N(N), .NBU(NBU), .S(s)) u_icbu (
      .clk, .rst_n,
      .in_valid (v[s]),   .in_ready (r[s]),   .in_aj (aj[s]),    .in_ajs (ajs[s]),
      .tw_grp   (g),      .tw       (tw[s]),
      .out_valid(v[s+1]), .out_ready(r[s+1]), .out_aj(aj[s+1]),  .out_ajs(ajs[s+1]));
    assign grp[s] = NL'(g);
  end

  // Stages 2p and 2p+1 share one two-port table; an odd last stage has its own.
  for (genvar p = 0; p < NL / 2; p++) begin : g_rom
    localparam int unsigned SA = 2 * p;
    localparam int unsigned AW = $clog2(3 << SA);
    twiddle_rom_dp #(.W(W), .Q(Q), .N(N), .PSI(PSI), .STAGE(SA)) u_rom (
      .addr_a(AW'(grp[SA])),
      .addr_b(AW'((1 << SA) + grp[SA + 1])),
      .tw_a  (tw[SA]),
      .tw_b  (tw[SA + 1]));
  end
  if (NL % 2 == 1) begin : g_rom_last
    localparam int unsigned SL = NL - 1;
    localparam int unsigned AW = (SL > 0) ? SL : 1;
    twiddle_rom #(.W(W), .Q(Q), .N(N), .PSI(PSI), .STAGE(SL), .DEPTH(1 << SL),
                  .BASE(0), .STEP(1)) u_rom (.addr(AW'(grp[SL])), .tw(tw[SL]));
  end

  assign out_valid = v[NL];
  assign r[NL]     = out_ready;
  assign out_aj    = aj[NL];
  assign out_ajs   = ajs[NL];
endmodule
