// xstage_module: merged dataflow module for all X-stages of one instance.
//
// Once the stride drops to NBU and below, the outputs of one butterfly feed
// several butterflies of the next stage, so all NBU*(log2(NBU)+1) butterflies
// of these stages form one deep pipeline with no reorder buffer. Each cycle
// it takes one pair from every lane, i.e. one window of 2*NBU consecutive
// coefficients a[k*2NBU .. k*2NBU+2NBU-1] (lane i supplies elements i and
// i+NBU), and runs stages with stride NBU, NBU/2, ..., 1 across that window.
// Butterfly i of a stage with stride str pairs elements g*2*str + j and
// g*2*str + j + str (g = i / str, j = i mod str); its twiddle belongs to
// stride group k*(NBU/str) + g, read by window number k from a table that
// the STR butterflies of group g share (the original shares twiddle ROMs
// between merged butterflies to save memory).
// The butterfly-to-element wiring is this design's reading of the crossing
// pattern of the original X-stage module.
//
// Interface: the lanes are joined (a window is taken when every lane is
// valid); the output is the result window, element e at word position e,
// which is result position k*2*NBU + e of the bit-reversed NTT output.
// Timing: latency 3*(log2(NBU)+1) cycles, one window per cycle; the whole
// pipeline stalls while the output is held.
module xstage_module #(
  parameter int unsigned     W   = 32,
  parameter longint unsigned Q   = 64'd3221225473,
  parameter int unsigned     N   = 1024,
  parameter longint unsigned PSI = 64'd1168849724,
  parameter int unsigned     NBU = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [NBU-1:0]             in_valid,
  output logic [NBU-1:0]             in_ready,
  input  logic [NBU-1:0][W-1:0]      in_aj,
  input  logic [NBU-1:0][W-1:0]      in_ajs,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [2*NBU-1:0][W-1:0]    out_data
);
  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned NX   = $clog2(NBU) + 1;     // X-stages
  localparam int unsigned NL   = LOGN - NX;           // first X-stage index
  localparam int unsigned NWIN = N / (2 * NBU);       // windows per polynomial
  localparam int unsigned KB   = (NWIN > 1) ? $clog2(NWIN) : 1;
  localparam int unsigned LAT  = 3;                   // bu_core latency

  logic en, all_valid, in_fire;
  logic [NX*LAT-1:0] v;                               // stage-register valids
  logic [NX:0][2*NBU-1:0][W-1:0] e;                   // windows between stages
  logic [NX-1:0] sv;                                  // valid at each stage input
  logic [NX-1:0][KB-1:0] kcnt;                        // window number per stage

  assign all_valid = &in_valid;
  assign en        = !v[NX*LAT-1] || out_ready;
  assign in_fire   = all_valid && en;
  assign in_ready  = {NBU{all_valid && en}};

  for (genvar i = 0; i < NBU; i++) begin : g_in
    assign e[0][i]       = in_aj[i];
    assign e[0][i + NBU] = in_ajs[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) v <= '0;
    else if (en) v <= {v[NX*LAT-2:0], all_valid};
  end

  for (genvar x = 0; x < NX; x++) begin : g_stage
    localparam int unsigned STR = NBU >> x;
    if (x == 0) begin : g_v0
      assign sv[x] = all_valid;
    end else begin : g_vx
      assign sv[x] = v[x*LAT-1];
    end

    // Window counter of this stage, advanced as its input is taken.
    always_ff @(posedge clk) begin
      if (!rst_n)             kcnt[x] <= '0;
      else if (en && sv[x])   kcnt[x] <= (NWIN > 1) ? kcnt[x] + 1'b1 : '0;
    end

    // Butterflies of one stride group read the same twiddle at the same time,
    // so each group has one table shared by its STR butterflies.
    logic [NBU/STR-1:0][W-1:0] tw;
    for (genvar g = 0; g < NBU / STR; g++) begin : g_rom
      twiddle_rom #(.W(W), .Q(Q), .N(N), .PSI(PSI), .STAGE(NL + x), .DEPTH(NWIN),
                    .BASE(g), .STEP(NBU / STR)) u_rom (.addr(kcnt[x]), .tw(tw[g]));
    end

    for (genvar i = 0; i < NBU; i++) begin : g_bu
      localparam int unsigned G  = i / STR;
      localparam int unsigned J  = i % STR;
      localparam int unsigned LO = G * 2 * STR + J;
      localparam int unsigned HI = LO + STR;

      bu_core #(.W(W), .Q(Q)) u_bu (.clk, .en, .aj(e[x][LO]), .ajs(e[x][HI]), .tw(tw[G]),
                                    .y(e[x+1][LO]), .x(e[x+1][HI]));
    end
  end

  assign out_valid = v[NX*LAT-1];
  assign out_data  = e[NX];

  a_in_join: assert property (@(posedge clk) disable iff (!rst_n)
    in_fire |-> all_valid);
endmodule
