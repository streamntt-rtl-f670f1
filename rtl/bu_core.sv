// bu_core: pipelined radix-2 Cooley-Tukey butterfly.
//
//   t = tw * a_js mod Q      (mod_mul, two stages)
//   x = a_j + Q - t, minus Q if x >= Q   -> new a_{j+str}
//   y = a_j + t,     minus Q if y >= Q   -> new a_j
// The twiddle is supplied by the caller alongside the operands. The
// subtract/add with conditional correction follows the butterfly datapath of
// the original design; the pipeline cut points are this design's choice.
//
// Timing: latency LAT = 3 advancing cycles, initiation interval 1. Every
// register advances only while 'en' is high, so an enclosing module stalls the
// whole butterfly pipeline (as a pipelined loop does) by dropping 'en'.
// Valid tracking is left to the enclosing module.
module bu_core #(
  parameter int unsigned     W = 32,
  parameter longint unsigned Q = 64'd3221225473
) (
  input  logic         clk,
  input  logic         en,
  input  logic [W-1:0] aj,
  input  logic [W-1:0] ajs,
  input  logic [W-1:0] tw,
  output logic [W-1:0] y,
  output logic [W-1:0] x
);
  localparam logic [W:0] QW = (W+1)'(Q);

  logic [W-1:0] aj_d1, aj_d2, t;

  mod_mul #(.W(W), .Q(Q)) u_mul (.clk, .en, .a(ajs), .b(tw), .r(t));

  always_ff @(posedge clk) begin
    if (en) begin
      aj_d1 <= aj;
      aj_d2 <= aj_d1;
    end
  end

  logic [W:0] xs, ys;
  always_comb begin
    xs = (W+1)'(aj_d2) + QW - (W+1)'(t);
    ys = (W+1)'(aj_d2) + (W+1)'(t);
    if (xs >= QW) xs = xs - QW;
    if (ys >= QW) ys = ys - QW;
  end

  always_ff @(posedge clk) begin
    if (en) begin
      x <= xs[W-1:0];
      y <= ys[W-1:0];
    end
  end
endmodule
