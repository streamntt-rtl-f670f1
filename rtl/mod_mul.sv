// mod_mul: pipelined modular multiplier, r = a * b mod Q.
//
// This is the "Reduce" unit of the butterfly: a full W x W product followed by
// a dedicated reduction, while the butterfly's additions use a plain
// conditional subtraction of Q. The reduction here is Barrett's method with
// k = W (requires 2^(W-1) <= Q < 2^W):
//   q1 = p >> (W-1);  q3 = (q1 * MU) >> (W+1);  r = p - q3*Q;
// with MU = floor(4^W / Q), which leaves r < 3Q, and two conditional
// subtractions finish the job. The choice of Barrett is this design's; the
// original accelerator uses a different special-form reduction.
//
// Timing: two register stages, both advanced by 'en' (a pipeline-wide stall
// input). Operands presented in the cycle 'en' is high appear as a result two
// advancing cycles later. No reset: the datapath carries no control state.
module mod_mul #(
  parameter int unsigned     W = 32,
  parameter longint unsigned Q = 64'd3221225473
) (
  input  logic         clk,
  input  logic         en,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] r
);
  localparam logic [2*W+1:0] FOUR_W = (2*W+2)'(1) << (2*W);
  localparam logic [2*W+1:0] MU     = FOUR_W / (2*W+2)'(Q);
  localparam logic [W+1:0]   QW     = (W+2)'(Q);

  if (Q >= (64'd1 << W) || Q < (64'd1 << (W-1))) begin : g_bad_q
    $error("mod_mul: Q must satisfy 2^(W-1) <= Q < 2^W");
  end

  logic [2*W-1:0] prod_q;
  logic [W-1:0]   red;

  always_ff @(posedge clk) begin
    if (en) prod_q <= a * b;
  end

  always_comb begin
    logic [W:0]   q1, q3;
    logic [W+1:0] rr;
    q1 = prod_q[2*W-1:W-1];
    q3 = (W+1)'(((2*W+2)'(q1) * MU) >> (W+1));
    rr = prod_q[W+1:0] - (W+2)'((2*W+2)'(q3) * (2*W+2)'(Q));
    if (rr >= QW) rr = rr - QW;
    if (rr >= QW) rr = rr - QW;
    red = rr[W-1:0];
  end

  always_ff @(posedge clk) begin
    if (en) r <= red;
  end
endmodule
