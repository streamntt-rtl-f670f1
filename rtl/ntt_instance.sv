// ntt_instance: one complete streaming NTT pipeline.
//
//   word stream -> in_scatter -> NBU x stream_fifo -> NBU x lstage_line
//               -> NBU x stream_fifo -> xstage_module -> word stream
//
// All log2(n) stages run concurrently on successive polynomials (coarse
// pipelining), NBU butterflies work side by side in every stage, and every
// butterfly is itself pipelined with an initiation interval of one. A
// polynomial of n coefficients enters as n/(2*NBU) words of 2*NBU
// coefficients (layout: see in_scatter) and leaves as n/(2*NBU) words holding
// the negacyclic NTT in bit-reversed order (word k, slot e = result position
// k*2*NBU + e; see ntt_pkg). Polynomials follow each other with no gap, so
// the sustained rate is one polynomial every n/(2*NBU) cycles.
// The instance runs freely after reset; there is no start/stop control, only
// the handshakes of its streams.
module ntt_instance #(
  parameter int unsigned     W   = 32,
  parameter longint unsigned Q   = 64'd3221225473,
  parameter int unsigned     N   = 1024,
  parameter longint unsigned PSI = 64'd1168849724,
  parameter int unsigned     NBU = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [2*NBU-1:0][W-1:0]  in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [2*NBU-1:0][W-1:0]  out_data
);
  logic [NBU-1:0]        s_v, s_r, f0_v, f0_r, l_v, l_r, f1_v, f1_r;
  logic [NBU-1:0][W-1:0] s_aj, s_ajs, f0_aj, f0_ajs, l_aj, l_ajs, f1_aj, f1_ajs;

  in_scatter #(.W(W), .NBU(NBU)) u_scatter (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .lane_valid(s_v), .lane_ready(s_r), .lane_aj(s_aj), .lane_ajs(s_ajs));

  for (genvar i = 0; i < NBU; i++) begin : g_lane
    stream_fifo #(.DW(2*W), .DEPTH(2)) u_fifo_in (
      .clk, .rst_n,
      .in_valid (s_v[i]),  .in_ready (s_r[i]),  .in_data ({s_ajs[i], s_aj[i]}),
      .out_valid(f0_v[i]), .out_ready(f0_r[i]), .out_data({f0_ajs[i], f0_aj[i]}));

    lstage_line #(.W(W), .Q(Q), .N(N), .PSI(PSI), .NBU(NBU)) u_line (
      .clk, .rst_n,
      .in_valid (f0_v[i]), .in_ready (f0_r[i]), .in_aj (f0_aj[i]), .in_ajs (f0_ajs[i]),
      .out_valid(l_v[i]),  .out_ready(l_r[i]),  .out_aj(l_aj[i]),  .out_ajs(l_ajs[i]));

    stream_fifo #(.DW(2*W), .DEPTH(2)) u_fifo_x (
      .clk, .rst_n,
      .in_valid (l_v[i]),  .in_ready (l_r[i]),  .in_data ({l_ajs[i], l_aj[i]}),
      .out_valid(f1_v[i]), .out_ready(f1_r[i]), .out_data({f1_ajs[i], f1_aj[i]}));
  end

  xstage_module #(.W(W), .Q(Q), .N(N), .PSI(PSI), .NBU(NBU)) u_x (
    .clk, .rst_n,
    .in_valid(f1_v), .in_ready(f1_r), .in_aj(f1_aj), .in_ajs(f1_ajs),
    .out_valid, .out_ready, .out_data);
endmodule
