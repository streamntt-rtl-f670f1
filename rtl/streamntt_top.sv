// streamntt_top: NNI independent NTT instances, each on its own pair of HBM
// channels.
//
// Instead of one very large NTT pipeline fed from many memory channels, the
// accelerator replicates a moderately sized pipeline (ntt_instance) NNI times.
// Instance i reads its polynomials from HBM channel 2i and writes its results
// to channel 2i+1, so each instance needs no arbitration across channels and
// can be placed close to its own channels. NCH must equal 2*NNI.
// Defaults are the main configuration of the original accelerator: n = 1024,
// q = 3221225473 (32-bit coefficients), NBU = 4, NNI = 16, NCH = 32, i.e.
// log2(n)*NBU*NNI = 640 butterflies. PSI (a primitive 2n-th root of unity
// mod q) is this design's choice.
//
// Ports: the HBM channels themselves (memory and AXI port logic) are outside
// this module; each even channel appears as a read-data word stream
// rd_* [instance], each odd channel as a write-data word stream wr_* [instance],
// 2*NBU coefficients per word (256 bits at the defaults). Each instance
// accepts one word per cycle and produces one polynomial every n/(2*NBU)
// cycles once its pipeline is full.
module streamntt_top #(
  parameter int unsigned     W   = ntt_pkg::W_DEFAULT,
  parameter longint unsigned Q   = ntt_pkg::Q_DEFAULT,
  parameter int unsigned     N   = ntt_pkg::N_DEFAULT,
  parameter longint unsigned PSI = ntt_pkg::PSI_DEFAULT,
  parameter int unsigned     NBU = 4,
  parameter int unsigned     NNI = 16,
  parameter int unsigned     NCH = 32
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // even HBM channels 0, 2, ..., NCH-2: coefficients in
  input  logic [NNI-1:0]                     rd_valid,
  output logic [NNI-1:0]                     rd_ready,
  input  logic [NNI-1:0][2*NBU-1:0][W-1:0]   rd_data,
  // odd HBM channels 1, 3, ..., NCH-1: transformed coefficients out
  output logic [NNI-1:0]                     wr_valid,
  input  logic [NNI-1:0]                     wr_ready,
  output logic [NNI-1:0][2*NBU-1:0][W-1:0]   wr_data
);
  if (NCH != 2 * NNI) begin : g_bad_nch
    $error("streamntt_top: each instance needs its own pair of HBM channels (NCH = 2*NNI)");
  end

  for (genvar i = 0; i < NNI; i++) begin : g_inst
    ntt_instance #(.W(W), .Q(Q), .N(N), .PSI(PSI), .NBU(NBU)) u_ntt (
      .clk, .rst_n,
      .in_valid (rd_valid[i]), .in_ready (rd_ready[i]), .in_data (rd_data[i]),
      .out_valid(wr_valid[i]), .out_ready(wr_ready[i]), .out_data(wr_data[i]));
  end
endmodule
