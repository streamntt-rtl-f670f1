// tb_streamntt_top: end-to-end test of the whole accelerator at its default
// configuration (n = 1024, q = 3221225473, NBU = 4, NNI = 16, NCH = 32).
// Each instance is fed from its own model of an even HBM channel (a word
// stream) and drained into its own odd-channel sink. Every instance
// transforms NPOLY random polynomials, the first ones back to back with a
// free output (to measure the sustained rate of one polynomial per
// n/(2*NBU) = 128 cycles), the rest with random read gaps and write
// back-pressure. Every result is compared with the direct definition of the
// negacyclic NTT. The test also counts that input stalls, output holds and
// all instances running at the same time were actually exercised.
module tb_streamntt_top;
  import ntt_ref_pkg::*;
  localparam int unsigned     N     = 1024;
  localparam int unsigned     NBU   = 4;
  localparam int unsigned     NNI   = 16;
  localparam int unsigned     W     = 32;
  localparam longint unsigned Q     = QREF;
  localparam int unsigned     WPP   = N / (2 * NBU);
  localparam int unsigned     NFREE = 3;     // polynomials per instance, no stalls
  localparam int unsigned     NPOLY = 6;     // polynomials per instance in total

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NNI-1:0] rd_valid, rd_ready, wr_valid, wr_ready;
  logic [NNI-1:0][2*NBU-1:0][W-1:0] rd_data, wr_data;

  streamntt_top dut (.*);

  int checks = 0, failures = 0;
  longint unsigned expq[NNI][$][];
  longint unsigned inq [NNI][$][];
  bit stress = 0;
  int unsigned cyc = 0;
  int unsigned n_in_stall = 0, n_out_hold = 0, max_busy = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---- one HBM read-channel model per instance ----
  for (genvar g = 0; g < NNI; g++) begin : g_src
    initial begin
      rd_valid[g] = 0; rd_data[g] = '0;
      wait (rst_n);
      @(posedge clk); #1;
      for (int p = 0; p < NPOLY; p++) begin
        longint unsigned a[];
        wait (inq[g].size() > p);
        a = inq[g][p];
        for (int t = 0; t < WPP; t++) begin
          for (int i = 0; i < NBU; i++) begin
            rd_data[g][i]       = W'(a[t * NBU + i]);
            rd_data[g][i + NBU] = W'(a[N / 2 + t * NBU + i]);
          end
          if (stress && ($urandom % 8 == 0)) begin
            rd_valid[g] = 0; @(posedge clk); #1;
          end
          rd_valid[g] = 1;
          do @(posedge clk); while (!rd_ready[g]);
          #1 rd_valid[g] = 0;
        end
      end
    end
  end

  // ---- one HBM write-channel model per instance ----
  int unsigned words_out[NNI], polys_out[NNI];
  int unsigned done_cyc[NNI][$];
  for (genvar g = 0; g < NNI; g++) begin : g_snk
    always @(posedge clk) begin
      wr_ready[g] <= stress ? ($urandom % 4 == 0) : 1'b1;
      if (rst_n && wr_valid[g] && wr_ready[g]) begin
        longint unsigned e[];
        int unsigned k;
        k = words_out[g] % WPP;
        e = expq[g][polys_out[g]];
        for (int s = 0; s < 2 * NBU; s++) begin
          checks++;
          if (64'(wr_data[g][s]) != e[k * 2 * NBU + s]) begin
            failures++;
            if (failures < 10) $display("MISMATCH inst %0d poly %0d word %0d slot %0d", g,
                                        polys_out[g], k, s);
          end
        end
        words_out[g]++;
        if (k == WPP - 1) begin
          polys_out[g]++;
          done_cyc[g].push_back(cyc);
        end
      end
      if (rst_n && rd_valid[g] && !rd_ready[g]) n_in_stall++;
      if (rst_n && wr_valid[g] && !wr_ready[g]) n_out_hold++;
    end
  end

  // instances producing results in the same cycle
  always @(posedge clk) if (rst_n && $countones(wr_valid) > max_busy) max_busy = $countones(wr_valid);

  function automatic bit all_done(int unsigned np);
    for (int g = 0; g < NNI; g++) if (polys_out[g] < np) return 0;
    return 1;
  endfunction

  initial begin
    longint unsigned psi;
    psi = pw(PSI1024, 1024 / N, Q);
    for (int g = 0; g < NNI; g++) begin words_out[g] = 0; polys_out[g] = 0; end
    // fill the queues before releasing reset
    for (int g = 0; g < NNI; g++)
      for (int p = 0; p < NPOLY; p++) begin
        longint unsigned a[], r[];
        a = new[N];
        for (int j = 0; j < N; j++) a[j] = (longint'($urandom) * 13 + longint'(g * 977 + j)) % Q;
        ntt_direct(a, psi, Q, r);
        inq[g].push_back(a);
        expq[g].push_back(r);
      end
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    while (!all_done(NFREE)) @(posedge clk);
    for (int g = 0; g < NNI; g++)
      for (int p = 1; p < NFREE; p++) begin
        checks++;
        if (done_cyc[g][p] - done_cyc[g][p-1] != WPP) begin
          failures++;
          $display("RATE inst %0d: %0d cycles between polynomials (exp %0d)", g,
                   done_cyc[g][p] - done_cyc[g][p-1], WPP);
        end
      end
    $display("first polynomial done at cycle %0d, then one every %0d cycles per instance",
             done_cyc[0][0], done_cyc[0][1] - done_cyc[0][0]);
    stress = 1;
    while (!all_done(NPOLY)) @(posedge clk);
    $display("input stalls %0d, output holds %0d, instances active together %0d",
             n_in_stall, n_out_hold, max_busy);
    checks += 3;
    if (n_in_stall == 0) begin failures++; $display("no input stall happened"); end
    if (n_out_hold == 0) begin failures++; $display("no output hold happened"); end
    if (max_busy != NNI) begin failures++; $display("not all instances ran together"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
