// tb_throughput: sustained-throughput run of the whole accelerator at its
// default configuration (16 instances, n = 1024, q = 3221225473, NBU = 4).
// NTOTAL polynomials are spread evenly over the instances, streamed with
// the memory side always ready, and the average number of cycles per
// polynomial over the whole batch is reported together with the resulting
// rate at 306 MHz. Every result word is checked. The expected values come
// from an in-place butterfly reference with a precomputed twiddle table; the
// first polynomial of every instance is also checked against the direct
// definition of the transform, which validates that reference.
module tb_throughput;
  import ntt_ref_pkg::*;
  localparam int unsigned     N      = 1024;
  localparam int unsigned     NBU    = 4;
  localparam int unsigned     NNI    = 16;
  localparam int unsigned     W      = 32;
  localparam longint unsigned Q      = QREF;
  localparam int unsigned     WPP    = N / (2 * NBU);
  localparam int unsigned     NTOTAL = 10000;
  localparam int unsigned     PER    = NTOTAL / NNI;     // 625 per instance

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NNI-1:0] rd_valid, rd_ready, wr_valid, wr_ready;
  logic [NNI-1:0][2*NBU-1:0][W-1:0] rd_data, wr_data;
  streamntt_top dut (.*);
  assign wr_ready = '1;

  int checks = 0, failures = 0;
  longint unsigned tw[N];            // tw[m] = psi^bitrev(m)
  int unsigned cyc = 0, start_cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // fast reference: all stages in place, bit-reversed output order
  function automatic void ntt_fast(ref longint unsigned a[]);
    for (int unsigned s = 0; s < $clog2(N); s++) begin
      int unsigned str = N >> (s + 1);
      for (int unsigned k = 0; k < (1 << s); k++)
        for (int unsigned j = 0; j < str; j++) begin
          int unsigned lo = k * 2 * str + j;
          longint unsigned t = mm(tw[(1 << s) + k], a[lo + str], Q);
          longint unsigned u = a[lo];
          a[lo]       = (u + t) % Q;
          a[lo + str] = (u + Q - t) % Q;
        end
    end
  endfunction

  function automatic longint unsigned coef(int g, int p, int j);
    return (longint'(g) * 1000003 + longint'(p) * 7919 + longint'(j) * 104729 + 12345) % Q;
  endfunction

  int unsigned polys_out[NNI], words_out[NNI];
  int unsigned last_cyc = 0;

  for (genvar g = 0; g < NNI; g++) begin : g_inst
    longint unsigned expw[$][];          // expected results, per polynomial
    initial begin
      rd_valid[g] = 0; rd_data[g] = '0;
      wait (rst_n);
      @(posedge clk); #1;
      for (int p = 0; p < PER; p++) begin
        longint unsigned a[], r[];
        a = new[N];
        for (int j = 0; j < N; j++) a[j] = coef(g, p, j);
        for (int t = 0; t < WPP; t++) begin
          for (int i = 0; i < NBU; i++) begin
            rd_data[g][i]       = W'(a[t * NBU + i]);
            rd_data[g][i + NBU] = W'(a[N / 2 + t * NBU + i]);
          end
          rd_valid[g] = 1;
          do @(posedge clk); while (!rd_ready[g]);
          #1 rd_valid[g] = 0;
        end
        r = a;
        ntt_fast(r);
        expw.push_back(r);
      end
    end

    always @(posedge clk) if (rst_n && wr_valid[g] && wr_ready[g]) begin
      int unsigned k;
      k = words_out[g] % WPP;
      for (int s = 0; s < 2 * NBU; s++) begin
        checks++;
        if (64'(wr_data[g][s]) != expw[0][k * 2 * NBU + s]) begin
          failures++;
          if (failures < 8) $display("inst %0d poly %0d word %0d slot %0d wrong", g,
                                     polys_out[g], k, s);
        end
      end
      words_out[g]++;
      if (k == WPP - 1) begin
        void'(expw.pop_front());
        polys_out[g]++;
        last_cyc = cyc;
      end
    end
  end

  function automatic bit all_done();
    for (int g = 0; g < NNI; g++) if (polys_out[g] < PER) return 0;
    return 1;
  endfunction

  initial begin
    longint unsigned psi;
    psi = pw(PSI1024, 1024 / N, Q);
    tw[0] = 1;
    for (int m = 1; m < N; m++) tw[m] = pw(psi, brv(m, $clog2(N)), Q);
    for (int g = 0; g < NNI; g++) begin polys_out[g] = 0; words_out[g] = 0; end
    // validate the fast reference against the definition
    for (int g = 0; g < NNI; g++) begin
      longint unsigned a[], r1[], r2[];
      a = new[N];
      for (int j = 0; j < N; j++) a[j] = coef(g, 0, j);
      ntt_direct(a, psi, Q, r1);
      r2 = a;
      ntt_fast(r2);
      checks++;
      if (r1 != r2) begin failures++; $display("reference mismatch, instance %0d", g); end
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    start_cyc = cyc;
    while (!all_done()) @(posedge clk);
    begin
      real cpp;
      cpp = real'(last_cyc - start_cyc) / real'(PER);
      $display("%0d polynomials in %0d cycles: %0.2f cycles per polynomial per instance",
               NNI * PER, last_cyc - start_cyc, cpp);
      $display("at 306 MHz: %0.1f M polynomials/s", 306.0 * real'(NNI) / cpp);
      // sustained rate is one polynomial per WPP cycles plus the pipeline fill
      checks++;
      if (last_cyc - start_cyc > PER * WPP + 400) begin
        failures++; $display("throughput below one polynomial per %0d cycles", WPP);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (PER * WPP + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
