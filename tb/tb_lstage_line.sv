// tb_lstage_line: tests the merged L-stage module of lane 3 in an n = 64,
// NBU = 4 pipeline (three chained units, strides 32, 16, 8). Random
// polynomials are fed as lane 3's stage-0 pairs; the expected output pairs at
// stride NBU come from applying stages 0..2 to the full coefficient array.
// Phase 1 checks one pair per cycle and the fill latency; phase 2 adds random
// stalls on both sides.
module tb_lstage_line;
  import ntt_ref_pkg::*;
  localparam int unsigned     N    = 64;
  localparam int unsigned     NBU  = 4;
  localparam int unsigned     LANE = 3;
  localparam int unsigned     W    = 32;
  localparam longint unsigned Q    = QREF;
  localparam int unsigned     NL   = 3;
  localparam int unsigned     NPAIR = N / (2 * NBU);
  localparam int unsigned     NP1 = 4, NP2 = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_aj, in_ajs, out_aj, out_ajs;
  lstage_line #(.W(W), .Q(Q), .N(N), .PSI(pw(PSI1024, 1024 / N, Q)), .NBU(NBU)) dut (.*);

  int checks = 0, failures = 0;
  bit stress = 0;
  longint unsigned exp_aj[$], exp_ajs[$];
  longint unsigned ins[$][];
  int unsigned nout = 0, first_cyc = 0, last_cyc = 0, cyc = 0, in_first = 0;
  int unsigned n_stall = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    out_ready <= stress ? ($urandom % 3 == 0) : 1'b1;
    if (rst_n && in_valid && !in_ready) n_stall++;
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (64'(out_aj) != exp_aj[0] || 64'(out_ajs) != exp_ajs[0]) begin
        failures++;
        if (failures < 8) $display("pair %0d: got %0d,%0d exp %0d,%0d", nout, out_aj, out_ajs,
                                   exp_aj[0], exp_ajs[0]);
      end
      void'(exp_aj.pop_front()); void'(exp_ajs.pop_front());
      if (nout == 0) first_cyc = cyc;
      if (nout == NP1 * NPAIR - 1) last_cyc = cyc;
      nout++;
    end
  end

  initial begin
    longint unsigned psi;
    psi = pw(PSI1024, 1024 / N, Q);
    in_valid = 0; in_aj = 0; in_ajs = 0;
    for (int p = 0; p < NP1 + NP2; p++) begin
      longint unsigned a[];
      a = new[N];
      for (int j = 0; j < N; j++) a[j] = {$urandom, $urandom} % Q;
      ins.push_back(a);
      for (int s = 0; s < NL; s++) ct_stage(a, s, psi, Q);
      for (int k = 0; k < N / (2 * NBU); k++) begin
        exp_aj.push_back(a[k * 2 * NBU + LANE]);
        exp_ajs.push_back(a[k * 2 * NBU + LANE + NBU]);
      end
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    in_first = cyc;
    for (int p = 0; p < NP1 + NP2; p++) begin
      if (p == NP1) begin
        while (nout < NP1 * NPAIR) @(posedge clk);
        #1 stress = 1;
      end
      for (int t = 0; t < NPAIR; t++) begin
        in_aj = W'(ins[p][t * NBU + LANE]); in_ajs = W'(ins[p][N / 2 + t * NBU + LANE]);
        if (stress && $urandom % 4 == 0) begin
          in_valid = 0; @(posedge clk); #1;
        end
        in_valid = 1;
        do @(posedge clk); while (!in_ready);
        #1 in_valid = 0;
      end
    end
    while (nout < (NP1 + NP2) * NPAIR) @(posedge clk);
    checks += 2;
    if (last_cyc - first_cyc != NP1 * NPAIR - 1) begin
      failures++; $display("%0d pairs took %0d cycles", NP1 * NPAIR, last_cyc - first_cyc + 1);
    end
    if (n_stall == 0) begin failures++; $display("input never stalled"); end
    $display("first pair out %0d cycles after the first pair in; input stalls %0d",
             first_cyc - in_first, n_stall);
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
