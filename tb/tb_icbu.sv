// tb_icbu: tests two integrated circular butterfly units of an n = 128,
// NBU = 4 pipeline: stage 1 on lane 1 (stride 32, 16-entry buffer) and
// stage 3 on lane 2 (stride 8, 4-entry buffer, the smallest an L-stage has).
// Each is fed the pairs its lane receives for random polynomials; the
// expected output pairs at half the stride come from applying the whole
// butterfly stage to the full coefficient array. Phase 1 streams without
// stalls and checks that output pairs leave back to back, one per cycle;
// phase 2 adds random input gaps and output back-pressure (exercising the
// buffer-full and buffer-empty waits).
module tb_icbu;
  import ntt_ref_pkg::*;
  localparam int unsigned     N   = 128;
  localparam int unsigned     NBU = 4;
  localparam int unsigned     W   = 32;
  localparam longint unsigned Q   = QREF;
  localparam int unsigned     NP1 = 4, NP2 = 6;
  localparam int unsigned     NPAIR = N / (2 * NBU);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, finished = 0;
  int unsigned wr_waits = 0;

  for (genvar cfg = 0; cfg < 2; cfg++) begin : g_cfg
    localparam int unsigned S    = (cfg == 0) ? 1 : 3;
    localparam int unsigned LANE = (cfg == 0) ? 1 : 2;
    localparam int unsigned STR  = N >> (S + 1);
    localparam int unsigned L    = STR / NBU;

    logic in_valid, in_ready, out_valid, out_ready;
    logic [W-1:0] in_aj, in_ajs, out_aj, out_ajs;
    bit stress = 0;

    logic [S-1:0] tw_grp;
    logic [W-1:0] tw;
    icbu #(.W(W), .Q(Q), .N(N), .NBU(NBU), .S(S)) dut (
      .clk, .rst_n, .in_valid, .in_ready, .in_aj, .in_ajs, .tw_grp, .tw,
      .out_valid, .out_ready, .out_aj, .out_ajs);
    // twiddle table of this stage: psi^bitrev(2^S + group)
    always_comb tw = W'(tw_ref(S, int'(tw_grp), N, pw(PSI1024, 1024 / N, Q), Q));

    longint unsigned exp_aj[$], exp_ajs[$];
    longint unsigned ins[$][];
    int unsigned nout = 0, first_cyc = 0, last_cyc = 0, cyc = 0;

    always @(posedge clk) begin
      cyc <= cyc + 1;
      out_ready <= stress ? ($urandom % 3 == 0) : 1'b1;
      if (rst_n && out_valid && out_ready) begin
        checks++;
        if (64'(out_aj) != exp_aj[0] || 64'(out_ajs) != exp_ajs[0]) begin
          failures++;
          if (failures < 8) $display("S=%0d pair %0d: got %0d,%0d exp %0d,%0d", S, nout,
                                     out_aj, out_ajs, exp_aj[0], exp_ajs[0]);
        end
        void'(exp_aj.pop_front()); void'(exp_ajs.pop_front());
        if (nout == 0) first_cyc = cyc;
        if (nout == NP1 * NPAIR - 1) last_cyc = cyc;
        nout++;
      end
      if (rst_n && dut.v[2] && !dut.wr_ok) wr_waits++;
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
        ct_stage(a, S, psi, Q);
        for (int k2 = 0; k2 < (1 << (S + 1)); k2++)
          for (int c2 = 0; c2 < L / 2; c2++) begin
            int lo;
            lo = k2 * STR + c2 * NBU + LANE;
            exp_aj.push_back(a[lo]);
            exp_ajs.push_back(a[lo + STR / 2]);
          end
      end
      wait (rst_n);
      @(posedge clk); #1;
      for (int p = 0; p < NP1 + NP2; p++) begin
        if (p == NP1) begin
          while (nout < NP1 * NPAIR) @(posedge clk);
          #1 stress = 1;
        end
        for (int k = 0; k < (1 << S); k++)
          for (int c = 0; c < L; c++) begin
            int lo;
            lo = k * 2 * STR + c * NBU + LANE;
            in_aj = W'(ins[p][lo]); in_ajs = W'(ins[p][lo + STR]);
            if (stress && $urandom % 4 == 0) begin
              in_valid = 0; @(posedge clk); #1;
            end
            in_valid = 1;
            do @(posedge clk); while (!in_ready);
            #1 in_valid = 0;
          end
      end
      while (nout < (NP1 + NP2) * NPAIR) @(posedge clk);
      checks++;
      if (last_cyc - first_cyc != NP1 * NPAIR - 1) begin
        failures++;
        $display("S=%0d: %0d pairs took %0d cycles", S, NP1 * NPAIR, last_cyc - first_cyc + 1);
      end
      $display("S=%0d: first pair out %0d cycles after reset", S, first_cyc);
      finished++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (finished == 2);
    checks++;
    if (wr_waits == 0) begin failures++; $display("buffer-full wait never happened"); end
    $display("buffer-full waits %0d", wr_waits);
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
