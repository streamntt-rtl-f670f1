// tb_xstage_module: tests the merged X-stage module of an n = 64, NBU = 4
// pipeline (stages 3, 4, 5 with strides 4, 2, 1; twelve butterflies).
// Random arrays are presented window by window (lane i carries elements i and
// i+4 of each 8-element window, lanes made valid at random different times);
// each output window is compared with stages 3..5 applied to the full
// array. Phase 1 checks the 9-cycle latency and one window per cycle;
// phase 2 adds output back-pressure.
module tb_xstage_module;
  import ntt_ref_pkg::*;
  localparam int unsigned     N   = 64;
  localparam int unsigned     NBU = 4;
  localparam int unsigned     W   = 32;
  localparam longint unsigned Q   = QREF;
  localparam int unsigned     NWIN = N / (2 * NBU);
  localparam int unsigned     NP1 = 4, NP2 = 6;
  localparam int unsigned     LAT = 9;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NBU-1:0] in_valid, in_ready;
  logic [NBU-1:0][W-1:0] in_aj, in_ajs;
  logic out_valid, out_ready;
  logic [2*NBU-1:0][W-1:0] out_data;
  xstage_module #(.W(W), .Q(Q), .N(N), .PSI(pw(PSI1024, 1024 / N, Q)), .NBU(NBU)) dut (.*);

  int checks = 0, failures = 0;
  bit stress = 0;
  longint unsigned expw[$][];
  longint unsigned ins[$][];
  int unsigned nout = 0, first_cyc = 0, last_cyc = 0, cyc = 0, in_cyc = 0, n_hold = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    out_ready <= stress ? ($urandom % 2 == 0) : 1'b1;
    if (rst_n && out_valid && !out_ready) n_hold++;
    if (rst_n && out_valid && out_ready) begin
      for (int e = 0; e < 2 * NBU; e++) begin
        checks++;
        if (64'(out_data[e]) != expw[0][e]) begin
          failures++;
          if (failures < 8) $display("window %0d slot %0d: got %0d exp %0d", nout, e,
                                     out_data[e], expw[0][e]);
        end
      end
      void'(expw.pop_front());
      if (nout == 0) first_cyc = cyc;
      if (nout == NP1 * NWIN - 1) last_cyc = cyc;
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
      for (int s = 3; s < 6; s++) ct_stage(a, s, psi, Q);
      for (int k = 0; k < NWIN; k++) begin
        longint unsigned w[];
        w = new[2 * NBU];
        for (int e = 0; e < 2 * NBU; e++) w[e] = a[k * 2 * NBU + e];
        expw.push_back(w);
      end
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    in_cyc = cyc;
    for (int p = 0; p < NP1 + NP2; p++) begin
      if (p == NP1) begin
        while (nout < NP1 * NWIN) @(posedge clk);
        #1 stress = 1;
      end
      for (int k = 0; k < NWIN; k++) begin
        for (int i = 0; i < NBU; i++) begin
          in_aj[i]  = W'(ins[p][k * 2 * NBU + i]);
          in_ajs[i] = W'(ins[p][k * 2 * NBU + i + NBU]);
        end
        if (stress) begin
          // lanes become valid one after another
          for (int i = 0; i < NBU; i++) begin
            in_valid[i] = 1;
            if (i < NBU - 1 && $urandom % 2 == 0) begin @(posedge clk); #1; end
          end
        end
        in_valid = '1;
        do @(posedge clk); while (!(&in_ready));
        #1 in_valid = '0;
      end
    end
    while (nout < (NP1 + NP2) * NWIN) @(posedge clk);
    checks += 3;
    if (first_cyc - in_cyc != LAT) begin
      failures++; $display("latency %0d, expected %0d", first_cyc - in_cyc, LAT);
    end
    if (last_cyc - first_cyc != NP1 * NWIN - 1) begin
      failures++; $display("%0d windows took %0d cycles", NP1 * NWIN, last_cyc - first_cyc + 1);
    end
    if (n_hold == 0) begin failures++; $display("output never held"); end
    $display("latency %0d cycles, output holds %0d", first_cyc - in_cyc, n_hold);
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
