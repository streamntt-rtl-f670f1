// tb_ntt_instance: end-to-end test of one NTT pipeline at n = 64, NBU = 4
// (three L-stages with reorder buffers of 16, 8 and 4 entries, three
// X-stages), q = 3221225473. Random polynomials are streamed back to back and
// every result word is compared with the direct definition of the transform.
// Phase 1 runs without stalls and checks the sustained rate of one polynomial
// every n/(2*NBU) cycles; phase 2 adds random input gaps and output
// back-pressure.
module tb_ntt_instance;
  import ntt_ref_pkg::*;
  localparam int unsigned     N    = 64;
  localparam int unsigned     NBU  = 4;
  localparam int unsigned     W    = 32;
  localparam longint unsigned Q    = QREF;
  localparam int unsigned     WPP  = N / (2 * NBU);   // words per polynomial
  localparam int unsigned     NP1  = 8;               // polynomials, phase 1
  localparam int unsigned     NP2  = 8;               // polynomials, phase 2

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  logic [2*NBU-1:0][W-1:0] in_data, out_data;

  longint unsigned psi;
  initial psi = pw(PSI1024, 1024 / N, Q);

  ntt_instance #(.W(W), .Q(Q), .N(N), .PSI(pw(PSI1024, 1024 / N, Q)), .NBU(NBU)) dut (.*);

  int checks = 0, failures = 0;
  longint unsigned polys[$][];     // inputs in send order
  longint unsigned expq[$][];      // expected results
  int stall_in = 0, stall_out = 0;
  bit gaps = 0, bp = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---- driver ----
  task automatic send_poly(longint unsigned a[]);
    for (int t = 0; t < WPP; t++) begin
      for (int i = 0; i < NBU; i++) begin
        in_data[i]       = W'(a[t * NBU + i]);
        in_data[i + NBU] = W'(a[N / 2 + t * NBU + i]);
      end
      in_valid = 1;
      if (gaps && ($urandom % 8 == 0)) begin
        in_valid = 0;
        @(posedge clk); #1;
        in_valid = 1;
      end
      do @(posedge clk); while (!in_ready);
      #1;
      in_valid = 0;
    end
  endtask

  function automatic void new_poly();
    longint unsigned a[], r[];
    a = new[N];
    for (int j = 0; j < N; j++) a[j] = (longint'($urandom) * 7 + j) % Q;
    ntt_direct(a, psi, Q, r);
    polys.push_back(a);
    expq.push_back(r);
  endfunction

  // ---- monitor ----
  int unsigned words_out = 0, polys_out = 0;
  int unsigned done_cyc[$];
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      longint unsigned e[];
      int unsigned k;
      k = words_out % WPP;
      e = expq[polys_out];
      for (int s = 0; s < 2 * NBU; s++) begin
        checks++;
        if (64'(out_data[s]) != e[k * 2 * NBU + s]) begin
          failures++;
          if (failures < 10) $display("t=%0t MISMATCH poly %0d word %0d slot %0d: got %0d exp %0d",
                                      $time, polys_out, k, s, out_data[s], e[k * 2 * NBU + s]);
        end
      end
      words_out++;
      if (k == WPP - 1) begin
        polys_out++;
        done_cyc.push_back(cyc);
      end
    end
    if (rst_n && in_valid && !in_ready) stall_in++;
    if (rst_n && out_valid && !out_ready) stall_out++;
  end

  always @(posedge clk) out_ready <= bp ? ($urandom % 2 == 0) : 1'b1;

  initial begin
    in_valid = 0; in_data = '0;
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    for (int p = 0; p < NP1 + NP2; p++) new_poly();
    // phase 1: back to back
    for (int p = 0; p < NP1; p++) send_poly(polys[p]);
    wait (polys_out == NP1);
    // sustained rate: polynomials complete every WPP cycles
    for (int p = 2; p < NP1; p++) begin
      checks++;
      if (done_cyc[p] - done_cyc[p-1] != WPP) begin
        failures++;
        $display("RATE: poly %0d finished %0d cycles after the previous (exp %0d)",
                 p, done_cyc[p] - done_cyc[p-1], WPP);
      end
    end
    $display("phase 1: first result after %0d cycles, interval %0d cycles",
             done_cyc[0], done_cyc[NP1-1] - done_cyc[NP1-2]);
    // phase 2: input gaps and output back-pressure
    gaps = 1; bp = 1;
    for (int p = NP1; p < NP1 + NP2; p++) send_poly(polys[p]);
    wait (polys_out == NP1 + NP2);
    checks++;
    if (stall_out == 0) begin failures++; $display("no output back-pressure seen"); end
    checks++;
    if (stall_in == 0) begin failures++; $display("no input stall seen"); end
    $display("input stalls %0d, output holds %0d", stall_in, stall_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d polynomials out", polys_out, NP1 + NP2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
