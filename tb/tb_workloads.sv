// tb_workloads: runs one NTT instance for each of the other three PQC
// configurations the accelerator is built for, with their own lane counts:
//   (n, q) = (256, 7681)    NBU = 16, 13-bit coefficients
//            (256, 8380417) NBU = 8,  23-bit coefficients
//            (1024, 12289)  NBU = 8,  14-bit coefficients
// (the default (1024, 3221225473), NBU = 4 configuration is covered by the
// top-level test). Each instance transforms NPOLY random polynomials back to
// back; every result is checked against the direct definition and the
// polynomials must complete n/(2*NBU) cycles apart.
module tb_workloads;
  import ntt_ref_pkg::*;
  localparam int unsigned NPOLY = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, finished = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  for (genvar c = 0; c < 3; c++) begin : g_cfg
    localparam int unsigned     N   = (c == 0) ? 256 : (c == 1) ? 256 : 1024;
    localparam longint unsigned Q   = (c == 0) ? 7681 : (c == 1) ? 8380417 : 12289;
    localparam longint unsigned PSI = (c == 0) ? 4055 : (c == 1) ? 6757063 : 1945;
    localparam int unsigned     W   = (c == 0) ? 13 : (c == 1) ? 23 : 14;
    localparam int unsigned     NBU = (c == 0) ? 16 : 8;
    localparam int unsigned     WPP = N / (2 * NBU);

    logic in_valid, in_ready, out_valid, out_ready;
    logic [2*NBU-1:0][W-1:0] in_data, out_data;
    ntt_instance #(.W(W), .Q(Q), .N(N), .PSI(PSI), .NBU(NBU)) dut (
      .clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data);
    assign out_ready = 1'b1;

    longint unsigned ins[$][], expq[$][];
    int unsigned words_out = 0, polys_out = 0;
    int unsigned done_cyc[$];

    always @(posedge clk) if (rst_n && out_valid && out_ready) begin
      int unsigned k;
      k = words_out % WPP;
      for (int s = 0; s < 2 * NBU; s++) begin
        checks++;
        if (64'(out_data[s]) != expq[polys_out][k * 2 * NBU + s]) begin
          failures++;
          if (failures < 8) $display("n=%0d q=%0d poly %0d word %0d slot %0d wrong", N, Q,
                                     polys_out, k, s);
        end
      end
      words_out++;
      if (k == WPP - 1) begin polys_out++; done_cyc.push_back(cyc); end
    end

    initial begin
      in_valid = 0; in_data = '0;
      // psi must be a primitive 2n-th root of unity
      checks++;
      if (pw(PSI, N, Q) != Q - 1) begin failures++; $display("bad psi for q=%0d", Q); end
      for (int p = 0; p < NPOLY; p++) begin
        longint unsigned a[], r[];
        a = new[N];
        for (int j = 0; j < N; j++) a[j] = longint'($urandom) % Q;
        ntt_direct(a, PSI, Q, r);
        ins.push_back(a); expq.push_back(r);
      end
      wait (rst_n);
      @(posedge clk); #1;
      for (int p = 0; p < NPOLY; p++)
        for (int t = 0; t < WPP; t++) begin
          for (int i = 0; i < NBU; i++) begin
            in_data[i]       = W'(ins[p][t * NBU + i]);
            in_data[i + NBU] = W'(ins[p][N / 2 + t * NBU + i]);
          end
          in_valid = 1;
          do @(posedge clk); while (!in_ready);
          #1 in_valid = 0;
        end
      while (polys_out < NPOLY) @(posedge clk);
      for (int p = 1; p < NPOLY; p++) begin
        checks++;
        if (done_cyc[p] - done_cyc[p-1] != WPP) begin
          failures++;
          $display("n=%0d q=%0d: %0d cycles between polynomials", N, Q, done_cyc[p] - done_cyc[p-1]);
        end
      end
      $display("n=%0d q=%0d NBU=%0d: latency %0d cycles, one polynomial per %0d cycles",
               N, Q, NBU, done_cyc[0] - 4, done_cyc[1] - done_cyc[0]);
      finished++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (finished == 3);
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
