// tb_twiddle_rom: reads every entry of two twiddle tables (an L-stage table
// covering all groups of stage 3, and an X-stage table with BASE = 1,
// STEP = 2 at stage 8) for n = 1024, q = 3221225473 and compares them with
// psi^bitrev(2^s + group) computed by repeated multiplication.
module tb_twiddle_rom;
  import ntt_ref_pkg::*;
  localparam int unsigned N = 1024;
  logic [2:0]  a1;
  logic [6:0]  a2;
  logic [31:0] t1, t2;
  twiddle_rom #(.W(32), .Q(QREF), .N(N), .PSI(PSI1024), .STAGE(3), .DEPTH(8),
                .BASE(0), .STEP(1)) dut1 (.addr(a1), .tw(t1));
  twiddle_rom #(.W(32), .Q(QREF), .N(N), .PSI(PSI1024), .STAGE(8), .DEPTH(128),
                .BASE(1), .STEP(2)) dut2 (.addr(a2), .tw(t2));
  int checks = 0, failures = 0;
  initial begin
    for (int e = 0; e < 8; e++) begin
      a1 = 3'(e); #1;
      checks++;
      if (64'(t1) != tw_ref(3, e, N, PSI1024, QREF)) begin
        failures++; $display("stage 3 entry %0d: got %0d", e, t1);
      end
    end
    for (int e = 0; e < 128; e++) begin
      a2 = 7'(e); #1;
      checks++;
      if (64'(t2) != tw_ref(8, 1 + 2 * e, N, PSI1024, QREF)) begin
        failures++; if (failures < 5) $display("stage 8 entry %0d: got %0d", e, t2);
      end
    end
    // psi must be a primitive 2n-th root: psi^n = -1
    checks++;
    if (pw(PSI1024, N, QREF) != QREF - 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
