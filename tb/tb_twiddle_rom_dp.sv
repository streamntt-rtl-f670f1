// tb_twiddle_rom_dp: reads the shared two-port tables of stages 0+1 and 4+5
// for n = 1024, q = 3221225473 through both ports at once, port A with
// stage s's group addresses and port B with stage s+1's, and compares them
// with psi^bitrev(2^s + group) computed by repeated multiplication.
module tb_twiddle_rom_dp;
  import ntt_ref_pkg::*;
  localparam int unsigned N = 1024;
  logic [1:0] a0, b0;
  logic [5:0] a4, b4;
  logic [31:0] ta0, tb0, ta4, tb4;
  twiddle_rom_dp #(.W(32), .Q(QREF), .N(N), .PSI(PSI1024), .STAGE(0)) dut0 (
    .addr_a(a0), .addr_b(b0), .tw_a(ta0), .tw_b(tb0));
  twiddle_rom_dp #(.W(32), .Q(QREF), .N(N), .PSI(PSI1024), .STAGE(4)) dut4 (
    .addr_a(a4), .addr_b(b4), .tw_a(ta4), .tw_b(tb4));
  int checks = 0, failures = 0;
  initial begin
    for (int g = 0; g < 2; g++) begin
      a0 = 0; b0 = 2'(1 + g); #1;
      checks += 2;
      if (64'(ta0) != tw_ref(0, 0, N, PSI1024, QREF)) failures++;
      if (64'(tb0) != tw_ref(1, g, N, PSI1024, QREF)) failures++;
    end
    for (int g = 0; g < 32; g++) begin
      a4 = 6'(g % 16); b4 = 6'(16 + g); #1;
      checks += 2;
      if (64'(ta4) != tw_ref(4, g % 16, N, PSI1024, QREF)) begin
        failures++; if (failures < 5) $display("stage 4 group %0d wrong", g % 16);
      end
      if (64'(tb4) != tw_ref(5, g, N, PSI1024, QREF)) begin
        failures++; if (failures < 5) $display("stage 5 group %0d wrong", g);
      end
    end
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
