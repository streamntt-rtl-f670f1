// tb_mod_mul: checks a*b mod q of the pipelined multiplier against 64-bit
// integer arithmetic, for the 32-bit modulus 3221225473 and the 13-bit
// modulus 7681, with random operands (including q-1 corners) and a random
// pipeline enable. Results must appear after exactly two enabled cycles.
module tb_mod_mul;
  localparam longint unsigned Q1 = 64'd3221225473;
  localparam longint unsigned Q2 = 64'd7681;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en;
  logic [31:0] a1, b1, r1;
  logic [12:0] a2, b2, r2;
  mod_mul #(.W(32), .Q(Q1)) dut1 (.clk, .en, .a(a1), .b(b1), .r(r1));
  mod_mul #(.W(13), .Q(Q2)) dut2 (.clk, .en, .a(a2), .b(b2), .r(r2));

  int checks = 0, failures = 0;
  longint unsigned e1[$], e2[$];

  function automatic longint unsigned rnd(longint unsigned q);
    case ($urandom % 8)
      0: return q - 1;
      1: return 0;
      default: return {$urandom, $urandom} % q;
    endcase
  endfunction

  initial begin
    en = 0; a1 = 0; b1 = 0; a2 = 0; b2 = 0;
    @(posedge clk); #1;
    for (int i = 0; i < 4000; i++) begin
      en = ($urandom % 4) != 0;
      a1 = 32'(rnd(Q1)); b1 = 32'(rnd(Q1));
      a2 = 13'(rnd(Q2)); b2 = 13'(rnd(Q2));
      @(posedge clk);
      if (en) begin
        e1.push_back((64'(a1) * 64'(b1)) % Q1);
        e2.push_back((64'(a2) * 64'(b2)) % Q2);
      end
      #1;
      // two enabled edges after its operands were taken, a product is out
      if (en && e1.size() == 2) begin
        checks += 2;
        if (64'(r1) != e1[0]) begin failures++; if (failures < 5) $display("q1: got %0d exp %0d", r1, e1[0]); end
        if (64'(r2) != e2[0]) begin failures++; if (failures < 5) $display("q2: got %0d exp %0d", r2, e2[0]); end
        void'(e1.pop_front()); void'(e2.pop_front());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
