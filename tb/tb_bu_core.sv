// tb_bu_core: checks the butterfly y = a_j + tw*a_js, x = a_j - tw*a_js
// (mod q) against 64-bit integer arithmetic for q = 3221225473, with random
// and corner operands and a random pipeline enable. Results must appear
// exactly three enabled cycles after their operands.
module tb_bu_core;
  localparam longint unsigned Q = 64'd3221225473;
  localparam int unsigned LAT = 3;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en;
  logic [31:0] aj, ajs, tw, y, x;
  bu_core #(.W(32), .Q(Q)) dut (.*);

  int checks = 0, failures = 0;
  longint unsigned ey[$], ex[$];

  function automatic longint unsigned rnd();
    case ($urandom % 8)
      0: return Q - 1;
      1: return 0;
      default: return {$urandom, $urandom} % Q;
    endcase
  endfunction

  initial begin
    en = 0; aj = 0; ajs = 0; tw = 0;
    @(posedge clk); #1;
    for (int i = 0; i < 4000; i++) begin
      en = ($urandom % 4) != 0;
      aj = 32'(rnd()); ajs = 32'(rnd()); tw = 32'(rnd());
      @(posedge clk);
      if (en) begin
        longint unsigned t;
        t = (64'(tw) * 64'(ajs)) % Q;
        ey.push_back((64'(aj) + t) % Q);
        ex.push_back((64'(aj) + Q - t) % Q);
      end
      #1;
      if (en && ey.size() == LAT) begin
        checks += 2;
        if (64'(y) != ey[0] || 64'(x) != ex[0]) begin
          failures++;
          if (failures < 5) $display("got y=%0d x=%0d exp y=%0d x=%0d", y, x, ey[0], ex[0]);
        end
        void'(ey.pop_front()); void'(ex.pop_front());
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
