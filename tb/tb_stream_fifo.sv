// tb_stream_fifo: random writes and reads through a depth-2 and a depth-3
// FIFO against a queue model. Checks data order, that the FIFO reports full
// exactly when it holds DEPTH entries (and still accepts a write while being
// read), and that it streams one word per cycle when both sides are always
// ready.
module tb_stream_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, finished = 0;

  for (genvar cfg = 0; cfg < 2; cfg++) begin : g_cfg
    localparam int unsigned DEPTH = cfg + 2;
    logic in_valid, in_ready, out_valid, out_ready;
    logic [15:0] in_data, out_data;
    stream_fifo #(.DW(16), .DEPTH(DEPTH)) dut (.*);

    logic [15:0] model[$];
    int unsigned sent = 0, got = 0, full_seen = 0, cyc = 0, phase1_end = 0;
    bit free_run = 1;

    always @(posedge clk) if (rst_n) begin
      cyc <= cyc + 1;
      // full flag against the model occupancy
      checks++;
      if ((model.size() == DEPTH && !out_ready) == in_ready) begin
        failures++;
        if (failures < 8) $display("D=%0d: in_ready=%0d with %0d stored", DEPTH, in_ready, model.size());
      end
      if (model.size() == DEPTH) full_seen++;
      checks++;
      if (out_valid != (model.size() != 0)) begin
        failures++;
        if (failures < 8) $display("D=%0d: out_valid=%0d with %0d stored", DEPTH, out_valid, model.size());
      end
      if (out_valid && out_ready) begin
        checks++;
        if (out_data != model[0]) begin
          failures++;
          if (failures < 8) $display("D=%0d: got %h exp %h", DEPTH, out_data, model[0]);
        end
        void'(model.pop_front());
        got++;
      end
      if (in_valid && in_ready) begin
        model.push_back(in_data);
        sent++;
      end
      if (free_run && got == 200) phase1_end = cyc;
    end

    initial begin
      in_valid = 0; in_data = 0; out_ready = 0;
      wait (rst_n);
      @(posedge clk); #1;
      // phase 1: both sides always ready: 200 words in about 200 cycles
      out_ready = 1;
      for (int i = 0; i < 200; i++) begin
        in_valid = 1; in_data = 16'($urandom);
        do @(posedge clk); while (!in_ready);
        #1;
      end
      in_valid = 0;
      while (got < 200) @(posedge clk);
      #1 free_run = 0;
      checks++;
      if (phase1_end > 205) begin failures++; $display("D=%0d: 200 words took %0d cycles", DEPTH, phase1_end); end
      // phase 2: random
      for (int i = 0; i < 2000; i++) begin
        in_valid = ($urandom % 3) != 0; in_data = 16'($urandom);
        out_ready = ($urandom % 3) == 0 || (i > 1000 && $urandom % 2 == 0);
        @(posedge clk); #1;
      end
      in_valid = 0; out_ready = 1;
      repeat (DEPTH + 2) @(posedge clk);
      checks++;
      if (full_seen == 0) begin failures++; $display("D=%0d: never full", DEPTH); end
      finished++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (finished == 2);
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
