// tb_in_scatter: sends random words into the input scatter for NBU = 4 and
// drains each lane with its own random ready pattern. Every lane must see
// (slot i, slot i+NBU) of every word, in order, exactly once, and a word must
// be retired only after all lanes took their part. Also checks that lanes
// can take a word at different times.
module tb_in_scatter;
  localparam int unsigned NBU = 4, W = 16, NWORD = 300;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready;
  logic [2*NBU-1:0][W-1:0] in_data;
  logic [NBU-1:0] lane_valid, lane_ready;
  logic [NBU-1:0][W-1:0] lane_aj, lane_ajs;
  in_scatter #(.W(W), .NBU(NBU)) dut (.*);

  int checks = 0, failures = 0;
  logic [2*NBU-1:0][W-1:0] words[$];
  int unsigned lane_cnt[NBU];
  int unsigned retired = 0, split = 0;
  bit rnd_ready = 0;

  always @(posedge clk) begin
    for (int i = 0; i < NBU; i++) lane_ready[i] <= rnd_ready ? ($urandom % 2 == 0) : 1'b1;
    if (rst_n) begin
      if (lane_valid != '0 && lane_valid != '1) split++;
      for (int i = 0; i < NBU; i++)
        if (lane_valid[i] && lane_ready[i]) begin
          checks++;
          if (lane_aj[i] != words[lane_cnt[i]][i] || lane_ajs[i] != words[lane_cnt[i]][i + NBU]) begin
            failures++;
            if (failures < 8) $display("lane %0d word %0d wrong", i, lane_cnt[i]);
          end
          lane_cnt[i]++;
        end
      if (in_valid && in_ready) begin
        checks++;
        for (int i = 0; i < NBU; i++)
          if (lane_cnt[i] != retired + 1) begin
            failures++;
            $display("word %0d retired before lane %0d took it", retired, i);
          end
        retired++;
      end
    end
  end

  initial begin
    for (int i = 0; i < NBU; i++) lane_cnt[i] = 0;
    for (int w = 0; w < NWORD; w++) begin
      logic [2*NBU-1:0][W-1:0] d;
      for (int s = 0; s < 2 * NBU; s++) d[s] = W'($urandom);
      words.push_back(d);
    end
    in_valid = 0; in_data = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int w = 0; w < NWORD; w++) begin
      if (w == 50) rnd_ready = 1;
      in_data = words[w];
      in_valid = 1;
      do @(posedge clk); while (!in_ready);
      #1 in_valid = 0;
    end
    repeat (2) @(posedge clk);
    checks += 2;
    for (int i = 0; i < NBU; i++) if (lane_cnt[i] != NWORD) failures++;
    if (split == 0) begin failures++; $display("lanes never took a word at different times"); end
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
