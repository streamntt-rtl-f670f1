// in_scatter: input multiplexer from one HBM read channel to the NBU lanes.
//
// Each input word carries 2*NBU coefficients of stage-0 pairs: slot i holds
// a[t*NBU + i] and slot i + NBU holds a[n/2 + t*NBU + i] for word number t.
// Lane i receives the pair (slot i, slot i+NBU), which is exactly the
// sequence j = i, i+NBU, i+2NBU, ... that butterfly i of stage 0 handles.
// The word layout is this design's choice (the original loads whole HBM words
// and scatters them; the load order is not specified).
//
// Interface: valid/ready word stream in, one valid/ready pair stream per
// lane out. The lanes are forked independently: a lane that is ready takes
// its pair at once and the word is retired when every lane has taken its
// part, so one slow lane does not block the others within a word.
module in_scatter #(
  parameter int unsigned W   = 32,
  parameter int unsigned NBU = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [2*NBU-1:0][W-1:0]  in_data,
  output logic [NBU-1:0]           lane_valid,
  input  logic [NBU-1:0]           lane_ready,
  output logic [NBU-1:0][W-1:0]    lane_aj,
  output logic [NBU-1:0][W-1:0]    lane_ajs
);
  logic [NBU-1:0] taken;     // lanes that already took the current word

  always_comb begin
    for (int i = 0; i < NBU; i++) begin
      lane_valid[i] = in_valid && !taken[i];
      lane_aj[i]    = in_data[i];
      lane_ajs[i]   = in_data[i + NBU];
    end
  end

  assign in_ready = &(taken | lane_ready);

  always_ff @(posedge clk) begin
    if (!rst_n)                     taken <= '0;
    else if (in_valid && in_ready)  taken <= '0;
    else                            taken <= taken | (lane_valid & lane_ready);
  end
endmodule
