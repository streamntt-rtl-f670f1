// stream_fifo: FIFO stream between two dataflow modules.
//
// A circular buffer of DEPTH entries with a valid/ready interface on both
// sides. Data written is visible on the read side the next cycle; a full FIFO
// accepts a write in the same cycle it is read. The original design connects
// its dataflow modules with such streams; depth 2 is this design's choice.
module stream_fifo #(
  parameter int unsigned DW    = 64,
  parameter int unsigned DEPTH = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [DW-1:0] in_data,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [DW-1:0] out_data
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DW-1:0]  mem [DEPTH];
  logic [AW-1:0]  wp, rp;
  logic [AW:0]    cnt;
  logic           wr, rd;

  assign out_valid = cnt != '0;
  assign rd        = out_valid && out_ready;
  assign in_ready  = (cnt != (AW+1)'(DEPTH)) || rd;
  assign wr        = in_valid && in_ready;
  assign out_data  = mem[rp];

  function automatic logic [AW-1:0] nxt(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (wr) mem[wp] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (wr) wp <= nxt(wp);
      if (rd) rp <= nxt(rp);
      cnt <= cnt + (AW+1)'(wr) - (AW+1)'(rd);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    cnt <= (AW+1)'(DEPTH));
endmodule
