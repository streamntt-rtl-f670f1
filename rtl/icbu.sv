// icbu: integrated circular butterfly unit for one lane of one L-stage.
//
// Lane i of stage s receives the coefficient pairs (a_m, a_m+str) whose index
// m = k*2*str + c*NBU + i (c = 0..L-1, L = str/NBU), one pair per cycle,
// applies the butterfly with the twiddle of stride group k, and writes the two
// results into a circular reorder buffer of 2*L = 2*str(s)/NBU entries. A
// separate read side sends the same coefficients on as pairs at half the
// stride, (a_m, a_m+str/2), which is what lane i of stage s+1 needs. Write and
// read are two independent state machines sharing the buffer, both running
// at one pair per cycle, as in the original unit.
//
// Buffer addressing (this design's own scheme, which keeps the buffer at the
// original 2*str/NBU entries while sustaining one pair per cycle):
//   write number w, c = w mod L: results go to logical slots c and L + c;
//   read number r, r' = r mod L: logical slots hi*L + lo and hi*L + L/2 + lo,
//   where hi = top bit of r' and lo the rest.
// Read r' of a window frees exactly the two physical slots that write c = r'
// of the next window needs if every second window swaps the two top bits of
// the slot address, so window parity selects identity or that swap.
// Flow control: write w may start once read w-L has happened (this cycle or
// earlier: the buffer reads old data before the clock edge writes new data);
// read r' may start once writes up to r'+L/2 (r' < L/2) or r' (r' >= L/2)
// of its window are done.
//
// The buffer is split into four banks of L/2 entries (by the top two slot
// bits), each with one write and one read port, which is enough for the two
// writes and two reads of every cycle.
//
// Interface: valid/ready streams in and out; the output is registered. The
// twiddle comes from a table outside the unit (shared with a neighbouring
// stage): the unit presents the stride group of the pair at its input on
// tw_grp and expects psi^bitrev(2^S + tw_grp) on tw in the same cycle.
// The butterfly pipeline (bu_core, 3 cycles) stalls as a whole when the
// buffer cannot accept its result. Steady-state throughput is one pair per
// cycle; first output appears about L/2 + 5 cycles after the first input.
// Requires L >= 2, i.e. str(s) >= 2*NBU (true for every L-stage).
module icbu #(
  parameter int unsigned     W   = 32,
  parameter longint unsigned Q   = 64'd3221225473,
  parameter int unsigned     N   = 1024,
  parameter int unsigned     NBU = 4,
  parameter int unsigned     S   = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_aj,
  input  logic [W-1:0] in_ajs,
  output logic [(S > 0 ? S : 1)-1:0] tw_grp,   // stride group of the input pair
  input  logic [W-1:0] tw,                     // its twiddle, same cycle
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_aj,
  output logic [W-1:0] out_ajs
);
  localparam int unsigned STR    = N >> (S + 1);
  localparam int unsigned L      = STR / NBU;       // pairs per window
  localparam int unsigned LB     = $clog2(L);
  localparam int unsigned M      = LB + 1;          // slot address bits
  localparam int unsigned GROUPS = 1 << S;          // stride groups
  localparam int unsigned NPAIR  = N / (2 * NBU);   // pairs per polynomial
  localparam int unsigned PB     = $clog2(NPAIR);
  localparam int unsigned CW     = LB + 2;          // write/read counters
  localparam int unsigned GB     = (GROUPS > 1) ? $clog2(GROUPS) : 1;
  localparam int unsigned LAT    = 3;

  if (L < 2 || (1 << LB) != L) begin : g_bad_cfg
    $error("icbu: needs str(s)/NBU >= 2");
  end

  // ---------------- butterfly pipeline ----------------
  logic [PB-1:0]  cin;          // pair index within the polynomial
  logic [GB-1:0]  grp;
  logic [W-1:0]   bf_y, bf_x;
  logic [LAT-1:0] v;            // valid of each butterfly stage
  logic           en, wr_ok, wr_fire, in_fire;

  if (GROUPS > 1) begin : g_grp
    assign grp = GB'(cin >> LB);
  end else begin : g_grp0
    assign grp = '0;
  end

  assign tw_grp = grp;

  bu_core #(.W(W), .Q(Q)) u_bu (.clk, .en, .aj(in_aj), .ajs(in_ajs), .tw,
                                .y(bf_y), .x(bf_x));

  assign en       = !v[LAT-1] || wr_ok;
  assign in_ready = en;
  assign in_fire  = in_valid && in_ready;
  assign wr_fire  = v[LAT-1] && wr_ok;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v   <= '0;
      cin <= '0;
    end else begin
      if (en) v <= {v[LAT-2:0], in_valid};
      if (in_fire) cin <= cin + 1'b1;   // wraps at NPAIR (power of two)
    end
  end

  // ---------------- circular reorder buffer ----------------
  localparam int unsigned BD = L / 2;               // entries per bank
  localparam int unsigned BI = (BD > 1) ? $clog2(BD) : 1;
  logic [CW-1:0] wcnt, rcnt, rcnt_eff, wdiff, rdiff;
  logic [M-1:0]  wa_y, wa_x, ra_1, ra_2;
  logic          rd_avail, rd_fire;

  function automatic logic [M-1:0] slot(logic [M-1:0] l, logic odd);
    logic [M-1:0] s;
    s = l;
    if (odd) begin
      s[M-1] = l[M-2];
      s[M-2] = l[M-1];
    end
    return s;
  endfunction

  always_comb begin
    logic [LB-1:0] c, r;
    logic [M-1:0]  l1;
    c    = wcnt[LB-1:0];
    wa_y = slot({1'b0, c}, wcnt[LB]);
    wa_x = slot({1'b1, c}, wcnt[LB]);
    r    = rcnt[LB-1:0];
    // {hi, half-select, lo}: hi = r[LB-1], lo = r[LB-2:0]
    l1   = M'({r[LB-1], 1'b0}) << (M - 2);
    l1   = l1 | M'(r & LB'(L / 2 - 1));
    ra_1 = slot(l1, rcnt[LB]);
    ra_2 = slot(l1 | (M'(1) << (M - 2)), rcnt[LB]);
  end

  // read side
  assign rdiff    = wcnt - rcnt;
  assign rd_avail = (rcnt[LB-1:0] < LB'(L / 2)) ? (rdiff >= CW'(L / 2 + 1))
                                                : (rdiff >= CW'(1));
  assign rd_fire  = rd_avail && (!out_valid || out_ready);
  assign rcnt_eff = rcnt + CW'(rd_fire);

  // write side
  assign wdiff = wcnt - rcnt_eff;
  assign wr_ok = wdiff < CW'(L);

  // Four banks selected by the top two slot-address bits. The two slots of
  // a write always differ in one of those bits, and so do the two slots of a
  // read, so each bank sees at most one write and one read per cycle.
  function automatic logic [BI-1:0] index_of(logic [M-1:0] a);
    return BI'(a & M'(BD - 1));
  endfunction

  logic [3:0][W-1:0] bank_rd;

  for (genvar b = 0; b < 4; b++) begin : g_bank
    logic [W-1:0]  mem [BD];
    logic          we;
    logic [BI-1:0] wi, ri;
    logic [W-1:0]  wd;
    always_comb begin
      we = wr_fire && (wa_y[M-1:M-2] == 2'(b) || wa_x[M-1:M-2] == 2'(b));
      wi = (wa_y[M-1:M-2] == 2'(b)) ? index_of(wa_y) : index_of(wa_x);
      wd = (wa_y[M-1:M-2] == 2'(b)) ? bf_y : bf_x;
      ri = (ra_1[M-1:M-2] == 2'(b)) ? index_of(ra_1) : index_of(ra_2);
    end
    always_ff @(posedge clk) begin
      if (we) mem[wi] <= wd;
    end
    assign bank_rd[b] = mem[ri];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wcnt      <= '0;
      rcnt      <= '0;
      out_valid <= 1'b0;
    end else begin
      if (wr_fire) wcnt <= wcnt + 1'b1;
      rcnt <= rcnt_eff;
      if (rd_fire)        out_valid <= 1'b1;
      else if (out_ready) out_valid <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rd_fire) begin
      out_aj  <= bank_rd[ra_1[M-1:M-2]];
      out_ajs <= bank_rd[ra_2[M-1:M-2]];
    end
  end

  // A held output must not change until it is taken.
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_aj) && $stable(out_ajs));
endmodule
