// Fully associative victim cache.
//
// Holds blocks that the direct-mapped L1 has replaced. A probe compares the
// probed block address with every entry in parallel and returns the hit
// entry's number, dirty bit and data combinationally. Two writes are
// supported, at most one per cycle:
//   swap_en - the promoted entry sw_way is overwritten by the L1's replaced
//             block (in_*); if the L1 had no valid block there (in_valid=0)
//             the entry is freed. This is the exchange that follows a
//             victim cache hit.
//   ins_en  - the L1's replaced block is inserted into a free entry, or
//             else into the least recently used one. The entry about to be
//             pushed out is shown on ev_* in the same cycle so that the
//             owner can write it back to level 2 if it is dirty.
// `match` is the compare result whether or not a probe is made (`hit` is
// match gated by `probe`); it only lets an observer tell how often a
// suppressed probe would have missed.
// Replacement is LRU by age counters (this design's choice; the swap and
// insertion rules are those of the classic victim cache) (0 = most recently used); a written
// entry becomes most recently used. Both writes take effect at the clock
// edge. nxt_valid/nxt_tag show the contents after that edge and `changed`
// says whether they differ from now, so that bypass predictors can be
// reloaded in the same edge. Defaults: 8 entries of 32-byte blocks, tags are
// 27-bit block addresses (32-bit byte address, 5 offset bits).
module victim_cache #(
  parameter int unsigned ENTRIES = 8,
  parameter int unsigned TAG_W   = 27,
  parameter int unsigned LINE_W  = 256
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // probe
  input  logic                          probe,
  input  logic [TAG_W-1:0]              probe_tag,
  output logic                          hit,
  output logic                          match,
  output logic [$clog2(ENTRIES)-1:0]    hit_way,
  output logic                          hit_dirty,
  output logic [LINE_W-1:0]             hit_line,
  // writes
  input  logic                          swap_en,
  input  logic [$clog2(ENTRIES)-1:0]    sw_way,
  input  logic                          ins_en,
  input  logic                          in_valid,
  input  logic                          in_dirty,
  input  logic [TAG_W-1:0]              in_tag,
  input  logic [LINE_W-1:0]             in_line,
  // entry an insertion would push out
  output logic                          ev_valid,
  output logic                          ev_dirty,
  output logic [TAG_W-1:0]              ev_tag,
  output logic [LINE_W-1:0]             ev_line,
  // contents after this edge, for the predictors
  output logic [ENTRIES-1:0]            nxt_valid,
  output logic [ENTRIES-1:0][TAG_W-1:0] nxt_tag,
  output logic                          changed
);

  localparam int unsigned WW = $clog2(ENTRIES);

  logic [ENTRIES-1:0]             val_q, dirty_q;
  logic [ENTRIES-1:0][TAG_W-1:0]  tag_q;
  logic [LINE_W-1:0]              line_q [ENTRIES];
  logic [ENTRIES-1:0][WW-1:0]     age_q;

  // probe
  always_comb begin
    match   = 1'b0;
    hit_way = '0;
    for (int unsigned e = 0; e < ENTRIES; e++)
      if (val_q[e] && tag_q[e] == probe_tag) begin
        match   = 1'b1;
        hit_way = WW'(e);
      end
  end
  assign hit = probe && match;
  assign hit_dirty = dirty_q[hit_way];
  assign hit_line  = line_q[hit_way];

  // replacement choice: first free entry, else the oldest
  logic [WW-1:0] rep_way;
  always_comb begin
    logic found;
    found   = 1'b0;
    rep_way = '0;
    for (int unsigned e = 0; e < ENTRIES; e++)
      if (!val_q[e] && !found) begin
        found   = 1'b1;
        rep_way = WW'(e);
      end
    if (!found)
      for (int unsigned e = 0; e < ENTRIES; e++)
        if (age_q[e] == WW'(ENTRIES - 1)) rep_way = WW'(e);
  end
  assign ev_valid = val_q[rep_way];
  assign ev_dirty = dirty_q[rep_way];
  assign ev_tag   = tag_q[rep_way];
  assign ev_line  = line_q[rep_way];

  wire            wr     = swap_en || ins_en;
  wire [WW-1:0]   wr_way = swap_en ? sw_way : rep_way;

  always_comb begin
    nxt_valid = val_q;
    nxt_tag   = tag_q;
    if (wr) begin
      nxt_valid[wr_way] = in_valid;
      nxt_tag[wr_way]   = in_tag;
    end
  end
  assign changed = wr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      val_q   <= '0;
      dirty_q <= '0;
      for (int unsigned e = 0; e < ENTRIES; e++) age_q[e] <= WW'(e);
    end else if (wr) begin
      val_q[wr_way]   <= in_valid;
      dirty_q[wr_way] <= in_valid && in_dirty;
      tag_q[wr_way]   <= in_tag;
      line_q[wr_way]  <= in_line;
      for (int unsigned e = 0; e < ENTRIES; e++)
        if (WW'(e) == wr_way)            age_q[e] <= '0;
        else if (age_q[e] < age_q[wr_way]) age_q[e] <= age_q[e] + 1'b1;
    end
  end

  // at most one write per cycle
  always_ff @(posedge clk)
    if (rst_n) assert (!(swap_en && ins_en)) else $error("victim_cache: swap and insert in one cycle");

endmodule
