// Self-checking test of victim_cache.
// A reference keeps every entry (valid, dirty, tag, block) and a recency
// list of entry numbers, most recent first. Each cycle a random block
// address from a pool of 24 is probed and the probe result is compared;
// then either the hit entry is swapped with a new block (sometimes an
// invalid one, which frees the entry), or a block that is not present is
// inserted, and the entry reported for eviction (free first, else least
// recently used) and the next-contents outputs are compared.
module tb_victim_cache;
  localparam int unsigned E = 8, TW = 27, LW = 256, WW = 3;
  logic clk = 0, rst_n = 0;
  logic probe, hit, match, hit_dirty, swap_en, ins_en, in_valid, in_dirty;
  logic ev_valid, ev_dirty, changed;
  logic [WW-1:0] hit_way, sw_way;
  logic [TW-1:0] probe_tag, in_tag, ev_tag;
  logic [LW-1:0] hit_line, in_line, ev_line;
  logic [E-1:0] nxt_valid;
  logic [E-1:0][TW-1:0] nxt_tag;
  int checks = 0, failures = 0;

  victim_cache #(.ENTRIES(E), .TAG_W(TW), .LINE_W(LW)) dut (.*);

  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic          mv [E];
  logic          md [E];
  logic [TW-1:0] mt [E];
  logic [LW-1:0] ml [E];
  int            order [$];

  function automatic int find(input logic [TW-1:0] t);
    for (int e = 0; e < E; e++) if (mv[e] && mt[e] == t) return e;
    return -1;
  endfunction

  function automatic int victim();
    for (int e = 0; e < E; e++) if (!mv[e]) return e;
    return order[E-1];
  endfunction

  task automatic touch(input int w);
    foreach (order[i]) if (order[i] == w) begin order.delete(i); break; end
    order.push_front(w);
  endtask

  function automatic logic [LW-1:0] rnd_line();
    logic [LW-1:0] l;
    for (int i = 0; i < LW / 32; i++) l[32*i +: 32] = $urandom;
    return l;
  endfunction

  task automatic fail(input string m);
    failures++; $display("FAIL %s", m);
  endtask

  int nswap = 0, nins = 0, nhit = 0, nevd = 0;
  initial begin
    for (int e = 0; e < E; e++) begin mv[e] = 0; md[e] = 0; order.push_back(e); end
    probe = 0; swap_en = 0; ins_en = 0; in_valid = 0; in_dirty = 0; probe_tag = 0; in_tag = 0; in_line = 0; sw_way = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      int w, wv;
      logic [TW-1:0] nt;
      @(negedge clk);
      probe = $urandom % 4 != 0;
      probe_tag = 27'h100 + ($urandom % 24);
      swap_en = 0; ins_en = 0;
      do nt = 27'h100 + ($urandom % 24); while (find(nt) >= 0);
      in_tag = nt; in_line = rnd_line(); in_dirty = $urandom; in_valid = ($urandom % 8) != 0;
      #1;
      w = find(probe_tag);
      checks++;
      if (hit !== (probe && w >= 0) || match !== (w >= 0)) fail($sformatf("hit=%b exp=%b", hit, probe && w >= 0));
      if (w >= 0) begin
        checks++;
        if (hit_way !== WW'(w) || hit_line !== ml[w] || hit_dirty !== md[w]) fail("hit entry");
      end
      if (hit && ($urandom % 2)) begin
        swap_en = 1; sw_way = hit_way; wv = w; nswap++;
      end else if ($urandom % 2) begin
        ins_en = 1; in_valid = 1; wv = victim(); nins++;
        checks++;
        if (ev_valid !== mv[wv] || (mv[wv] && (ev_tag !== mt[wv] || ev_line !== ml[wv] || ev_dirty !== md[wv])))
          fail($sformatf("eviction entry exp way %0d", wv));
        if (ev_valid && ev_dirty) nevd++;
      end
      if (hit) nhit++;
      #1;
      checks++;
      if (changed !== (swap_en || ins_en)) fail("changed");
      for (int e = 0; e < E; e++) begin
        logic ev_, et_ok;
        ev_ = ((swap_en || ins_en) && e == wv) ? in_valid : mv[e];
        et_ok = ((swap_en || ins_en) && e == wv) ? (nxt_tag[e] == in_tag) : (!mv[e] || nxt_tag[e] == mt[e]);
        checks++;
        if (nxt_valid[e] !== ev_ || (ev_ && !et_ok)) fail($sformatf("next contents entry %0d", e));
      end
      @(posedge clk); #1;
      if (swap_en || ins_en) begin
        mv[wv] = in_valid; md[wv] = in_valid && in_dirty; mt[wv] = in_tag; ml[wv] = in_line; touch(wv);
      end
    end
    checks++;
    if (nswap == 0 || nins == 0 || nhit == 0 || nevd == 0) fail("coverage");
    $display("swaps %0d inserts %0d hits %0d dirty evictions %0d", nswap, nins, nhit, nevd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
