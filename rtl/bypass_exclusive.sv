// Exclusive bypass predictor.
//
// A small fully associative table remembers block addresses that are known
// NOT to be in the victim cache. When a victim cache probe misses
// (train_en), its address is recorded; later accesses to an address in the
// table raise `bypass` (certain miss). When a block is placed into the
// victim cache (rm_en), the table is searched and a matching entry is
// invalidated in the same edge, so a bypass never hides a block that is
// present.
//
// Insertion goes to a free entry if there is one, otherwise to the entry
// under a round-robin pointer (this design's choice); an address already
// in the table is not inserted twice. If the same address is trained and
// removed in one cycle, removal wins. `bypass` is combinational from
// look_tag and the table. Default: 32 entries.
module bypass_exclusive #(
  parameter int unsigned ENTRIES = 32,
  parameter int unsigned TAG_W   = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [TAG_W-1:0] look_tag,
  output logic             bypass,
  input  logic             train_en,
  input  logic [TAG_W-1:0] train_tag,
  input  logic             rm_en,
  input  logic [TAG_W-1:0] rm_tag
);

  localparam int unsigned IW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic [ENTRIES-1:0]            val_q;
  logic [ENTRIES-1:0][TAG_W-1:0] tag_q;
  logic [IW-1:0]                 rr_q;

  logic [ENTRIES-1:0] look_match, train_match;
  logic               have_free;
  logic [IW-1:0]      free_idx, ins_idx;

  always_comb begin
    have_free = 1'b0;
    free_idx  = '0;
    for (int unsigned e = 0; e < ENTRIES; e++) begin
      look_match[e]  = val_q[e] && (tag_q[e] == look_tag);
      train_match[e] = val_q[e] && (tag_q[e] == train_tag);
      if (!val_q[e] && !have_free) begin
        have_free = 1'b1;
        free_idx  = IW'(e);
      end
    end
    ins_idx = have_free ? free_idx : rr_q;
  end

  assign bypass = |look_match;

  wire do_train = train_en && !(|train_match) && !(rm_en && rm_tag == train_tag);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      val_q <= '0;
      rr_q  <= '0;
    end else begin
      if (do_train) begin
        val_q[ins_idx] <= 1'b1;
        tag_q[ins_idx] <= train_tag;
        if (!have_free) rr_q <= (rr_q == IW'(ENTRIES - 1)) ? '0 : rr_q + 1'b1;
      end
      if (rm_en)
        for (int unsigned e = 0; e < ENTRIES; e++)
          if (val_q[e] && tag_q[e] == rm_tag && !(do_train && IW'(e) == ins_idx))
            val_q[e] <= 1'b0;
    end
  end

endmodule
