// HighLow-Bits bypass predictor.
//
// Two registers summarise the tags held in the victim cache: NOR holds the
// negation of the OR of all valid tags (a 1 marks a bit position that is 0
// in every stored tag) and AND holds the AND of all valid tags (a 1 marks a
// position that is 1 in every stored tag). An access tag that has a 1 where
// NOR has a 1, or a 0 where AND has a 1, cannot equal any stored tag, so
// `bypass` is raised: the victim cache probe is certain to miss. A low
// output means only "may hit".
//
// The registers are reloaded from the victim cache's next contents
// (nxt_valid/nxt_tag) at every clock edge where `upd` is high, i.e. in the
// same edge that changes the victim cache, so the summary is never stale.
// Rebuilding from all tags is this design's choice: an OR cannot be undone
// when a block leaves, so incremental update is not possible. With no valid
// entry both registers are all ones and every access is bypassed.
// `bypass` is combinational from look_tag and the registers.
module bypass_highlow #(
  parameter int unsigned ENTRIES = 8,
  parameter int unsigned TAG_W   = 32
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          upd,
  input  logic [ENTRIES-1:0]            nxt_valid,
  input  logic [ENTRIES-1:0][TAG_W-1:0] nxt_tag,
  input  logic [TAG_W-1:0]              look_tag,
  output logic                          bypass
);

  logic [TAG_W-1:0] nor_q, and_q, nor_d, and_d;

  always_comb begin
    logic [TAG_W-1:0] or_acc;
    or_acc = '0;
    and_d  = '1;
    for (int unsigned e = 0; e < ENTRIES; e++) begin
      if (nxt_valid[e]) begin
        or_acc = or_acc | nxt_tag[e];
        and_d  = and_d & nxt_tag[e];
      end
    end
    nor_d = ~or_acc;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      nor_q <= '1;
      and_q <= '1;
    end else if (upd) begin
      nor_q <= nor_d;
      and_q <= and_d;
    end
  end

  assign bypass = |(look_tag & nor_q) | |(~look_tag & and_q);

endmodule
