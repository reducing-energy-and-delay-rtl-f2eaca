// Table bypass predictor.
//
// A table of 2^N one-bit entries is addressed by the N least significant
// bits of a tag. Entries whose index equals the low N bits of some tag held
// in the victim cache hold 0; all others hold 1. Reading a 1 for an access
// means no stored tag can match, so `bypass` is raised (certain miss); a 0
// means the access must be completed.
//
// The table is reloaded from the victim cache's next contents at every edge
// where `upd` is high (the edge that changes the victim cache), which also
// restores 1s for blocks that have left. The default N = 8 gives the
// 256-bit (8x1) table; here it is a register array, read combinationally.
module bypass_table #(
  parameter int unsigned ENTRIES = 8,
  parameter int unsigned TAG_W   = 32,
  parameter int unsigned N       = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          upd,
  input  logic [ENTRIES-1:0]            nxt_valid,
  input  logic [ENTRIES-1:0][TAG_W-1:0] nxt_tag,
  input  logic [TAG_W-1:0]              look_tag,
  output logic                          bypass
);

  localparam int unsigned SIZE = 1 << N;

  logic [SIZE-1:0] tab_q, tab_d;

  always_comb begin
    tab_d = '1;
    for (int unsigned e = 0; e < ENTRIES; e++)
      if (nxt_valid[e]) tab_d[nxt_tag[e][N-1:0]] = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)   tab_q <= '1;
    else if (upd) tab_q <= tab_d;
  end

  assign bypass = tab_q[look_tag[N-1:0]];

endmodule
