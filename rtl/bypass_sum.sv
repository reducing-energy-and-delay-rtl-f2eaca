// Sum bypass predictor.
//
// Each tag is hashed to a SUM_WIDTH-bit "sum". For every possible sum there
// is one flip-flop, set when some tag held in the victim cache has that sum.
// An access whose sum's flip-flop is clear cannot match any stored tag, so
// `bypass` is raised (certain miss). ARRAYS independent arrays use different
// hashes; the access is bypassed when any one of them reports a miss, which
// keeps the prediction safe and raises coverage.
//
// Hash of array k (this design's choice of the loop-based sum): rotate the
// tag left by k*SUM_WIDTH/2 bits, cut it into SUM_WIDTH-bit pieces from the
// least significant end (the last piece zero-extended) and add the pieces
// modulo 2^SUM_WIDTH.
//
// The arrays are reloaded from the victim cache's next contents at every
// edge where `upd` is high, so a block that leaves clears its bit unless
// another stored block has the same sum. `bypass` is combinational from
// look_tag and the flip-flops. Defaults: two arrays of 2^10 flip-flops.
module bypass_sum #(
  parameter int unsigned ENTRIES   = 8,
  parameter int unsigned TAG_W     = 32,
  parameter int unsigned SUM_WIDTH = 10,
  parameter int unsigned ARRAYS    = 2
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          upd,
  input  logic [ENTRIES-1:0]            nxt_valid,
  input  logic [ENTRIES-1:0][TAG_W-1:0] nxt_tag,
  input  logic [TAG_W-1:0]              look_tag,
  output logic                          bypass
);

  localparam int unsigned SIZE   = 1 << SUM_WIDTH;
  localparam int unsigned PIECES = (TAG_W + SUM_WIDTH - 1) / SUM_WIDTH;

  function automatic logic [SUM_WIDTH-1:0] tag_sum(input logic [TAG_W-1:0] tag,
                                                   input int unsigned k);
    logic [TAG_W-1:0]                  rot;
    logic [PIECES*SUM_WIDTH-1:0]       ext;
    logic [SUM_WIDTH-1:0]              sum;
    int unsigned                       r;
    r   = (k * (SUM_WIDTH / 2)) % TAG_W;
    rot = (r == 0) ? tag : ((tag << r) | (tag >> (TAG_W - r)));
    ext = '0;
    ext[TAG_W-1:0] = rot;
    sum = '0;
    for (int unsigned p = 0; p < PIECES; p++)
      sum = sum + ext[p*SUM_WIDTH +: SUM_WIDTH];
    return sum;
  endfunction

  logic [ARRAYS-1:0][SIZE-1:0] arr_q, arr_d;
  logic [ARRAYS-1:0]           miss_k;

  always_comb begin
    arr_d = '0;
    for (int unsigned k = 0; k < ARRAYS; k++)
      for (int unsigned e = 0; e < ENTRIES; e++)
        if (nxt_valid[e]) arr_d[k][tag_sum(nxt_tag[e], k)] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)   arr_q <= '0;
    else if (upd) arr_q <= arr_d;
  end

  always_comb
    for (int unsigned k = 0; k < ARRAYS; k++)
      miss_k[k] = ~arr_q[k][tag_sum(look_tag, k)];

  assign bypass = |miss_k;

endmodule
