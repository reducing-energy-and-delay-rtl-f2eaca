// Behavioural model of the level-2 side (level-2 cache plus memory) for
// testbenches: a flat store of LINES blocks addressed by the low bits of
// the block address. A block fetch accepted in cycle t returns its block
// with resp_valid in cycle t+LAT (12 cycles by default); one fetch is
// outstanding at a time. Write-backs are posted and take effect at the
// edge they are accepted. Initial block contents follow init_word(), a
// fixed function of the word address that testbenches can reproduce.
// With STALL_PCT above 0, req_ready is withheld in random cycles to
// exercise the requester's handshake.
module l2_model #(
  parameter int unsigned BLK_W  = 27,
  parameter int unsigned LINE_W = 256,
  parameter int unsigned LINES  = 2048,
  parameter int unsigned LAT    = 12,
  parameter int unsigned STALL_PCT = 0   // chance (%) that req_ready is held low in a cycle
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_we,
  input  logic [BLK_W-1:0]  req_blk,
  input  logic [LINE_W-1:0] req_wdata,
  output logic              resp_valid,
  output logic [LINE_W-1:0] resp_rdata
);
  localparam int unsigned WPL = LINE_W / 32;

  function automatic logic [31:0] init_word(input int unsigned waddr);
    return (waddr * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  logic [LINE_W-1:0] mem [LINES];
  int unsigned       cnt;
  logic              busy;
  logic [BLK_W-1:0]  blk_q;

  initial
    for (int unsigned b = 0; b < LINES; b++)
      for (int unsigned w = 0; w < WPL; w++) mem[b][32*w +: 32] = init_word(b * WPL + w);

  logic stall;
  always_ff @(posedge clk) stall <= ($urandom % 100) < STALL_PCT;

  assign req_ready = !busy && !stall;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      resp_valid <= 1'b0;
    end else begin
      resp_valid <= 1'b0;
      if (req_valid && req_ready) begin
        if (req_we) mem[req_blk % LINES] <= req_wdata;
        else begin
          busy  <= 1'b1;
          cnt   <= LAT - 1;
          blk_q <= req_blk;
        end
      end
      if (busy) begin
        if (cnt == 1) begin
          resp_valid <= 1'b1;
          resp_rdata <= mem[blk_q % LINES];
          busy       <= 1'b0;
        end
        cnt <= cnt - 1;
      end
    end
  end
endmodule
