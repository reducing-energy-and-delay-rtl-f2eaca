// Direct-mapped level-1 data cache array.
//
// One block per set: valid, dirty, tag and a LINE_W-bit block. A lookup
// (rd_en with rd_index/rd_tag) is read synchronously: in the next cycle
// q_* show the stored block of that set and `hit` says whether it is valid
// and its tag equals rd_tag, giving the one-cycle L1 latency. A write
// (wr_en) replaces a whole block at the clock edge; a write and a lookup of
// the same set in one cycle return the old contents. Reset clears the
// valid bits. Defaults: 4 KB of 32-byte blocks (128 sets), 20-bit tags for
// a 32-bit address. Capacity, direct mapping and the one-cycle latency are
// the intended configuration; the block size (taken equal to the victim
// cache's) and the read-before-write behaviour are this design's choices.
module l1_dcache #(
  parameter int unsigned SETS   = 128,
  parameter int unsigned TAG_W  = 20,
  parameter int unsigned LINE_W = 256
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    rd_en,
  input  logic [$clog2(SETS)-1:0] rd_index,
  input  logic [TAG_W-1:0]        rd_tag,
  output logic                    hit,
  output logic                    q_valid,
  output logic                    q_dirty,
  output logic [TAG_W-1:0]        q_tag,
  output logic [LINE_W-1:0]       q_line,
  input  logic                    wr_en,
  input  logic [$clog2(SETS)-1:0] wr_index,
  input  logic [TAG_W-1:0]        wr_tag,
  input  logic                    wr_dirty,
  input  logic [LINE_W-1:0]       wr_line
);

  logic [SETS-1:0]    val_q;
  logic [SETS-1:0]    dirty_q;
  logic [TAG_W-1:0]   tag_mem  [SETS];
  logic [LINE_W-1:0]  line_mem [SETS];
  logic [TAG_W-1:0]   cmp_tag_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      val_q   <= '0;
      dirty_q <= '0;
      q_valid <= 1'b0;
      q_dirty <= 1'b0;
    end else begin
      if (rd_en) begin
        q_valid <= val_q[rd_index];
        q_dirty <= dirty_q[rd_index];
      end
      if (wr_en) begin
        val_q[wr_index]   <= 1'b1;
        dirty_q[wr_index] <= wr_dirty;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      q_tag     <= tag_mem[rd_index];
      q_line    <= line_mem[rd_index];
      cmp_tag_q <= rd_tag;
    end
    if (wr_en) begin
      tag_mem[wr_index]  <= wr_tag;
      line_mem[wr_index] <= wr_line;
    end
  end

  assign hit = q_valid && (q_tag == cmp_tag_q);

endmodule
