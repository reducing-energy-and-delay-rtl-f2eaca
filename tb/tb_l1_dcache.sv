// Self-checking test of l1_dcache.
// A reference array (valid, dirty, tag, block per set) is updated with
// every write. Random lookups and writes on a few sets are issued; one
// cycle after each lookup, hit and the returned block are compared with
// the reference as it stood when the lookup was issued (read-before-write
// in the same cycle).
module tb_l1_dcache;
  localparam int unsigned SETS = 128, TW = 20, LW = 256, IW = 7;
  logic clk = 0, rst_n = 0;
  logic rd_en, wr_en, wr_dirty, hit, qv, qd;
  logic [IW-1:0] rd_index, wr_index;
  logic [TW-1:0] rd_tag, wr_tag, qt;
  logic [LW-1:0] wr_line, ql;
  int checks = 0, failures = 0;

  logic          mv [SETS];
  logic          md [SETS];
  logic [TW-1:0] mt [SETS];
  logic [LW-1:0] ml [SETS];

  l1_dcache #(.SETS(SETS), .TAG_W(TW), .LINE_W(LW)) dut (.clk, .rst_n, .rd_en, .rd_index, .rd_tag,
    .hit, .q_valid(qv), .q_dirty(qd), .q_tag(qt), .q_line(ql), .wr_en, .wr_index, .wr_tag, .wr_dirty, .wr_line);

  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [LW-1:0] rnd_line();
    logic [LW-1:0] l;
    for (int i = 0; i < LW / 32; i++) l[32*i +: 32] = $urandom;
    return l;
  endfunction

  int nhit = 0;
  initial begin
    logic          e_pend, e_hit, e_v, e_d;
    logic [TW-1:0] e_t;
    logic [LW-1:0] e_l;
    for (int s = 0; s < SETS; s++) begin mv[s] = 0; md[s] = 0; end
    rd_en = 0; wr_en = 0; rd_index = 0; wr_index = 0; rd_tag = 0; wr_tag = 0; wr_dirty = 0; wr_line = 0;
    e_pend = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      if (e_pend) begin
        checks++;
        if (hit !== e_hit || qv !== e_v || (e_v && (qd !== e_d || qt !== e_t || ql !== e_l))) begin
          failures++; $display("FAIL at %0d: hit=%b exp=%b", i, hit, e_hit);
        end
        if (hit) nhit++;
      end
      rd_en = ($urandom % 2);
      rd_index = $urandom % 8; rd_tag = $urandom % 3;
      wr_en = ($urandom % 3) == 0;
      wr_index = $urandom % 8; wr_tag = $urandom % 3; wr_dirty = $urandom; wr_line = rnd_line();
      e_pend = rd_en;
      if (rd_en) begin
        e_v = mv[rd_index]; e_d = md[rd_index]; e_t = mt[rd_index]; e_l = ml[rd_index];
        e_hit = e_v && e_t == rd_tag;
      end
      @(posedge clk); #1;
      if (wr_en) begin mv[wr_index] = 1; md[wr_index] = wr_dirty; mt[wr_index] = wr_tag; ml[wr_index] = wr_line; end
      if (!rd_en) e_pend = 0;
    end
    checks++; if (nhit == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
