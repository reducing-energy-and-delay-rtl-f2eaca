// Self-checking test of bypass_table.
// Loads random victim-cache contents (with upd) and checks `bypass` for
// random tags and for tags sharing low bits with stored ones against a
// reference: bypass exactly when no valid stored tag has the same N low
// bits. Also checks that the table changes only with upd and that blocks
// that leave free their table entry again.
module tb_bypass_table;
  localparam int unsigned E = 8, W = 32, N = 8;
  logic clk = 0, rst_n = 0, upd = 0, bypass;
  logic [E-1:0] nv;
  logic [E-1:0][W-1:0] nt;
  logic [W-1:0] look;
  int checks = 0, failures = 0;
  logic [E-1:0] rv;
  logic [E-1:0][W-1:0] rt;

  bypass_table #(.ENTRIES(E), .TAG_W(W), .N(N)) dut (.clk, .rst_n, .upd, .nxt_valid(nv), .nxt_tag(nt), .look_tag(look), .bypass);

  always #5 clk = ~clk;
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic ref_miss(input logic [W-1:0] t);
    for (int e = 0; e < E; e++) if (rv[e] && (rt[e] % (1 << N)) == (t % (1 << N))) return 1'b0;
    return 1'b1;
  endfunction

  task automatic probe(input logic [W-1:0] t);
    look = t; #1;
    checks++;
    if (bypass !== ref_miss(t)) begin
      failures++;
      $display("FAIL tag=%h bypass=%b exp=%b", t, bypass, ref_miss(t));
    end
  endtask

  initial begin
    nv = '0; nt = '0; look = '0; rv = '0; rt = '0;
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    for (int i = 0; i < 20; i++) probe($urandom);
    for (int round = 0; round < 300; round++) begin
      for (int e = 0; e < E; e++) begin
        nv[e] = ($urandom % 3) != 0;
        nt[e] = {$urandom} & 32'hFFFF_F03F;
      end
      upd = (round % 5) != 2;
      @(posedge clk); #1;
      if (upd) begin rv = nv; rt = nt; end
      upd = 0;
      for (int e = 0; e < E; e++) begin
        probe(rt[e]);
        probe(rt[e] ^ 32'h100);       // same low bits, other tag
        probe(rt[e] ^ 32'h1);         // other low bits
      end
      for (int i = 0; i < 10; i++) probe($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
