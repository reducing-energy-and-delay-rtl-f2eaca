// Self-checking test of bypass_highlow.
// Loads random victim-cache contents (with upd), then checks `bypass` for
// random tags, for tags near the stored ones and for the stored tags
// themselves against a bit-by-bit reference: an access is a certain miss
// when some bit position holds a value that no stored tag has there. Also
// checks that contents only change with upd and that an empty cache
// bypasses everything.
module tb_bypass_highlow;
  localparam int unsigned E = 8, W = 32;
  logic clk = 0, rst_n = 0, upd = 0, bypass;
  logic [E-1:0] nv;
  logic [E-1:0][W-1:0] nt;
  logic [W-1:0] look;
  int checks = 0, failures = 0;
  logic [E-1:0] rv;
  logic [E-1:0][W-1:0] rt;

  bypass_highlow #(.ENTRIES(E), .TAG_W(W)) dut (.clk, .rst_n, .upd, .nxt_valid(nv), .nxt_tag(nt), .look_tag(look), .bypass);

  always #5 clk = ~clk;
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic ref_miss(input logic [W-1:0] t);
    for (int b = 0; b < W; b++) begin
      logic seen;
      seen = 0;
      for (int e = 0; e < E; e++) if (rv[e] && rt[e][b] == t[b]) seen = 1;
      if (!seen) return 1'b1;
    end
    return 1'b0;
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
    // empty: everything misses
    for (int i = 0; i < 20; i++) probe($urandom);
    // example from the description: tags 0110 and 1100 -> x0x1 misses
    nv = '0; nv[0] = 1; nv[1] = 1; nt[0] = 32'h6; nt[1] = 32'hC; upd = 1;
    @(posedge clk); #1 upd = 0; rv = nv; rt = nt;
    probe(32'h1); probe(32'h3); probe(32'h9); probe(32'hB);
    probe(32'h6); probe(32'hC); probe(32'h4);
    for (int round = 0; round < 300; round++) begin
      logic [W-1:0] base;
      base = $urandom;
      for (int e = 0; e < E; e++) begin
        nv[e] = ($urandom % 4) != 0;
        nt[e] = (round % 2) ? (base ^ (32'(1) << ($urandom % W)) ^ (32'(1) << ($urandom % W))) : $urandom;
      end
      upd = (round % 7) != 3;
      @(posedge clk); #1;
      if (upd) begin rv = nv; rt = nt; end
      upd = 0;
      for (int e = 0; e < E; e++) if (rv[e]) begin
        probe(rt[e]);
        checks++; if (bypass) begin failures++; $display("FAIL stored tag bypassed"); end
      end
      for (int i = 0; i < 10; i++) probe(base ^ (32'(1) << ($urandom % W)));
      for (int i = 0; i < 10; i++) probe($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
