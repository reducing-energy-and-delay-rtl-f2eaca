// Self-checking test of bypass_sum.
// The reference hash is computed bit by bit: after the array's rotation,
// tag bit i adds 2^(i mod SUM_WIDTH) to the sum, modulo 2^SUM_WIDTH (the
// same value as adding SUM_WIDTH-bit pieces). An access is a certain miss
// when, for some array, no valid stored tag has its sum. Random contents,
// random tags, stored tags and near-by tags are checked, with and without
// upd; a stored tag must never be bypassed.
module tb_bypass_sum;
  localparam int unsigned E = 8, W = 32, SW = 10, A = 2;
  logic clk = 0, rst_n = 0, upd = 0, bypass;
  logic [E-1:0] nv;
  logic [E-1:0][W-1:0] nt;
  logic [W-1:0] look;
  int checks = 0, failures = 0;
  logic [E-1:0] rv;
  logic [E-1:0][W-1:0] rt;

  bypass_sum #(.ENTRIES(E), .TAG_W(W), .SUM_WIDTH(SW), .ARRAYS(A)) dut (.clk, .rst_n, .upd, .nxt_valid(nv), .nxt_tag(nt), .look_tag(look), .bypass);

  always #5 clk = ~clk;
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic int unsigned ref_hash(input logic [W-1:0] t, input int k);
    int unsigned s, r;
    s = 0;
    r = (k * (SW / 2)) % W;
    for (int i = 0; i < W; i++)
      if (t[i]) s += 1 << (((i + r) % W) % SW);
    return s % (1 << SW);
  endfunction

  function automatic logic ref_miss(input logic [W-1:0] t);
    for (int k = 0; k < A; k++) begin
      logic found;
      found = 0;
      for (int e = 0; e < E; e++) if (rv[e] && ref_hash(rt[e], k) == ref_hash(t, k)) found = 1;
      if (!found) return 1'b1;
    end
    return 1'b0;
  endfunction

  int nbyp = 0, npass = 0;
  task automatic probe(input logic [W-1:0] t);
    look = t; #1;
    checks++;
    if (bypass) nbyp++; else npass++;
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
        nv[e] = ($urandom % 4) != 0;
        nt[e] = $urandom;
      end
      upd = (round % 6) != 1;
      @(posedge clk); #1;
      if (upd) begin rv = nv; rt = nt; end
      upd = 0;
      for (int e = 0; e < E; e++) begin
        probe(rt[e]);
        if (rv[e]) begin checks++; if (bypass) begin failures++; $display("FAIL stored tag bypassed"); end end
        // swapping two bits leaves one of the sums alike in many cases
        probe({rt[e][W-1:SW+1], rt[e][0], rt[e][SW-1:1], rt[e][SW]});
        probe(rt[e] + 32'd1);
      end
      for (int i = 0; i < 10; i++) probe($urandom);
    end
    // both outcomes must have occurred
    checks++; if (nbyp == 0 || npass == 0) failures++;
    $display("bypassed %0d, passed %0d", nbyp, npass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
