// Self-checking test of bypass_exclusive.
// A reference table with the same placement rule (first free entry, else a
// round-robin pointer; no duplicates; removal wins over training of the
// same address) is kept alongside. Random training, removal and lookups
// from a small address pool exercise filling, overflow and replacement;
// `bypass` is compared every cycle. A directed part checks that a trained
// address is bypassed and a removed one no longer is.
module tb_bypass_exclusive;
  localparam int unsigned E = 32, W = 32;
  logic clk = 0, rst_n = 0, bypass;
  logic [W-1:0] look, ttag, rtag;
  logic ten, ren;
  int checks = 0, failures = 0;
  logic rv [E];
  logic [W-1:0] rt [E];
  int rr;

  bypass_exclusive #(.ENTRIES(E), .TAG_W(W)) dut (.clk, .rst_n, .look_tag(look), .bypass,
    .train_en(ten), .train_tag(ttag), .rm_en(ren), .rm_tag(rtag));

  always #5 clk = ~clk;
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic ref_has(input logic [W-1:0] t);
    for (int e = 0; e < E; e++) if (rv[e] && rt[e] == t) return 1'b1;
    return 1'b0;
  endfunction

  task automatic ref_step();
    int slot;
    if (ten && !ref_has(ttag) && !(ren && rtag == ttag)) begin
      slot = -1;
      for (int e = 0; e < E; e++) if (!rv[e] && slot < 0) slot = e;
      if (slot < 0) begin slot = rr; rr = (rr + 1) % E; end
      rv[slot] = 1; rt[slot] = ttag;
    end
    if (ren)
      for (int e = 0; e < E; e++) if (rv[e] && rt[e] == rtag) rv[e] = 0;
  endtask

  task automatic check_now();
    #1; checks++;
    if (bypass !== ref_has(look)) begin
      failures++; $display("FAIL look=%h bypass=%b exp=%b", look, bypass, ref_has(look));
    end
  endtask

  int nbyp = 0;
  initial begin
    for (int e = 0; e < E; e++) rv[e] = 0;
    rr = 0; ten = 0; ren = 0; look = 0; ttag = 0; rtag = 0;
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    // directed
    look = 32'h1234; check_now();
    ten = 1; ttag = 32'h1234; @(posedge clk); ref_step(); #1 ten = 0;
    check_now();
    checks++; if (!bypass) failures++;
    ren = 1; rtag = 32'h1234; @(posedge clk); ref_step(); #1 ren = 0;
    check_now();
    checks++; if (bypass) failures++;
    // random, pool of 80 addresses > 32 entries
    for (int i = 0; i < 20000; i++) begin
      ten  = ($urandom % 3) != 0;
      ttag = 32'h4000 + ($urandom % 80);
      ren  = ($urandom % 4) == 0;
      rtag = (i % 50 == 0) ? ttag : 32'h4000 + ($urandom % 80);
      look = 32'h4000 + ($urandom % 80);
      check_now();
      if (bypass) nbyp++;
      @(posedge clk); ref_step(); #1;
    end
    checks++; if (nbyp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
