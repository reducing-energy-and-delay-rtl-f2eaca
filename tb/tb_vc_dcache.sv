// End-to-end test of vc_dcache at its default sizes, with l2_model behind
// it (12-cycle block fetch).
//
// For both organisations (parallel and serial victim lookup) and each
// bypass selection (none, HighLow-Bits, Sum, Table, Exclusive) a stream of
// random loads and stores is run. Most accesses go to 12 blocks that fall
// into two L1 sets, so the L1 thrashes and the victim cache serves the
// conflicts; others hit a small resident region or scatter over 64 KB to
// cause victim misses, evictions and dirty write-backs. Every load is
// compared with a reference memory; every access's latency is checked
// (L1 hit 1 cycle; victim hit 2 cycles parallel / 3 serial; level-2 fill
// 14 / 15, plus any cycles the level-2 side holds off the request - the
// model withholds req_ready in 20% of cycles). Each predictor output is checked to be safe (never a miss for
// a block that is present) and its coverage - the share of victim misses
// it would have avoided - is printed. Every mechanism must occur at least
// once.
module tb_vc_dcache;
  import vc_pkg::*;
  localparam int unsigned LINES = 2048, WPL = 8, ACC_PER_CFG = 3000;

  logic clk = 0, rst_n = 0;
  logic cfg_parallel;
  bypass_sel_e cfg_bypass;
  logic req_valid, req_ready, req_we, resp_valid;
  logic [31:0] req_addr, req_wdata, resp_rdata;
  logic [3:0] req_be;
  logic l2_req_valid, l2_req_ready, l2_req_we, l2_resp_valid;
  logic [26:0] l2_req_blk;
  logic [255:0] l2_req_wdata, l2_resp_rdata;
  vc_events_t ev;
  int checks = 0, failures = 0;

  vc_dcache dut (.*);

  l2_model #(.BLK_W(27), .LINE_W(256), .LINES(LINES), .LAT(12), .STALL_PCT(20)) u_l2 (
    .clk, .rst_n, .req_valid(l2_req_valid), .req_ready(l2_req_ready), .req_we(l2_req_we),
    .req_blk(l2_req_blk), .req_wdata(l2_req_wdata), .resp_valid(l2_resp_valid), .resp_rdata(l2_resp_rdata));

  always #5 clk = ~clk;
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // reference memory, same initial contents as the level-2 model
  logic [31:0] ref_mem [LINES*WPL];
  initial for (int unsigned a = 0; a < LINES * WPL; a++) ref_mem[a] = (a * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;

  // event counters
  int n_stall = 0;
  int n_l1hit, n_l1miss, n_probe, n_vchit, n_fill, n_ins, n_l2rd, n_l2wr, n_swap_par, n_swap_ser;
  int n_byp [5];
  int n_vcmiss, n_cov [4], n_unsafe;
  int c_vcmiss, c_cov [4];   // per configuration
  initial begin
    {n_l1hit, n_l1miss, n_probe, n_vchit, n_fill, n_ins, n_l2rd, n_l2wr, n_swap_par, n_swap_ser, n_vcmiss, n_unsafe} = '0;
    for (int i = 0; i < 5; i++) n_byp[i] = 0;
    for (int i = 0; i < 4; i++) begin n_cov[i] = 0; c_cov[i] = 0; end
    c_vcmiss = 0;
  end

  always @(negedge clk) if (rst_n) begin
    n_stall  += int'(l2_req_valid && !l2_req_ready);
    n_l1hit  += int'(ev.l1_hit);
    n_l1miss += int'(ev.l1_miss);
    n_probe  += int'(ev.vc_probe);
    n_vchit  += int'(ev.vc_hit);
    n_fill   += int'(ev.fill);
    n_ins    += int'(ev.vc_insert);
    n_l2rd   += int'(ev.l2_read);
    n_l2wr   += int'(ev.l2_write);
    if (ev.swap && cfg_parallel)  n_swap_par++;
    if (ev.swap && !cfg_parallel) n_swap_ser++;
    if (ev.vc_bypass) n_byp[int'(cfg_bypass)]++;
    if (ev.vc_lookup) begin
      if (ev.vc_miss_any) begin
        n_vcmiss++; c_vcmiss++;
        for (int k = 0; k < 4; k++) if (ev.pred[k]) begin n_cov[k]++; c_cov[k]++; end
      end else if (ev.pred != 4'b0) begin
        n_unsafe++;
        $display("FAIL predictor %b claims a miss for a present block", ev.pred);
      end
      if (ev.vc_hit && ev.vc_miss_any) n_unsafe++;
    end
  end

  task automatic access(input logic we, input logic [31:0] addr, input logic [31:0] wdata, input logic [3:0] be);
    int lat, sw0, fi0, st0, exp_lat;
    logic [31:0] exp;
    @(negedge clk);
    req_valid = 1; req_we = we; req_addr = addr; req_wdata = wdata; req_be = be;
    while (!req_ready) @(negedge clk);
    sw0 = n_swap_par + n_swap_ser; fi0 = n_fill; st0 = n_stall;
    @(negedge clk);
    req_valid = 0;
    lat = 1;
    while (!resp_valid) begin
      @(negedge clk); lat++;
      if (lat > 100) break;
    end
    exp = ref_mem[addr[15:2]];
    if (we)
      for (int b = 0; b < 4; b++) if (be[b]) ref_mem[addr[15:2]][8*b +: 8] = wdata[8*b +: 8];
    // the counters of this negedge are updated after this point; include them
    #1;
    if (n_swap_par + n_swap_ser != sw0)   exp_lat = cfg_parallel ? 2 : 3;
    else if (n_fill != fi0)               exp_lat = (cfg_parallel ? 14 : 15) + (n_stall - st0);
    else                                  exp_lat = 1;
    checks++;
    if (lat != exp_lat) begin
      failures++; $display("FAIL latency %0d, expected %0d (addr %h)", lat, exp_lat, addr);
    end
    if (!we) begin
      checks++;
      if (resp_rdata !== exp) begin
        failures++; $display("FAIL load %h: got %h expected %h", addr, resp_rdata, exp);
      end
    end
  endtask

  function automatic logic [31:0] pick_addr();
    int r;
    r = $urandom % 100;
    if (r < 60)       // 12 blocks in two L1 sets: conflict misses
      return 32'((($urandom % 6) * 4096) + (($urandom % 2) ? 3 * 32 : 77 * 32) + (($urandom % 8) * 4));
    else if (r < 85)  // resident region
      return 32'(1024 + ($urandom % 512)) & ~32'h3;
    else              // anywhere in 64 KB
      return $urandom % 65536 & ~32'h3;
  endfunction

  initial begin
    string names [5];
    names = '{"none", "HighLow-Bits", "Sum", "Table", "Exclusive"};
    cfg_parallel = 1; cfg_bypass = BYP_NONE;
    req_valid = 0; req_we = 0; req_addr = 0; req_wdata = 0; req_be = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int par = 1; par >= 0; par--)
      for (int sel = 0; sel < 5; sel++) begin
        @(negedge clk);
        cfg_parallel = par[0]; cfg_bypass = bypass_sel_e'(sel);
        c_vcmiss = 0; for (int k = 0; k < 4; k++) c_cov[k] = 0;
        for (int i = 0; i < ACC_PER_CFG; i++) begin
          logic we;
          we = ($urandom % 3) == 0;
          access(we, pick_addr(), $urandom, we ? 4'($urandom) : 4'h0);
        end
        $display("%s, bypass %-12s: victim misses %5d, coverage HL %0d%% SUM %0d%% TAB %0d%% EXC %0d%%",
                 par ? "PVC" : "SVC", names[sel], c_vcmiss,
                 c_cov[0] * 100 / (c_vcmiss > 0 ? c_vcmiss : 1), c_cov[1] * 100 / (c_vcmiss > 0 ? c_vcmiss : 1),
                 c_cov[2] * 100 / (c_vcmiss > 0 ? c_vcmiss : 1), c_cov[3] * 100 / (c_vcmiss > 0 ? c_vcmiss : 1));
      end
    repeat (20) @(negedge clk);
    $display("L1 hits %0d misses %0d | victim probes %0d hits %0d | swaps PVC %0d SVC %0d | fills %0d inserts %0d | L2 reads %0d write-backs %0d",
             n_l1hit, n_l1miss, n_probe, n_vchit, n_swap_par, n_swap_ser, n_fill, n_ins, n_l2rd, n_l2wr);
    $display("bypasses: HL %0d SUM %0d TAB %0d EXC %0d", n_byp[1], n_byp[2], n_byp[3], n_byp[4]);
    // safety of every predictor
    checks++; if (n_unsafe != 0) failures++;
    // every mechanism happened
    begin
      int ev_counts [13];
      ev_counts = '{n_l1hit, n_l1miss, n_probe, n_vchit, n_swap_par, n_swap_ser, n_fill, n_ins, n_l2wr,
                    n_byp[1], n_byp[2], n_byp[3], n_stall};
      foreach (ev_counts[i]) begin
        checks++;
        if (ev_counts[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
      checks++;
      if (n_byp[4] == 0) begin failures++; $display("FAIL Exclusive bypass never happened"); end
      checks++;
      if (n_l2rd != n_fill) begin failures++; $display("FAIL %0d fetches but %0d fills", n_l2rd, n_fill); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
