// CRC-32 packet workload on vc_dcache (default sizes) with l2_model.
//
// The testbench plays the processor running a table-driven CRC-32 over a
// stream of packets, the core loop of a packet-checksum program: the
// 256-word CRC table and the packets are first stored through the cache,
// then for every packet each data word is loaded, and for each of its
// bytes one table word is loaded and folded into the running CRC. The
// table and the packet buffers are placed 4 KB apart so that they compete
// for the same L1 sets, which is where the victim cache helps. The CRC of
// every packet, computed from data returned by the cache, is compared with
// one computed directly; the predictor's safety rule is checked on every
// lookup. The packets are run in the parallel organisation once with each
// predictor gating the probes, then in the serial organisation;
// level-2 traffic, victim hits and each predictor's coverage are printed.
// A predictor that does not gate probes is still evaluated, but the
// Exclusive one only learns from probes that are made, so its coverage is
// meaningful only in the run where it is selected.
module tb_crc_workload;
  import vc_pkg::*;
  localparam int unsigned LINES = 2048, PACKETS = 24;
  localparam logic [31:0] TABLE_BASE = 32'h0000_1000;
  localparam logic [31:0] PKT_BASE   = 32'h0000_3000;   // 4 KB multiples apart from the table

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

  l2_model #(.BLK_W(27), .LINE_W(256), .LINES(LINES), .LAT(12)) u_l2 (
    .clk, .rst_n, .req_valid(l2_req_valid), .req_ready(l2_req_ready), .req_we(l2_req_we),
    .req_blk(l2_req_blk), .req_wdata(l2_req_wdata), .resp_valid(l2_resp_valid), .resp_rdata(l2_resp_rdata));

  always #5 clk = ~clk;
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int n_l2rd, n_l2wr, n_vchit, n_probe, n_lookup, n_vcmiss, n_unsafe, n_cyc;
  int n_cov [4];
  always @(negedge clk) if (rst_n) begin
    n_cyc++;
    n_l2rd   += int'(ev.l2_read);
    n_l2wr   += int'(ev.l2_write);
    n_vchit  += int'(ev.vc_hit);
    n_probe  += int'(ev.vc_probe);
    n_lookup += int'(ev.vc_lookup);
    if (ev.vc_lookup && ev.vc_miss_any) begin
      n_vcmiss++;
      for (int k = 0; k < 4; k++) if (ev.pred[k]) n_cov[k]++;
    end
    if (ev.vc_lookup && !ev.vc_miss_any && ev.pred != 4'b0) n_unsafe++;
  end

  task automatic clear_counts();
    {n_l2rd, n_l2wr, n_vchit, n_probe, n_lookup, n_vcmiss, n_unsafe, n_cyc} = '0;
    for (int k = 0; k < 4; k++) n_cov[k] = 0;
  endtask

  task automatic access(input logic we, input logic [31:0] addr, input logic [31:0] wdata,
                        output logic [31:0] rdata);
    @(negedge clk);
    req_valid = 1; req_we = we; req_addr = addr; req_wdata = wdata; req_be = 4'hF;
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 0;
    while (!resp_valid) @(negedge clk);
    rdata = resp_rdata;
  endtask

  // reflected CRC-32 (polynomial 0xEDB88320)
  function automatic logic [31:0] crc_entry(input int unsigned i);
    logic [31:0] c;
    c = 32'(i);
    for (int k = 0; k < 8; k++) c = c[0] ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    return c;
  endfunction

  function automatic logic [31:0] crc_direct(input logic [31:0] c, input logic [7:0] b);
    c = c ^ 32'(b);
    for (int k = 0; k < 8; k++) c = c[0] ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    return c;
  endfunction

  int unsigned pkt_len [PACKETS];
  logic [31:0] pkt_addr [PACKETS];

  task automatic run_packets(input string label);
    logic [31:0] w, t, crc, ref_crc;
    clear_counts();
    for (int p = 0; p < PACKETS; p++) begin
      crc = '1; ref_crc = '1;
      for (int unsigned i = 0; i < pkt_len[p]; i += 4) begin
        access(1'b0, pkt_addr[p] + i, '0, w);
        for (int b = 0; b < 4; b++) begin
          access(1'b0, TABLE_BASE + 4 * 32'((crc ^ 32'(w[8*b +: 8])) & 32'hFF), '0, t);
          crc = (crc >> 8) ^ t;
          ref_crc = crc_direct(ref_crc, w[8*b +: 8]);
        end
      end
      checks++;
      if (~crc !== ~ref_crc) begin
        failures++; $display("FAIL %s packet %0d: crc %h expected %h", label, p, ~crc, ~ref_crc);
      end
    end
    checks++;
    if (n_unsafe != 0) begin failures++; $display("FAIL %s: %0d unsafe predictions", label, n_unsafe); end
    $display("%s: %0d cycles, L2 fetches %0d, write-backs %0d, victim lookups %0d probes %0d hits %0d misses %0d",
             label, n_cyc, n_l2rd, n_l2wr, n_lookup, n_probe, n_vchit, n_vcmiss);
    $display("%s: coverage HighLow-Bits %0d%%, Sum %0d%%, Table %0d%%, Exclusive %0d%%", label,
             n_cov[0] * 100 / (n_vcmiss > 0 ? n_vcmiss : 1), n_cov[1] * 100 / (n_vcmiss > 0 ? n_vcmiss : 1),
             n_cov[2] * 100 / (n_vcmiss > 0 ? n_vcmiss : 1), n_cov[3] * 100 / (n_vcmiss > 0 ? n_vcmiss : 1));
  endtask

  initial begin
    logic [31:0] dummy;
    int total_hits;
    cfg_parallel = 1; cfg_bypass = BYP_NONE;
    req_valid = 0; req_we = 0; req_addr = 0; req_wdata = 0; req_be = 0;
    clear_counts();
    repeat (3) @(posedge clk); rst_n = 1;
    // packet layout: buffers every 4 KB plus a small skew, lengths 64..1024 bytes
    for (int p = 0; p < PACKETS; p++) begin
      pkt_len[p]  = 64 * (1 + ($urandom % 16));
      pkt_addr[p] = PKT_BASE + 32'(4096 * (p % 12)) + 32'(64 * (p / 12));
    end
    // store the table and the packets through the cache
    for (int unsigned i = 0; i < 256; i++) access(1'b1, TABLE_BASE + 4 * i, crc_entry(i), dummy);
    for (int p = 0; p < PACKETS; p++)
      for (int unsigned i = 0; i < pkt_len[p]; i += 4) access(1'b1, pkt_addr[p] + i, $urandom, dummy);
    total_hits = 0;
    for (int sel = 1; sel <= 4; sel++) begin
      @(negedge clk); cfg_bypass = bypass_sel_e'(sel);
      run_packets($sformatf("PVC + %s", cfg_bypass.name()));
      total_hits += n_vchit;
      checks++; if (n_probe >= n_lookup) begin failures++; $display("FAIL no probe was bypassed"); end
    end
    @(negedge clk); cfg_parallel = 0; cfg_bypass = BYP_NONE;
    run_packets("SVC");
    total_hits += n_vchit;
    checks++; if (total_hits == 0) begin failures++; $display("FAIL the victim cache never hit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
