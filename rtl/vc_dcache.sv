// Level-1 data cache with a victim cache and victim-cache bypass prediction.
//
// A small direct-mapped L1 suffers conflict misses. Blocks it replaces are
// kept in a small fully associative victim cache; an L1 miss that finds its
// block there swaps the two blocks instead of going to level 2, saving the
// slow, energy-hungry level-2/bus access. In the parallel organisation
// (PVC, cfg_parallel=1) the victim cache is looked up together with the L1
// on every access, which is fast but makes most victim cache probes misses.
// A bypass predictor therefore decides, before the probe, whether the
// block is certainly absent; if so the probe is suppressed. Four
// predictors are kept up to date side by side and cfg_bypass picks the one
// that gates probes (HighLow-Bits, Sum, Table, Exclusive, or none). In the
// serial organisation (SVC, cfg_parallel=0) the victim cache is looked up
// only in the cycle after an L1 miss. PVC with the Sum predictor is the
// most energy-efficient setting.
//
// Operation (blocking, one access at a time; write-back, write-allocate):
//   cycle 0  request accepted (req_valid && req_ready), L1 set read
//   cycle 1  L1 tag compare; PVC: victim lookup. L1 hit -> resp_valid.
//            SVC and L1 miss: victim lookup in cycle 2.
//   victim hit: next cycle the victim block is written into the L1, the
//            L1's replaced block takes its victim cache entry, resp_valid.
//   victim miss or bypass: block fetched over l2_*; in the cycle it
//            arrives it is written into the L1, the L1's replaced block is
//            inserted into the victim cache (LRU), resp_valid. A dirty
//            block pushed out of the victim cache is then written back.
// Stores merge req_wdata under req_be into the block and set its dirty
// bit. The L1 and victim cache hold each block at most once between them.
// l2_* is a valid/ready request port (block fetch or posted write-back)
// with the fetched block returned on l2_resp_valid/l2_resp_rdata, any
// number of cycles later (12 in the intended system).
// `ev` carries one-cycle event pulses and all four predictor outputs at
// each victim lookup, for counting hit rates and predictor coverage.
//
// Sizes follow the intended configuration: 32-bit addresses, 4 KB L1 with
// 32-byte blocks, 8-entry victim cache, Sum with two 2^10 arrays, 2^8-bit
// Table, 32-entry Exclusive table. Handshakes, write policy, swap timing
// and the run-time predictor selection are this design's own choices.
module vc_dcache
  import vc_pkg::*;
#(
  parameter int unsigned ADDR_W       = 32,
  parameter int unsigned L1_BYTES     = 4096,
  parameter int unsigned BLOCK_BYTES  = 32,
  parameter int unsigned VC_ENTRIES   = 8,
  parameter int unsigned SUM_WIDTH    = 10,
  parameter int unsigned SUM_ARRAYS   = 2,
  parameter int unsigned TABLE_N      = 8,
  parameter int unsigned EXCL_ENTRIES = 32,
  // derived
  localparam int unsigned OFF_W  = $clog2(BLOCK_BYTES),
  localparam int unsigned SETS   = L1_BYTES / BLOCK_BYTES,
  localparam int unsigned IDX_W  = $clog2(SETS),
  localparam int unsigned L1T_W  = ADDR_W - IDX_W - OFF_W,
  localparam int unsigned BLK_W  = ADDR_W - OFF_W,
  localparam int unsigned LINE_W = BLOCK_BYTES * 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration
  input  logic              cfg_parallel,
  input  bypass_sel_e       cfg_bypass,
  // processor load/store port
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_we,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [31:0]       req_wdata,
  input  logic [3:0]        req_be,
  output logic              resp_valid,
  output logic [31:0]       resp_rdata,
  // level-2 port
  output logic              l2_req_valid,
  input  logic              l2_req_ready,
  output logic              l2_req_we,
  output logic [BLK_W-1:0]  l2_req_blk,
  output logic [LINE_W-1:0] l2_req_wdata,
  input  logic              l2_resp_valid,
  input  logic [LINE_W-1:0] l2_resp_rdata,
  // events
  output vc_events_t        ev
);

  localparam int unsigned WAY_W = $clog2(VC_ENTRIES);
  localparam int unsigned WSEL_W = OFF_W - 2;

  typedef enum logic [2:0] {
    S_IDLE, S_LOOK, S_VCPROBE, S_SWAP, S_L2REQ, S_L2WAIT, S_WB
  } state_e;

  state_e state_q, state_d;

  // registered request
  logic              r_we;
  logic [ADDR_W-1:0] r_addr;
  logic [31:0]       r_wdata;
  logic [3:0]        r_be;

  wire [BLK_W-1:0]  r_blk  = r_addr[ADDR_W-1:OFF_W];
  wire [IDX_W-1:0]  r_idx  = r_addr[OFF_W +: IDX_W];
  wire [L1T_W-1:0]  r_l1t  = r_addr[ADDR_W-1 -: L1T_W];
  wire [WSEL_W-1:0] r_word = r_addr[2 +: WSEL_W];

  // ---------------------------------------------------------------- L1
  logic              l1_hit, l1_qv, l1_qd;
  logic [L1T_W-1:0]  l1_qt;
  logic [LINE_W-1:0] l1_ql;
  logic              l1_wr;
  logic              l1_wdirty;
  logic [LINE_W-1:0] l1_wline;

  wire rd_go = (state_q == S_IDLE) && req_valid;

  l1_dcache #(.SETS(SETS), .TAG_W(L1T_W), .LINE_W(LINE_W)) u_l1 (
    .clk, .rst_n,
    .rd_en   (rd_go),
    .rd_index(req_addr[OFF_W +: IDX_W]),
    .rd_tag  (req_addr[ADDR_W-1 -: L1T_W]),
    .hit     (l1_hit),
    .q_valid (l1_qv),
    .q_dirty (l1_qd),
    .q_tag   (l1_qt),
    .q_line  (l1_ql),
    .wr_en   (l1_wr),
    .wr_index(r_idx),
    .wr_tag  (r_l1t),
    .wr_dirty(l1_wdirty),
    .wr_line (l1_wline)
  );

  // block address of the block the L1 holds in the accessed set
  wire [BLK_W-1:0] l1_rep_blk = {l1_qt, r_idx};

  // ------------------------------------------------------- victim cache
  logic                             vc_probe, vc_hit, vc_match, vc_hdirty;
  logic [WAY_W-1:0]                 vc_hway, sw_way_q;
  logic [LINE_W-1:0]                vc_hline;
  logic                             vc_swap, vc_ins;
  logic                             vc_evv, vc_evd;
  logic [BLK_W-1:0]                 vc_evt;
  logic [LINE_W-1:0]                vc_evl;
  logic [VC_ENTRIES-1:0]            vc_nv;
  logic [VC_ENTRIES-1:0][BLK_W-1:0] vc_nt;
  logic                             vc_chg;

  victim_cache #(.ENTRIES(VC_ENTRIES), .TAG_W(BLK_W), .LINE_W(LINE_W)) u_vc (
    .clk, .rst_n,
    .probe    (vc_probe),
    .probe_tag(r_blk),
    .hit      (vc_hit),
    .match    (vc_match),
    .hit_way  (vc_hway),
    .hit_dirty(vc_hdirty),
    .hit_line (vc_hline),
    .swap_en  (vc_swap),
    .sw_way   (sw_way_q),
    .ins_en   (vc_ins),
    .in_valid (l1_qv),
    .in_dirty (l1_qd),
    .in_tag   (l1_rep_blk),
    .in_line  (l1_ql),
    .ev_valid (vc_evv),
    .ev_dirty (vc_evd),
    .ev_tag   (vc_evt),
    .ev_line  (vc_evl),
    .nxt_valid(vc_nv),
    .nxt_tag  (vc_nt),
    .changed  (vc_chg)
  );

  // --------------------------------------------------------- predictors
  logic [3:0] pred;
  logic       train_en, rm_en;

  bypass_highlow #(.ENTRIES(VC_ENTRIES), .TAG_W(BLK_W)) u_hl (
    .clk, .rst_n, .upd(vc_chg), .nxt_valid(vc_nv), .nxt_tag(vc_nt),
    .look_tag(r_blk), .bypass(pred[P_HIGHLOW]));

  bypass_sum #(.ENTRIES(VC_ENTRIES), .TAG_W(BLK_W), .SUM_WIDTH(SUM_WIDTH),
               .ARRAYS(SUM_ARRAYS)) u_sum (
    .clk, .rst_n, .upd(vc_chg), .nxt_valid(vc_nv), .nxt_tag(vc_nt),
    .look_tag(r_blk), .bypass(pred[P_SUM]));

  bypass_table #(.ENTRIES(VC_ENTRIES), .TAG_W(BLK_W), .N(TABLE_N)) u_tab (
    .clk, .rst_n, .upd(vc_chg), .nxt_valid(vc_nv), .nxt_tag(vc_nt),
    .look_tag(r_blk), .bypass(pred[P_TABLE]));

  bypass_exclusive #(.ENTRIES(EXCL_ENTRIES), .TAG_W(BLK_W)) u_exc (
    .clk, .rst_n,
    .look_tag (r_blk), .bypass(pred[P_EXCL]),
    .train_en (train_en), .train_tag(r_blk),
    .rm_en    (rm_en),    .rm_tag   (l1_rep_blk));

  logic bypass;
  always_comb begin
    unique case (cfg_bypass)
      BYP_HIGHLOW: bypass = pred[P_HIGHLOW];
      BYP_SUM:     bypass = pred[P_SUM];
      BYP_TABLE:   bypass = pred[P_TABLE];
      BYP_EXCL:    bypass = pred[P_EXCL];
      default:     bypass = 1'b0;
    endcase
  end

  // ------------------------------------------------------ control logic
  // a victim cache lookup is due in this cycle
  wire lookup = (state_q == S_LOOK && cfg_parallel) || state_q == S_VCPROBE;

  // merge a store into a block
  function automatic logic [LINE_W-1:0] merge(input logic [LINE_W-1:0] line,
                                              input logic              we,
                                              input logic [WSEL_W-1:0] word,
                                              input logic [31:0]       wdata,
                                              input logic [3:0]        be);
    logic [LINE_W-1:0] m;
    m = line;
    if (we)
      for (int unsigned b = 0; b < 4; b++)
        if (be[b]) m[32*word + 8*b +: 8] = wdata[8*b +: 8];
    return m;
  endfunction

  logic [BLK_W-1:0]  wb_blk_q;
  logic [LINE_W-1:0] wb_line_q;
  logic [LINE_W-1:0] resp_line;

  always_comb begin
    state_d    = state_q;
    req_ready  = (state_q == S_IDLE);
    resp_valid = 1'b0;
    resp_line  = l1_ql;
    l1_wr      = 1'b0;
    l1_wdirty  = 1'b0;
    l1_wline   = l1_ql;
    vc_probe   = lookup && !bypass;
    vc_swap    = 1'b0;
    vc_ins     = 1'b0;
    train_en   = vc_probe && !vc_hit;
    rm_en      = 1'b0;
    l2_req_valid = 1'b0;
    l2_req_we    = 1'b0;
    l2_req_blk   = r_blk;
    l2_req_wdata = wb_line_q;

    unique case (state_q)
      S_IDLE: if (req_valid) state_d = S_LOOK;

      S_LOOK: begin
        if (l1_hit) begin
          resp_valid = 1'b1;
          l1_wr      = r_we;
          l1_wdirty  = 1'b1;
          l1_wline   = merge(l1_ql, r_we, r_word, r_wdata, r_be);
          state_d    = S_IDLE;
        end else if (!cfg_parallel) begin
          state_d = S_VCPROBE;
        end else if (vc_hit) begin
          state_d = S_SWAP;
        end else begin
          state_d = S_L2REQ;
        end
      end

      S_VCPROBE: state_d = vc_hit ? S_SWAP : S_L2REQ;

      S_SWAP: begin
        // promote the victim block, demote the L1 block into its entry
        resp_valid = 1'b1;
        resp_line  = vc_hline;
        l1_wr      = 1'b1;
        l1_wdirty  = vc_hdirty || r_we;
        l1_wline   = merge(vc_hline, r_we, r_word, r_wdata, r_be);
        vc_swap    = 1'b1;
        rm_en      = l1_qv;
        state_d    = S_IDLE;
      end

      S_L2REQ: begin
        l2_req_valid = 1'b1;
        if (l2_req_ready) state_d = S_L2WAIT;
      end

      S_L2WAIT: if (l2_resp_valid) begin
        resp_valid = 1'b1;
        resp_line  = l2_resp_rdata;
        l1_wr      = 1'b1;
        l1_wdirty  = r_we;
        l1_wline   = merge(l2_resp_rdata, r_we, r_word, r_wdata, r_be);
        vc_ins     = l1_qv;
        rm_en      = l1_qv;
        state_d    = (l1_qv && vc_evv && vc_evd) ? S_WB : S_IDLE;
      end

      S_WB: begin
        l2_req_valid = 1'b1;
        l2_req_we    = 1'b1;
        l2_req_blk   = wb_blk_q;
        if (l2_req_ready) state_d = S_IDLE;
      end

      default: state_d = S_IDLE;
    endcase
  end

  assign resp_rdata = resp_line[32*r_word +: 32];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
    end else begin
      state_q <= state_d;
      if (rd_go) begin
        r_we    <= req_we;
        r_addr  <= req_addr;
        r_wdata <= req_wdata;
        r_be    <= req_be;
      end
      if (lookup && vc_hit) sw_way_q <= vc_hway;
      if (vc_ins && vc_evv && vc_evd) begin
        wb_blk_q  <= vc_evt;
        wb_line_q <= vc_evl;
      end
    end
  end

  // ------------------------------------------------------------- events
  always_comb begin
    ev             = '0;
    ev.l1_hit      = (state_q == S_LOOK) && l1_hit;
    ev.l1_miss     = (state_q == S_LOOK) && !l1_hit;
    ev.vc_lookup   = lookup;
    ev.vc_probe    = vc_probe;
    ev.vc_hit      = vc_hit;
    ev.vc_bypass   = lookup && bypass;
    ev.vc_miss_any = lookup && !vc_match;
    ev.pred        = lookup ? pred : 4'b0;
    ev.swap        = vc_swap;
    ev.fill        = (state_q == S_L2WAIT) && l2_resp_valid;
    ev.vc_insert   = vc_ins;
    ev.l2_read     = (state_q == S_L2REQ) && l2_req_ready;
    ev.l2_write    = (state_q == S_WB) && l2_req_ready;
  end

  // A predicted miss must never hide a block that is present.
  always_ff @(posedge clk)
    if (rst_n && lookup) assert (!(bypass && vc_match))
      else $error("vc_dcache: bypass predicted a miss for a block in the victim cache");

  // A level-2 request, once raised, holds still until it is accepted.
  l2_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
      l2_req_valid && !l2_req_ready |=> l2_req_valid && $stable(l2_req_we) && $stable(l2_req_blk));

  // Processor responses come only for an accepted request.
  resp_needs_req: assert property (@(posedge clk) disable iff (!rst_n)
      resp_valid |-> !req_ready);

endmodule
