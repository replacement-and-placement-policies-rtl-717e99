// iap_cache_system: on-chip data-cache subsystem with prefetch-aware line policies.
//
// The processor's data references go to a 16 KB, 4-way, 32-byte-line write-back,
// write-allocate data cache. A prefetch unit watches every reference: a LOAD/STORE-
// UPDATE instruction reveals the address of the next datum (IAP prefetching), other
// references fall back to prefetch-on-miss. Prefetches wait in an 8-entry queue and
// use the single bus to the second-level memory only when no demand fetch needs it;
// a demand miss aborts a prefetch in flight. Three policies for the prefetched lines
// can be switched on through cfg_i:
//   * Instant Zero (iz_en): a line prefetched as the "next block" of an IAP reference
//     falls to the lowest priority as soon as it is referenced; all other lines
//     follow LRU.
//   * Priority Pre-Updating with victim cache (ppu_en, vc_en): prefetched lines are
//     recorded in prefetch order; a reference to one lowers the priority of the older,
//     still unreferenced ones. Unreferenced prefetched lines displaced from the data
//     cache go to a 4-entry FIFO victim cache, probed after a data-cache miss at the
//     cost of one extra cycle.
//   * Prefetch cache (pfc_en): IAP lines are placed in a 1 KB fully-associative FIFO
//     prefetch cache, probed in parallel with the data cache, instead of the data cache.
//     PFC_REPL selects LRU or Instant Zero replacement there instead of FIFO.
//
// Timing (cycle t = request accepted with req_valid_i && req_ready_o):
//   data-cache or prefetch-cache hit: resp_valid_o at t+1;
//   victim-cache hit:                 resp_valid_o at t+2;
//   miss: the demand request leaves at t+1 (t+2 when the victim cache is probed) and
//   resp_valid_o follows the cycle after the second-level memory returns the line.
//   Partial hit: if the missing block is the prefetch now in service, no demand request
//   is made; the prefetch is allowed to finish and its line serves the miss.
// One request is outstanding at a time. The second-level memory interface carries
// whole lines: l2_req_valid_o is a one-cycle request of block l2_req_blk_o; a new
// request while one is in service aborts it (only a demand request does that here);
// l2_rvalid_i returns the line of the request in service. Write-backs are posted on
// l2_wb_* and need no handshake. Which sizes and policies are used follows the
// evaluated configuration; the cycle-level sequencing, the one-line buffer for an
// arrived prefetch, and placing lines taken from the victim cache as ordinary LRU
// lines are this design's choices. Synchronous active-low reset.
module iap_cache_system #(
  parameter int unsigned DC_SETS    = 128,   // 16 KB / (4 ways * 32 B)
  parameter int unsigned DC_WAYS    = 4,
  parameter int unsigned PFC_SETS   = 1,     // fully associative
  parameter int unsigned PFC_WAYS   = 32,    // 1 KB / 32 B
  parameter cache_pkg::pfc_repl_e PFC_REPL = cache_pkg::PFC_FIFO,
  parameter int unsigned PQ_DEPTH   = 8,
  parameter int unsigned PPU_DEPTH  = 8,
  parameter int unsigned VC_ENTRIES = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  cache_pkg::cfg_t      cfg_i,
  // processor data-reference port
  input  logic                 req_valid_i,
  output logic                 req_ready_o,
  input  cache_pkg::addr_t     req_addr_i,
  input  logic                 req_we_i,
  input  cache_pkg::word_t     req_wdata_i,
  input  logic                 req_upd_i,      // LOAD/STORE-UPDATE instruction
  input  cache_pkg::word_t     req_stride_i,   // Disp or (Ry) added to the index register
  output logic                 resp_valid_o,
  output cache_pkg::word_t     resp_rdata_o,
  // second-level memory port
  output logic                 l2_req_valid_o,
  output cache_pkg::blk_t      l2_req_blk_o,
  output logic                 l2_req_pf_o,
  input  logic                 l2_rvalid_i,
  input  cache_pkg::line_t     l2_rline_i,
  output logic                 l2_wb_valid_o,
  output cache_pkg::blk_t      l2_wb_blk_o,
  output cache_pkg::line_t     l2_wb_line_o,
  // event pulses
  output cache_pkg::events_t   ev_o
);
  import cache_pkg::*;

  localparam int unsigned DSW = (DC_SETS > 1) ? $clog2(DC_SETS) : 1;
  localparam int unsigned DHW = (DC_WAYS > 1) ? $clog2(DC_WAYS) : 1;
  localparam int unsigned PSW = (PFC_SETS > 1) ? $clog2(PFC_SETS) : 1;
  localparam int unsigned PHW = (PFC_WAYS > 1) ? $clog2(PFC_WAYS) : 1;

  typedef enum logic [2:0] {S_IDLE, S_VC, S_MREQ, S_MWAIT} state_e;

  state_e  state_q, state_d;

  // latched request
  addr_t   r_addr_q;
  logic    r_we_q;
  word_t   r_wdata_q;
  blk_t    r_blk;
  assign   r_blk = blk_of(r_addr_q);

  // response
  logic    resp_valid_q, resp_valid_d;
  word_t   resp_data_q, resp_data_d;

  // second-level memory bookkeeping
  logic    out_valid_q;      // a request is in service
  logic    out_pf_q;         // ... and it is a prefetch
  pf_req_t out_req_q;
  logic    pfb_valid_q;      // arrived prefetch line waiting to be placed
  pf_req_t pfb_req_q;
  line_t   pfb_line_q;

  // ------------------------------------------------------------------
  // sub-blocks
  // ------------------------------------------------------------------
  // data cache
  addr_t         dc_addr;
  logic          dc_acc, dc_hit, dc_hit_iap, dc_hit_pfu;
  logic [DHW-1:0] dc_way;
  word_t         dc_rdata;
  blk_t          probe_blk;
  logic          dc_probe_hit;
  logic          dc_fill;
  blk_t          dc_fill_blk;
  line_t         dc_fill_line;
  line_flags_t   dc_fill_flags;
  logic          dc_vic_valid;
  blk_t          dc_vic_blk;
  line_t         dc_vic_line;
  line_flags_t   dc_vic_flags;
  logic [DHW-1:0] dc_vic_way;
  logic [DSW-1:0] dc_fill_set;
  logic          dc_dec, dc_dec_ack;
  logic [DSW-1:0] ppu_dec_set;
  logic [DHW-1:0] ppu_dec_way;

  set_assoc_cache #(.SETS(DC_SETS), .WAYS(DC_WAYS), .FIFO(1'b0)) u_dcache (
    .clk, .rst_n,
    .addr_i(dc_addr), .acc_i(dc_acc), .we_i(req_we_i), .wdata_i(req_wdata_i),
    .iz_en_i(cfg_i.iz_en),
    .hit_o(dc_hit), .way_o(dc_way), .rdata_o(dc_rdata), .hit_iap_o(dc_hit_iap),
    .hit_pf_unref_o(dc_hit_pfu),
    .probe_blk_i(probe_blk), .probe_hit_o(dc_probe_hit),
    .fill_i(dc_fill), .fill_blk_i(dc_fill_blk), .fill_line_i(dc_fill_line),
    .fill_flags_i(dc_fill_flags),
    .vic_valid_o(dc_vic_valid), .vic_blk_o(dc_vic_blk), .vic_line_o(dc_vic_line),
    .vic_flags_o(dc_vic_flags), .vic_way_o(dc_vic_way), .fill_set_o(dc_fill_set),
    .dec_i(dc_dec), .dec_set_i(ppu_dec_set), .dec_way_i(ppu_dec_way), .dec_ack_o(dc_dec_ack)
  );

  // prefetch cache
  logic          pc_acc, pc_hit_raw, pc_hit, pc_unused_iap, pc_unused_pfu;
  logic [PHW-1:0] pc_way;
  word_t         pc_rdata;
  logic          pc_probe_hit;
  logic          pc_fill;
  logic          pc_vic_valid;
  blk_t          pc_vic_blk;
  line_t         pc_vic_line;
  line_flags_t   pc_vic_flags;
  logic [PHW-1:0] pc_vic_way;
  logic [PSW-1:0] pc_fill_set;
  logic          pc_unused_ack;

  // every line in the prefetch cache is an IAP line, so with PFC_IZ a referenced line
  // drops to priority 0 at once
  set_assoc_cache #(.SETS(PFC_SETS), .WAYS(PFC_WAYS), .FIFO(PFC_REPL == PFC_FIFO)) u_pcache (
    .clk, .rst_n,
    .addr_i(dc_addr), .acc_i(pc_acc), .we_i(req_we_i), .wdata_i(req_wdata_i),
    .iz_en_i(PFC_REPL == PFC_IZ),
    .hit_o(pc_hit_raw), .way_o(pc_way), .rdata_o(pc_rdata), .hit_iap_o(pc_unused_iap),
    .hit_pf_unref_o(pc_unused_pfu),
    .probe_blk_i(probe_blk), .probe_hit_o(pc_probe_hit),
    .fill_i(pc_fill), .fill_blk_i(pfb_req_q.blk), .fill_line_i(pfb_line_q),
    .fill_flags_i('{dirty: 1'b0, iap: 1'b1, pf_unref: 1'b1}),
    .vic_valid_o(pc_vic_valid), .vic_blk_o(pc_vic_blk), .vic_line_o(pc_vic_line),
    .vic_flags_o(pc_vic_flags), .vic_way_o(pc_vic_way), .fill_set_o(pc_fill_set),
    .dec_i(1'b0), .dec_set_i('0), .dec_way_i('0), .dec_ack_o(pc_unused_ack)
  );
  assign pc_hit = cfg_i.pfc_en && pc_hit_raw;

  // victim cache
  logic  vc_hit, vc_take, vc_probe_hit, vc_ins, vc_displaced;
  line_t vc_line;

  victim_cache #(.ENTRIES(VC_ENTRIES)) u_vcache (
    .clk, .rst_n,
    .lk_blk_i(r_blk), .lk_hit_o(vc_hit), .lk_line_o(vc_line), .take_i(vc_take),
    .probe_blk_i(probe_blk), .probe_hit_o(vc_probe_hit),
    .ins_i(vc_ins), .ins_blk_i(dc_vic_blk), .ins_line_i(dc_vic_line),
    .displaced_o(vc_displaced)
  );

  // PPU
  logic ppu_ins, ppu_ref, ppu_evict, ppu_dec_valid, ppu_ref_found;
  logic [$clog2(PPU_DEPTH+1)-1:0] ppu_count;

  ppu_unit #(.DEPTH(PPU_DEPTH), .SW(DSW), .HW(DHW)) u_ppu (
    .clk, .rst_n,
    .ins_i(ppu_ins), .ins_set_i(dc_fill_set), .ins_way_i(dc_vic_way),
    .ref_i(ppu_ref), .ref_set_i(DSW'(blk_of(req_addr_i))), .ref_way_i(dc_way),
    .evict_i(ppu_evict), .evict_set_i(dc_fill_set), .evict_way_i(dc_vic_way),
    .dec_valid_o(ppu_dec_valid), .dec_set_o(ppu_dec_set), .dec_way_o(ppu_dec_way),
    .dec_ack_i(dc_dec_ack), .ref_found_o(ppu_ref_found), .count_o(ppu_count)
  );
  assign dc_dec = cfg_i.ppu_en && ppu_dec_valid;

  // IAP prefetch address generation and prefetch queue
  logic    accept, acc_hit, pf_valid, pq_push, pq_pop, pq_head_valid, pq_full, pq_dropped;
  pf_req_t pf_req, pq_head;

  iap_prefetch_unit u_iap (
    .ref_valid_i(accept), .ea_i(req_addr_i), .upd_i(req_upd_i), .stride_i(req_stride_i),
    .miss_i(!acc_hit), .iap_en_i(cfg_i.iap_en),
    .pf_valid_o(pf_valid), .pf_o(pf_req)
  );
  assign pq_push = pf_valid;

  prefetch_queue #(.DEPTH(PQ_DEPTH)) u_pq (
    .clk, .rst_n,
    .push_i(pq_push), .req_i(pf_req), .pop_i(pq_pop),
    .head_valid_o(pq_head_valid), .head_o(pq_head), .full_o(pq_full),
    .dropped_o(pq_dropped)
  );
  assign probe_blk = pq_head.blk;

  // ------------------------------------------------------------------
  // control
  // ------------------------------------------------------------------
  logic pfb_place;         // place the waiting prefetched line this cycle
  logic pfb_stale;         // ... unless its block reached a cache meanwhile
  logic pfb_to_pfc;
  logic dem_issue;         // demand request to the second-level memory
  logic pf_issue;
  logic dem_from_pfb;      // the missing line is the prefetched line that just arrived
  logic partial_hit;       // the missing line is the prefetch now in service
  logic dc_fill_dem;       // data-cache fill of a demand line (from memory or VC)
  line_t dem_line;

  function automatic line_t merge_word(line_t l, addr_t a, logic we, word_t d);
    line_t r;
    r = l;
    if (we) r[a[OFFSET_W-1:2]*WORD_W +: WORD_W] = d;
    return r;
  endfunction

  // while a prefetched line waits, the access port checks that it is not on chip
  assign dc_addr      = pfb_valid_q ? {pfb_req_q.blk, OFFSET_W'(0)} : req_addr_i;
  assign pfb_to_pfc   = cfg_i.pfc_en && (pfb_req_q.kind == PF_IAP);
  // An arrived prefetched line is placed when the controller is idle; the processor
  // waits for that cycle.
  assign pfb_stale    = (state_q == S_IDLE) && pfb_valid_q && (dc_hit || pc_hit_raw);
  assign pfb_place    = (state_q == S_IDLE) && pfb_valid_q && !pfb_stale;
  assign req_ready_o  = (state_q == S_IDLE) && !pfb_valid_q;
  assign accept       = req_valid_i && req_ready_o;
  assign acc_hit      = dc_hit || pc_hit;
  assign dem_from_pfb = (state_q == S_MREQ) && pfb_valid_q && (pfb_req_q.blk == r_blk);
  assign partial_hit  = (state_q == S_MREQ) && !dem_from_pfb && out_valid_q && out_pf_q &&
                        (out_req_q.blk == r_blk);

  always_comb begin
    state_d      = state_q;
    resp_valid_d = 1'b0;
    resp_data_d  = resp_data_q;
    dc_acc       = 1'b0;
    pc_acc       = 1'b0;
    dc_fill      = 1'b0;
    dc_fill_blk  = r_blk;
    dc_fill_line = '0;
    dc_fill_flags = '{dirty: 1'b0, iap: 1'b0, pf_unref: 1'b0};
    dc_fill_dem  = 1'b0;
    pc_fill      = 1'b0;
    vc_take      = 1'b0;
    dem_issue    = 1'b0;
    dem_line     = l2_rline_i;
    ppu_ref      = 1'b0;

    unique case (state_q)
      S_IDLE: begin
        if (pfb_place) begin
          if (pfb_to_pfc) pc_fill = 1'b1;
          else begin
            dc_fill       = 1'b1;
            dc_fill_blk   = pfb_req_q.blk;
            dc_fill_line  = pfb_line_q;
            dc_fill_flags = '{dirty: 1'b0, iap: pfb_req_q.iz, pf_unref: 1'b1};
          end
        end else if (accept) begin
          if (dc_hit) begin
            dc_acc       = 1'b1;
            ppu_ref      = cfg_i.ppu_en;
            resp_valid_d = 1'b1;
            resp_data_d  = dc_rdata;
          end else if (pc_hit) begin
            pc_acc       = 1'b1;
            resp_valid_d = 1'b1;
            resp_data_d  = pc_rdata;
          end else begin
            state_d = cfg_i.vc_en ? S_VC : S_MREQ;
          end
        end
      end
      S_VC: begin
        if (vc_hit) begin
          vc_take      = 1'b1;
          dc_fill      = 1'b1;
          dc_fill_dem  = 1'b1;
          dem_line     = vc_line;
          state_d      = S_IDLE;
          resp_valid_d = 1'b1;
          resp_data_d  = vc_line[r_addr_q[OFFSET_W-1:2]*WORD_W +: WORD_W];
        end else begin
          state_d = S_MREQ;
        end
      end
      S_MREQ: begin
        if (dem_from_pfb) begin
          dc_fill      = 1'b1;
          dc_fill_dem  = 1'b1;
          dem_line     = pfb_line_q;
          state_d      = S_IDLE;
          resp_valid_d = 1'b1;
          resp_data_d  = pfb_line_q[r_addr_q[OFFSET_W-1:2]*WORD_W +: WORD_W];
        end else if (partial_hit && l2_rvalid_i) begin
          // the prefetched line arrives now: take it from the buffer next cycle
          state_d = S_MREQ;
        end else begin
          // partial hit: let the prefetch of this line finish instead of aborting it
          dem_issue = !partial_hit;
          state_d   = S_MWAIT;
        end
      end
      S_MWAIT: begin
        // the line in service is the demand line, or the prefetch of the same block
        if (l2_rvalid_i && out_valid_q) begin
          dc_fill      = 1'b1;
          dc_fill_dem  = 1'b1;
          dem_line     = l2_rline_i;
          state_d      = S_IDLE;
          resp_valid_d = 1'b1;
          resp_data_d  = l2_rline_i[r_addr_q[OFFSET_W-1:2]*WORD_W +: WORD_W];
        end
      end
      default: state_d = S_IDLE;
    endcase

    if (dc_fill_dem) begin
      dc_fill_blk   = r_blk;
      dc_fill_line  = merge_word(dem_line, r_addr_q, r_we_q, r_wdata_q);
      dc_fill_flags = '{dirty: r_we_q, iap: 1'b0, pf_unref: 1'b0};
    end
  end

  // displaced lines
  assign vc_ins    = dc_fill && dc_vic_valid && dc_vic_flags.pf_unref && cfg_i.vc_en;
  assign ppu_evict = dc_fill && dc_vic_valid;
  assign ppu_ins   = cfg_i.ppu_en && pfb_place && !pfb_to_pfc;

  always_comb begin
    l2_wb_valid_o = 1'b0;
    l2_wb_blk_o   = dc_vic_blk;
    l2_wb_line_o  = dc_vic_line;
    if (dc_fill && dc_vic_valid && dc_vic_flags.dirty) l2_wb_valid_o = 1'b1;
    if (pc_fill && pc_vic_valid && pc_vic_flags.dirty) begin
      l2_wb_valid_o = 1'b1;
      l2_wb_blk_o   = pc_vic_blk;
      l2_wb_line_o  = pc_vic_line;
    end
  end

  // prefetch issue: bus idle, controller idle with no demand miss starting, buffer free
  logic pq_present;
  assign pq_present = dc_probe_hit || (cfg_i.pfc_en && pc_probe_hit) || (cfg_i.vc_en && vc_probe_hit);
  always_comb begin
    pq_pop   = 1'b0;
    pf_issue = 1'b0;
    if (pq_head_valid && !out_valid_q && !pfb_valid_q && state_q == S_IDLE &&
        !(accept && !acc_hit)) begin
      pq_pop   = 1'b1;
      pf_issue = !pq_present;
    end
  end

  assign l2_req_valid_o = dem_issue || pf_issue;
  assign l2_req_blk_o   = dem_issue ? r_blk : pq_head.blk;
  assign l2_req_pf_o    = !dem_issue;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      resp_valid_q <= 1'b0;
      resp_data_q  <= '0;
      out_valid_q  <= 1'b0;
      out_pf_q     <= 1'b0;
      out_req_q    <= '0;
      pfb_valid_q  <= 1'b0;
      pfb_req_q    <= '0;
      pfb_line_q   <= '0;
      r_addr_q     <= '0;
      r_we_q       <= 1'b0;
      r_wdata_q    <= '0;
    end else begin
      state_q      <= state_d;
      resp_valid_q <= resp_valid_d;
      resp_data_q  <= resp_data_d;
      if (accept) begin
        r_addr_q  <= req_addr_i;
        r_we_q    <= req_we_i;
        r_wdata_q <= req_wdata_i;
      end
      // second-level memory
      if (l2_rvalid_i && out_valid_q) begin
        out_valid_q <= 1'b0;
        if (out_pf_q && state_q != S_MWAIT) begin
          pfb_valid_q <= 1'b1;
          pfb_req_q   <= out_req_q;
          pfb_line_q  <= l2_rline_i;
        end
      end
      if (dem_issue) begin
        out_valid_q <= 1'b1;
        out_pf_q    <= 1'b0;
      end else if (pf_issue) begin
        out_valid_q <= 1'b1;
        out_pf_q    <= 1'b1;
        out_req_q   <= pq_head;
      end
      if (pfb_place || pfb_stale || dem_from_pfb) pfb_valid_q <= 1'b0;
    end
  end

  assign resp_valid_o = resp_valid_q;
  assign resp_rdata_o = resp_data_q;

  always_comb begin
    ev_o             = '0;
    ev_o.dc_hit      = accept && dc_hit;
    ev_o.pfc_hit     = accept && !dc_hit && pc_hit;
    ev_o.vc_hit      = (state_q == S_VC) && vc_hit;
    ev_o.miss        = dem_issue || dem_from_pfb || (partial_hit && !l2_rvalid_i);
    ev_o.iz          = accept && dc_hit && dc_hit_iap && cfg_i.iz_en;
    ev_o.ppu_dec     = dc_dec && dc_dec_ack;
    ev_o.vc_ins      = vc_ins;
    ev_o.pf_issue    = pf_issue;
    ev_o.pf_skip     = pq_pop && !pf_issue;
    ev_o.pf_abort    = dem_issue && out_valid_q && out_pf_q && !l2_rvalid_i;
    ev_o.pf_partial  = partial_hit && !l2_rvalid_i;
    ev_o.pq_overflow = pq_dropped && pq_full;
    ev_o.vc_evict    = vc_displaced;
    ev_o.pf_fill_dc  = pfb_place && !pfb_to_pfc;
    ev_o.pf_fill_pfc = pfb_place && pfb_to_pfc;
    ev_o.wb          = l2_wb_valid_o;
  end

endmodule
