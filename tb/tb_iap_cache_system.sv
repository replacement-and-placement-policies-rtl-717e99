// tb_iap_cache_system: end-to-end test of the prefetch-aware data-cache subsystem at
// its full default size (16 KB 4-way data cache, 1 KB fully-associative prefetch cache,
// 8-entry prefetch queue and PPU, 4-entry victim cache).
//
// A behavioural second-level memory (l2_mem_model) serves the misses. The processor
// side is driven with reference streams like those of loops over arrays: LOAD-UPDATE
// and STORE-UPDATE sweeps with small and large strides, plain loads and stores, and
// conflict-heavy streams whose blocks map to few sets. Every load is checked against
// a reference memory kept by the testbench; every hit is checked to answer in one
// cycle and every victim-cache hit in two.
//
// Directed sequences check that:
//   * a referenced Instant Zero line is the next victim of its set, and an LRU line
//     is not;
//   * referencing a newer prefetched line pre-updates an older one;
//   * a miss on a block whose prefetch is in service waits for it, with no request
//     or abort of its own (partial hit).
//
// The run goes through four policy settings in turn, without reset:
//   IAP with Instant Zero; prefetch-on-miss with pre-updating and victim cache;
//   IAP with pre-updating and victim cache; IAP with the prefetch cache.
// Each mechanism must happen at least once: hits in each structure, Instant Zero,
// pre-update, victim insertion and displacement, prefetch issue / skip / abort,
// partial hit, prefetch-queue overflow, placement in either cache, write-back.
module tb_iap_cache_system;
  import cache_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  cfg_t    cfg;
  logic    req_valid, req_ready, req_we, req_upd;
  addr_t   req_addr;
  word_t   req_wdata, req_stride;
  logic    resp_valid;
  word_t   resp_rdata;
  logic    l2_req_valid, l2_req_pf, l2_rvalid, l2_wb_valid;
  blk_t    l2_req_blk, l2_wb_blk;
  line_t   l2_rline, l2_wb_line;
  events_t ev;
  int unsigned l2_aborts, l2_reads, l2_writes;

  iap_cache_system dut (
    .clk, .rst_n, .cfg_i(cfg),
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_addr_i(req_addr),
    .req_we_i(req_we), .req_wdata_i(req_wdata), .req_upd_i(req_upd),
    .req_stride_i(req_stride), .resp_valid_o(resp_valid), .resp_rdata_o(resp_rdata),
    .l2_req_valid_o(l2_req_valid), .l2_req_blk_o(l2_req_blk), .l2_req_pf_o(l2_req_pf),
    .l2_rvalid_i(l2_rvalid), .l2_rline_i(l2_rline),
    .l2_wb_valid_o(l2_wb_valid), .l2_wb_blk_o(l2_wb_blk), .l2_wb_line_o(l2_wb_line),
    .ev_o(ev)
  );

  l2_mem_model u_l2 (
    .clk, .rst_n, .req_valid_i(l2_req_valid), .req_blk_i(l2_req_blk), .req_pf_i(l2_req_pf),
    .rvalid_o(l2_rvalid), .rline_o(l2_rline),
    .wb_valid_i(l2_wb_valid), .wb_blk_i(l2_wb_blk), .wb_line_i(l2_wb_line),
    .aborts_o(l2_aborts), .reads_o(l2_reads), .writes_o(l2_writes)
  );

  int checks = 0, failures = 0;
  int cycles = 0;
  int n_l2_dem = 0;   // demand requests sent to the second-level memory
  always @(posedge clk) begin
    cycles++;
    n_l2_dem += int'(l2_req_valid && !l2_req_pf);
  end

  // mechanism counters
  int n_dc_hit, n_pfc_hit, n_vc_hit, n_miss, n_iz, n_ppu_dec, n_vc_ins, n_pf_issue,
      n_pf_skip, n_pf_abort, n_pf_partial, n_pq_overflow, n_vc_evict, n_pf_fill_dc, n_pf_fill_pfc, n_wb;
  always @(posedge clk) if (rst_n) begin
    n_dc_hit      += int'(ev.dc_hit);
    n_pfc_hit     += int'(ev.pfc_hit);
    n_vc_hit      += int'(ev.vc_hit);
    n_miss        += int'(ev.miss);
    n_iz          += int'(ev.iz);
    n_ppu_dec     += int'(ev.ppu_dec);
    n_vc_ins      += int'(ev.vc_ins);
    n_pf_issue    += int'(ev.pf_issue);
    n_pf_skip     += int'(ev.pf_skip);
    n_pf_abort    += int'(ev.pf_abort);
    n_pf_partial  += int'(ev.pf_partial);
    n_pq_overflow += int'(ev.pq_overflow);
    n_vc_evict    += int'(ev.vc_evict);
    n_pf_fill_dc  += int'(ev.pf_fill_dc);
    n_pf_fill_pfc += int'(ev.pf_fill_pfc);
    n_wb          += int'(ev.wb);
  end

  // reference memory, by word address
  word_t ref_mem [int unsigned];

  function automatic word_t ref_read(addr_t a);
    int unsigned wa;
    wa = a >> 2;
    if (ref_mem.exists(wa)) return ref_mem[wa];
    return (wa) ^ 32'h5A5A_0000;   // same pattern as the memory model's
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycles, what);
    end
  endtask

  bit last_hit;   // the last reference hit the data cache or the prefetch cache

  // one data reference
  task automatic access(addr_t a, bit we, word_t d, bit upd, word_t stride);
    int     t0;
    bit     was_hit, was_vc;
    word_t  expv;
    a = {a[31:2], 2'b00};
    @(negedge clk);
    req_addr   = a;
    req_we     = we;
    req_wdata  = d;
    req_upd    = upd;
    req_stride = stride;
    req_valid  = 1'b1;
    #1;
    while (!req_ready) begin
      @(negedge clk);
      #1;
    end
    // the request is taken at the coming rising edge
    t0      = cycles;
    was_hit = ev.dc_hit || ev.pfc_hit;
    last_hit = was_hit;
    was_vc  = 1'b0;
    @(negedge clk);
    req_valid = 1'b0;
    #1;
    while (!resp_valid) begin
      if (ev.vc_hit) was_vc = 1'b1;
      @(negedge clk);
      #1;
    end
    expv = ref_read(a);
    if (!we) check(resp_rdata == expv,
                   $sformatf("load %h got %h exp %h", a, resp_rdata, expv));
    else ref_mem[a >> 2] = d;
    if (was_hit) check(cycles - t0 == 1, $sformatf("hit latency %0d", cycles - t0));
    if (was_vc)  check(cycles - t0 == 2, $sformatf("victim hit latency %0d", cycles - t0));
    // a few idle cycles between references, as between memory instructions
    repeat ($urandom_range(0, 3)) @(posedge clk);
  endtask

  // a[i] += b[i] over N words with LOAD-UPDATE / STORE-UPDATE, stride in bytes
  task automatic sweep(addr_t a_base, addr_t b_base, int n, int stride, int reps);
    for (int r = 0; r < reps; r++)
      for (int i = 0; i < n; i++) begin
        word_t v;
        access(b_base + i * stride, 1'b0, '0, 1'b1, word_t'(stride));
        v = ref_read(b_base + i * stride) + ref_read(a_base + i * stride);
        access(a_base + i * stride, 1'b0, '0, 1'b1, word_t'(stride));
        access(a_base + i * stride, 1'b1, v, 1'b1, word_t'(stride));
      end
  endtask

  // references to blocks that map to one data-cache set (4 KB apart)
  task automatic conflict(addr_t base, int nblk, int n, bit upd);
    for (int i = 0; i < n; i++) begin
      addr_t a;
      a = base + ($urandom_range(0, nblk - 1) << 12) + ($urandom_range(0, 7) << 2);
      access(a, $urandom_range(0, 3) == 0, $urandom, upd, 32'd4);
    end
  endtask

  // miss on x, which prefetches x+1 on a miss; push x+1 out of its set; use it again
  task automatic victim_pattern(addr_t x);
    access(x, 1'b0, '0, 1'b0, '0);
    repeat (40) @(posedge clk);              // let the prefetch of x+1 arrive
    for (int k = 1; k <= 6; k++) begin
      access(x + 32 + (k << 12), 1'b0, '0, 1'b0, '0);
      repeat (30) @(posedge clk);
    end
    access(x + 32 + 8, 1'b0, '0, 1'b0, '0);  // should come from the victim cache
  endtask

  // Instant Zero: a referenced next-block IAP line is the next victim of its set
  task automatic iz_pattern(addr_t b0, bit iz_on);
    // b0 .. b4 map to one set; x is the block just below b3
    addr_t x;
    x = b0 + (3 << 12) - 32;
    for (int k = 0; k < 3; k++) begin
      access(b0 + (k << 12), 1'b0, '0, 1'b0, '0);
      repeat (40) @(posedge clk);
    end
    access(x + 20, 1'b0, '0, 1'b1, 32'd4);   // LOAD-UPDATE: next datum in the same block
    repeat (40) @(posedge clk);               // next block (b3) is prefetched
    access(b0 + (3 << 12), 1'b0, '0, 1'b0, '0);
    check(last_hit, "prefetched next block hits");
    repeat (40) @(posedge clk);
    access(b0 + (4 << 12), 1'b0, '0, 1'b0, '0);   // miss in the same set
    repeat (40) @(posedge clk);
    access(b0 + (1 << 12), 1'b0, '0, 1'b0, '0);
    check(last_hit, "b1 kept");
    access(b0 + (2 << 12), 1'b0, '0, 1'b0, '0);
    check(last_hit, "b2 kept");
    access(b0, 1'b0, '0, 1'b0, '0);
    check(last_hit == iz_on, iz_on ? "b0 kept: the IZ line went first" : "b0 (LRU) went first");
    access(b0 + (3 << 12), 1'b0, '0, 1'b0, '0);
    if (iz_on) check(!last_hit, "referenced IZ line displaced");
    repeat (40) @(posedge clk);
  endtask

  // pre-update: referencing a newer prefetched line lowers an older one's priority
  task automatic ppu_pattern(addr_t a, addr_t c);
    int n_prev;
    access(a, 1'b0, '0, 1'b0, '0);           // miss, a+1 prefetched
    repeat (200) @(posedge clk);
    access(c, 1'b0, '0, 1'b0, '0);           // miss, c+1 prefetched
    repeat (200) @(posedge clk);
    n_prev = n_ppu_dec;
    access(c + 32, 1'b0, '0, 1'b0, '0);      // reference to c+1
    repeat (4) @(posedge clk);
    check(last_hit, "prefetched line hits");
    check(n_ppu_dec > n_prev, "older prefetched line pre-updated");
  endtask

  // random references over a region larger than the cache
  task automatic random_refs(addr_t base, int span_kb, int n);
    for (int i = 0; i < n; i++) begin
      addr_t a;
      a = base + ($urandom_range(0, span_kb * 256 - 1) << 2);
      access(a, $urandom_range(0, 2) == 0, $urandom, $urandom_range(0, 1) == 1,
             word_t'($urandom_range(0, 1) ? 4 : 96));
    end
  endtask

  // partial hit: a miss on x prefetches x+1; a reference to x+1 while that prefetch is
  // still in service must wait for it, without a request or an abort of its own
  task automatic partial_pattern(addr_t x);
    int unsigned a0;
    int          p0, d0;
    repeat (60) @(posedge clk);              // queue and bus idle
    access(x, 1'b0, '0, 1'b0, '0);
    d0 = n_l2_dem;
    a0 = l2_aborts;
    p0 = n_pf_partial;
    access(x + 32 + 12, 1'b0, '0, 1'b0, '0);
    check(!last_hit, "next block not yet on chip");
    check(n_pf_partial == p0 + 1, "miss waited for the prefetch in service");
    check(n_l2_dem == d0 && l2_aborts == a0, "no demand request and no abort on a partial hit");
  endtask

  task automatic phase(cfg_t c, string name);
    cfg = c;
    $display("phase %s", name);
    sweep(32'h0010_0000, 32'h0020_0000, 600, 4, 2);        // same-line strides
    sweep(32'h0030_0000, 32'h0040_0000, 200, 64, 2);       // block-crossing strides
    conflict(32'h0050_0040, 6, 200, 1'b0);
    conflict(32'h0060_0080, 5, 100, 1'b1);
    for (int k = 0; k < 4; k++) victim_pattern(32'h0070_0000 + (k << 7) + (32'(name.len()) << 14));
    random_refs(32'h0080_0000, 48, 1500);
    if (c.ppu_en) for (int k = 0; k < 4; k++)
      ppu_pattern(32'h00A0_0000 + (k << 8) + (32'(name.len()) << 16),
                  32'h00B0_0000 + (k << 8) + (32'(name.len()) << 16));
  endtask

  initial begin
    cfg        = '0;
    req_valid  = 1'b0;
    req_addr   = '0;
    req_we     = 1'b0;
    req_wdata  = '0;
    req_upd    = 1'b0;
    req_stride = '0;
    rst_n      = 1'b0;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    cfg = '{iap_en: 1, iz_en: 1, ppu_en: 0, vc_en: 0, pfc_en: 0};
    iz_pattern(32'h0090_0400, 1'b1);
    cfg = '{iap_en: 1, iz_en: 0, ppu_en: 0, vc_en: 0, pfc_en: 0};
    iz_pattern(32'h0098_0600, 1'b0);
    cfg = '{iap_en: 0, iz_en: 0, ppu_en: 0, vc_en: 0, pfc_en: 0};
    for (int k = 0; k < 4; k++) partial_pattern(32'h00C0_0000 + (k << 10));
    phase('{iap_en: 1, iz_en: 1, ppu_en: 0, vc_en: 0, pfc_en: 0}, "IAP+IZ");
    phase('{iap_en: 0, iz_en: 0, ppu_en: 1, vc_en: 1, pfc_en: 0}, "POM+PPUVC");
    phase('{iap_en: 1, iz_en: 0, ppu_en: 1, vc_en: 1, pfc_en: 0}, "IAP+PPUVC");
    phase('{iap_en: 1, iz_en: 0, ppu_en: 0, vc_en: 0, pfc_en: 1}, "IAP+prefetch cache");

    // re-read everything written, through the caches
    begin
      int unsigned keys[$];
      foreach (ref_mem[k]) keys.push_back(k);
      for (int i = 0; i < keys.size(); i += 7) access(addr_t'(keys[i] << 2), 1'b0, '0, 1'b0, '0);
    end

    $display("events: dc_hit=%0d pfc_hit=%0d vc_hit=%0d miss=%0d iz=%0d ppu_dec=%0d vc_ins=%0d",
             n_dc_hit, n_pfc_hit, n_vc_hit, n_miss, n_iz, n_ppu_dec, n_vc_ins);
    $display("        pf_issue=%0d pf_skip=%0d pf_abort=%0d pf_partial=%0d pf_fill_dc=%0d pf_fill_pfc=%0d wb=%0d",
             n_pf_issue, n_pf_skip, n_pf_abort, n_pf_partial, n_pf_fill_dc, n_pf_fill_pfc, n_wb);
    $display("        pq_overflow=%0d vc_evict=%0d", n_pq_overflow, n_vc_evict);
    $display("memory: reads=%0d aborts=%0d writes=%0d cycles=%0d", l2_reads, l2_aborts,
             l2_writes, cycles);
    check(n_dc_hit > 0, "no data-cache hit");
    check(n_pfc_hit > 0, "no prefetch-cache hit");
    check(n_vc_hit > 0, "no victim-cache hit");
    check(n_miss > 0, "no miss");
    check(n_iz > 0, "Instant Zero never applied");
    check(n_ppu_dec > 0, "no priority pre-update");
    check(n_vc_ins > 0, "no victim-cache insertion");
    check(n_pf_issue > 0, "no prefetch issued");
    check(n_pf_skip > 0, "no redundant prefetch skipped");
    check(n_pf_abort > 0, "no prefetch aborted by a demand miss");
    check(n_pq_overflow > 0, "prefetch queue never overflowed");
    check(n_vc_evict > 0, "victim cache never displaced a line");
    check(n_pf_partial > 0, "no partial hit on a prefetch in service");
    check(n_pf_fill_dc > 0, "no prefetched line placed in the data cache");
    check(n_pf_fill_pfc > 0, "no prefetched line placed in the prefetch cache");
    check(n_wb > 0, "no write-back");
    check(l2_aborts == n_pf_abort, "abort count differs from the memory's");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
