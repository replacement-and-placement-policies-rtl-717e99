// cache_sys_harness: one iap_cache_system at a chosen size, with its own second-level
// memory model, reference memory and traffic, for running several sizes side by side.
//
// Not synthesizable; used by tb_config_sweep. After reset it runs:
//   1. a capacity check: with only prefetch-on-miss enabled, a contiguous region of
//      half the data cache is read twice; every reference of the second pass must hit
//      (the region fits whatever the set count or associativity);
//   2. mixed traffic under each evaluated policy setting in turn (IAP + Instant Zero,
//      prefetch-on-miss + pre-update + victim cache, IAP + pre-update + victim cache,
//      IAP + prefetch cache): LOAD/STORE-UPDATE sweeps with same-block and cross-block
//      strides, and random loads and stores over twice the data-cache size.
// Every load is compared with the reference memory and every hit must answer in one
// cycle. It counts hits in the prefetch cache, which must occur for each size. The
// outputs report checks and failures and raise done_o when it has finished.
module cache_sys_harness #(
  parameter int unsigned DC_SETS  = 128,
  parameter int unsigned DC_WAYS  = 4,
  parameter int unsigned PFC_SETS = 1,
  parameter int unsigned PFC_WAYS = 32,
  parameter cache_pkg::pfc_repl_e PFC_REPL = cache_pkg::PFC_FIFO,
  parameter int unsigned N_RAND   = 1500
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks_o,
  output int   failures_o,
  output logic done_o
);
  import cache_pkg::*;

  localparam int unsigned DC_BYTES = DC_SETS * DC_WAYS * LINE_BYTES;

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

  iap_cache_system #(
    .DC_SETS(DC_SETS), .DC_WAYS(DC_WAYS), .PFC_SETS(PFC_SETS), .PFC_WAYS(PFC_WAYS),
    .PFC_REPL(PFC_REPL)
  ) dut (
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

  int checks = 0, failures = 0, cycles = 0, n_pfc_hit = 0;
  assign checks_o   = checks;
  assign failures_o = failures;
  always @(posedge clk) begin
    cycles++;
    n_pfc_hit += int'(ev.pfc_hit);
  end

  word_t ref_mem [int unsigned];

  function automatic word_t ref_read(addr_t a);
    int unsigned wa;
    wa = a >> 2;
    if (ref_mem.exists(wa)) return ref_mem[wa];
    return (wa) ^ 32'h5A5A_0000;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10)
        $display("FAIL [%0d sets x %0d ways, pfc %0dx%0d %s] @%0d: %s", DC_SETS, DC_WAYS,
                 PFC_SETS, PFC_WAYS, PFC_REPL.name(), cycles, what);
    end
  endtask

  bit last_hit;

  task automatic access(addr_t a, bit we, word_t d, bit upd, word_t stride);
    int    t0;
    bit    was_hit;
    word_t expv;
    a = {a[31:2], 2'b00};
    @(negedge clk);
    req_addr = a; req_we = we; req_wdata = d; req_upd = upd; req_stride = stride;
    req_valid = 1'b1;
    #1;
    while (!req_ready) begin
      @(negedge clk);
      #1;
    end
    t0       = cycles;
    was_hit  = ev.dc_hit || ev.pfc_hit;
    last_hit = was_hit;
    @(negedge clk);
    req_valid = 1'b0;
    #1;
    while (!resp_valid) begin
      @(negedge clk);
      #1;
    end
    expv = ref_read(a);
    if (!we) check(resp_rdata == expv, $sformatf("load %h got %h exp %h", a, resp_rdata, expv));
    else ref_mem[a >> 2] = d;
    if (was_hit) check(cycles - t0 == 1, $sformatf("hit latency %0d", cycles - t0));
    repeat ($urandom_range(0, 3)) @(posedge clk);
  endtask

  task automatic sweep(addr_t a_base, addr_t b_base, int n, int stride);
    for (int i = 0; i < n; i++) begin
      word_t v;
      access(b_base + i * stride, 1'b0, '0, 1'b1, word_t'(stride));
      v = ref_read(b_base + i * stride) + 1;
      access(a_base + i * stride, 1'b1, v, 1'b1, word_t'(stride));
    end
  endtask

  task automatic random_refs(addr_t base, int n);
    for (int i = 0; i < n; i++) begin
      addr_t a;
      a = base + ($urandom_range(0, DC_BYTES / 2 - 1) << 2);
      access(a, $urandom_range(0, 2) == 0, $urandom, $urandom_range(0, 1) == 1,
             word_t'($urandom_range(0, 1) ? 4 : 96));
    end
  endtask

  initial begin
    int misses;
    cfg = '0; req_valid = 1'b0; req_addr = '0; req_we = 1'b0; req_wdata = '0;
    req_upd = 1'b0; req_stride = '0; done_o = 1'b0;
    @(posedge clk);
    while (!rst_n) @(posedge clk);
    @(posedge clk);

    // 1. capacity: half the data cache, read twice
    cfg = '{iap_en: 0, iz_en: 0, ppu_en: 0, vc_en: 0, pfc_en: 0};
    for (int i = 0; i < int'(DC_BYTES / 2); i += LINE_BYTES)
      access(32'h0100_0000 + i, 1'b0, '0, 1'b0, '0);
    repeat (40) @(posedge clk);
    misses = 0;
    for (int i = 0; i < int'(DC_BYTES / 2); i += LINE_BYTES) begin
      access(32'h0100_0000 + i + 4, 1'b0, '0, 1'b0, '0);
      if (!last_hit) misses++;
    end
    check(misses == 0, $sformatf("%0d misses re-reading half the cache", misses));

    // 2. the evaluated policy settings
    for (int m = 0; m < 4; m++) begin
      case (m)
        0: cfg = '{iap_en: 1, iz_en: 1, ppu_en: 0, vc_en: 0, pfc_en: 0};
        1: cfg = '{iap_en: 0, iz_en: 0, ppu_en: 1, vc_en: 1, pfc_en: 0};
        2: cfg = '{iap_en: 1, iz_en: 0, ppu_en: 1, vc_en: 1, pfc_en: 0};
        default: cfg = '{iap_en: 1, iz_en: 0, ppu_en: 0, vc_en: 0, pfc_en: 1};
      endcase
      sweep(32'h0200_0000 + (m << 20), 32'h0280_0000 + (m << 20), 300, 4);
      sweep(32'h0300_0000 + (m << 20), 32'h0380_0000 + (m << 20), 100, 96);
      random_refs(32'h0400_0000, N_RAND);
    end
    check(n_pfc_hit > 0, "no prefetch-cache hit");
    $display("size %0d B, %0d-way, prefetch cache %0d B (%0d sets, %s): checks=%0d failures=%0d pfc_hits=%0d cycles=%0d",
             DC_BYTES, DC_WAYS, PFC_SETS * PFC_WAYS * LINE_BYTES, PFC_SETS, PFC_REPL.name(), checks, failures,
             n_pfc_hit, cycles);
    done_o = 1'b1;
  end

endmodule
