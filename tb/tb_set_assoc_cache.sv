// tb_set_assoc_cache: checks the set-associative line store against a behavioural model.
//
// Two instances are tested: a 4-set, 4-way LRU / Instant Zero store (the data-cache
// organisation, shrunk) and an 8-way fully-associative FIFO store (the prefetch-cache
// organisation, shrunk). Random loads, stores, fills and priority decrements over a
// small pool of blocks are applied; the model keeps each set's lines as an ordered
// list (front = next victim) and checks hits, hit way, read data, probe results, the
// victim a fill would displace with its tag, data and flags, and whether a decrement
// is accepted.
module tb_set_assoc_cache;
  import cache_pkg::*;

  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 30) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---------------- instance A: 4 sets x 4 ways, LRU / IZ ----------------
  localparam int SA = 4, WA = 4;
  addr_t       a_addr;
  logic        a_acc, a_we, a_iz, a_hit, a_hiap, a_hpfu, a_probe_hit, a_fill, a_vvalid;
  logic        a_dec, a_dack;
  word_t       a_wdata, a_rdata;
  logic [1:0]  a_way, a_vway, a_dway;
  logic [1:0]  a_fset, a_dset;
  blk_t        a_probe, a_fblk, a_vblk;
  line_t       a_fline, a_vline;
  line_flags_t a_fflags, a_vflags;

  set_assoc_cache #(.SETS(SA), .WAYS(WA), .FIFO(1'b0)) dut_a (
    .clk, .rst_n, .addr_i(a_addr), .acc_i(a_acc), .we_i(a_we), .wdata_i(a_wdata),
    .iz_en_i(a_iz), .hit_o(a_hit), .way_o(a_way), .rdata_o(a_rdata), .hit_iap_o(a_hiap),
    .hit_pf_unref_o(a_hpfu), .probe_blk_i(a_probe), .probe_hit_o(a_probe_hit),
    .fill_i(a_fill), .fill_blk_i(a_fblk), .fill_line_i(a_fline), .fill_flags_i(a_fflags),
    .vic_valid_o(a_vvalid), .vic_blk_o(a_vblk), .vic_line_o(a_vline), .vic_flags_o(a_vflags),
    .vic_way_o(a_vway), .fill_set_o(a_fset), .dec_i(a_dec), .dec_set_i(a_dset),
    .dec_way_i(a_dway), .dec_ack_o(a_dack)
  );

  // ---------------- instance B: fully associative 8 ways, FIFO ----------------
  localparam int WB = 8;
  addr_t       b_addr;
  logic        b_acc, b_we, b_hit, b_hiap, b_hpfu, b_probe_hit, b_fill, b_vvalid, b_dack;
  word_t       b_wdata, b_rdata;
  logic [2:0]  b_way, b_vway;
  logic [0:0]  b_fset;
  blk_t        b_probe, b_fblk, b_vblk;
  line_t       b_fline, b_vline;
  line_flags_t b_vflags;

  set_assoc_cache #(.SETS(1), .WAYS(WB), .FIFO(1'b1)) dut_b (
    .clk, .rst_n, .addr_i(b_addr), .acc_i(b_acc), .we_i(b_we), .wdata_i(b_wdata),
    .iz_en_i(1'b0), .hit_o(b_hit), .way_o(b_way), .rdata_o(b_rdata), .hit_iap_o(b_hiap),
    .hit_pf_unref_o(b_hpfu), .probe_blk_i(b_probe), .probe_hit_o(b_probe_hit),
    .fill_i(b_fill), .fill_blk_i(b_fblk), .fill_line_i(b_fline),
    .fill_flags_i('{dirty: 1'b0, iap: 1'b1, pf_unref: 1'b1}),
    .vic_valid_o(b_vvalid), .vic_blk_o(b_vblk), .vic_line_o(b_vline), .vic_flags_o(b_vflags),
    .vic_way_o(b_vway), .fill_set_o(b_fset), .dec_i(1'b0), .dec_set_i(1'b0),
    .dec_way_i(3'd0), .dec_ack_o(b_dack)
  );

  // ---------------- model ----------------
  typedef struct {
    bit          valid;
    blk_t        blk;
    line_t       line;
    line_flags_t fl;
  } mline_t;

  mline_t ma [SA][WA];
  int     oa [SA][$];
  mline_t mb [WB];
  int     ob [$];

  function automatic line_t rnd_line();
    line_t l;
    for (int i = 0; i < LINE_WORDS; i++) l[i*32 +: 32] = $urandom;
    return l;
  endfunction

  function automatic int find_a(blk_t b);
    int s = int'(b % SA);
    for (int w = 0; w < WA; w++) if (ma[s][w].valid && ma[s][w].blk == b) return w;
    return -1;
  endfunction

  function automatic int find_b(blk_t b);
    for (int w = 0; w < WB; w++) if (mb[w].valid && mb[w].blk == b) return w;
    return -1;
  endfunction

  function automatic int victim_a(int s);
    for (int w = 0; w < WA; w++) if (!ma[s][w].valid) return w;
    return oa[s][0];
  endfunction

  function automatic int victim_b();
    for (int w = 0; w < WB; w++) if (!mb[w].valid) return w;
    return ob[0];
  endfunction

  function automatic void to_back(ref int q[$], input int w);
    foreach (q[i]) if (q[i] == w) begin q.delete(i); break; end
    q.push_back(w);
  endfunction

  function automatic void to_front(ref int q[$], input int w);
    foreach (q[i]) if (q[i] == w) begin q.delete(i); break; end
    q.push_front(w);
  endfunction

  function automatic void dec_one(ref int q[$], input int w);
    foreach (q[i]) if (q[i] == w) begin
      if (i > 0) begin q[i] = q[i-1]; q[i-1] = w; end
      break;
    end
  endfunction

  int n_iz, n_fill_evict, n_dec;

  initial begin
    rst_n = 1'b0;
    a_acc = 0; a_fill = 0; a_dec = 0; a_we = 0; a_iz = 0; a_addr = '0; a_wdata = '0;
    a_probe = '0; a_fblk = '0; a_fline = '0; a_fflags = '0; a_dset = '0; a_dway = '0;
    b_acc = 0; b_fill = 0; b_we = 0; b_addr = '0; b_wdata = '0; b_probe = '0; b_fblk = '0;
    b_fline = '0;
    for (int s = 0; s < SA; s++) begin
      oa[s] = '{0, 1, 2, 3};
      for (int w = 0; w < WA; w++) ma[s][w].valid = 0;
    end
    ob = '{0, 1, 2, 3, 4, 5, 6, 7};
    for (int w = 0; w < WB; w++) mb[w].valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int n = 0; n < 6000; n++) begin
      blk_t  ba, bb;
      int    wa_, wb_, sa, kind, dw, ds;
      bit    dec_exp;
      @(negedge clk);
      // ---------- instance A ----------
      ba     = blk_t'($urandom_range(0, 23));
      sa     = int'(ba % SA);
      wa_    = find_a(ba);
      a_addr = {ba, 3'($urandom), 2'b00};
      a_probe = blk_t'($urandom_range(0, 23));
      a_we   = 1'($urandom);
      a_wdata = $urandom;
      a_iz   = 1'($urandom);
      kind   = (wa_ < 0) ? 1 : 0;          // miss -> fill, hit -> access
      a_acc  = (kind == 0);
      a_fill = (kind == 1);
      a_fblk = ba;
      a_fline = rnd_line();
      a_fflags = '{dirty: 1'($urandom_range(0, 3) == 0), iap: 1'($urandom), pf_unref: 1'($urandom)};
      ds     = $urandom_range(0, SA - 1);
      dw     = $urandom_range(0, WA - 1);
      a_dec  = 1'($urandom);
      a_dset = 2'(ds);
      a_dway = 2'(dw);
      #1;
      check(a_hit == (wa_ >= 0), "A hit");
      check(a_probe_hit == (find_a(a_probe) >= 0), "A probe");
      if (wa_ >= 0) begin
        check(a_way == 2'(wa_), "A hit way");
        check(a_rdata == ma[sa][wa_].line[a_addr[4:2]*32 +: 32], "A read data");
        check(a_hiap == ma[sa][wa_].fl.iap && a_hpfu == ma[sa][wa_].fl.pf_unref, "A hit flags");
      end else begin
        int v;
        v = victim_a(sa);
        check(a_vway == 2'(v) && a_fset == 2'(sa), $sformatf("A victim way %0d exp %0d", a_vway, v));
        check(a_vvalid == ma[sa][v].valid, "A victim valid");
        if (ma[sa][v].valid) begin
          check(a_vblk == ma[sa][v].blk && a_vline == ma[sa][v].line &&
                a_vflags == ma[sa][v].fl, "A victim contents");
          n_fill_evict++;
        end
      end
      dec_exp = a_dec && (ds != sa);
      check(a_dack == dec_exp, "A decrement accepted");
      @(posedge clk);
      if (dec_exp) begin dec_one(oa[ds], dw); n_dec++; end
      if (kind == 0) begin
        if (a_iz && ma[sa][wa_].fl.iap) begin to_front(oa[sa], wa_); n_iz++; end
        else to_back(oa[sa], wa_);
        ma[sa][wa_].fl.pf_unref = 0;
        if (a_we) begin
          ma[sa][wa_].line[a_addr[4:2]*32 +: 32] = a_wdata;
          ma[sa][wa_].fl.dirty = 1;
        end
      end else begin
        int v;
        v = victim_a(sa);
        ma[sa][v] = '{valid: 1, blk: ba, line: a_fline, fl: a_fflags};
        to_back(oa[sa], v);
      end

      // ---------- instance B ----------
      @(negedge clk);
      a_acc = 0; a_fill = 0; a_dec = 0;
      bb     = blk_t'($urandom_range(0, 13));
      wb_    = find_b(bb);
      b_addr = {bb, 3'($urandom), 2'b00};
      b_probe = blk_t'($urandom_range(0, 13));
      b_we   = 1'($urandom);
      b_wdata = $urandom;
      b_acc  = (wb_ >= 0);
      b_fill = (wb_ < 0);
      b_fblk = bb;
      b_fline = rnd_line();
      #1;
      check(b_hit == (wb_ >= 0), "B hit");
      check(b_probe_hit == (find_b(b_probe) >= 0), "B probe");
      if (wb_ >= 0) begin
        check(b_way == 3'(wb_), "B hit way");
        check(b_rdata == mb[wb_].line[b_addr[4:2]*32 +: 32], "B read data");
      end else begin
        int v;
        v = victim_b();
        check(b_vway == 3'(v), $sformatf("B FIFO victim way %0d exp %0d", b_vway, v));
        if (mb[v].valid) check(b_vblk == mb[v].blk && b_vflags.dirty == mb[v].fl.dirty,
                               "B victim contents");
      end
      @(posedge clk);
      if (wb_ >= 0) begin
        mb[wb_].fl.pf_unref = 0;
        if (b_we) begin
          mb[wb_].line[b_addr[4:2]*32 +: 32] = b_wdata;
          mb[wb_].fl.dirty = 1;
        end
      end else begin
        int v;
        v = victim_b();
        mb[v] = '{valid: 1, blk: bb, line: b_fline, fl: '{dirty: 0, iap: 1, pf_unref: 1}};
        to_back(ob, v);
      end
      @(negedge clk);
      b_acc = 0; b_fill = 0;
    end
    check(n_iz > 0 && n_fill_evict > 0 && n_dec > 0, "IZ, eviction and decrement all exercised");
    $display("iz=%0d evictions=%0d decrements=%0d", n_iz, n_fill_evict, n_dec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
