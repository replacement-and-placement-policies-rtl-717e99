// tb_iap_prefetch_unit: checks the prefetch requests of the combined IAP scheme.
//
// Directed cases: an UPDATE reference whose next datum is in another block (prefetch
// of that block, LRU), one whose next datum stays in the block (next block, Instant
// Zero), a negative stride inside the block (previous block), a non-UPDATE miss and
// hit (prefetch-on-miss only on the miss), and IAP disabled. Then random references
// against the rule computed here from the block arithmetic.
module tb_iap_prefetch_unit;
  import cache_pkg::*;

  logic    ref_valid, upd, miss, iap_en, pf_valid;
  addr_t   ea;
  word_t   stride;
  pf_req_t pf;
  logic    clk = 1'b0;

  iap_prefetch_unit dut (
    .ref_valid_i(ref_valid), .ea_i(ea), .upd_i(upd), .stride_i(stride), .miss_i(miss),
    .iap_en_i(iap_en), .pf_valid_o(pf_valid), .pf_o(pf)
  );

  int checks = 0, failures = 0;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic apply(bit v, addr_t a, bit u, word_t s, bit m, bit en);
    ref_valid = v; ea = a; upd = u; stride = s; miss = m; iap_en = en;
    #1;
  endtask

  initial begin
    apply(1, 32'h0000_1000, 1, 32'd64, 0, 1);
    check(pf_valid && pf.kind == PF_IAP && pf.blk == 27'h82 && !pf.iz, "cross-block stride");
    apply(1, 32'h0000_1004, 1, 32'd4, 0, 1);
    check(pf_valid && pf.kind == PF_IAP && pf.blk == 27'h81 && pf.iz, "same-block stride");
    apply(1, 32'h0000_1008, 1, -32'sd4, 1, 1);
    check(pf_valid && pf.kind == PF_IAP && pf.blk == 27'h7F && pf.iz, "negative same-block");
    apply(1, 32'h0000_101C, 1, 32'd4, 0, 1);
    check(pf_valid && pf.blk == 27'h81 && !pf.iz, "stride crossing into next block");
    apply(1, 32'h0000_2000, 0, 32'd0, 1, 1);
    check(pf_valid && pf.kind == PF_POM && pf.blk == 27'h101, "prefetch on miss");
    apply(1, 32'h0000_2000, 0, 32'd0, 0, 1);
    check(!pf_valid, "no prefetch on a non-update hit");
    apply(1, 32'h0000_2000, 1, 32'd64, 0, 0);
    check(!pf_valid, "IAP disabled, hit");
    apply(1, 32'h0000_2000, 1, 32'd64, 1, 0);
    check(pf_valid && pf.kind == PF_POM && pf.blk == 27'h101, "IAP disabled, miss");
    apply(0, 32'h0000_2000, 1, 32'd64, 1, 1);
    check(!pf_valid, "no reference");

    for (int n = 0; n < 5000; n++) begin
      addr_t a, nx;
      word_t s;
      bit    u, m, en, ev;
      blk_t  eb;
      bit    eiz;
      pf_kind_e ek;
      a  = $urandom;
      s  = ($urandom_range(0, 1)) ? word_t'($urandom_range(0, 40)) - 32'd20
                                  : word_t'($urandom_range(0, 4096)) - 32'd2048;
      u  = 1'($urandom);
      m  = 1'($urandom);
      en = 1'($urandom);
      apply(1, a, u, s, m, en);
      nx = a + s;
      ev = 1'b0; eb = '0; eiz = 1'b0; ek = PF_NONE;
      if (en && u) begin
        ev = 1'b1; ek = PF_IAP;
        if (nx[31:5] != a[31:5]) eb = nx[31:5];
        else begin
          eiz = 1'b1;
          eb  = $signed(s) < 0 ? a[31:5] - 1 : a[31:5] + 1;
        end
      end else if (m) begin
        ev = 1'b1; ek = PF_POM; eb = a[31:5] + 1;
      end
      check(pf_valid == ev, "valid");
      if (ev) check(pf.blk == eb && pf.kind == ek && pf.iz == eiz,
                    $sformatf("a=%h s=%0d u=%0d m=%0d en=%0d got %h/%0d/%0d", a, $signed(s),
                              u, m, en, pf.blk, pf.kind, pf.iz));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
