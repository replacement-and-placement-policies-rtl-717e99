// tb_victim_cache: checks the 4-entry FIFO victim cache against a queue model.
//
// Directed part: five lines are inserted into the four entries; the first (oldest)
// must be gone, the other four found with their data, and a hit taken out must no
// longer be found. Random part: lookups, takes, probes and insertions every cycle.
module tb_victim_cache;
  import cache_pkg::*;

  logic  clk = 1'b0, rst_n;
  blk_t  lk_blk, probe_blk, ins_blk;
  logic  lk_hit, take, probe_hit, ins, displaced;
  line_t lk_line, ins_line;

  victim_cache dut (
    .clk, .rst_n, .lk_blk_i(lk_blk), .lk_hit_o(lk_hit), .lk_line_o(lk_line), .take_i(take),
    .probe_blk_i(probe_blk), .probe_hit_o(probe_hit), .ins_i(ins), .ins_blk_i(ins_blk),
    .ins_line_i(ins_line), .displaced_o(displaced)
  );

  always #5 clk = ~clk;

  typedef struct { blk_t blk; line_t line; } ent_t;
  ent_t m[$];
  int checks = 0, failures = 0, n_vhit = 0;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic line_t line_of(blk_t b, int salt);
    line_t l;
    for (int i = 0; i < LINE_WORDS; i++) l[i*32 +: 32] = 32'(b) * 977 + 32'(i) + 32'(salt);
    return l;
  endfunction

  task automatic cycle(blk_t l, bit t, blk_t p, bit i, blk_t ib, line_t il);
    int k, kp;
    @(negedge clk);
    lk_blk = l; take = t; probe_blk = p; ins = i; ins_blk = ib; ins_line = il;
    #1;
    k = -1; kp = -1;
    foreach (m[j]) begin
      if (m[j].blk == l) k = j;
      if (m[j].blk == p) kp = j;
    end
    check(lk_hit == (k >= 0), $sformatf("lookup %0h", l));
    if (k >= 0) begin
      check(lk_line == m[k].line, "line data");
      n_vhit++;
    end
    check(probe_hit == (kp >= 0), "probe");
    check(displaced == (i && (m.size() - ((t && k >= 0) ? 1 : 0)) == 4), "displaced");
    @(posedge clk);
    if (t && k >= 0) m.delete(k);
    if (i) begin
      if (m.size() == 4) void'(m.pop_front());
      m.push_back('{blk: ib, line: il});
    end
  endtask

  initial begin
    rst_n = 0; take = 0; ins = 0; lk_blk = '0; probe_blk = '0; ins_blk = '0; ins_line = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 1; b <= 5; b++) cycle('0, 0, '0, 1, blk_t'(b * 16), line_of(blk_t'(b * 16), 0));
    cycle(blk_t'(16), 0, '0, 0, '0, '0);
    check(!lk_hit, "oldest line displaced");
    for (int b = 2; b <= 5; b++) begin
      cycle(blk_t'(b * 16), 0, '0, 0, '0, '0);
      check(lk_hit && lk_line == line_of(blk_t'(b * 16), 0), "remaining lines found");
    end
    cycle(blk_t'(48), 1, '0, 0, '0, '0);
    cycle(blk_t'(48), 0, '0, 0, '0, '0);
    check(!lk_hit, "taken line removed");
    for (int n = 0; n < 6000; n++) begin
      blk_t b;
      b = blk_t'($urandom_range(0, 9));
      cycle(blk_t'($urandom_range(0, 9)), 1'($urandom), blk_t'($urandom_range(0, 9)),
            $urandom_range(0, 2) == 0, b, line_of(b, n));
    end
    check(n_vhit > 100, "hits exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
