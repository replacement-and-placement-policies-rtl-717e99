// tb_ppu_unit: checks the Priority Pre-Updating unit against a list model.
//
// Directed part: three prefetched lines A, B, C are recorded; a reference to C must
// request one decrement for A and one for B (oldest first) and delete C, and a later
// reference to A deletes A without further requests. Random part: insertions,
// references, evictions and decrement acknowledgements, compared every cycle with a
// model that keeps the records in prefetch order with their owed decrements.
module tb_ppu_unit;

  localparam int DEPTH = 8, SW = 3, HW = 2;

  logic          clk = 1'b0, rst_n;
  logic          ins, refv, evict, dec_valid, dec_ack, ref_found;
  logic [SW-1:0] ins_set, ref_set, evict_set, dec_set;
  logic [HW-1:0] ins_way, ref_way, evict_way, dec_way;
  logic [3:0]    count;

  ppu_unit #(.DEPTH(DEPTH), .SW(SW), .HW(HW)) dut (
    .clk, .rst_n, .ins_i(ins), .ins_set_i(ins_set), .ins_way_i(ins_way),
    .ref_i(refv), .ref_set_i(ref_set), .ref_way_i(ref_way),
    .evict_i(evict), .evict_set_i(evict_set), .evict_way_i(evict_way),
    .dec_valid_o(dec_valid), .dec_set_o(dec_set), .dec_way_o(dec_way), .dec_ack_i(dec_ack),
    .ref_found_o(ref_found), .count_o(count)
  );

  always #5 clk = ~clk;

  typedef struct { int set; int way; int pend; } rec_t;
  rec_t m[$];
  int checks = 0, failures = 0;
  int n_dec = 0;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // drive one cycle, compare, update the model
  task automatic cycle(bit i, int is, int iw, bit r, int rs, int rw, bit e, int es, int ew,
                       bit ack);
    int di, k;
    @(negedge clk);
    ins = i; ins_set = SW'(is); ins_way = HW'(iw);
    refv = r; ref_set = SW'(rs); ref_way = HW'(rw);
    evict = e; evict_set = SW'(es); evict_way = HW'(ew);
    dec_ack = ack;
    #1;
    di = -1;
    foreach (m[j]) if (di < 0 && m[j].pend > 0) di = j;
    check(dec_valid == (di >= 0), "dec_valid");
    if (di >= 0) check(dec_set == SW'(m[di].set) && dec_way == HW'(m[di].way),
                       $sformatf("dec target %0d/%0d exp %0d/%0d", dec_set, dec_way,
                                 m[di].set, m[di].way));
    check(count == 4'(m.size()), "count");
    k = -1;
    if (r) foreach (m[j]) if (k < 0 && m[j].set == rs && m[j].way == rw) k = j;
    check(ref_found == (k >= 0), "ref_found");
    @(posedge clk);
    #1;
    ins = 0; refv = 0; evict = 0; dec_ack = 0;
    if (di >= 0 && ack) begin m[di].pend--; n_dec++; end
    if (k >= 0) begin
      for (int j = 0; j < k; j++) if (m[j].pend < 3) m[j].pend++;
      m.delete(k);
    end
    if (e) for (int j = m.size() - 1; j >= 0; j--)
      if (m[j].set == es && m[j].way == ew) m.delete(j);
    if (i) begin
      if (m.size() == DEPTH) void'(m.pop_front());
      m.push_back('{set: is, way: iw, pend: 0});
    end
  endtask

  initial begin
    rst_n = 0; ins = 0; refv = 0; evict = 0; dec_ack = 0;
    ins_set = 0; ins_way = 0; ref_set = 0; ref_way = 0; evict_set = 0; evict_way = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // directed: A=(1,0) B=(2,1) C=(3,2)
    cycle(1, 1, 0, 0, 0, 0, 0, 0, 0, 0);
    cycle(1, 2, 1, 0, 0, 0, 0, 0, 0, 0);
    cycle(1, 3, 2, 0, 0, 0, 0, 0, 0, 0);
    cycle(0, 0, 0, 1, 3, 2, 0, 0, 0, 0);   // reference C
    check(m.size() == 2 && m[0].pend == 1 && m[1].pend == 1, "A and B owe one decrement");
    @(negedge clk); #1;
    check(dec_valid && dec_set == 3'd1 && dec_way == 2'd0, "A is decremented first");
    cycle(0, 0, 0, 0, 0, 0, 0, 0, 0, 1);
    @(negedge clk); #1;
    check(dec_valid && dec_set == 3'd2 && dec_way == 2'd1, "then B");
    cycle(0, 0, 0, 0, 0, 0, 0, 0, 0, 1);
    @(negedge clk); #1;
    check(!dec_valid, "nothing more owed");
    cycle(0, 0, 0, 1, 1, 0, 0, 0, 0, 0);   // reference A: oldest, nothing before it
    check(m.size() == 1, "A deleted");
    // random
    for (int n = 0; n < 6000; n++)
      cycle($urandom_range(0, 2) == 0, $urandom_range(0, 7), $urandom_range(0, 3),
            $urandom_range(0, 2) == 0, $urandom_range(0, 7), $urandom_range(0, 3),
            $urandom_range(0, 5) == 0, $urandom_range(0, 7), $urandom_range(0, 3),
            1'($urandom));
    check(n_dec > 10, "decrements exercised");
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
