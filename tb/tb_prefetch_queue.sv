// tb_prefetch_queue: checks the 8-entry prefetch request FIFO against a queue model.
//
// Random pushes (often of blocks already waiting, to exercise duplicate dropping) and
// pops; the head, the full flag and the drop indication are compared every cycle.
// A first directed phase fills the queue to its eight entries and checks that a ninth
// request is dropped.
module tb_prefetch_queue;
  import cache_pkg::*;

  logic    clk = 1'b0, rst_n;
  logic    push, pop, head_valid, full, dropped;
  pf_req_t req, head;

  prefetch_queue dut (
    .clk, .rst_n, .push_i(push), .req_i(req), .pop_i(pop), .head_valid_o(head_valid),
    .head_o(head), .full_o(full), .dropped_o(dropped)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  pf_req_t model[$];

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // one cycle: drive at the falling edge, compare, then let the rising edge act
  task automatic cycle(bit pu, pf_req_t r, bit po);
    bit dup, exp_push;
    @(negedge clk);
    push = pu; req = r; pop = po && (model.size() != 0);
    #1;
    check(head_valid == (model.size() != 0), "head_valid");
    if (model.size() != 0) check(head == model[0], "head");
    check(full == (model.size() == 8), "full");
    dup = 1'b0;
    foreach (model[i]) if (model[i].blk == r.blk) dup = 1'b1;
    exp_push = pu && !dup && (model.size() < 8 || pop);
    check(dropped == (pu && !exp_push), "dropped");
    @(posedge clk);
    if (pop) void'(model.pop_front());
    if (exp_push) model.push_back(r);
  endtask

  function automatic pf_req_t rnd_req(int range);
    pf_req_t r;
    r.blk  = blk_t'($urandom_range(0, range));
    r.kind = ($urandom_range(0, 1)) ? PF_IAP : PF_POM;
    r.iz   = 1'($urandom);
    return r;
  endfunction

  initial begin
    rst_n = 1'b0; push = 0; pop = 0; req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 9; i++) cycle(1, '{blk: blk_t'(100 + i), kind: PF_IAP, iz: 1'b0}, 0);
    check(model.size() == 8, "eight entries held");
    for (int i = 0; i < 8; i++) cycle(0, '0, 1);
    for (int n = 0; n < 5000; n++)
      cycle($urandom_range(0, 2) != 0, rnd_req(20), $urandom_range(0, 2) == 0);
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
