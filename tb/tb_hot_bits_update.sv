// tb_hot_bits_update: checks the hot-bit next-state logic of one 4-way set.
//
// First the worked example of an Instant Zero update: priorities 2,3,1,0 on lines
// 0..3, line 0 an IAP line that is referenced, giving 0,3,2,1. Then random operation
// sequences are compared with an independent model that keeps the lines of the set as
// an ordered list (front = next victim): LRU and fill move a line to the back,
// Instant Zero to the front, a pre-update swaps it with its neighbour towards the front.
module tb_hot_bits_update;
  import cache_pkg::*;

  localparam int W = 4;

  logic [W-1:0][1:0] hot_i, hot_o;
  logic [W-1:0]      valid_i;
  hot_op_e           op;
  logic [1:0]        way, victim;
  logic              clk = 1'b0;

  hot_bits_update #(.WAYS(W)) dut (
    .hot_i, .valid_i, .op_i(op), .way_i(way), .hot_o, .victim_o(victim)
  );

  int checks = 0, failures = 0;
  int order[$];   // order[0] is the lowest priority

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [W-1:0][1:0] from_order();
    logic [W-1:0][1:0] h;
    foreach (order[i]) h[order[i]] = 2'(i);
    return h;
  endfunction

  function automatic int pos_of(int w);
    foreach (order[i]) if (order[i] == w) return i;
    return -1;
  endfunction

  initial begin
    // worked example
    hot_i   = {2'b00, 2'b01, 2'b11, 2'b10};   // lines 3,2,1,0
    valid_i = '1;
    op      = HOP_IZ;
    way     = 2'd0;
    #1;
    check(hot_o == {2'b01, 2'b10, 2'b11, 2'b00}, $sformatf("IZ example got %b", hot_o));
    op = HOP_LRU; way = 2'd3;
    #1;
    check(hot_o == {2'b11, 2'b00, 2'b10, 2'b01}, $sformatf("LRU example got %b", hot_o));
    check(victim == 2'd3, "victim of the example set is line 3");
    op = HOP_NONE;
    #1;
    check(hot_o == hot_i, "no-op keeps priorities");

    // random sequences
    order = '{0, 1, 2, 3};
    for (int n = 0; n < 4000; n++) begin
      int w, p, vexp;
      hot_i   = from_order();
      valid_i = 4'($urandom);
      w       = $urandom_range(0, W - 1);
      way     = 2'(w);
      case ($urandom_range(0, 3))
        0: op = HOP_LRU;
        1: op = HOP_IZ;
        2: op = HOP_FILL;
        default: op = HOP_DEC;
      endcase
      #1;
      vexp = -1;
      for (int i = 0; i < W; i++) if (vexp < 0 && !valid_i[i]) vexp = i;
      if (vexp < 0) vexp = order[0];
      check(victim == 2'(vexp), $sformatf("victim %0d exp %0d", victim, vexp));
      p = pos_of(w);
      case (op)
        HOP_LRU, HOP_FILL: begin order.delete(p); order.push_back(w); end
        HOP_IZ:            begin order.delete(p); order.push_front(w); end
        HOP_DEC:           if (p > 0) begin order[p] = order[p-1]; order[p-1] = w; end
        default: ;
      endcase
      check(hot_o == from_order(), $sformatf("op %s way %0d: got %b exp %b", op.name(), w,
                                             hot_o, from_order()));
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
