// hot_bits_update: next-state logic for the hot bits (priorities) of one cache set.
//
// Every line of a set holds a priority 0 .. WAYS-1; together they form a permutation,
// 0 being the line that goes first. The operations are those described for the
// data cache's mixed LRU / Instant Zero policy:
//   HOP_LRU  - the referenced line takes the highest priority; lines above its old
//              priority move down by one, the rest keep theirs.
//   HOP_IZ   - a referenced IAP line drops to 0 at once; lines below its old
//              priority move up by one, the rest keep theirs (Instant Zero).
//   HOP_FILL - the line placed in `way` takes the highest priority, exactly as HOP_LRU.
//              A fill normally goes to the 0-priority victim, so every other line
//              moves down by one.
//   HOP_DEC  - priority pre-update: the line's priority drops by one and the line
//              just below it moves up into its place. Decrementing by a swap keeps the
//              priorities a permutation; that is this design's reading of "decrement
//              by 1".
// FIFO replacement (used in the prefetch cache) is obtained by issuing only HOP_FILL.
// `victim` is the lowest-numbered invalid way, or else the way of priority 0.
// Purely combinational.
module hot_bits_update #(
  parameter int unsigned WAYS = 4,
  localparam int unsigned HW  = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic [WAYS-1:0][HW-1:0] hot_i,
  input  logic [WAYS-1:0]         valid_i,
  input  cache_pkg::hot_op_e      op_i,
  input  logic [HW-1:0]           way_i,
  output logic [WAYS-1:0][HW-1:0] hot_o,
  output logic [HW-1:0]           victim_o
);
  import cache_pkg::*;

  localparam logic [HW-1:0] TOP = HW'(WAYS - 1);

  logic [HW-1:0] p;

  always_comb begin
    p     = hot_i[way_i];
    hot_o = hot_i;
    unique case (op_i)
      HOP_LRU, HOP_FILL: begin
        for (int unsigned v = 0; v < WAYS; v++)
          if (hot_i[v] > p) hot_o[v] = hot_i[v] - 1'b1;
        hot_o[way_i] = TOP;
      end
      HOP_IZ: begin
        for (int unsigned v = 0; v < WAYS; v++)
          if (hot_i[v] < p) hot_o[v] = hot_i[v] + 1'b1;
        hot_o[way_i] = '0;
      end
      HOP_DEC: begin
        if (p != '0) begin
          for (int unsigned v = 0; v < WAYS; v++)
            if (hot_i[v] == p - 1'b1) hot_o[v] = p;
          hot_o[way_i] = p - 1'b1;
        end
      end
      default: ;
    endcase
  end

  always_comb begin
    logic found;
    found    = 1'b0;
    victim_o = '0;
    for (int unsigned v = 0; v < WAYS; v++)
      if (!found && !valid_i[v]) begin
        victim_o = HW'(v);
        found    = 1'b1;
      end
    for (int unsigned v = 0; v < WAYS; v++)
      if (!found && hot_i[v] == '0) begin
        victim_o = HW'(v);
        found    = 1'b1;
      end
  end

endmodule
