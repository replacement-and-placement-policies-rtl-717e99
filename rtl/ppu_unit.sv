// ppu_unit: Priority Pre-Updating unit.
//
// Keeps the prefetched lines that sit in the data cache, unreferenced, in the order
// they were prefetched (entry 0 is the oldest). Each entry names a cache line by set
// and way. Rules:
//   * ins_i records a newly installed prefetched line at the tail. When the unit is
//     full the oldest record is dropped (capacity and this drop are this design's
//     choice; the policy only says that all prefetched lines are recorded).
//   * ref_i reports a reference to a cache line. If the line is recorded, every older
//     record (all of them are unreferenced, since a referenced line leaves the unit)
//     owes one priority decrement, and the referenced line's record is deleted.
//   * evict_i reports that a cache line was displaced; its record is deleted.
//   * Owed decrements are paid one per cycle, oldest record first: dec_valid_o with
//     dec_set_o / dec_way_o asks the cache to lower that line's priority by one, and
//     dec_ack_i says it was done. Up to three owed decrements are counted per record.
// Applying the decrements serially, and between cache accesses, is this design's
// choice; priorities of lines in other sets thus change a few cycles after the
// reference. In one cycle the order is: acknowledge, reference, eviction, insertion.
// Synchronous active-low reset clears the unit.
module ppu_unit #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned SW    = 7,     // set index width of the data cache
  parameter int unsigned HW    = 2      // way index width of the data cache
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ins_i,
  input  logic [SW-1:0] ins_set_i,
  input  logic [HW-1:0] ins_way_i,
  input  logic          ref_i,
  input  logic [SW-1:0] ref_set_i,
  input  logic [HW-1:0] ref_way_i,
  input  logic          evict_i,
  input  logic [SW-1:0] evict_set_i,
  input  logic [HW-1:0] evict_way_i,
  output logic          dec_valid_o,
  output logic [SW-1:0] dec_set_o,
  output logic [HW-1:0] dec_way_o,
  input  logic          dec_ack_i,
  output logic          ref_found_o,   // the reference hit a recorded line
  output logic [$clog2(DEPTH+1)-1:0] count_o
);

  typedef struct packed {
    logic          valid;
    logic [SW-1:0] set;
    logic [HW-1:0] way;
    logic [1:0]    pend;
  } ent_t;

  ent_t ent_q [DEPTH];
  ent_t ent_d [DEPTH];
  ent_t tmp   [DEPTH];

  int unsigned dec_idx;

  always_comb begin
    dec_valid_o = 1'b0;
    dec_idx     = 0;
    for (int i = DEPTH - 1; i >= 0; i--)
      if (ent_q[i].valid && ent_q[i].pend != 2'd0) begin
        dec_valid_o = 1'b1;
        dec_idx     = unsigned'(i);
      end
    dec_set_o = ent_q[dec_idx].set;
    dec_way_o = ent_q[dec_idx].way;
  end

  always_comb begin
    int unsigned n, k;
    logic        found;
    tmp   = ent_q;
    found = 1'b0;
    k     = 0;
    if (dec_valid_o && dec_ack_i) tmp[dec_idx].pend = tmp[dec_idx].pend - 2'd1;
    if (ref_i)
      for (int unsigned i = 0; i < DEPTH; i++)
        if (!found && tmp[i].valid && tmp[i].set == ref_set_i && tmp[i].way == ref_way_i) begin
          found = 1'b1;
          k     = i;
        end
    if (found) begin
      for (int unsigned i = 0; i < DEPTH; i++)
        if (i < k && tmp[i].valid && tmp[i].pend != 2'd3) tmp[i].pend = tmp[i].pend + 2'd1;
      tmp[k].valid = 1'b0;
    end
    if (evict_i)
      for (int unsigned i = 0; i < DEPTH; i++)
        if (tmp[i].valid && tmp[i].set == evict_set_i && tmp[i].way == evict_way_i)
          tmp[i].valid = 1'b0;
    // compact, keeping the order
    n = 0;
    for (int unsigned i = 0; i < DEPTH; i++) ent_d[i] = '0;
    for (int unsigned i = 0; i < DEPTH; i++)
      if (tmp[i].valid) begin
        ent_d[n] = tmp[i];
        n++;
      end
    if (ins_i) begin
      if (n == DEPTH) begin
        for (int unsigned i = 0; i + 1 < DEPTH; i++) ent_d[i] = ent_d[i+1];
        n = DEPTH - 1;
      end
      ent_d[n] = '{valid: 1'b1, set: ins_set_i, way: ins_way_i, pend: 2'd0};
    end
    ref_found_o = found;
  end

  always_comb begin
    count_o = '0;
    for (int unsigned i = 0; i < DEPTH; i++)
      if (ent_q[i].valid) count_o = count_o + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < DEPTH; i++) ent_q[i] <= '0;
    end else begin
      for (int unsigned i = 0; i < DEPTH; i++) ent_q[i] <= ent_d[i];
    end
  end

endmodule
