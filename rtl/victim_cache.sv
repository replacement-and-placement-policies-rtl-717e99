// victim_cache: small fully-associative buffer for unreferenced prefetched lines.
//
// Lines that the data cache displaces while still prefetched-but-unreferenced are
// kept here (four entries of one line each) so that a late first reference finds them
// on chip. Replacement is FIFO: when the buffer is full, an insertion displaces the
// oldest line. Entries are kept in age order, entry 0 the oldest.
//   * lk_blk_i is looked up combinationally (lk_hit_o, lk_line_o). With take_i high on
//     a hit the line is removed at the clock edge: it moves back into the data cache.
//   * probe_blk_i is a second presence check, used to skip redundant prefetches.
//   * ins_i inserts ins_blk_i / ins_line_i at the tail.
// The lines held are unreferenced, hence clean, so a displaced line is simply
// dropped. Synchronous active-low reset empties the buffer.
module victim_cache #(
  parameter int unsigned ENTRIES = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cache_pkg::blk_t   lk_blk_i,
  output logic              lk_hit_o,
  output cache_pkg::line_t  lk_line_o,
  input  logic              take_i,
  input  cache_pkg::blk_t   probe_blk_i,
  output logic              probe_hit_o,
  input  logic              ins_i,
  input  cache_pkg::blk_t   ins_blk_i,
  input  cache_pkg::line_t  ins_line_i,
  output logic              displaced_o   // an insertion pushed out the oldest line
);
  import cache_pkg::*;

  typedef struct packed {
    logic  valid;
    blk_t  blk;
    line_t line;
  } vent_t;

  vent_t ent_q [ENTRIES];
  vent_t ent_d [ENTRIES];

  int unsigned hit_idx;

  always_comb begin
    lk_hit_o    = 1'b0;
    hit_idx     = 0;
    probe_hit_o = 1'b0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (ent_q[i].valid && ent_q[i].blk == lk_blk_i) begin
        lk_hit_o = 1'b1;
        hit_idx  = i;
      end
      if (ent_q[i].valid && ent_q[i].blk == probe_blk_i) probe_hit_o = 1'b1;
    end
    lk_line_o = ent_q[hit_idx].line;
  end

  always_comb begin
    int unsigned n;
    n           = 0;
    displaced_o = 1'b0;
    for (int unsigned i = 0; i < ENTRIES; i++) ent_d[i] = '0;
    for (int unsigned i = 0; i < ENTRIES; i++)
      if (ent_q[i].valid && !(take_i && lk_hit_o && i == hit_idx)) begin
        ent_d[n] = ent_q[i];
        n++;
      end
    if (ins_i) begin
      if (n == ENTRIES) begin
        for (int unsigned i = 0; i + 1 < ENTRIES; i++) ent_d[i] = ent_d[i+1];
        n           = ENTRIES - 1;
        displaced_o = 1'b1;
      end
      ent_d[n] = '{valid: 1'b1, blk: ins_blk_i, line: ins_line_i};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < ENTRIES; i++) ent_q[i].valid <= 1'b0;
    end else begin
      for (int unsigned i = 0; i < ENTRIES; i++) ent_q[i] <= ent_d[i];
    end
  end

endmodule
