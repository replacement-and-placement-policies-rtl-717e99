// set_assoc_cache: set-associative, write-back line store with hot-bit replacement.
//
// Each line holds the fields of the set layout used for the prefetch-aware data
// cache: dirty bit D, hot bits H (the priority, $clog2(WAYS) bits), IAP bit I, valid
// bit S, the tag and the data line; plus one flag of this design, "prefetched and
// not yet referenced", which the victim cache policy needs. The same module serves
// as the 16 KB 4-way data cache (LRU with Instant Zero) and, with FIFO = 1, as the
// 1 KB prefetch cache (FIFO replacement: references leave the priorities alone).
//
// Ports:
//   * access port (addr_i): lookup is combinational (hit_o, way_o, rdata_o, flags).
//     With acc_i high, the reference is performed at the clock edge: a store writes
//     one word and sets D, the line is marked referenced, and the hot bits follow
//     LRU, or Instant Zero if the line's I bit is set and iz_en_i is high.
//   * probe port (probe_blk_i): combinational presence check for one block.
//   * fill port: vic_* show, combinationally, the line that a fill of fill_blk_i
//     would displace (the first invalid way, else priority 0). With fill_i high the
//     new line replaces it at the clock edge and takes the highest priority.
//     fill_set_o and the set-index bits of vic_blk_o are the index bits of fill_blk_i,
//     brought out so that the caller need not slice them again.
//   * decrement port: dec_i lowers the priority of (dec_set_i, dec_way_i) by one.
//     It is accepted (dec_ack_o) unless an access or fill touches the same set in
//     that cycle.
// Access and fill must not be asserted together. Synchronous active-low reset
// invalidates all lines and sets the priorities of every set to 0,1,..,WAYS-1.
module set_assoc_cache #(
  parameter int unsigned SETS = 128,
  parameter int unsigned WAYS = 4,
  parameter bit          FIFO = 1'b0,
  localparam int unsigned HW  = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned SW  = (SETS > 1) ? $clog2(SETS) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // access port
  input  cache_pkg::addr_t        addr_i,
  input  logic                    acc_i,
  input  logic                    we_i,
  input  cache_pkg::word_t        wdata_i,
  input  logic                    iz_en_i,
  output logic                    hit_o,
  output logic [HW-1:0]           way_o,
  output cache_pkg::word_t        rdata_o,
  output logic                    hit_iap_o,
  output logic                    hit_pf_unref_o,
  // probe port
  input  cache_pkg::blk_t         probe_blk_i,
  output logic                    probe_hit_o,
  // fill port
  input  logic                    fill_i,
  input  cache_pkg::blk_t         fill_blk_i,
  input  cache_pkg::line_t        fill_line_i,
  input  cache_pkg::line_flags_t  fill_flags_i,
  output logic                    vic_valid_o,
  output cache_pkg::blk_t         vic_blk_o,
  output cache_pkg::line_t        vic_line_o,
  output cache_pkg::line_flags_t  vic_flags_o,
  output logic [HW-1:0]           vic_way_o,
  output logic [SW-1:0]           fill_set_o,
  // priority decrement port
  input  logic                    dec_i,
  input  logic [SW-1:0]           dec_set_i,
  input  logic [HW-1:0]           dec_way_i,
  output logic                    dec_ack_o
);
  import cache_pkg::*;

  localparam int unsigned TAG_W = BLK_W - ((SETS > 1) ? SW : 0);
  typedef logic [TAG_W-1:0] tag_t;

  tag_t                   tag_q   [SETS][WAYS];
  logic [WAYS-1:0]        val_q   [SETS];
  logic [WAYS-1:0]        dirty_q [SETS];
  logic [WAYS-1:0]        iap_q   [SETS];
  logic [WAYS-1:0]        pfu_q   [SETS];
  logic [WAYS-1:0][HW-1:0] hot_q  [SETS];
  line_t                  data_q  [SETS][WAYS];

  function automatic logic [SW-1:0] set_of(blk_t b);
    return (SETS > 1) ? SW'(b) : '0;
  endfunction
  function automatic tag_t tag_of(blk_t b);
    return tag_t'(b >> ((SETS > 1) ? SW : 0));
  endfunction

  // ---------------- access lookup ----------------
  blk_t            a_blk;
  logic [SW-1:0]   a_set;
  logic [WORD_SEL_W-1:0] a_word;

  always_comb begin
    a_blk  = blk_of(addr_i);
    a_set  = set_of(a_blk);
    a_word = addr_i[OFFSET_W-1:2];
    hit_o  = 1'b0;
    way_o  = '0;
    for (int unsigned w = 0; w < WAYS; w++)
      if (val_q[a_set][w] && tag_q[a_set][w] == tag_of(a_blk)) begin
        hit_o = 1'b1;
        way_o = HW'(w);
      end
    rdata_o        = data_q[a_set][way_o][a_word*WORD_W +: WORD_W];
    hit_iap_o      = iap_q[a_set][way_o];
    hit_pf_unref_o = pfu_q[a_set][way_o];
  end

  // ---------------- probe ----------------
  always_comb begin
    logic [SW-1:0] ps;
    ps          = set_of(probe_blk_i);
    probe_hit_o = 1'b0;
    for (int unsigned w = 0; w < WAYS; w++)
      if (val_q[ps][w] && tag_q[ps][w] == tag_of(probe_blk_i)) probe_hit_o = 1'b1;
  end

  // ---------------- hot-bit logic: port A (access or fill) ----------------
  logic [SW-1:0]           f_set, op_set;
  logic [WAYS-1:0][HW-1:0] hot_a_new, hot_d_new;
  logic [HW-1:0]           vic_way, unused_victim;
  hot_op_e                 op_a;
  logic [HW-1:0]           op_way;

  assign f_set = set_of(fill_blk_i);

  always_comb begin
    op_a   = HOP_NONE;
    op_set = a_set;
    op_way = way_o;
    if (fill_i) begin
      op_a   = HOP_FILL;
      op_set = f_set;
      op_way = vic_way;
    end else if (acc_i && hit_o && !FIFO) begin
      op_a = (iz_en_i && iap_q[a_set][way_o]) ? HOP_IZ : HOP_LRU;
    end
  end

  hot_bits_update #(.WAYS(WAYS)) u_hot_a (
    .hot_i   (hot_q[fill_i ? f_set : a_set]),
    .valid_i (val_q[fill_i ? f_set : a_set]),
    .op_i    (op_a),
    .way_i   (op_way),
    .hot_o   (hot_a_new),
    .victim_o(vic_way)
  );

  hot_bits_update #(.WAYS(WAYS)) u_hot_d (
    .hot_i   (hot_q[dec_set_i]),
    .valid_i (val_q[dec_set_i]),
    .op_i    (HOP_DEC),
    .way_i   (dec_way_i),
    .hot_o   (hot_d_new),
    .victim_o(unused_victim)
  );

  assign dec_ack_o = dec_i && !((fill_i || (acc_i && hit_o)) && dec_set_i == op_set);

  // victim of a fill
  assign vic_way_o   = vic_way;
  assign fill_set_o  = f_set;
  assign vic_valid_o = val_q[f_set][vic_way];
  assign vic_line_o  = data_q[f_set][vic_way];
  assign vic_flags_o = '{dirty: dirty_q[f_set][vic_way], iap: iap_q[f_set][vic_way],
                         pf_unref: pfu_q[f_set][vic_way]};
  assign vic_blk_o   = (SETS > 1) ? blk_t'({tag_q[f_set][vic_way], f_set})
                                  : blk_t'(tag_q[f_set][vic_way]);

  // ---------------- state update ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < SETS; s++) begin
        val_q[s] <= '0;
        dirty_q[s] <= '0;
        iap_q[s] <= '0;
        pfu_q[s] <= '0;
        for (int unsigned w = 0; w < WAYS; w++) hot_q[s][w] <= HW'(w);
      end
    end else begin
      if (dec_ack_o) hot_q[dec_set_i] <= hot_d_new;
      if (fill_i) begin
        hot_q[f_set]            <= hot_a_new;
        val_q[f_set][vic_way]   <= 1'b1;
        tag_q[f_set][vic_way]   <= tag_of(fill_blk_i);
        data_q[f_set][vic_way]  <= fill_line_i;
        dirty_q[f_set][vic_way] <= fill_flags_i.dirty;
        iap_q[f_set][vic_way]   <= fill_flags_i.iap;
        pfu_q[f_set][vic_way]   <= fill_flags_i.pf_unref;
      end else if (acc_i && hit_o) begin
        if (!FIFO) hot_q[a_set] <= hot_a_new;
        pfu_q[a_set][way_o] <= 1'b0;
        if (we_i) begin
          data_q[a_set][way_o][a_word*WORD_W +: WORD_W] <= wdata_i;
          dirty_q[a_set][way_o] <= 1'b1;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(fill_i && acc_i))
    else $error("set_assoc_cache: access and fill in the same cycle");

endmodule
