// iap_prefetch_unit: prefetch address generation of the combined IAP scheme.
//
// For each data reference the processor reports the effective address, whether the
// instruction is a LOAD/STORE-UPDATE, and the stride it adds to the index register
// (the displacement Disp in index-displacement mode, the content of Ry in index-based
// register mode). The next expected datum is at EA + stride.
//   * LOAD/STORE-UPDATE with IAP enabled: if EA + stride lies in another block j, a
//     prefetch of j is requested (it obeys LRU). If it lies in the current block i, the
//     neighbouring block in the stride's direction (i+1, or i-1 for a negative stride)
//     is requested instead and is marked to obey Instant Zero.
//   * Any other reference (or every reference with IAP disabled): the default
//     prefetch-on-miss requests block i+1 when the reference missed.
// Combinational; the request is valid in the cycle the reference is presented.
// Next-block for prefetch-on-miss, and i-1 for a negative stride, are this design's
// reading of "the block preceding it or following it".
module iap_prefetch_unit (
  input  logic              ref_valid_i,
  input  cache_pkg::addr_t  ea_i,         // effective address of the reference
  input  logic              upd_i,        // LOAD/STORE-UPDATE instruction
  input  cache_pkg::word_t  stride_i,     // Disp or (Ry), two's complement
  input  logic              miss_i,       // the reference missed in the cache
  input  logic              iap_en_i,     // combined IAP enabled
  output logic              pf_valid_o,
  output cache_pkg::pf_req_t pf_o
);
  import cache_pkg::*;

  addr_t next_ea;
  blk_t  cur_blk, next_blk;

  always_comb begin
    next_ea    = ea_i + stride_i;
    cur_blk    = blk_of(ea_i);
    next_blk   = blk_of(next_ea);
    pf_valid_o = 1'b0;
    pf_o       = '{blk: cur_blk + 1'b1, kind: PF_NONE, iz: 1'b0};
    if (ref_valid_i) begin
      if (iap_en_i && upd_i) begin
        pf_valid_o = 1'b1;
        pf_o.kind  = PF_IAP;
        if (next_blk != cur_blk) begin
          pf_o.blk = next_blk;
          pf_o.iz  = 1'b0;
        end else begin
          pf_o.blk = stride_i[WORD_W-1] ? cur_blk - 1'b1 : cur_blk + 1'b1;
          pf_o.iz  = 1'b1;
        end
      end else if (miss_i) begin
        pf_valid_o = 1'b1;
        pf_o.kind  = PF_POM;
      end
    end
  end

endmodule
