// l2_mem_model: behavioural model of the interleaved second-level cache / memory.
//
// Not synthesizable. It is infinitely large (a line never written holds a pattern
// computed from its block address, see init_word) and serves one request at a time.
// A line of LINE_WORDS words comes back C1 + C2*(LINE_WORDS-1) cycles after the
// request (startup plus one bus cycle per further word, from the banks working in
// parallel). A request for the block right after the one just finished, made in the
// next cycle, has its startup hidden by the banks and takes C2*LINE_WORDS cycles.
// A request arriving while another is in service aborts it and starts one cycle
// later. Write-backs are absorbed at once.
module l2_mem_model #(
  parameter int unsigned C1 = 6,
  parameter int unsigned C2 = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid_i,
  input  cache_pkg::blk_t   req_blk_i,
  input  logic              req_pf_i,
  output logic              rvalid_o,
  output cache_pkg::line_t  rline_o,
  input  logic              wb_valid_i,
  input  cache_pkg::blk_t   wb_blk_i,
  input  cache_pkg::line_t  wb_line_i,
  output int unsigned       aborts_o,
  output int unsigned       reads_o,
  output int unsigned       writes_o
);
  import cache_pkg::*;

  line_t mem [blk_t];

  logic        busy;
  int unsigned cnt;
  blk_t        cur_blk, last_blk;
  logic        last_done;   // a request finished in the previous cycle
  logic        unused_pf;

  function automatic word_t init_word(blk_t b, int unsigned i);
    return (32'(b) * 32'(LINE_WORDS) + 32'(i)) ^ 32'h5A5A_0000;
  endfunction

  function automatic line_t read_line(blk_t b);
    line_t l;
    if (mem.exists(b)) return mem[b];
    for (int unsigned i = 0; i < LINE_WORDS; i++) l[i*WORD_W +: WORD_W] = init_word(b, i);
    return l;
  endfunction

  assign unused_pf = req_pf_i;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      cnt       <= 0;
      rvalid_o  <= 1'b0;
      rline_o   <= '0;
      last_done <= 1'b0;
      last_blk  <= '0;
      cur_blk   <= '0;
      aborts_o  <= 0;
      reads_o   <= 0;
      writes_o  <= 0;
    end else begin
      rvalid_o  <= 1'b0;
      last_done <= 1'b0;
      if (wb_valid_i) begin
        mem[wb_blk_i] = wb_line_i;
        writes_o <= writes_o + 1;
      end
      if (req_valid_i) begin
        busy    <= 1'b1;
        cur_blk <= req_blk_i;
        reads_o <= reads_o + 1;
        if (busy) begin
          aborts_o <= aborts_o + 1;
          cnt      <= C1 + C2 * (LINE_WORDS - 1) + 1;
        end else if ((last_done || rvalid_o) && req_blk_i == last_blk + 1'b1)
          cnt <= C2 * LINE_WORDS;
        else
          cnt <= C1 + C2 * (LINE_WORDS - 1);
      end else if (busy) begin
        if (cnt == 1) begin
          busy      <= 1'b0;
          rvalid_o  <= 1'b1;
          rline_o   <= read_line(cur_blk);
          last_blk  <= cur_blk;
          last_done <= 1'b1;
        end
        cnt <= cnt - 1;
      end
    end
  end

endmodule
