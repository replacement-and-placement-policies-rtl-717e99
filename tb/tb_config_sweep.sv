// tb_config_sweep: runs the cache subsystem at the other sizes its evaluation sweeps.
//
// Nine instances of cache_sys_harness run side by side from one clock and reset:
//   8 KB and 32 KB 4-way data caches, 16 KB direct-mapped and 2-way data caches
//   (all with the 1 KB fully-associative FIFO prefetch cache); 16 KB 4-way data caches
//   with a 256 B fully-associative, a 4 KB fully-associative and a 1 KB 4-way
//   prefetch cache; and the 1 KB fully-associative prefetch cache with LRU and with
//   Instant Zero replacement in place of FIFO.
// Each harness checks its loads against a reference memory, its hit latency and
// that a region of half its data-cache size stays resident; see cache_sys_harness.
// The line size stays at 32 bytes. The sum of all checks and failures is reported.
module tb_config_sweep;

  localparam int N = 9;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int   checks [N];
  int   failures [N];
  logic done [N];

  cache_sys_harness #(.DC_SETS(64),  .DC_WAYS(4))  h_8k   (.clk, .rst_n, .checks_o(checks[0]), .failures_o(failures[0]), .done_o(done[0]));
  cache_sys_harness #(.DC_SETS(256), .DC_WAYS(4))  h_32k  (.clk, .rst_n, .checks_o(checks[1]), .failures_o(failures[1]), .done_o(done[1]));
  cache_sys_harness #(.DC_SETS(512), .DC_WAYS(1))  h_dm   (.clk, .rst_n, .checks_o(checks[2]), .failures_o(failures[2]), .done_o(done[2]));
  cache_sys_harness #(.DC_SETS(256), .DC_WAYS(2))  h_2w   (.clk, .rst_n, .checks_o(checks[3]), .failures_o(failures[3]), .done_o(done[3]));
  cache_sys_harness #(.PFC_SETS(1), .PFC_WAYS(8))   h_p256 (.clk, .rst_n, .checks_o(checks[4]), .failures_o(failures[4]), .done_o(done[4]));
  cache_sys_harness #(.PFC_SETS(1), .PFC_WAYS(128)) h_p4k  (.clk, .rst_n, .checks_o(checks[5]), .failures_o(failures[5]), .done_o(done[5]));
  cache_sys_harness #(.PFC_SETS(8), .PFC_WAYS(4))   h_p4w  (.clk, .rst_n, .checks_o(checks[6]), .failures_o(failures[6]), .done_o(done[6]));
  cache_sys_harness #(.PFC_REPL(cache_pkg::PFC_LRU)) h_plru (.clk, .rst_n, .checks_o(checks[7]), .failures_o(failures[7]), .done_o(done[7]));
  cache_sys_harness #(.PFC_REPL(cache_pkg::PFC_IZ))  h_piz  (.clk, .rst_n, .checks_o(checks[8]), .failures_o(failures[8]), .done_o(done[8]));

  int total_checks, total_failures;

  task automatic report(int extra);
    total_checks = 0;
    total_failures = extra;
    for (int i = 0; i < N; i++) begin
      total_checks   += checks[i];
      total_failures += failures[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
    $finish;
  endtask

  initial begin
    bit all;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    do begin
      @(posedge clk);
      all = 1'b1;
      for (int i = 0; i < N; i++) if (!done[i]) all = 1'b0;
    end while (!all);
    report(0);
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    $display("watchdog expired");
    report(1);
  end

endmodule
