// tb_splics_configs: the split latency cache in each evaluated configuration.
//
// In the first eight, cache A stays at 4 KB two-way with 128-byte lines and a one-line BtoAbuf;
// cache B is 32, 64, 128 or 256 KB two-way (128, 256, 512, 1024 sets) with a
// latency of 3 or 5 cycles. All ten caches run side by side, each with its own L2 model
// and checking environment, each running 10000 random loads and stores over 4096
// lines (512 KB, twice the largest cache B) with a hot set, spatial repeats and a
// warm set. Data and latency of every response are checked; every mechanism but
// the BtoAbuf squash must occur in each configuration. Two more caches keep the
// default 64 KB 3-cycle cache B and vary cache A within the range the evaluation
// explored: 1 KB direct-mapped (8 sets) and 4 KB 4-way (8 sets). Each configuration prints
// its event counts, which show how the hits split between cache A and cache B.
// The configurations and checks follow the evaluation's cache sizes and latencies;
// the random address stream stands in for its traces, which are not available.
module tb_splics_configs;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NCFG = 10;
  logic        done [NCFG];
  int unsigned checks [NCFG];
  int unsigned failures [NCFG];

  for (genvar g = 0; g < 8; g++) begin : cfg
    localparam int unsigned BS  = 128 << (g / 2);
    localparam int unsigned LAT = (g % 2 == 0) ? 3 : 5;
    splics_sys #(.A_SETS(16), .A_WAYS(2), .B_SETS(BS), .B_WAYS(2), .B_LAT(LAT), .BUF_DEPTH(1),
                 .NLINES(4096), .HOT(24), .WARM(256), .NREQ(10000), .SEED(100 + g),
                 .IDLE_PCT(5), .P_HOT(50), .P_PREV(20), .P_WARM(15), .P_CONF(5),
                 .NEED_SQUASH(1'b0)) s (
      .clk, .rst_n, .done(done[g]), .checks(checks[g]), .failures(failures[g]));
  end

  // cache A variants at the default cache B: 1 KB direct-mapped and 4 KB 4-way
  for (genvar g = 0; g < 2; g++) begin : acfg
    localparam int unsigned AW = (g == 0) ? 1 : 4;
    splics_sys #(.A_SETS(8), .A_WAYS(AW), .B_SETS(256), .B_WAYS(2), .B_LAT(3), .BUF_DEPTH(1),
                 .NLINES(4096), .HOT(24), .WARM(256), .NREQ(10000), .SEED(200 + g),
                 .IDLE_PCT(5), .P_HOT(50), .P_PREV(20), .P_WARM(15), .P_CONF(5),
                 .NEED_SQUASH(1'b0)) s (
      .clk, .rst_n, .done(done[8+g]), .checks(checks[8+g]), .failures(failures[8+g]));
  end

  function automatic bit all_done();
    for (int i = 0; i < NCFG; i++) if (!done[i]) return 0;
    return 1;
  endfunction

  function automatic int unsigned sum(input int unsigned a [NCFG]);
    int unsigned r;
    r = 0;
    for (int i = 0; i < NCFG; i++) r += a[i];
    return r;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    do @(posedge clk); while (!all_done());
    $display("TB_RESULT checks=%0d failures=%0d", sum(checks), sum(failures));
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", sum(checks), sum(failures) + 1);
    $finish;
  end
endmodule
