// tb_splics: end-to-end test of the split latency cache at reduced sizes.
//
// Two caches run side by side, each with its own L2 model (10-cycle latency) and
// checking environment (splics_env), on random streams that keep every request
// slot busy:
//   s0  cache A 2 sets x 2 ways, cache B 4 sets x 2 ways, B latency 3, one-line
//       BtoAbuf: the text's organisation, shrunk so that B casts lines out often;
//   s1  cache B direct mapped (4 sets), B latency 5, two-line BtoAbuf: the other
//       latency studied, and a B that casts out lines still waiting in BtoAbuf.
// Every case of the access algorithm, promotions that are moved, inclusion
// invalidations and write-backs must happen in both; promotions dropped on a full
// BtoAbuf must happen in s0. s1 ends with a directed sequence in which a line
// waiting in BtoAbuf is cast out of cache B by a fill, and must be squashed.
module tb_splics;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic done0, done1;
  int unsigned checks0, failures0, checks1, failures1;

  always #5 clk = ~clk;

  splics_sys #(.A_SETS(2), .A_WAYS(2), .B_SETS(4), .B_WAYS(2), .B_LAT(3), .BUF_DEPTH(1),
               .NLINES(24), .HOT(3), .WARM(10), .NREQ(6000), .SEED(7),
               .IDLE_PCT(0), .P_HOT(40), .P_PREV(15), .P_WARM(10), .P_CONF(25),
               .NEED_SQUASH(1'b0)) s0 (
    .clk, .rst_n, .done(done0), .checks(checks0), .failures(failures0));

  splics_sys #(.A_SETS(2), .A_WAYS(2), .B_SETS(4), .B_WAYS(1), .B_LAT(5), .BUF_DEPTH(2),
               .NLINES(24), .HOT(3), .WARM(10), .NREQ(6000), .SEED(11),
               .IDLE_PCT(0), .P_HOT(40), .P_PREV(15), .P_WARM(10), .P_CONF(25),
               .NEED_SQUASH(1'b1), .NEED_DROP(1'b0), .DIRECTED(1'b1)) s1 (
    .clk, .rst_n, .done(done1), .checks(checks1), .failures(failures1));

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (done0 && done1);
    $display("TB_RESULT checks=%0d failures=%0d", checks0 + checks1, failures0 + failures1);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks0 + checks1, failures0 + failures1 + 1);
    $finish;
  end
endmodule
