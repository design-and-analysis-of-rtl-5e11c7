// tb_bdx_size_sweep: runs the 2R1W, 2R1W/4R and hierarchical 4R1W memories
// over the range of sizes the method is meant for: bank depths from 8 to
// 8192 words with 8-bit words (including the 256 and 512 points), and
// 16-, 32- and 64-bit words. Each point is an independent bdx_size_check
// instance with its own reference memories; all run in parallel from one
// clock and the results are summed.
module tb_bdx_size_sweep;
  localparam int NPT = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NPT-1:0] done;
  int ck [NPT];
  int fl [NPT];
  int rc [NPT];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bdx_size_check #(.WIDTH(8),  .DEPTH(8),    .NCYC(3000)) p0 (clk, rst_n, done[0], ck[0], fl[0], rc[0]);
  bdx_size_check #(.WIDTH(8),  .DEPTH(16),   .NCYC(3000)) p1 (clk, rst_n, done[1], ck[1], fl[1], rc[1]);
  bdx_size_check #(.WIDTH(8),  .DEPTH(64),   .NCYC(3000)) p2 (clk, rst_n, done[2], ck[2], fl[2], rc[2]);
  bdx_size_check #(.WIDTH(8),  .DEPTH(128),  .NCYC(3000)) p3 (clk, rst_n, done[3], ck[3], fl[3], rc[3]);
  bdx_size_check #(.WIDTH(8),  .DEPTH(256),  .NCYC(3000)) p4 (clk, rst_n, done[4], ck[4], fl[4], rc[4]);
  bdx_size_check #(.WIDTH(8),  .DEPTH(512),  .NCYC(3000)) p5 (clk, rst_n, done[5], ck[5], fl[5], rc[5]);
  bdx_size_check #(.WIDTH(8),  .DEPTH(8192), .NCYC(3000)) p6 (clk, rst_n, done[6], ck[6], fl[6], rc[6]);
  bdx_size_check #(.WIDTH(16), .DEPTH(64),   .NCYC(3000)) p7 (clk, rst_n, done[7], ck[7], fl[7], rc[7]);
  bdx_size_check #(.WIDTH(32), .DEPTH(64),   .NCYC(3000)) p8 (clk, rst_n, done[8], ck[8], fl[8], rc[8]);
  bdx_size_check #(.WIDTH(64), .DEPTH(64),   .NCYC(3000)) p9 (clk, rst_n, done[9], ck[9], fl[9], rc[9]);

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (&done);
    for (int p = 0; p < NPT; p++) begin
      $display("point %0d: checks %0d failures %0d cycles with recovery %0d", p, ck[p], fl[p], rc[p]);
      checks += ck[p];
      failures += fl[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures = 1;
    for (int p = 0; p < NPT; p++) begin checks += ck[p]; failures += fl[p]; end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
