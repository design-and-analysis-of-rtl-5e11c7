// tb_bdx_kr1w: random traffic for the replicated kR1W memory with six read
// ports (three 2R1W copies) against a flat reference. Checks every read
// word of every port, the recovery flag of each copy (set when its two
// reads share a bank) and that all copies see the common write.
module tb_bdx_kr1w;
  import bdx_pkg::*;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned DEPTH = 16;
  localparam int unsigned K = 6;
  localparam int unsigned OW = $clog2(DEPTH);
  localparam int unsigned AW = BANK_W + OW;
  localparam int unsigned WORDS = NUM_BANKS * DEPTH;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ready, we;
  logic [AW-1:0] waddr;
  logic [WIDTH-1:0] wdata;
  logic [K-1:0][AW-1:0] raddr;
  logic [K-1:0][WIDTH-1:0] rdata;
  logic [K/2-1:0] rd_recon;
  logic [WIDTH-1:0] ref_mem [WORDS];
  int checks = 0, failures = 0, n_recon = 0;

  always #5 clk = ~clk;

  bdx_kr1w #(.WIDTH(WIDTH), .DEPTH(DEPTH), .K(K)) dut (
    .clk(clk), .rst_n(rst_n), .ready(ready), .we(we), .waddr(waddr),
    .wdata(wdata), .raddr(raddr), .rdata(rdata), .rd_recon(rd_recon));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int cyc;
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    foreach (ref_mem[i]) ref_mem[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    cyc = 0;
    while (!ready) begin @(posedge clk); #1; cyc++; end
    check(cyc == DEPTH, $sformatf("ready after %0d cycles", cyc));
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      we    = ($urandom_range(0, 3) != 0);
      waddr = AW'($urandom_range(0, WORDS - 1));
      wdata = WIDTH'($urandom);
      for (int i = 0; i < K; i++)
        raddr[i] = ($urandom_range(0, 1) == 0) ? {BANK_W'(0), OW'($urandom_range(0, DEPTH - 1))}
                                               : AW'($urandom_range(0, WORDS - 1));
      #1;
      for (int i = 0; i < K; i++)
        check(rdata[i] == ref_mem[raddr[i]],
              $sformatf("read %0d addr %h: got %h expected %h", i, raddr[i], rdata[i], ref_mem[raddr[i]]));
      for (int j = 0; j < K / 2; j++) begin
        check(rd_recon[j] == (raddr[2*j][AW-1 -: BANK_W] == raddr[2*j+1][AW-1 -: BANK_W]),
              $sformatf("recovery flag of copy %0d", j));
        if (rd_recon[j]) n_recon++;
      end
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
    end
    check(n_recon > 0, "no recovered read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
