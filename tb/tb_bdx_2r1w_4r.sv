// tb_bdx_2r1w_4r: random traffic for the two-mode memory against a flat
// reference. Cycles with a write must run in 2R1W mode (reads 0 and 1
// served, reads 2 and 3 zero); cycles without run in 4R mode (four reads).
// Bank selects are biased so that reads pile up in one bank. Besides every
// read word, the recovery flags are checked against the rule worked out
// from the port budget: in 2R1W mode read 1 is recovered when it shares
// read 0's bank; in 4R mode a read is recovered when two earlier reads of
// the cycle already use its bank. Each case is counted and must occur.
module tb_bdx_2r1w_4r;
  import bdx_pkg::*;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned DEPTH = 16;
  localparam int unsigned OW = $clog2(DEPTH);
  localparam int unsigned AW = BANK_W + OW;
  localparam int unsigned WORDS = NUM_BANKS * DEPTH;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ready, we;
  logic [AW-1:0] waddr;
  logic [WIDTH-1:0] wdata;
  logic [3:0][AW-1:0] raddr;
  logic [3:0][WIDTH-1:0] rdata;
  logic [3:0] rd_recon;
  bdx_mode_e mode;
  logic [WIDTH-1:0] ref_mem [WORDS];
  int checks = 0, failures = 0;
  int n_2r1w = 0, n_4r = 0, n_recon_2r1w = 0, n_recon_4r = 0, n_worst_4r = 0, n_worst_2r1w = 0;

  always #5 clk = ~clk;

  bdx_2r1w_4r #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .ready(ready), .we(we), .waddr(waddr),
    .wdata(wdata), .raddr(raddr), .rdata(rdata), .mode(mode), .rd_recon(rd_recon));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [BANK_W-1:0] bank_of(input logic [AW-1:0] a);
    return a[AW-1 -: BANK_W];
  endfunction

  function automatic logic [AW-1:0] rand_addr(input int hot);
    logic [BANK_W-1:0] b;
    b = ($urandom_range(0, 2) != 0) ? BANK_W'(hot) : BANK_W'($urandom_range(0, 3));
    return {b, OW'($urandom_range(0, DEPTH - 1))};
  endfunction

  initial begin
    int cyc, hot, earlier;
    logic [3:0] exp_recon;
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    foreach (ref_mem[i]) ref_mem[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    cyc = 0;
    while (!ready) begin @(posedge clk); #1; cyc++; end
    check(cyc == DEPTH, $sformatf("ready after %0d cycles", cyc));
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      hot   = $urandom_range(0, 3);
      we    = ($urandom_range(0, 1) != 0);
      waddr = rand_addr(hot);
      wdata = WIDTH'($urandom);
      for (int i = 0; i < 4; i++) raddr[i] = rand_addr(hot);
      if ($urandom_range(0, 7) == 0) begin   // everything in one bank
        for (int i = 0; i < 4; i++) raddr[i][AW-1 -: BANK_W] = BANK_W'(hot);
        waddr[AW-1 -: BANK_W] = BANK_W'(hot);
      end
      #1;
      exp_recon = '0;
      if (we) begin
        check(mode == MODE_2R1W, "mode not 2R1W during a write");
        exp_recon[1] = (bank_of(raddr[1]) == bank_of(raddr[0]));
        for (int i = 0; i < 2; i++)
          check(rdata[i] == ref_mem[raddr[i]],
                $sformatf("2R1W read %0d addr %h: got %h expected %h", i, raddr[i], rdata[i], ref_mem[raddr[i]]));
        check(rdata[2] == '0 && rdata[3] == '0, "reads 2/3 not idle in 2R1W mode");
        n_2r1w++;
        if (exp_recon[1]) n_recon_2r1w++;
        if (bank_of(raddr[0]) == bank_of(waddr) && exp_recon[1]) n_worst_2r1w++;
      end else begin
        check(mode == MODE_4R, "mode not 4R without a write");
        for (int i = 0; i < 4; i++) begin
          earlier = 0;
          for (int j = 0; j < i; j++) if (bank_of(raddr[j]) == bank_of(raddr[i])) earlier++;
          exp_recon[i] = (earlier >= 2);
          check(rdata[i] == ref_mem[raddr[i]],
                $sformatf("4R read %0d addr %h: got %h expected %h", i, raddr[i], rdata[i], ref_mem[raddr[i]]));
        end
        n_4r++;
        if (exp_recon != '0) n_recon_4r++;
        if (exp_recon == 4'b1100) n_worst_4r++;
      end
      check(rd_recon == exp_recon, $sformatf("recovery flags %b expected %b", rd_recon, exp_recon));
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
    end
    $display("2R1W cycles %0d (recovered %0d, worst case %0d), 4R cycles %0d (recovered %0d, 4 reads of one bank %0d)",
             n_2r1w, n_recon_2r1w, n_worst_2r1w, n_4r, n_recon_4r, n_worst_4r);
    check(n_2r1w > 0 && n_4r > 0 && n_recon_2r1w > 0 && n_recon_4r > 0 &&
          n_worst_2r1w > 0 && n_worst_4r > 0, "a case never happened");
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
