// tb_bdx_hbdx_4r1w: random one-write four-read traffic for the
// hierarchical memory against a flat reference memory. Addresses are
// biased towards one bank and one sub-bank so that reads collide at both
// levels, and one cycle in eight puts the write and all four reads in the
// same bank (the worst case). Checks every read word, the clearing time,
// and the top-level recovery flags against the rule that follows from the
// port budget: with a write, a read of the written bank is recovered when
// two earlier reads of the cycle use that bank, a read of another bank
// when three do; without a write nothing is recovered at the top level.
// Top-level recoveries, recoveries inside a module, the worst case and
// pure 4R cycles are counted and must all occur.
module tb_bdx_hbdx_4r1w;
  import bdx_pkg::*;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned DEPTH = 32;
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
  logic [NUM_MODS-1:0] sub_recon;
  logic [WIDTH-1:0] ref_mem [WORDS];
  int checks = 0, failures = 0;
  int n_top_recon = 0, n_sub_recon = 0, n_worst = 0, n_read_only = 0, n_wr = 0, n_xb_sub = 0;

  always #5 clk = ~clk;

  bdx_hbdx_4r1w #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .ready(ready), .we(we), .waddr(waddr),
    .wdata(wdata), .raddr(raddr), .rdata(rdata), .rd_recon(rd_recon),
    .sub_recon(sub_recon));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [BANK_W-1:0] bank_of(input logic [AW-1:0] a);
    return a[AW-1 -: BANK_W];
  endfunction

  // bank: hot bank with probability 2/3; sub-bank: hot sub-bank likewise
  function automatic logic [AW-1:0] rand_addr(input int hot, input int hot_sub);
    logic [BANK_W-1:0] b, s;
    b = ($urandom_range(0, 2) != 0) ? BANK_W'(hot) : BANK_W'($urandom_range(0, 3));
    s = ($urandom_range(0, 2) != 0) ? BANK_W'(hot_sub) : BANK_W'($urandom_range(0, 3));
    return {b, s, (OW-BANK_W)'($urandom_range(0, DEPTH / 4 - 1))};
  endfunction

  initial begin
    int cyc, hot, hot_sub, earlier;
    logic [3:0] exp_recon;
    bit worst;
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    foreach (ref_mem[i]) ref_mem[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    cyc = 0;
    while (!ready) begin @(posedge clk); #1; cyc++; end
    check(cyc == DEPTH / 4, $sformatf("ready after %0d cycles", cyc));
    for (int n = 0; n < 8000; n++) begin
      @(negedge clk);
      hot     = $urandom_range(0, 3);
      hot_sub = $urandom_range(0, 3);
      we      = ($urandom_range(0, 3) != 0);
      waddr   = rand_addr(hot, hot_sub);
      wdata   = WIDTH'($urandom);
      for (int i = 0; i < 4; i++) raddr[i] = rand_addr(hot, hot_sub);
      worst = ($urandom_range(0, 7) == 0);
      if (worst) begin
        we = 1'b1;
        waddr[AW-1 -: BANK_W] = BANK_W'(hot);
        for (int i = 0; i < 4; i++) raddr[i][AW-1 -: BANK_W] = BANK_W'(hot);
      end
      #1;
      exp_recon = '0;
      for (int i = 0; i < 4; i++) begin
        earlier = 0;
        for (int j = 0; j < i; j++) if (bank_of(raddr[j]) == bank_of(raddr[i])) earlier++;
        if (we) exp_recon[i] = (bank_of(raddr[i]) == bank_of(waddr)) ? (earlier >= 2) : (earlier >= 3);
        check(rdata[i] == ref_mem[raddr[i]],
              $sformatf("read %0d addr %h: got %h expected %h", i, raddr[i], rdata[i], ref_mem[raddr[i]]));
      end
      check(rd_recon == exp_recon, $sformatf("recovery flags %b expected %b", rd_recon, exp_recon));
      if (rd_recon != '0) n_top_recon++;
      if (sub_recon != '0) n_sub_recon++;
      if (sub_recon[XB_IDX]) n_xb_sub++;
      if (we && exp_recon == 4'b1100 && bank_of(raddr[0]) == bank_of(waddr)) n_worst++;
      if (!we) n_read_only++;
      @(posedge clk);
      if (we) begin ref_mem[waddr] = wdata; n_wr++; end
    end
    // read back all words, four at a time from one bank
    for (int a = 0; a < WORDS; a += 4) begin
      @(negedge clk);
      we = 1'b0;
      for (int i = 0; i < 4; i++) raddr[i] = AW'(a + i);
      #1;
      for (int i = 0; i < 4; i++)
        check(rdata[i] == ref_mem[a + i], $sformatf("final word %0d", a + i));
    end
    $display("writes %0d, top recoveries %0d, module recoveries %0d (in XB %0d), worst case %0d, read-only %0d",
             n_wr, n_top_recon, n_sub_recon, n_xb_sub, n_worst, n_read_only);
    check(n_top_recon > 0 && n_sub_recon > 0 && n_xb_sub > 0 && n_worst > 0 && n_read_only > 0,
          "a case never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
