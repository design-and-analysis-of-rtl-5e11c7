// tb_bdx_top: end-to-end test of bdx_top at its default parameters
// (8-bit words, 512-word banks, 2048 words per memory, four read ports on
// both memories). Both memories get independent random traffic in the same
// cycles and are compared with two flat reference memories; at the end
// every word of both is read back. Counted, and required to occur:
// the clearing sweeps (checked against their expected lengths), writes
// (2R1W mode in the written modules), read-only cycles (all modules in 4R
// mode), top-level XOR recoveries, recoveries inside a 2R1W/4R module, the
// worst case of a write and four reads in one bank, and recoveries in the
// kR1W copies.
module tb_bdx_top;
  import bdx_pkg::*;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned DEPTH = 512;
  localparam int unsigned K = 4;
  localparam int unsigned OW = $clog2(DEPTH);
  localparam int unsigned AW = BANK_W + OW;
  localparam int unsigned WORDS = NUM_BANKS * DEPTH;

  logic clk = 1'b0, rst_n = 1'b0;
  logic h_ready, h_we, k_ready, k_we;
  logic [AW-1:0] h_waddr, k_waddr;
  logic [WIDTH-1:0] h_wdata, k_wdata;
  logic [3:0][AW-1:0] h_raddr;
  logic [3:0][WIDTH-1:0] h_rdata;
  logic [3:0] h_rd_recon;
  logic [NUM_MODS-1:0] h_sub_recon;
  logic [K-1:0][AW-1:0] k_raddr;
  logic [K-1:0][WIDTH-1:0] k_rdata;
  logic [K/2-1:0] k_rd_recon;
  logic [WIDTH-1:0] h_ref [WORDS];
  logic [WIDTH-1:0] k_ref [WORDS];
  int checks = 0, failures = 0;
  int n_wr = 0, n_ro = 0, n_top = 0, n_sub = 0, n_worst = 0, n_k = 0;

  always #5 clk = ~clk;

  bdx_top dut (
    .clk(clk), .rst_n(rst_n),
    .h_ready(h_ready), .h_we(h_we), .h_waddr(h_waddr), .h_wdata(h_wdata),
    .h_raddr(h_raddr), .h_rdata(h_rdata), .h_rd_recon(h_rd_recon), .h_sub_recon(h_sub_recon),
    .k_ready(k_ready), .k_we(k_we), .k_waddr(k_waddr), .k_wdata(k_wdata),
    .k_raddr(k_raddr), .k_rdata(k_rdata), .k_rd_recon(k_rd_recon));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Addresses confined to a small window so that words are rewritten and
  // reads meet in one bank and one sub-bank often.
  function automatic logic [AW-1:0] rand_addr(input int hot, input int hot_sub);
    logic [BANK_W-1:0] b, s;
    b = ($urandom_range(0, 2) != 0) ? BANK_W'(hot) : BANK_W'($urandom_range(0, 3));
    s = ($urandom_range(0, 2) != 0) ? BANK_W'(hot_sub) : BANK_W'($urandom_range(0, 3));
    return {b, s, (OW-BANK_W)'($urandom_range(0, 15))};
  endfunction

  initial begin
    int cyc, h_cyc, k_cyc, hot, hot_sub;
    h_we = 1'b0; k_we = 1'b0; h_waddr = '0; k_waddr = '0; h_wdata = '0; k_wdata = '0;
    h_raddr = '0; k_raddr = '0;
    foreach (h_ref[i]) begin h_ref[i] = '0; k_ref[i] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    cyc = 0; h_cyc = -1; k_cyc = -1;
    while (!(h_ready && k_ready)) begin
      @(posedge clk); #1; cyc++;
      if (h_ready && h_cyc < 0) h_cyc = cyc;
      if (k_ready && k_cyc < 0) k_cyc = cyc;
    end
    check(h_cyc == DEPTH / 4, $sformatf("4R1W ready after %0d cycles", h_cyc));
    check(k_cyc == DEPTH, $sformatf("kR1W ready after %0d cycles", k_cyc));

    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      hot = $urandom_range(0, 3); hot_sub = $urandom_range(0, 3);
      h_we    = ($urandom_range(0, 3) != 0);
      h_waddr = rand_addr(hot, hot_sub);
      h_wdata = WIDTH'($urandom);
      for (int i = 0; i < 4; i++) h_raddr[i] = rand_addr(hot, hot_sub);
      if ($urandom_range(0, 7) == 0) begin
        h_we = 1'b1;
        h_waddr[AW-1 -: BANK_W] = BANK_W'(hot);
        for (int i = 0; i < 4; i++) h_raddr[i][AW-1 -: BANK_W] = BANK_W'(hot);
      end
      k_we    = ($urandom_range(0, 3) != 0);
      k_waddr = rand_addr(hot, hot_sub);
      k_wdata = WIDTH'($urandom);
      for (int i = 0; i < K; i++) k_raddr[i] = rand_addr(hot, hot_sub);
      #1;
      for (int i = 0; i < 4; i++)
        check(h_rdata[i] == h_ref[h_raddr[i]],
              $sformatf("4R1W read %0d addr %h: got %h expected %h", i, h_raddr[i], h_rdata[i], h_ref[h_raddr[i]]));
      for (int i = 0; i < K; i++)
        check(k_rdata[i] == k_ref[k_raddr[i]],
              $sformatf("kR1W read %0d addr %h: got %h expected %h", i, k_raddr[i], k_rdata[i], k_ref[k_raddr[i]]));
      if (h_we) n_wr++; else n_ro++;
      if (h_rd_recon != '0) n_top++;
      if (h_sub_recon != '0) n_sub++;
      if (h_we && h_rd_recon == 4'b1100 &&
          h_raddr[0][AW-1 -: BANK_W] == h_waddr[AW-1 -: BANK_W] &&
          h_raddr[1][AW-1 -: BANK_W] == h_waddr[AW-1 -: BANK_W] &&
          h_raddr[2][AW-1 -: BANK_W] == h_waddr[AW-1 -: BANK_W] &&
          h_raddr[3][AW-1 -: BANK_W] == h_waddr[AW-1 -: BANK_W]) n_worst++;
      if (k_rd_recon != '0) n_k++;
      @(posedge clk);
      if (h_we) h_ref[h_waddr] = h_wdata;
      if (k_we) k_ref[k_waddr] = k_wdata;
    end

    for (int a = 0; a < WORDS; a += 4) begin
      @(negedge clk);
      h_we = 1'b0; k_we = 1'b0;
      for (int i = 0; i < 4; i++) begin h_raddr[i] = AW'(a + i); k_raddr[i] = AW'(a + i); end
      #1;
      for (int i = 0; i < 4; i++)
        check(h_rdata[i] == h_ref[a + i] && k_rdata[i] == k_ref[a + i], $sformatf("final word %0d", a + i));
    end

    $display("4R1W: writes %0d, read-only cycles %0d, top recoveries %0d, module recoveries %0d, worst case %0d",
             n_wr, n_ro, n_top, n_sub, n_worst);
    $display("kR1W: cycles with a recovered read %0d", n_k);
    check(n_wr > 0, "no write");
    check(n_ro > 0, "no read-only (4R) cycle");
    check(n_top > 0, "no top-level recovery");
    check(n_sub > 0, "no recovery inside a module");
    check(n_worst > 0, "worst case never occurred");
    check(n_k > 0, "no kR1W recovery");
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
