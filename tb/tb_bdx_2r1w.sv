// tb_bdx_2r1w: random two-read one-write traffic against a flat reference
// memory. Bank selects are biased so that both reads often meet in one bank
// (read 1 then comes from the XOR bank) and writes often hit the bank being
// read. Checks every read word, that read 1 is flagged as recovered exactly
// when the two reads share a bank, the clearing time, and that one write
// and two reads complete in every cycle.
module tb_bdx_2r1w;
  import bdx_pkg::*;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned DEPTH = 32;
  localparam int unsigned OW = $clog2(DEPTH);
  localparam int unsigned AW = BANK_W + OW;
  localparam int unsigned WORDS = NUM_BANKS * DEPTH;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ready, we, r1_recon;
  logic [AW-1:0] waddr;
  logic [WIDTH-1:0] wdata;
  logic [1:0][AW-1:0] raddr;
  logic [1:0][WIDTH-1:0] rdata;
  logic [WIDTH-1:0] ref_mem [WORDS];
  int checks = 0, failures = 0, n_recon = 0, n_direct = 0, n_wr = 0;

  always #5 clk = ~clk;

  bdx_2r1w #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .ready(ready), .we(we), .waddr(waddr),
    .wdata(wdata), .raddr(raddr), .rdata(rdata), .r1_recon(r1_recon));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [AW-1:0] rand_addr(input int hot);
    logic [BANK_W-1:0] b;
    b = ($urandom_range(0, 1) == 0) ? BANK_W'(hot) : BANK_W'($urandom_range(0, 3));
    return {b, OW'($urandom_range(0, DEPTH - 1))};
  endfunction

  initial begin
    int cyc, hot;
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    foreach (ref_mem[i]) ref_mem[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    cyc = 0;
    while (!ready) begin @(posedge clk); #1; cyc++; end
    check(cyc == DEPTH, $sformatf("ready after %0d cycles", cyc));
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      hot      = $urandom_range(0, 3);
      we       = ($urandom_range(0, 3) != 0);
      waddr    = rand_addr(hot);
      wdata    = WIDTH'($urandom);
      raddr[0] = rand_addr(hot);
      raddr[1] = ($urandom_range(0, 3) == 0) ? raddr[0] : rand_addr(hot);
      #1;
      for (int p = 0; p < 2; p++)
        check(rdata[p] == ref_mem[raddr[p]],
              $sformatf("read %0d addr %h: got %h expected %h", p, raddr[p], rdata[p], ref_mem[raddr[p]]));
      check(r1_recon == (raddr[0][AW-1 -: BANK_W] == raddr[1][AW-1 -: BANK_W]), "recovery flag");
      if (r1_recon) n_recon++; else n_direct++;
      @(posedge clk);
      if (we) begin ref_mem[waddr] = wdata; n_wr++; end
    end
    // read back every word through both ports with the ports in one bank
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      we = 1'b0; raddr[0] = AW'(a); raddr[1] = AW'(a); #1;
      check(rdata[0] == ref_mem[a] && rdata[1] == ref_mem[a], $sformatf("final word %0d", a));
    end
    check(n_recon > 0 && n_direct > 0 && n_wr > 0, "a case never happened");
    $display("recovered reads %0d, direct second reads %0d, writes %0d", n_recon, n_direct, n_wr);
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
