// tb_bdx_bank: checks one storage bank: the self-clearing after reset
// (ready after exactly DEPTH cycles, every word zero), writes, two
// independent asynchronous read ports, and that a read of the word being
// written returns the old word.
module tb_bdx_bank;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned DEPTH = 32;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  logic ready, we;
  logic [AW-1:0] waddr;
  logic [WIDTH-1:0] wdata;
  logic [1:0][AW-1:0] raddr;
  logic [1:0][WIDTH-1:0] rdata;
  logic [WIDTH-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0, same_addr = 0;

  always #5 clk = ~clk;

  bdx_bank #(.WIDTH(WIDTH), .DEPTH(DEPTH), .NRD(2)) dut (
    .clk(clk), .rst_n(rst_n), .ready(ready), .we(we), .waddr(waddr),
    .wdata(wdata), .raddr(raddr), .rdata(rdata));

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
    check(cyc == DEPTH, $sformatf("ready after %0d cycles, expected %0d", cyc, DEPTH));
    for (int a = 0; a < DEPTH; a++) begin
      raddr[0] = AW'(a); raddr[1] = AW'(DEPTH - 1 - a); #1;
      check(rdata[0] == '0 && rdata[1] == '0, $sformatf("word %0d not cleared", a));
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we    = ($urandom_range(0, 2) != 0);
      waddr = AW'($urandom_range(0, DEPTH - 1));
      wdata = WIDTH'($urandom);
      raddr[0] = ($urandom_range(0, 3) == 0) ? waddr : AW'($urandom_range(0, DEPTH - 1));
      raddr[1] = AW'($urandom_range(0, DEPTH - 1));
      #1;
      if (we && raddr[0] == waddr) same_addr++;
      for (int p = 0; p < 2; p++)
        check(rdata[p] == ref_mem[raddr[p]],
              $sformatf("port %0d addr %0d: got %h expected %h", p, raddr[p], rdata[p], ref_mem[raddr[p]]));
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
    end
    check(same_addr > 0, "no read of the word being written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
