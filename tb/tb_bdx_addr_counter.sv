// tb_bdx_addr_counter: checks that the clearing counter visits every
// address 0..DEPTH-1 once, one per clock, raises done exactly DEPTH cycles
// after reset and then holds, and restarts on a second reset.
module tb_bdx_addr_counter;
  localparam int unsigned DEPTH = 16;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [AW-1:0] addr;
  logic done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bdx_addr_counter #(.DEPTH(DEPTH)) dut (.clk(clk), .rst_n(rst_n), .addr(addr), .done(done));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic sweep();
    // addr must count 0..DEPTH-1 with done low, then done high
    for (int c = 0; c < DEPTH; c++) begin
      check(!done, $sformatf("done early at cycle %0d", c));
      check(addr == AW'(c), $sformatf("addr %0d at cycle %0d", addr, c));
      @(posedge clk); #1;
    end
    check(done, "done not set after DEPTH cycles");
    for (int c = 0; c < 5; c++) begin
      check(done && addr == AW'(DEPTH - 1), "counter moved after done");
      @(posedge clk); #1;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;     // released just after an edge: first count at next edge
    sweep();
    rst_n = 1'b0;
    @(posedge clk); #1;
    check(!done && addr == '0, "reset did not clear the counter");
    rst_n = 1'b1;
    sweep();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
