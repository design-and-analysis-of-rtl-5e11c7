// bdx_size_check: testbench helper that runs the three BDX memories
// (bdx_2r1w, bdx_2r1w_4r, bdx_hbdx_4r1w) at one WIDTH/DEPTH point.
//
// After reset it waits for all three to finish clearing, then drives NCYC
// cycles of random traffic, identical addresses for the three memories and
// a shared reference array each, and compares every read word. Addresses
// are drawn from a 64-word window per bank (or the whole bank when smaller)
// so that words are rewritten and reads collide in banks. `done` rises at
// the end; `checks` and `failures` hold the counts, `recon` the number of
// cycles in which a read of any of the three memories was recovered.
module bdx_size_check
  import bdx_pkg::*;
#(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 64,
  parameter int unsigned NCYC  = 1000
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   recon
);
  localparam int unsigned OW = $clog2(DEPTH);
  localparam int unsigned AW = BANK_W + OW;
  localparam int unsigned WORDS = NUM_BANKS * DEPTH;
  localparam int unsigned WIN = (DEPTH < 64) ? DEPTH : 64;

  logic a_ready, b_ready, c_ready, we, a_recon;
  logic [AW-1:0] waddr;
  logic [WIDTH-1:0] wdata;
  logic [3:0][AW-1:0] raddr;
  logic [1:0][WIDTH-1:0] a_rdata;
  logic [3:0][WIDTH-1:0] b_rdata, c_rdata;
  logic [3:0] b_recon, c_recon;
  logic [NUM_MODS-1:0] c_sub;
  bdx_mode_e b_mode;
  logic [WIDTH-1:0] ref_a [WORDS];
  logic [WIDTH-1:0] ref_b [WORDS];
  logic [WIDTH-1:0] ref_c [WORDS];

  bdx_2r1w #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_a (
    .clk(clk), .rst_n(rst_n), .ready(a_ready), .we(we), .waddr(waddr), .wdata(wdata),
    .raddr(raddr[1:0]), .rdata(a_rdata), .r1_recon(a_recon));
  bdx_2r1w_4r #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_b (
    .clk(clk), .rst_n(rst_n), .ready(b_ready), .we(we), .waddr(waddr), .wdata(wdata),
    .raddr(raddr), .rdata(b_rdata), .mode(b_mode), .rd_recon(b_recon));
  bdx_hbdx_4r1w #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_c (
    .clk(clk), .rst_n(rst_n), .ready(c_ready), .we(we), .waddr(waddr), .wdata(wdata),
    .raddr(raddr), .rdata(c_rdata), .rd_recon(c_recon), .sub_recon(c_sub));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL W=%0d D=%0d: %s", WIDTH, DEPTH, what);
    end
  endtask

  function automatic logic [AW-1:0] rand_addr();
    return {BANK_W'($urandom_range(0, 3)), OW'($urandom_range(0, WIN - 1))};
  endfunction

  function automatic logic [WIDTH-1:0] rand_word();
    logic [WIDTH-1:0] w;
    for (int i = 0; i < WIDTH; i += 32) w = (w << 32) | WIDTH'($urandom);
    return w;
  endfunction

  initial begin
    done = 1'b0; checks = 0; failures = 0; recon = 0;
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    foreach (ref_a[i]) begin ref_a[i] = '0; ref_b[i] = '0; ref_c[i] = '0; end
    @(posedge rst_n);
    while (!(a_ready && b_ready && c_ready)) @(posedge clk);
    for (int n = 0; n < NCYC; n++) begin
      @(negedge clk);
      we    = ($urandom_range(0, 2) != 0);
      waddr = rand_addr();
      wdata = rand_word();
      for (int i = 0; i < 4; i++) raddr[i] = rand_addr();
      #1;
      for (int i = 0; i < 2; i++)
        check(a_rdata[i] == ref_a[raddr[i]], $sformatf("2R1W read %0d", i));
      for (int i = 0; i < (we ? 2 : 4); i++)
        check(b_rdata[i] == ref_b[raddr[i]], $sformatf("2R1W/4R read %0d", i));
      for (int i = 0; i < 4; i++)
        check(c_rdata[i] == ref_c[raddr[i]], $sformatf("4R1W read %0d", i));
      check(b_mode == (we ? MODE_2R1W : MODE_4R), "2R1W/4R mode");
      if (a_recon || b_recon != '0 || c_recon != '0) recon++;
      @(posedge clk);
      if (we) begin ref_a[waddr] = wdata; ref_b[waddr] = wdata; ref_c[waddr] = wdata; end
    end
    check(recon > 0, "no recovered read");
    done = 1'b1;
  end
endmodule
