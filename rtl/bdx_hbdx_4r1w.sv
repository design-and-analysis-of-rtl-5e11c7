// bdx_hbdx_4r1w: four-read one-write memory built by hierarchical bank
// division with XOR (HBDX).
//
// The BDX method is applied twice. At the top level the 4*DEPTH words are
// spread over four memory banks MB0..MB3 of DEPTH words, plus an XOR bank XB
// of DEPTH words holding the XOR of the four banks at each offset; the word
// address is {bank, offset}. Each of these five modules is itself a
// bdx_2r1w_4r hybrid memory (of DEPTH/4-word sub-banks), so it serves either
// two reads and one write (2R1W mode) or four reads (4R mode) per cycle.
//
// A write W to bank b, offset o writes MBb (which then runs in 2R1W mode)
// and, through the read update Ru, writes XB[o] = W ^ (XOR of MBk[o], k != b)
// (XB also in 2R1W mode); the Ru read takes one port of each other bank,
// which stay in 4R mode. The four reads are then scheduled by
// bdx_port_alloc: a read uses a free port of its own bank, and when none is
// left it is recovered as the XOR of the same offset in the other three
// banks and XB. In the worst case, a write and all four reads in one bank,
// that bank serves reads 0 and 1 directly, reads 2 and 3 are recovered, and
// every other bank serves three reads (two recoveries and Ru) in 4R mode.
// Without a write every module is in 4R mode and all four reads are direct.
// Inside each module the same scheme resolves reads that meet in one
// sub-bank.
//
// Interface: write port (we, waddr, wdata), four read ports (raddr, rdata),
// rd_recon[i] high when read i is recovered at the top level this cycle,
// sub_recon[k] high when module k (0..3 = MB0..MB3, 4 = XB) recovers any of
// its reads internally. `ready` rises DEPTH/4 cycles after reset, when all
// sub-banks are cleared; writes before then are ignored.
//
// Timing: all reads are combinational and return the contents before the
// next rising edge; a write takes effect at the edge. One write and four
// reads are accepted every cycle.
//
// Follows the design: the five 2R1W/4R modules, the three XOR recovery
// paths (two reads and Ru) and the worst-case schedule. This design's own
// choices: the read-port schedule for other address patterns, address bit
// layout and asynchronous reads. DEPTH must be a power of two and at least 8.
module bdx_hbdx_4r1w
  import bdx_pkg::*;
#(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 512
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  output logic                                  ready,
  input  logic                                  we,
  input  logic [BANK_W+$clog2(DEPTH)-1:0]       waddr,
  input  logic [WIDTH-1:0]                      wdata,
  input  logic [3:0][BANK_W+$clog2(DEPTH)-1:0]  raddr,
  output logic [3:0][WIDTH-1:0]                 rdata,
  output logic [3:0]                            rd_recon,
  output logic [NUM_MODS-1:0]                   sub_recon
);

  localparam int unsigned OW    = $clog2(DEPTH);    // offset within a module
  localparam int unsigned NPORT = 4;                // ports of a 4R module
  localparam int unsigned SUB_DEPTH = DEPTH / NUM_BANKS;

  bank_sel_t               bw;
  logic [OW-1:0]           ow;
  logic [3:0][BANK_W-1:0]  rb;
  logic [3:0][OW-1:0]      ro;
  logic                    we_eff;
  logic [NUM_MODS-1:0]     mod_ready;

  assign {bw, ow} = waddr;
  for (genvar i = 0; i < 4; i++) begin : g_split
    assign {rb[i], ro[i]} = raddr[i];
  end

  assign ready  = &mod_ready;
  assign we_eff = we & ready;

  // Read budget per module: two in 2R1W mode (written), four in 4R mode.
  logic [NUM_MODS-1:0][2:0] cap;
  always_comb begin
    for (int k = 0; k < NUM_MODS; k++) cap[k] = 3'd4;
    if (we_eff) begin
      cap[bw]     = 3'd2;
      cap[XB_IDX] = 3'd2;
    end
  end

  logic [NUM_MODS-1:0][NPORT-1:0][OW-1:0]    port_off;
  logic [3:0][NUM_MODS-1:0]                  rd_use;
  logic [3:0][NUM_MODS-1:0][1:0]             rd_port;
  logic [NUM_MODS-1:0]                       ru_use;
  logic [NUM_MODS-1:0][1:0]                  ru_port;
  logic                                      overflow;

  bdx_port_alloc #(.NRD(4), .NPORT(NPORT), .OW(OW)) u_alloc (
    .rd_valid(4'b1111),
    .rd_bank (rb),
    .rd_off  (ro),
    .ru_en   (we_eff),
    .ru_bank (bw),
    .ru_off  (ow),
    .cap     (cap),
    .port_off(port_off),
    .rd_use  (rd_use),
    .rd_port (rd_port),
    .rd_recon(rd_recon),
    .ru_use  (ru_use),
    .ru_port (ru_port),
    .overflow(overflow)
  );

  logic [NUM_MODS-1:0][NPORT-1:0][WIDTH-1:0] q;
  logic [WIDTH-1:0]                          ru_data;

  for (genvar k = 0; k < NUM_MODS; k++) begin : g_mod
    logic             mod_we;
    logic [WIDTH-1:0] mod_wdata;
    logic [3:0]       mod_recon;
    bdx_mode_e        mod_mode;

    if (k == XB_IDX) begin : g_xb
      assign mod_we    = we_eff;
      assign mod_wdata = ru_data;
    end else begin : g_mb
      assign mod_we    = we_eff && (bw == BANK_W'(k));
      assign mod_wdata = wdata;
    end

    bdx_2r1w_4r #(.WIDTH(WIDTH), .DEPTH(SUB_DEPTH)) u_mod (
      .clk     (clk),
      .rst_n   (rst_n),
      .ready   (mod_ready[k]),
      .we      (mod_we),
      .waddr   (ow),
      .wdata   (mod_wdata),
      .raddr   (port_off[k]),
      .rdata   (q[k]),
      .mode    (mod_mode),
      .rd_recon(mod_recon)
    );

    assign sub_recon[k] = |mod_recon;

    // A module that is written only has two read ports.
    a_mode_cap: assert property (@(posedge clk)
        (mod_mode == MODE_2R1W) |-> !(rd_use[0][k] && rd_port[0][k] > 2'd1) &&
                                    !(rd_use[1][k] && rd_port[1][k] > 2'd1) &&
                                    !(rd_use[2][k] && rd_port[2][k] > 2'd1) &&
                                    !(rd_use[3][k] && rd_port[3][k] > 2'd1) &&
                                    !(ru_use[k]    && ru_port[k]    > 2'd1))
      else $error("bdx_hbdx_4r1w: port above 1 used on a module in 2R1W mode");
  end

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      rdata[i] = '0;
      for (int k = 0; k < NUM_MODS; k++)
        if (rd_use[i][k]) rdata[i] ^= q[k][rd_port[i][k]];
    end
    ru_data = wdata;
    for (int k = 0; k < NUM_MODS; k++)
      if (ru_use[k]) ru_data ^= q[k][ru_port[k]];
  end

  a_no_overflow: assert property (@(posedge clk) !overflow)
    else $error("bdx_hbdx_4r1w: read ports oversubscribed");

endmodule
