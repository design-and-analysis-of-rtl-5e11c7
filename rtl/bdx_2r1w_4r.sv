// bdx_2r1w_4r: two-mode BDX memory that works as 2R1W or as 4R.
//
// Storage is four memory banks MB0..MB3 of DEPTH words and the XOR bank XB
// (X[o] = XOR of the four banks at offset o); the word address is
// {bank, offset}. Every bank has two asynchronous read ports and one write
// port. The mode follows the write request:
//   * 2R1W mode (we = 1): reads 0 and 1 are served, reads 2 and 3 are
//     ignored and return zero. The written bank gives up one port and every
//     other bank one port to the read update (Ru): the new XB word is the
//     written word XORed with the three other banks at that offset. A read
//     whose bank has no port left recovers its word as the XOR of the other
//     three banks and XB at its offset. In the worst case (write, read 0 and
//     read 1 all in one bank) read 0 is direct and read 1 is recovered.
//   * 4R mode (we = 0): four reads are served. Each bank serves up to two
//     reads directly; a third or fourth read of the same bank is recovered
//     from the two ports of the other banks and XB. Four reads of one bank
//     therefore give two direct and two recovered words.
// The port schedule comes from bdx_port_alloc. All banks clear themselves
// after reset; `ready` rises when they are done and writes before then are
// ignored.
//
// Interface: write port (we, waddr, wdata), four read ports (raddr, rdata),
// mode (MODE_2R1W or MODE_4R), rd_recon[i] high when read i is recovered
// through XB this cycle.
//
// Timing: reads are combinational and return the contents before the next
// rising edge (a read of the word being written returns the old word); a
// write takes effect at the edge. Throughput is one write and two reads, or
// four reads, per cycle.
//
// Follows the design: the two modes, the direct and XOR-recovered reads and
// the read update. This design's own choices: which port of a bank a given
// read takes, reads 2 and 3 being dropped while writing, and asynchronous
// reads.
module bdx_2r1w_4r
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
  output bdx_mode_e                             mode,
  output logic [3:0]                            rd_recon
);

  localparam int unsigned OW    = $clog2(DEPTH);
  localparam int unsigned NPORT = 2;

  bank_sel_t            bw;
  logic [OW-1:0]        ow;
  logic [3:0][BANK_W-1:0] rb;
  logic [3:0][OW-1:0]   ro;
  logic                 we_eff;
  logic [NUM_MODS-1:0]  mod_ready;

  assign {bw, ow} = waddr;
  for (genvar i = 0; i < 4; i++) begin : g_split
    assign {rb[i], ro[i]} = raddr[i];
  end

  assign ready  = &mod_ready;
  assign we_eff = we & ready;
  assign mode   = we_eff ? MODE_2R1W : MODE_4R;

  // Port budget per module for this cycle.
  logic [NUM_MODS-1:0][1:0] cap;
  always_comb begin
    for (int k = 0; k < NUM_MODS; k++) cap[k] = 2'd2;
    if (mode == MODE_2R1W) begin
      cap[bw]     = 2'd1;   // one port kept back, its partner banks feed Ru
      cap[XB_IDX] = 2'd1;   // XB is being rewritten this cycle
    end
  end

  logic [NUM_MODS-1:0][NPORT-1:0][OW-1:0]    port_off;
  logic [3:0][NUM_MODS-1:0]                  rd_use;
  logic [3:0][NUM_MODS-1:0][0:0]             rd_port;
  logic [NUM_MODS-1:0]                       ru_use;
  logic [NUM_MODS-1:0][0:0]                  ru_port;
  logic                                      overflow;
  logic [3:0]                                rd_valid;

  assign rd_valid = (mode == MODE_2R1W) ? 4'b0011 : 4'b1111;

  bdx_port_alloc #(.NRD(4), .NPORT(NPORT), .OW(OW)) u_alloc (
    .rd_valid(rd_valid),
    .rd_bank (rb),
    .rd_off  (ro),
    .ru_en   (mode == MODE_2R1W),
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
    if (k == XB_IDX) begin : g_xb
      assign mod_we    = we_eff;
      assign mod_wdata = ru_data;
    end else begin : g_mb
      assign mod_we    = we_eff && (bw == BANK_W'(k));
      assign mod_wdata = wdata;
    end

    bdx_bank #(.WIDTH(WIDTH), .DEPTH(DEPTH), .NRD(NPORT)) u_bank (
      .clk  (clk),
      .rst_n(rst_n),
      .ready(mod_ready[k]),
      .we   (mod_we),
      .waddr(ow),
      .wdata(mod_wdata),
      .raddr(port_off[k]),
      .rdata(q[k])
    );
  end

  // Each read is the XOR of the ports the scheduler picked for it.
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

  // The port budget always holds the requests of either mode.
  a_no_overflow: assert property (@(posedge clk) !overflow)
    else $error("bdx_2r1w_4r: read ports oversubscribed");

endmodule
