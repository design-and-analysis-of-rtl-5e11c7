// bdx_2r1w: generic two-read one-write memory built by bank division with
// XOR (BDX).
//
// The 4*DEPTH words are spread over four memory banks MB0..MB3 of DEPTH
// words each; the word address is {bank, offset}. A fifth bank, the XOR
// bank XB, holds X[o] = MB0[o] ^ MB1[o] ^ MB2[o] ^ MB3[o] for every offset o.
// Each memory bank has two read ports: port 0 serves the data reads, port 1
// is kept for the read update (Ru) of XB. So:
//   * read 0 always reads its bank directly;
//   * read 1 reads its bank directly when that differs from read 0's bank;
//     when both reads hit the same bank b it recovers its word as
//     XB[o1] ^ (XOR of MBk[o1] for the three banks k != b)   (bank conflict);
//   * a write of W to bank b, offset o stores W in MBb[o] and, in the same
//     cycle, W ^ (XOR of MBk[o] for k != b) in XB[o] (read update).
// All five banks start cleared to zero, so XB is consistent from the start.
//
// Interface: one write port (we, waddr, wdata) and two read ports (raddr,
// rdata); r1_recon is high when read 1 is being recovered through XB.
// `ready` rises DEPTH cycles after reset, when all banks are cleared; writes
// before then are ignored.
//
// Timing: reads are combinational (asynchronous, as LUT RAM) and return the
// contents before the next clock edge; a write takes effect at the rising
// edge. One write and two reads are accepted every cycle.
//
// Follows the design: bank/XB structure, XB update and XOR recovery. This
// design's own choices: bank = two most significant address bits, the
// port-1 reservation for the read update, asynchronous reads and
// read-old-data on a simultaneous write.
module bdx_2r1w
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
  input  logic [1:0][BANK_W+$clog2(DEPTH)-1:0]  raddr,
  output logic [1:0][WIDTH-1:0]                 rdata,
  output logic                                  r1_recon
);

  localparam int unsigned OW = $clog2(DEPTH);

  bank_sel_t        b0, b1, bw;
  logic [OW-1:0]    o0, o1, ow;
  logic             we_eff;

  assign {b0, o0} = raddr[0];
  assign {b1, o1} = raddr[1];
  assign {bw, ow} = waddr;

  logic [NUM_MODS-1:0] bank_ready;
  assign ready  = &bank_ready;
  assign we_eff = we & ready;

  // Memory banks: port 0 for data reads, port 1 for the read update.
  logic [NUM_BANKS-1:0][1:0][OW-1:0]    mb_raddr;
  logic [NUM_BANKS-1:0][1:0][WIDTH-1:0] mb_q;
  logic [0:0][WIDTH-1:0]                xb_q;
  logic [WIDTH-1:0]                     ru_data;

  for (genvar k = 0; k < NUM_BANKS; k++) begin : g_mb
    assign mb_raddr[k][0] = (bank_sel_t'(k) == b0) ? o0 : o1;
    assign mb_raddr[k][1] = ow;

    bdx_bank #(.WIDTH(WIDTH), .DEPTH(DEPTH), .NRD(2)) u_mb (
      .clk  (clk),
      .rst_n(rst_n),
      .ready(bank_ready[k]),
      .we   (we_eff && (bw == bank_sel_t'(k))),
      .waddr(ow),
      .wdata(wdata),
      .raddr(mb_raddr[k]),
      .rdata(mb_q[k])
    );
  end

  bdx_bank #(.WIDTH(WIDTH), .DEPTH(DEPTH), .NRD(1)) u_xb (
    .clk  (clk),
    .rst_n(rst_n),
    .ready(bank_ready[XB_IDX]),
    .we   (we_eff),
    .waddr(ow),
    .wdata(ru_data),
    .raddr(o1),
    .rdata(xb_q)
  );

  // Read 0: direct. Read 1: direct, or XOR recovery on a bank conflict.
  assign r1_recon = (b1 == b0);

  always_comb begin
    rdata[0] = mb_q[b0][0];
    if (r1_recon) begin
      rdata[1] = xb_q[0];
      for (int k = 0; k < NUM_BANKS; k++)
        if (bank_sel_t'(k) != b1) rdata[1] ^= mb_q[k][0];
    end else begin
      rdata[1] = mb_q[b1][0];
    end
  end

  // Read update: new XB word = written word ^ the other three banks.
  always_comb begin
    ru_data = wdata;
    for (int k = 0; k < NUM_BANKS; k++)
      if (bank_sel_t'(k) != bw) ru_data ^= mb_q[k][1];
  end

endmodule
