// bdx_top: the two multi-read-port BDX memories side by side.
//
// h_*: the hierarchical 4R1W memory (bdx_hbdx_4r1w), four reads and one
//      write per cycle from five 2R1W/4R hybrid modules.
// k_*: the kR1W memory (bdx_kr1w), K/2 replicated 2R1W memories with a
//      common write.
// Both hold 4*DEPTH words of WIDTH bits, addressed {bank[1:0], offset}, are
// cleared to zero after reset (h_ready, k_ready) and have combinational
// reads and writes at the rising clock edge. The two share only clk and
// rst_n. The recovery flags say when a read was served through an XOR bank.
module bdx_top
  import bdx_pkg::*;
#(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 512,
  parameter int unsigned K     = 4
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  // hierarchical 4R1W memory
  output logic                                   h_ready,
  input  logic                                   h_we,
  input  logic [BANK_W+$clog2(DEPTH)-1:0]        h_waddr,
  input  logic [WIDTH-1:0]                       h_wdata,
  input  logic [3:0][BANK_W+$clog2(DEPTH)-1:0]   h_raddr,
  output logic [3:0][WIDTH-1:0]                  h_rdata,
  output logic [3:0]                             h_rd_recon,
  output logic [NUM_MODS-1:0]                    h_sub_recon,
  // kR1W memory
  output logic                                   k_ready,
  input  logic                                   k_we,
  input  logic [BANK_W+$clog2(DEPTH)-1:0]        k_waddr,
  input  logic [WIDTH-1:0]                       k_wdata,
  input  logic [K-1:0][BANK_W+$clog2(DEPTH)-1:0] k_raddr,
  output logic [K-1:0][WIDTH-1:0]                k_rdata,
  output logic [K/2-1:0]                         k_rd_recon
);

  bdx_hbdx_4r1w #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_hbdx (
    .clk      (clk),
    .rst_n    (rst_n),
    .ready    (h_ready),
    .we       (h_we),
    .waddr    (h_waddr),
    .wdata    (h_wdata),
    .raddr    (h_raddr),
    .rdata    (h_rdata),
    .rd_recon (h_rd_recon),
    .sub_recon(h_sub_recon)
  );

  bdx_kr1w #(.WIDTH(WIDTH), .DEPTH(DEPTH), .K(K)) u_kr1w (
    .clk     (clk),
    .rst_n   (rst_n),
    .ready   (k_ready),
    .we      (k_we),
    .waddr   (k_waddr),
    .wdata   (k_wdata),
    .raddr   (k_raddr),
    .rdata   (k_rdata),
    .rd_recon(k_rd_recon)
  );

endmodule
