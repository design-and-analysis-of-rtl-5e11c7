// bdx_kr1w: k-read one-write memory made of k/2 copies of the BDX 2R1W
// memory.
//
// Every copy (bdx_2r1w) holds the whole 4*DEPTH-word contents and receives
// the same write; copy j serves reads 2j and 2j+1. The write port is shared,
// so all copies always hold the same data, at the cost of K/2 times the
// storage of one 2R1W memory, which is the cost the hierarchical 4R1W
// design (bdx_hbdx_4r1w) avoids.
//
// Interface: write port (we, waddr, wdata), K read ports (raddr, rdata),
// rd_recon[j] high when read 2j+1, the second read of copy j, is recovered
// through that copy's XOR bank (the first read of a copy is always direct).
// `ready` rises DEPTH cycles after reset.
//
// Timing: as bdx_2r1w: combinational reads of the contents before the next
// rising edge, writes at the edge, one write and K reads every cycle.
//
// Follows the design: replication of 2R1W modules with a common write.
// K is not fixed by the design; four read ports are this design's default.
module bdx_kr1w
  import bdx_pkg::*;
#(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 512,
  parameter int unsigned K     = 4     // number of read ports, even
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  output logic                                  ready,
  input  logic                                  we,
  input  logic [BANK_W+$clog2(DEPTH)-1:0]       waddr,
  input  logic [WIDTH-1:0]                      wdata,
  input  logic [K-1:0][BANK_W+$clog2(DEPTH)-1:0] raddr,
  output logic [K-1:0][WIDTH-1:0]               rdata,
  output logic [K/2-1:0]                        rd_recon
);

  localparam int unsigned NCOPY = K / 2;

  logic [NCOPY-1:0] copy_ready;
  assign ready = &copy_ready;

  for (genvar j = 0; j < NCOPY; j++) begin : g_copy
    bdx_2r1w #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_2r1w (
      .clk     (clk),
      .rst_n   (rst_n),
      .ready   (copy_ready[j]),
      .we      (we),
      .waddr   (waddr),
      .wdata   (wdata),
      .raddr   (raddr[2*j+1 -: 2]),
      .rdata   (rdata[2*j+1 -: 2]),
      .r1_recon(rd_recon[j])
    );
  end

endmodule
