// bdx_bank: one storage bank of a BDX memory, used both for the memory
// banks MB0..MB3 and for the XOR bank XB.
//
// The bank is an array of DEPTH words of WIDTH bits with one synchronous
// write port and NRD asynchronous read ports, the structure that FPGA slice
// logic (registers and LUT RAM) gives; no block RAM is implied. Each bank
// supports two reads and one write in the same cycle (NRD = 2), as the
// design states for a single memory bank.
//
// After reset the bank clears itself: its own bdx_addr_counter walks all
// addresses and zero is written at each, one per clock. `ready` goes high
// after DEPTH cycles; writes requested before that are ignored and reads
// return undefined data.
//
// Timing: rdata[i] follows raddr[i] combinationally and shows the contents
// before the clock edge; a write to waddr takes effect at the rising edge,
// so a read of the address being written returns the old word.
module bdx_bank #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 512,
  parameter int unsigned NRD   = 2
) (
  input  logic                               clk,
  input  logic                               rst_n,
  output logic                               ready,
  input  logic                               we,
  input  logic [$clog2(DEPTH)-1:0]           waddr,
  input  logic [WIDTH-1:0]                   wdata,
  input  logic [NRD-1:0][$clog2(DEPTH)-1:0]  raddr,
  output logic [NRD-1:0][WIDTH-1:0]          rdata
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    clr_addr;
  logic             clr_done;

  bdx_addr_counter #(.DEPTH(DEPTH)) u_cnt (
    .clk  (clk),
    .rst_n(rst_n),
    .addr (clr_addr),
    .done (clr_done)
  );

  assign ready = clr_done;

  always_ff @(posedge clk) begin
    if (!clr_done)  mem[clr_addr] <= '0;
    else if (we)    mem[waddr]    <= wdata;
  end

  always_comb begin
    for (int i = 0; i < NRD; i++) rdata[i] = mem[raddr[i]];
  end

endmodule
