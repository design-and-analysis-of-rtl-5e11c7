// bdx_addr_counter: address generator for the zero-initialisation of one
// bank.
//
// After reset the counter steps through every address of a bank, 0 to
// DEPTH-1, one per clock, and then stops with `done` high. The bank it
// belongs to writes zero at `addr` on every cycle while `done` is low, so
// all locations are cleared DEPTH cycles after reset is released. One such
// counter sits in each of the five banks (four memory banks and the XOR
// bank), as the design's address-generation counters count to the last
// location of the memory depth; that they are used for the clearing sweep
// is this design's reading.
//
// Interface: clk, active-low asynchronous rst_n; addr is the current sweep
// address, done rises in the cycle after addr reached DEPTH-1 and stays high
// until the next reset.
module bdx_addr_counter #(
  parameter int unsigned DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     rst_n,
  output logic [$clog2(DEPTH)-1:0] addr,
  output logic                     done
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam logic [AW-1:0] LAST = AW'(DEPTH - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr <= '0;
      done <= 1'b0;
    end else if (!done) begin
      if (addr == LAST) done <= 1'b1;
      else              addr <= addr + 1'b1;
    end
  end

endmodule
