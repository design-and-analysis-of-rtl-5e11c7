// bdx_port_alloc: read-port scheduler for one level of a BDX memory.
//
// It decides, for one clock cycle, which physical read port of which of the
// five storage modules (MB0..MB3 and XB) serves each logical read and the
// read update (Ru) of a write. Module k offers cap[k] read ports this cycle.
// Requests are granted in a fixed order:
//   1. Ru, when a write is requested: one port on every memory bank except
//      the one written (the new XB word is the written word XORed with them);
//   2. the logical reads 0..NRD-1 in order: a read uses a free port of its
//      own bank when there is one (direct read); otherwise it takes one port
//      on each of the four other modules, the three other banks and XB, and
//      its word is the XOR of what they return (XOR recovery).
// For each read the result is a mask of the modules whose port outputs are
// XORed (a single module for a direct read) and the port number used on
// each. Ports are handed out from 0 upwards. `overflow` flags a request the
// capacities could not hold; the callers choose capacities for which that
// cannot happen and assert it.
//
// Purely combinational. The greedy order is this design's own choice; the
// direct-or-recover rule is the BDX method itself.
module bdx_port_alloc
  import bdx_pkg::*;
#(
  parameter int unsigned NRD   = 4,  // logical reads
  parameter int unsigned NPORT = 2,  // physical read ports per module
  parameter int unsigned OW    = 7   // offset (in-bank address) width
) (
  input  logic [NRD-1:0]                                 rd_valid,
  input  logic [NRD-1:0][BANK_W-1:0]                     rd_bank,
  input  logic [NRD-1:0][OW-1:0]                         rd_off,
  input  logic                                           ru_en,
  input  logic [BANK_W-1:0]                              ru_bank,
  input  logic [OW-1:0]                                  ru_off,
  input  logic [NUM_MODS-1:0][$clog2(NPORT+1)-1:0]       cap,
  output logic [NUM_MODS-1:0][NPORT-1:0][OW-1:0]         port_off,
  output logic [NRD-1:0][NUM_MODS-1:0]                   rd_use,
  output logic [NRD-1:0][NUM_MODS-1:0][$clog2(NPORT)-1:0] rd_port,
  output logic [NRD-1:0]                                 rd_recon,
  output logic [NUM_MODS-1:0]                            ru_use,
  output logic [NUM_MODS-1:0][$clog2(NPORT)-1:0]         ru_port,
  output logic                                           overflow
);

  localparam int unsigned CW = $clog2(NPORT + 1);
  localparam int unsigned PW = $clog2(NPORT);

  logic [NUM_MODS-1:0][CW-1:0] used;
  logic [$clog2(NUM_MODS)-1:0] b;    // bank of the read being scheduled

  always_comb begin
    used     = '0;
    b        = '0;
    port_off = '0;
    rd_use   = '0;
    rd_port  = '0;
    rd_recon = '0;
    ru_use   = '0;
    ru_port  = '0;
    overflow = 1'b0;

    // 1. Read update of the XOR bank.
    if (ru_en) begin
      for (int k = 0; k < NUM_BANKS; k++) begin
        if (BANK_W'(k) != ru_bank) begin
          if (used[k] < cap[k]) begin
            port_off[k][PW'(used[k])] = ru_off;
            ru_use[k]  = 1'b1;
            ru_port[k] = PW'(used[k]);
            used[k]    = used[k] + 1'b1;
          end else begin
            overflow = 1'b1;
          end
        end
      end
    end

    // 2. Logical reads, direct when the bank has a free port.
    for (int i = 0; i < NRD; i++) begin
      b = {1'b0, rd_bank[i]};
      if (rd_valid[i]) begin
        if (used[b] < cap[b]) begin
          port_off[b][PW'(used[b])] = rd_off[i];
          rd_use[i][b]  = 1'b1;
          rd_port[i][b] = PW'(used[b]);
          used[b]       = used[b] + 1'b1;
        end else begin
          rd_recon[i] = 1'b1;
          for (int k = 0; k < NUM_MODS; k++) begin
            if (k == XB_IDX || BANK_W'(k) != rd_bank[i]) begin
              if (used[k] < cap[k]) begin
                port_off[k][PW'(used[k])] = rd_off[i];
                rd_use[i][k]  = 1'b1;
                rd_port[i][k] = PW'(used[k]);
                used[k]       = used[k] + 1'b1;
              end else begin
                overflow = 1'b1;
              end
            end
          end
        end
      end
    end
  end

endmodule
