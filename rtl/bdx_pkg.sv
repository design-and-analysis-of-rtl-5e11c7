// bdx_pkg: constants and types shared by the bank-division-with-XOR (BDX)
// memories.
//
// Every BDX memory splits its address space over four memory banks
// (MB0..MB3) and keeps a fifth, the XOR bank (XB), whose word at offset o is
// the XOR of the four bank words at offset o. A word address is
// {bank[1:0], offset}: the two most significant bits pick the bank. The
// five storage modules are indexed 0..3 for the memory banks and XB_IDX for
// the XOR bank.
package bdx_pkg;

  localparam int unsigned NUM_BANKS = 4;              // MB0..MB3
  localparam int unsigned NUM_MODS  = NUM_BANKS + 1;  // MB0..MB3 and XB
  localparam int unsigned XB_IDX    = NUM_BANKS;      // index of the XOR bank
  localparam int unsigned BANK_W    = 2;              // bank-select address bits

  typedef logic [BANK_W-1:0] bank_sel_t;

  // Operating mode of the hybrid 2R1W/4R module: 2R1W while a write is
  // requested, 4R while none is.
  typedef enum logic {
    MODE_2R1W = 1'b0,
    MODE_4R   = 1'b1
  } bdx_mode_e;

endpackage
