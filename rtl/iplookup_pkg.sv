// iplookup_pkg: types and constants shared by the Blooming-Tree IP lookup engine.
//
// The engine splits the forwarding table in two: prefixes of length 0..15 live in a
// Direct Addressing table indexed by the 15 most significant address bits, and
// prefixes of length 16..32 are held by an array of 17 Blooming-Tree minimal perfect
// hash functions (one per length) whose output is an address into an external SRAM.
// The sizes below are those of the reference configuration: 17 BTs, 16-bit hash keys,
// 128 sections of 16 bins per BT, 5-bit Huffman-coded bins, 20-bit SRAM addresses,
// a 32-bit next hop and a 3-bit output port.
//
// Interface and timing: nothing here has timing; the configuration write bus
// (cfg_wr_t) is a single-cycle write strobe with a target, a BT number, a row and data.
// The bus format and the SRAM entry layout are choices of this design.
package iplookup_pkg;

  localparam int unsigned IP_W       = 32;  // IPv4 destination address
  localparam int unsigned NH_W       = 32;  // next-hop address
  localparam int unsigned PORT_W     = 3;   // 8 output ports
  localparam int unsigned MIN_BT_LEN = 16;  // shortest prefix held by the BT-array
  localparam int unsigned NUM_BT     = 17;  // lengths 16..32
  localparam int unsigned DA_BITS    = 15;  // Direct Addressing index width
  localparam int unsigned KEY_W      = 16;  // H3 output (key) width
  localparam int unsigned SRAM_AW    = 20;  // SRAM address / lookup-table entry width
  localparam int unsigned PLEN_W     = 6;   // prefix length 0..32

  // One forwarding entry as stored in one SRAM word.
  typedef struct packed {
    logic [IP_W-1:0]   prefix;    // prefix bits, host bits zero
    logic [PLEN_W-1:0] plen;      // prefix length
    logic [NH_W-1:0]   next_hop;  // gateway address
    logic [PORT_W-1:0] port;      // output port
  } sram_entry_t;

  localparam int unsigned SRAM_DW = $bits(sram_entry_t);

  // Result of a lookup (one routing decision).
  typedef struct packed {
    logic              hit;       // a prefix matched
    logic [NH_W-1:0]   next_hop;
    logic [PORT_W-1:0] port;
  } route_t;

  // One Direct Addressing entry.
  typedef struct packed {
    logic              valid;
    logic [NH_W-1:0]   next_hop;
    logic [PORT_W-1:0] port;
  } da_entry_t;

  // Targets of the configuration (register-bus) write port.
  typedef enum logic [2:0] {
    CFG_Q   = 3'd0,  // one row of the H3 Q matrix (addr = address bit, data[KEY_W-1:0])
    CFG_LUT = 3'd1,  // BT lookup table row (addr = section, data[SRAM_AW-1:0])
    CFG_CBF = 3'd2,  // BT layer 0, one section of 16 bins x 5 bits (data[79:0])
    CFG_L1  = 3'd3,  // BT layer 1, one section: 2 bits per bin (data[31:0])
    CFG_L2  = 3'd4,  // BT layer 2, one section: 2 bits per layer-1 bit (data[63:0])
    CFG_DA  = 3'd5   // Direct Addressing entry (addr = index, data = da_entry_t)
  } cfg_target_e;

  localparam int unsigned CFG_DW = 80;

  typedef struct packed {
    logic              we;
    cfg_target_e       target;
    logic [4:0]        bt;        // BT number 0..16 (prefix length - 16)
    logic [DA_BITS-1:0] addr;
    logic [CFG_DW-1:0] data;
  } cfg_wr_t;

  // Prefix mask of a given length.
  function automatic logic [IP_W-1:0] prefix_mask(input int unsigned len);
    logic [IP_W-1:0] m;
    for (int unsigned i = 0; i < IP_W; i++) m[IP_W-1-i] = (i < len);
    return m;
  endfunction

endpackage
