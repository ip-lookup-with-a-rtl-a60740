// iplookup_top: longest-prefix-match IP lookup engine. A 32-bit destination address is
// looked up in two structures at once: the Direct Addressing table (prefixes of length
// 0..15, indexed by the 15 most significant address bits) and the BT-array (prefixes of
// length 16..32, one Blooming-Tree perfect hash per length, confirmed in external SRAM).
// The output controller returns the longest match: a 32-bit next hop and a 3-bit port.
//
// Interface:
//   cfg            single-cycle configuration writes from the control software (H3 Q
//                  matrix rows, BT tables, DA entries), see iplookup_pkg::cfg_wr_t;
//   in_valid/in_ready/in_ip   lookup requests (accepted when both are high);
//   sram_*         read port to the external SRAM holding the forwarding entries;
//   out_valid      one-cycle pulse per lookup, in request order, with out_route (hit,
//                  next hop, port), out_plen (matched length, 0 for a DA match or a miss),
//                  out_from_bt and out_nreads (SRAM reads the lookup used).
// Timing: up to DEPTH lookups in flight. For an idle engine and an SRAM answering S
// cycles after it samples a read, out_valid rises 6 + R*(S+2) cycles after the accepting
// edge, R being the SRAM reads, minus one when the BT-array confirmed a hit (R = 0: no BT
// matched, 6 cycles; a BT hit with no false positive: 7 + S). Each false positive costs
// one more read. Throughput is bounded by the one-at-a-time SRAM check.
//
// Follows the published design: the split at length 16, BT-array and DA in parallel, an output
// controller picking the longest match, 32-bit next hop and 3-bit port. Own choices: the
// configuration bus, the request handshake and the in-order result FIFO.
module iplookup_top
  import iplookup_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  cfg_wr_t            cfg,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [IP_W-1:0]    in_ip,
  output logic               sram_req,
  output logic [SRAM_AW-1:0] sram_addr,
  input  logic               sram_rvalid,
  input  sram_entry_t        sram_rdata,
  output logic               out_valid,
  output route_t             out_route,
  output logic [5:0]         out_plen,
  output logic               out_from_bt,
  output logic [4:0]         out_nreads
);

  logic       bt_valid;
  route_t     bt_route;
  logic [5:0] bt_plen;
  logic [4:0] bt_nreads;
  logic       da_valid;
  da_entry_t  da_entry;

  bt_array #(.DEPTH(DEPTH)) u_bt_array (
    .clk         (clk),
    .rst_n       (rst_n),
    .cfg         (cfg),
    .in_valid    (in_valid),
    .in_ready    (in_ready),
    .in_ip       (in_ip),
    .sram_req    (sram_req),
    .sram_addr   (sram_addr),
    .sram_rvalid (sram_rvalid),
    .sram_rdata  (sram_rdata),
    .out_valid   (bt_valid),
    .out_route   (bt_route),
    .out_plen    (bt_plen),
    .out_nreads  (bt_nreads)
  );

  direct_addressing #(.IP_W(IP_W), .DA_BITS(DA_BITS)) u_da (
    .clk       (clk),
    .rst_n     (rst_n),
    .wr_en     (cfg.we && cfg.target == CFG_DA),
    .wr_addr   (cfg.addr),
    .wr_data   (cfg.data[$bits(da_entry_t)-1:0]),
    .in_valid  (in_valid && in_ready),
    .in_ip     (in_ip),
    .out_valid (da_valid),
    .out_entry (da_entry)
  );

  output_controller #(.DEPTH(DEPTH)) u_out (
    .clk         (clk),
    .rst_n       (rst_n),
    .da_valid    (da_valid),
    .da_entry    (da_entry),
    .bt_valid    (bt_valid),
    .bt_route    (bt_route),
    .bt_plen     (bt_plen),
    .bt_nreads   (bt_nreads),
    .out_valid   (out_valid),
    .out_route   (out_route),
    .out_plen    (out_plen),
    .out_from_bt (out_from_bt),
    .out_nreads  (out_nreads)
  );

endmodule
