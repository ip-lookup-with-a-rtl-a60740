// direct_addressing: lookup for the short prefixes (length 0..15). The 15 most
// significant bits of the destination address index a table of 2^DA_BITS entries,
// each holding a valid bit, a next hop and an output port. Prefixes shorter than 15
// bits are expanded by the control software into every entry they cover (a longer
// prefix overwriting a shorter one), so one read gives the longest short-prefix match.
//
// Interface: wr_en/wr_addr/wr_data write one entry; in_valid/in_ip start a lookup and
// out_valid/out_entry follow one cycle later (synchronous memory read). One lookup per
// cycle. The table is not cleared at reset: the control software writes every entry.
//
// Follows the published design: a direct-addressed table indexed by the 15 most significant
// address bits for prefixes of length <= 15. Own choices: the entry format, prefix
// expansion in software and on-chip storage.
module direct_addressing
  import iplookup_pkg::da_entry_t;
#(
  parameter int unsigned IP_W    = 32,
  parameter int unsigned DA_BITS = 15
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wr_en,
  input  logic [DA_BITS-1:0] wr_addr,
  input  da_entry_t          wr_data,
  input  logic               in_valid,
  input  logic [IP_W-1:0]    in_ip,
  output logic               out_valid,
  output da_entry_t          out_entry
);

  da_entry_t table_mem [2**DA_BITS];

  always_ff @(posedge clk) begin
    if (wr_en) table_mem[wr_addr] <= wr_data;
    out_entry <= table_mem[in_ip[IP_W-1 -: DA_BITS]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
