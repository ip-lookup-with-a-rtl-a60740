// sram_query: confirms the candidates of the BT-array in the external SRAM. Blooming
// Trees can give false positives, so each candidate address is read and the stored
// forwarding entry is compared with the destination address masked to the candidate's
// length. Candidates are tried longest first (priority encoder); a false positive clears
// its bit and the next longest is tried, so a lookup costs 1 + (false positives) SRAM
// reads when some prefix matches, and no read when no BT matched.
//
// Interface: in_valid/in_ready accept one lookup (address, 17-bit match vector, 17
// candidate SRAM addresses); in_ready is high only while idle, so one lookup is in
// progress at a time. SRAM port: sram_req is a one-cycle read strobe with sram_addr;
// the memory answers with sram_rvalid and sram_rdata some cycles later (any latency,
// one outstanding read). Output: out_valid pulses for one cycle with the route (hit,
// next hop, port), the matched prefix length and the number of SRAM reads used.
//
// Timing: accept -> first read strobe 1 cycle later; each read costs the SRAM latency
// plus one cycle; the result is given in the cycle of the confirming response; a
// lookup with no candidate finishes 1 cycle after it is accepted.
//
// Follows the published design: longest-first checking with sequential fall-back on false
// positives. Own choices: the SRAM word layout (prefix, length, next hop, port), the
// read handshake and the state machine.
module sram_query
  import iplookup_pkg::sram_entry_t, iplookup_pkg::route_t;
#(
  parameter int unsigned IP_W    = 32,
  parameter int unsigned NUM_BT  = 17,
  parameter int unsigned MIN_LEN = 16,
  parameter int unsigned ADDR_W  = 20
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic [IP_W-1:0]           in_ip,
  input  logic [NUM_BT-1:0]         in_match,
  input  logic [ADDR_W-1:0]         in_addr [NUM_BT],
  // external SRAM
  output logic                      sram_req,
  output logic [ADDR_W-1:0]         sram_addr,
  input  logic                      sram_rvalid,
  input  sram_entry_t               sram_rdata,
  // result
  output logic                      out_valid,
  output route_t                    out_route,
  output logic [5:0]                out_plen,
  output logic [4:0]                out_nreads
);

  localparam int unsigned IW = $clog2(NUM_BT);

  typedef enum logic [1:0] {S_IDLE, S_CHECK, S_WAIT} state_e;
  state_e state;

  logic [IP_W-1:0]   ip_q;
  logic [NUM_BT-1:0] pend_q;
  logic [ADDR_W-1:0] addr_q [NUM_BT];
  logic [IW-1:0]     cur_q;
  logic [4:0]        nreads_q;

  logic          pe_valid;
  logic [IW-1:0] pe_idx;

  priority_encoder #(.N(NUM_BT)) u_pe (
    .match_vec (pend_q),
    .valid     (pe_valid),
    .idx       (pe_idx)
  );

  // compare the returned entry with the address masked to the candidate length
  logic [5:0]      cur_len;
  logic [IP_W-1:0] cur_mask;
  logic            confirmed;
  always_comb begin
    cur_len  = 6'(MIN_LEN) + 6'(cur_q);
    cur_mask = '0;
    for (int i = 0; i < int'(IP_W); i++) cur_mask[IP_W-1-i] = (i < int'(cur_len));
    confirmed = (sram_rdata.plen == cur_len) && (sram_rdata.prefix == (ip_q & cur_mask));
  end

  assign in_ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      ip_q      <= '0;
      pend_q    <= '0;
      cur_q     <= '0;
      nreads_q  <= '0;
      sram_req  <= 1'b0;
      sram_addr <= '0;
      out_valid <= 1'b0;
      out_route <= '0;
      out_plen  <= '0;
      out_nreads <= '0;
      for (int i = 0; i < int'(NUM_BT); i++) addr_q[i] <= '0;
    end else begin
      sram_req  <= 1'b0;
      out_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (in_valid) begin
          ip_q     <= in_ip;
          pend_q   <= in_match;
          addr_q   <= in_addr;
          nreads_q <= '0;
          state    <= S_CHECK;
        end
        S_CHECK: begin
          if (pe_valid) begin
            sram_req  <= 1'b1;
            sram_addr <= addr_q[pe_idx];
            cur_q     <= pe_idx;
            nreads_q  <= nreads_q + 1'b1;
            state     <= S_WAIT;
          end else begin
            out_valid  <= 1'b1;          // no (remaining) candidate: BT-array miss
            out_route  <= '0;
            out_plen   <= '0;
            out_nreads <= nreads_q;
            state      <= S_IDLE;
          end
        end
        S_WAIT: if (sram_rvalid) begin
          if (confirmed) begin
            out_valid          <= 1'b1;
            out_route.hit      <= 1'b1;
            out_route.next_hop <= sram_rdata.next_hop;
            out_route.port     <= sram_rdata.port;
            out_plen           <= cur_len;
            out_nreads         <= nreads_q;
            state              <= S_IDLE;
          end else begin
            pend_q[cur_q] <= 1'b0;       // false positive: try the next longest
            state         <= S_CHECK;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_rvalid_when_waiting: assert property (@(posedge clk) disable iff (!rst_n)
                                          sram_rvalid |-> state == S_WAIT);

endmodule
