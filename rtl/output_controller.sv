// output_controller: merges the two lookup paths into one routing decision. The Direct
// Addressing result arrives one cycle after the lookup starts, the BT-array result a
// variable number of cycles later (it depends on SRAM reads), both in lookup order.
// DA results wait in a FIFO; when a BT-array result arrives the oldest DA result is
// popped and the longer match is chosen: a BT-array hit (length >= 16) always beats a DA
// hit (length <= 15); with no BT-array hit the DA entry is used if valid; otherwise the
// lookup misses (hit = 0).
//
// Interface: da_valid/da_entry from the DA table; bt_valid/bt_route/bt_plen/bt_nreads
// from the BT-array; out_valid (one cycle) with out_route, out_plen (0..32, 0 for a DA
// hit whose length is not kept), out_from_bt and out_nreads, registered: one cycle after
// bt_valid. The FIFO must hold DEPTH results, at least as many lookups as may be in
// flight; the BT-array's credit limit guarantees that.
//
// Follows the published design: an output controller that compares both results and gives the
// longest match. Own choices: the FIFO and its depth, the output fields.
module output_controller
  import iplookup_pkg::da_entry_t, iplookup_pkg::route_t;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       da_valid,
  input  da_entry_t  da_entry,
  input  logic       bt_valid,
  input  route_t     bt_route,
  input  logic [5:0] bt_plen,
  input  logic [4:0] bt_nreads,
  output logic       out_valid,
  output route_t     out_route,
  output logic [5:0] out_plen,
  output logic       out_from_bt,
  output logic [4:0] out_nreads
);

  da_entry_t da_head;
  logic      da_empty, da_full;

  sync_fifo #(.WIDTH($bits(da_entry_t)), .DEPTH(DEPTH)) u_da_fifo (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (da_valid),
    .din   (da_entry),
    .pop   (bt_valid),
    .dout  (da_head),
    .empty (da_empty),
    .full  (da_full)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      out_route   <= '0;
      out_plen    <= '0;
      out_from_bt <= 1'b0;
      out_nreads  <= '0;
    end else begin
      out_valid <= bt_valid;
      if (bt_valid) begin
        out_nreads <= bt_nreads;
        if (bt_route.hit) begin
          out_route   <= bt_route;
          out_plen    <= bt_plen;
          out_from_bt <= 1'b1;
        end else begin
          out_route.hit      <= da_head.valid;
          out_route.next_hop <= da_head.valid ? da_head.next_hop : '0;
          out_route.port     <= da_head.valid ? da_head.port : '0;
          out_plen           <= '0;
          out_from_bt        <= 1'b0;
        end
      end
    end
  end

  a_da_before_bt: assert property (@(posedge clk) disable iff (!rst_n) bt_valid |-> !da_empty);

endmodule
