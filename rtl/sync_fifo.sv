// sync_fifo: small single-clock first-in first-out buffer used to decouple the pipelined
// parts of the lookup engine from the variable-latency SRAM check. DEPTH words of WIDTH
// bits held in registers; dout shows the oldest word while empty is 0 (first-word
// fall-through). push and pop act on the rising clock edge and may happen together.
// Pushing when full or popping when empty is an error and is asserted against; the
// users keep it from happening by credit counting. This buffer is a choice of this
// design, not part of the published scheme.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    rptr, wptr;
  logic [PW:0]      count;

  assign empty = (count == '0);
  assign full  = (count == (PW+1)'(DEPTH));
  assign dout  = mem[rptr];

  always_ff @(posedge clk) begin
    if (push) mem[wptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rptr  <= '0;
      wptr  <= '0;
      count <= '0;
    end else begin
      if (push) wptr <= (wptr == PW'(DEPTH-1)) ? '0 : wptr + 1'b1;
      if (pop)  rptr <= (rptr == PW'(DEPTH-1)) ? '0 : rptr + 1'b1;
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop  |-> !empty);

endmodule
