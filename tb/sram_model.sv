// sram_model: behavioural model of the external SRAM that holds the forwarding entries.
// Not synthesizable logic of the design: a testbench part. One read strobe (req, addr)
// returns rvalid/rdata LAT cycles later; words never written read as zero. Testbenches
// fill it with the write() task and may count reads with the reads counter.
module sram_model
  import iplookup_pkg::sram_entry_t;
#(
  parameter int LAT = 2
) (
  input  logic        clk,
  input  logic        req,
  input  logic [19:0] addr,
  output logic        rvalid,
  output sram_entry_t rdata
);

  sram_entry_t mem [int unsigned];
  logic        v_pipe [LAT];
  sram_entry_t d_pipe [LAT];
  int unsigned reads = 0;

  function automatic void write(int unsigned a, sram_entry_t e);
    mem[a] = e;
  endfunction

  function automatic void clear();
    mem.delete();
  endfunction

  initial for (int i = 0; i < LAT; i++) begin v_pipe[i] = 1'b0; d_pipe[i] = '0; end

  always @(posedge clk) begin
    v_pipe[0] <= req;
    d_pipe[0] <= (req && mem.exists(int'(addr))) ? mem[int'(addr)] : '0;
    if (req) reads <= reads + 1;
    for (int i = 1; i < LAT; i++) begin
      v_pipe[i] <= v_pipe[i-1];
      d_pipe[i] <= d_pipe[i-1];
    end
  end

  assign rvalid = v_pipe[LAT-1];
  assign rdata  = d_pipe[LAT-1];

endmodule
