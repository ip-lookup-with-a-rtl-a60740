// h3_hash_bank: the "Hashing" stage of the BT-array. For every prefix length
// L = MIN_LEN .. MIN_LEN+NUM_BT-1 it hashes the destination address masked to its L
// most significant bits with a hash of the H3 class:
//     h(x) = x_1 & q(1) ^ x_2 & q(2) ^ ... ^ x_32 & q(32)
// where q(k) is row k of a 32 x KEY_W boolean matrix Q. Each address bit gates its Q row
// (a row of AND gates) and the gated rows are XOR-ed column by column into the key.
// All lengths share one Q matrix, so a new Q (loaded after a collision) re-hashes every
// BT; the per-length keys differ because the inputs are masked differently.
//
// Interface: q_we/q_addr/q_data write one Q row (row k multiplies address bit k, bit 0
// being the least significant address bit); this is the register-bus path the control
// software uses. in_valid/in_ip present an address; one cycle later out_valid,
// out_ip and out_key[i] (key for length MIN_LEN+i) are valid. Fully pipelined: one
// address per cycle, latency 1.
//
// Follows the published design: H3 class, 32 x 16 Q matrix written by software, 17 hash values.
// Own choices: one shared Q for all lengths, Q held in flip-flops (all rows are read in
// every cycle), Q cleared at reset, the output register.
module h3_hash_bank #(
  parameter int unsigned IP_W    = 32,
  parameter int unsigned KEY_W   = 16,
  parameter int unsigned NUM_BT  = 17,
  parameter int unsigned MIN_LEN = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // Q matrix write port
  input  logic                     q_we,
  input  logic [$clog2(IP_W)-1:0]  q_addr,
  input  logic [KEY_W-1:0]         q_data,
  // lookup
  input  logic                     in_valid,
  input  logic [IP_W-1:0]          in_ip,
  output logic                     out_valid,
  output logic [IP_W-1:0]          out_ip,
  output logic [KEY_W-1:0]         out_key [NUM_BT]
);

  logic [KEY_W-1:0] q_mat [IP_W];
  logic [KEY_W-1:0] key_d [NUM_BT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(IP_W); k++) q_mat[k] <= '0;
    end else if (q_we) begin
      q_mat[q_addr] <= q_data;
    end
  end

  // AND plane then XOR plane, once per prefix length
  always_comb begin
    for (int i = 0; i < int'(NUM_BT); i++) begin
      key_d[i] = '0;
      for (int k = 0; k < int'(IP_W); k++) begin
        // address bit k belongs to the prefix of length MIN_LEN+i when k >= IP_W-L
        if (k >= int'(IP_W) - (int'(MIN_LEN) + i))
          key_d[i] = key_d[i] ^ ({KEY_W{in_ip[k]}} & q_mat[k]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_ip    <= '0;
      for (int i = 0; i < int'(NUM_BT); i++) out_key[i] <= '0;
    end else begin
      out_valid <= in_valid;
      out_ip    <= in_ip;
      for (int i = 0; i < int'(NUM_BT); i++) out_key[i] <= key_d[i];
    end
  end

endmodule
