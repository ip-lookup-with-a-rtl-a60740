// priority_encoder: picks the longest matching prefix length from the BT-array's
// result bus. Bit i of match_vec is the answer of the BT for prefix length
// MIN_LEN+i, so the highest set bit is the longest candidate. Purely combinational:
// valid is 1 when any bit is set and idx is then the index of the highest set bit
// (0 when none is set).
// Follows the published design: a priority encoder that takes the longest matching prefix
// from the 17-bit result bus. Own choice: bit i stands for length MIN_LEN+i.
module priority_encoder #(
  parameter int unsigned N = 17
) (
  input  logic [N-1:0]         match_vec,
  output logic                 valid,
  output logic [$clog2(N)-1:0] idx
);

  always_comb begin
    valid = 1'b0;
    idx   = '0;
    for (int i = 0; i < int'(N); i++) begin
      if (match_vec[i]) begin
        valid = 1'b1;
        idx   = ($clog2(N))'(i);
      end
    end
  end

endmodule
