// tb_priority_encoder: exhaustive over one-hot and two-hot vectors plus random vectors;
// the expected index is the highest set bit found by scanning down from the top.
module tb_priority_encoder;
  logic [16:0] match_vec;
  logic        valid;
  logic [4:0]  idx;
  int checks = 0, failures = 0;

  priority_encoder dut (.*);

  task automatic check_vec(input logic [16:0] v);
    int exp_idx = 0;
    bit exp_valid = 0;
    match_vec = v;
    #1;
    for (int i = 16; i >= 0; i--) if (v[i] && !exp_valid) begin exp_valid = 1; exp_idx = i; end
    checks++;
    if (valid !== exp_valid || (exp_valid && idx !== 5'(exp_idx))) begin
      failures++;
      $display("vec %b: valid %0d idx %0d", v, valid, idx);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_vec('0);
    for (int i = 0; i < 17; i++)
      for (int j = 0; j < 17; j++) check_vec((17'(1) << i) | (17'(1) << j));
    for (int n = 0; n < 2000; n++) check_vec(17'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
