// tb_h3_hash_bank: loads a random Q matrix, hashes random addresses back to back and
// compares each of the 17 keys with the H3 definition applied to the address masked to
// its prefix length; checks the 1-cycle latency, that a Q row rewrite changes the keys
// accordingly (re-hash after an update), and that host bits below a length do not
// change that length's key.
module tb_h3_hash_bank;
  import tb_lookup_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge so that asynchronous resets take effect
  always #5 clk = ~clk;

  logic        q_we = 0;
  logic [4:0]  q_addr = '0;
  logic [15:0] q_data = '0;
  logic        in_valid = 0;
  logic [31:0] in_ip = '0;
  logic        out_valid;
  logic [31:0] out_ip;
  logic [15:0] out_key [17];

  h3_hash_bank dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] q [32];
  typedef struct { logic [31:0] ip; int t; logic [15:0] q [32]; } exp_t;
  exp_t expq [$];

  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t e;
    e = expq.pop_front();
    checks++;
    if (out_ip !== e.ip || cycle - e.t != 1) failures++;
    for (int i = 0; i < 17; i++) begin
      checks++;
      if (out_key[i] !== h3_ref(e.q, e.ip, 16 + i)) begin
        failures++;
        if (failures < 10) $display("ip %h len %0d: key %h expected %h", e.ip, 16+i, out_key[i], h3_ref(e.q, e.ip, 16+i));
      end
    end
  end

  task automatic load_q();
    for (int k = 0; k < 32; k++) begin
      @(negedge clk);
      q[k] = 16'($urandom);
      q_we = 1; q_addr = 5'(k); q_data = q[k];
    end
    @(negedge clk) q_we = 0;
  endtask

  task automatic hash(input logic [31:0] ip);
    exp_t e;
    @(negedge clk);
    in_valid = 1; in_ip = ip;
    e.ip = ip; e.t = cycle; e.q = q;
    expq.push_back(e);
  endtask

  initial begin
    logic [31:0] a;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_q();
    for (int i = 0; i < 500; i++) hash($urandom);
    hash(32'hFFFF_FFFF);
    hash(32'h0000_0000);
    @(negedge clk) in_valid = 0;
    // new Q matrix (collision recovery), then hash again
    load_q();
    for (int i = 0; i < 500; i++) hash($urandom);
    @(negedge clk) in_valid = 0;
    repeat (3) @(posedge clk);
    // host bits are ignored: two addresses equal in their top 16 bits share the BT-16 key
    a = $urandom;
    hash(a);
    @(negedge clk) in_valid = 0;
    @(posedge clk) #1;
    begin
      logic [15:0] k16;
      k16 = out_key[0];
      hash({a[31:16], ~a[15:0]});
      @(negedge clk) in_valid = 0;
      @(posedge clk) #1;
      checks++;
      if (out_key[0] !== k16) failures++;
    end
    repeat (3) @(posedge clk);
    checks++;
    if (expq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
