// tb_mphf: self-checking test of one Blooming-Tree perfect hash (mphf) at its full size
// (128 sections x 16 bins). A random set of 1500 keys, with bins of 1 to 4 elements in
// every tree shape, is turned into tables by the testbench builder and written row by
// row. Every member must match and get the address the builder numbered it with, the
// member addresses must be exactly base..base+n-1 (minimal and perfect), random
// non-members must give what the builder's path table says (definite miss, or the
// address of the leaf their path ends on), and every answer must come 2 cycles after
// its key.
module tb_mphf;
  import iplookup_pkg::*;
  import tb_lookup_pkg::*;

  localparam int N_KEYS  = 1500;
  localparam int BASE    = 1000;
  localparam int N_RAND  = 3000;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge so that asynchronous resets take effect
  always #5 clk = ~clk;

  logic        wr_en = 0;
  cfg_target_e wr_sel = CFG_LUT;
  logic [6:0]  wr_addr = '0;
  logic [79:0] wr_data = '0;
  logic        in_valid = 0;
  logic [15:0] in_key = '0;
  logic        out_valid, out_match;
  logic [19:0] out_addr;

  mphf dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected answers, in order
  typedef struct { bit m; int unsigned a; int t; bit member; logic [15:0] k; } exp_t;
  exp_t        expq [$];
  bit          seen [int unsigned];
  int          n_member_hits = 0, n_fp = 0, n_neg = 0;

  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t e;
    if (expq.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      e = expq.pop_front();
      checks++;
      if (out_match !== e.m || (e.m && out_addr !== 20'(e.a)) || cycle - e.t != 2) begin
        failures++;
        if (failures < 10) $display("mismatch: got m=%0d a=%0d exp m=%0d a=%0d lat=%0d",
                                    out_match, out_addr, e.m, e.a, cycle - e.t);
      end
      if (e.member) begin
        if (seen.exists(out_addr)) begin failures++; $display("address %0d given twice", out_addr); end
        seen[out_addr] = 1;
        n_member_hits++;
      end else if (e.m && !used[e.k[15:3]]) n_fp++;
      else n_neg++;
    end
  end

  logic [15:0]  keys [$];
  int unsigned  addr_of [$];
  bt_image      img;
  int           bin_cnt [2048];
  bit           used [8192];
  int           shape_cnt [5];

  task automatic put(input cfg_target_e sel, input int row, input logic [79:0] d);
    @(negedge clk);
    wr_en = 1; wr_sel = sel; wr_addr = 7'(row); wr_data = d;
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic ask(input logic [15:0] k, input bit member);
    exp_t e;
    @(negedge clk);
    in_valid = 1; in_key = k;
    e.m = img.path_ok[k[15:3]]; e.a = img.path_addr[k[15:3]];
    e.t = cycle; e.member = member; e.k = k;
    expq.push_back(e);
  endtask

  initial begin
    // key set: distinct 13-bit paths, at most 4 per bin
    for (int b = 0; b < 2048; b++) bin_cnt[b] = 0;
    for (int p = 0; p < 8192; p++) used[p] = 0;
    while (keys.size() < N_KEYS) begin
      logic [15:0] k;
      k = 16'($urandom);
      if (!used[k[15:3]] && bin_cnt[k[15:5]] < 4) begin
        used[k[15:3]] = 1; bin_cnt[k[15:5]]++; keys.push_back(k);
      end
    end
    for (int i = 0; i < 5; i++) shape_cnt[i] = 0;
    for (int b = 0; b < 2048; b++) shape_cnt[bin_cnt[b]]++;
    img = new();
    checks++;
    if (!img.build(keys, BASE, addr_of)) begin failures++; $display("builder failed"); end

    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 128; s++) begin
      put(CFG_LUT, s, 80'(img.lut[s]));
      put(CFG_CBF, s, img.cbf[s]);
      put(CFG_L1,  s, 80'(img.l1[s]));
      put(CFG_L2,  s, 80'(img.l2[s]));
    end
    // members, back to back
    foreach (keys[i]) begin
      ask(keys[i], 1);
      checks++;
      if (img.path_addr[keys[i][15:3]] != addr_of[i]) failures++;
    end
    // random keys (mostly non-members)
    for (int i = 0; i < N_RAND; i++) begin
      logic [15:0] k;
      k = 16'($urandom);
      ask(k, 0);
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    // minimal perfect: member addresses are exactly BASE .. BASE+N-1
    checks++;
    if (seen.size() != N_KEYS) begin failures++; $display("member addresses: %0d distinct", seen.size()); end
    foreach (seen[a]) begin
      checks++;
      if (a < BASE || a >= BASE + N_KEYS) failures++;
    end
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d answers missing", expq.size()); end
    checks++;
    if (shape_cnt[4] == 0 || shape_cnt[3] == 0 || n_fp == 0 || n_neg == 0) failures++;
    $display("bins with 1..4 elements: %0d %0d %0d %0d; member hits %0d, false positives %0d, misses %0d",
             shape_cnt[1], shape_cnt[2], shape_cnt[3], shape_cnt[4], n_member_hits, n_fp, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
