// tb_direct_addressing: fills the full 2^15-entry table from a list of random short
// prefixes (lengths 1..15, expanded shortest first so longer prefixes overwrite), then
// looks up random addresses back to back. Each answer must arrive one cycle after its
// address and equal the longest short prefix found by a linear search of the list.
module tb_direct_addressing;
  import iplookup_pkg::*;
  import tb_lookup_pkg::mask_of;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge so that asynchronous resets take effect
  always #5 clk = ~clk;

  logic        wr_en = 0;
  logic [14:0] wr_addr = '0;
  da_entry_t   wr_data = '0;
  logic        in_valid = 0;
  logic [31:0] in_ip = '0;
  logic        out_valid;
  da_entry_t   out_entry;

  direct_addressing dut (.*);

  int checks = 0, failures = 0, cycle = 0, n_hit = 0, n_miss = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [31:0] p; int len; logic [31:0] nh; logic [2:0] port; } pfx_t;
  pfx_t      pfx [$];
  da_entry_t tbl [32768];
  typedef struct { da_entry_t e; int t; } exp_t;
  exp_t expq [$];

  function automatic da_entry_t lpm(logic [31:0] ip);
    da_entry_t r = '0;
    int best = -1;
    foreach (pfx[i])
      if ((ip & mask_of(pfx[i].len)) == pfx[i].p && pfx[i].len > best) begin
        best = pfx[i].len; r.valid = 1; r.next_hop = pfx[i].nh; r.port = pfx[i].port;
      end
    return r;
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t e;
    e = expq.pop_front();
    checks++;
    if (out_entry !== e.e || cycle - e.t != 1) begin
      failures++;
      if (failures < 5) $display("got %h expected %h latency %0d", out_entry, e.e, cycle - e.t);
    end
    if (e.e.valid) n_hit++; else n_miss++;
  end

  initial begin
    while (pfx.size() < 40) begin
      pfx_t x;
      bit dup;
      x.len = 1 + ($urandom % 15);
      x.p = $urandom & mask_of(x.len);
      x.nh = $urandom; x.port = 3'($urandom);
      dup = 0;
      foreach (pfx[i]) if (pfx[i].len == x.len && pfx[i].p == x.p) dup = 1;
      if (!dup) pfx.push_back(x);
    end
    for (int a = 0; a < 32768; a++) tbl[a] = '0;
    for (int len = 1; len <= 15; len++)
      foreach (pfx[i]) if (pfx[i].len == len)
        for (int a = 0; a < (1 << (15 - len)); a++) begin
          int idx;
          idx = int'(pfx[i].p[31:17]) + a;
          tbl[idx].valid = 1; tbl[idx].next_hop = pfx[i].nh; tbl[idx].port = pfx[i].port;
        end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 32768; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 15'(a); wr_data = tbl[a];
    end
    @(negedge clk) wr_en = 0;
    for (int n = 0; n < 3000; n++) begin
      exp_t e;
      @(negedge clk);
      in_valid = 1;
      in_ip = (n % 2) ? pfx[$urandom % pfx.size()].p | ($urandom >> 12) : $urandom;
      e.e = lpm(in_ip); e.t = cycle;
      expq.push_back(e);
    end
    @(negedge clk) in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (expq.size() != 0 || n_hit == 0 || n_miss == 0) failures++;
    $display("hits %0d misses %0d", n_hit, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
