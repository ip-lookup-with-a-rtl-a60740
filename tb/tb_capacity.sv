// tb_capacity: how many prefixes per length the BT-array can hold in practice, and a
// full load at that size. Every length 16..32 receives the same number n of random
// prefixes, growing in steps of 8. For each n the control-software model searches up to
// MAX_TRIES random H3 Q matrices for one under which all 17 Blooming Trees build
// without an unresolvable collision. The largest n that succeeds is loaded into the
// engine at its default sizes, and every stored prefix (with random host bits) and a
// set of random addresses are looked up and checked against a linear longest-prefix
// search. The result is printed next to the structural capacity of 8192 per length
// (2048 bins x 4 leaves).
module tb_capacity;
  import iplookup_pkg::*;
  import tb_lookup_pkg::*;

  localparam int STEP      = 8;
  localparam int MAX_N     = 96;
  localparam int MAX_TRIES = 1000;
  localparam int SRAM_LAT  = 2;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge so that asynchronous resets take effect
  always #5 clk = ~clk;

  cfg_wr_t     cfg = '0;
  logic        in_valid = 0, in_ready;
  logic [31:0] in_ip = '0;
  logic        sram_req, sram_rvalid;
  logic [19:0] sram_addr;
  sram_entry_t sram_rdata;
  logic        out_valid, out_from_bt;
  route_t      out_route;
  logic [5:0]  out_plen;
  logic [4:0]  out_nreads;

  iplookup_top dut (.*);
  sram_model #(.LAT(SRAM_LAT)) u_sram (.clk(clk), .req(sram_req), .addr(sram_addr),
                                       .rvalid(sram_rvalid), .rdata(sram_rdata));

  int checks = 0, failures = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [31:0] p; int len; logic [31:0] nh; logic [2:0] port; } pfx_t;
  pfx_t pfx [$];

  function automatic bit exists(logic [31:0] p, int len);
    foreach (pfx[i]) if (pfx[i].len == len && pfx[i].p == p) return 1;
    return 0;
  endfunction

  function automatic int ref_lpm(logic [31:0] ip);
    int best = -1;
    foreach (pfx[i])
      if ((ip & mask_of(pfx[i].len)) == pfx[i].p && (best < 0 || pfx[i].len > pfx[best].len)) best = i;
    return best;
  endfunction

  logic [15:0] q [32], q_ok [32];
  bt_image     img [17];

  // try Q matrices until all 17 trees build; leaves the winning Q in q
  function automatic bit search_q(int max_tries);
    for (int t = 0; t < max_tries; t++) begin
      bit ok = 1;
      for (int k = 0; k < 32; k++) q[k] = 16'($urandom);
      for (int b = 0; b < 17 && ok; b++) begin
        logic [15:0] keys [$];
        int unsigned addr_of [$];
        foreach (pfx[i]) if (pfx[i].len == 16 + b) keys.push_back(h3_ref(q, pfx[i].p, pfx[i].len));
        ok = img[b].build(keys, b * 8192, addr_of);
      end
      if (ok) return 1;
    end
    return 0;
  endfunction

  task automatic cfg_write(cfg_target_e t, int bt, int addr, logic [79:0] d);
    @(negedge clk);
    cfg.we = 1; cfg.target = t; cfg.bt = 5'(bt); cfg.addr = 15'(addr); cfg.data = d;
    @(negedge clk);
    cfg.we = 0;
  endtask

  task automatic load();
    u_sram.clear();
    for (int b = 0; b < 17; b++) begin
      logic [15:0] keys [$];
      int unsigned addr_of [$];
      int idx [$];
      foreach (pfx[i]) if (pfx[i].len == 16 + b) begin
        keys.push_back(h3_ref(q, pfx[i].p, pfx[i].len)); idx.push_back(i);
      end
      checks++;
      if (!img[b].build(keys, b * 8192, addr_of)) failures++;
      foreach (idx[j]) begin
        sram_entry_t e;
        e.prefix = pfx[idx[j]].p; e.plen = 6'(pfx[idx[j]].len);
        e.next_hop = pfx[idx[j]].nh; e.port = pfx[idx[j]].port;
        u_sram.write(addr_of[j], e);
      end
    end
    for (int k = 0; k < 32; k++) cfg_write(CFG_Q, 0, k, 80'(q[k]));
    for (int b = 0; b < 17; b++)
      for (int s = 0; s < 128; s++) begin
        cfg_write(CFG_LUT, b, s, 80'(img[b].lut[s]));
        cfg_write(CFG_CBF, b, s, img[b].cbf[s]);
        cfg_write(CFG_L1,  b, s, 80'(img[b].l1[s]));
        cfg_write(CFG_L2,  b, s, 80'(img[b].l2[s]));
      end
    for (int a = 0; a < 32768; a++) begin   // no short prefixes: empty DA table
      @(negedge clk);
      cfg.we = 1; cfg.target = CFG_DA; cfg.bt = '0; cfg.addr = 15'(a); cfg.data = '0;
    end
    @(negedge clk) cfg.we = 0;
  endtask

  task automatic check_lookup(logic [31:0] ip);
    int best;
    @(negedge clk);
    in_valid = 1; in_ip = ip;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk) in_valid = 0;
    while (!out_valid) @(posedge clk);
    #1;
    best = ref_lpm(ip);
    checks++;
    if (out_route.hit !== (best >= 0) ||
        (best >= 0 && (out_route.next_hop !== pfx[best].nh || out_plen !== 6'(pfx[best].len)))) begin
      failures++;
      if (failures < 10) $display("ip %h: hit %0d len %0d", ip, out_route.hit, out_plen);
    end
  endtask

  initial begin
    int n = 0, n_ok = 0;
    pfx_t saved [$];
    for (int b = 0; b < 17; b++) img[b] = new();
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (n < MAX_N) begin
      for (int len = 16; len <= 32; len++)
        for (int k = 0; k < STEP; k++) begin
          pfx_t x;
          do begin x.p = $urandom & mask_of(len); end while (exists(x.p, len));
          x.len = len; x.nh = $urandom; x.port = 3'($urandom);
          pfx.push_back(x);
        end
      n += STEP;
      if (!search_q(MAX_TRIES)) begin
        $display("%0d prefixes per length: no collision-free Q in %0d tries", n, MAX_TRIES);
        break;
      end
      $display("%0d prefixes per length (%0d in all): collision-free Q found", n, 17 * n);
      n_ok = n;
      saved = pfx;
      q_ok = q;
    end
    checks++;
    if (n_ok == 0) begin failures++; $display("no size could be built"); end
    else begin
      pfx = saved;
      q = q_ok;
      load();
      foreach (saved[i]) check_lookup(saved[i].p | ($urandom & ~mask_of(saved[i].len)));
      for (int i = 0; i < 500; i++) check_lookup($urandom);
    end
    $display("largest table built: %0d prefixes per length, %0d in all (structural limit 8192 per length)",
             n_ok, 17 * n_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
