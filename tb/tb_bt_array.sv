// tb_bt_array: test of the BT-array alone (hashing, 17 Blooming Trees, candidate FIFO,
// priority encoder and SRAM check) at its default sizes. The testbench builds the
// tables of a random set of prefixes of length 16..32 as the control software would
// (a new H3 Q matrix while any tree has an unresolvable collision), loads them, streams
// lookups and checks each answer against a linear longest-prefix search; an update
// then adds prefixes under a new Q. Counted and required: hits, misses, false positives
// rejected, hits after a false positive, back-pressure, Q changes; isolated lookups
// check the latency.
module tb_bt_array;
  import iplookup_pkg::*;
  import tb_lookup_pkg::*;

  localparam int N_PER_LEN = 40;    // BT prefixes per length
  localparam int N_LOOKUP  = 4000;  // streamed lookups per phase
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
  logic        out_valid;
  route_t      out_route;
  logic [5:0]  out_plen;
  logic [4:0]  out_nreads;

  bt_array dut (.*);
  sram_model #(.LAT(SRAM_LAT)) u_sram (.clk(clk), .req(sram_req), .addr(sram_addr),
                                       .rvalid(sram_rvalid), .rdata(sram_rdata));

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ forwarding table
  typedef struct { logic [31:0] p; int len; logic [31:0] nh; logic [2:0] port; } pfx_t;
  pfx_t pfx [$];

  function automatic bit exists(logic [31:0] p, int len);
    foreach (pfx[i]) if (pfx[i].len == len && pfx[i].p == p) return 1;
    return 0;
  endfunction

  task automatic add_prefixes(int per_len, int n_da);
    for (int len = 16; len <= 32; len++)
      for (int n = 0; n < per_len; n++) begin
        pfx_t x;
        do begin x.p = $urandom & mask_of(len); end while (exists(x.p, len));
        x.len = len; x.nh = $urandom; x.port = 3'($urandom);
        pfx.push_back(x);
      end
    for (int n = 0; n < n_da; n++) begin
      pfx_t x;
      x.len = 8 + ($urandom % 8);
      do begin x.p = $urandom & mask_of(x.len); end while (exists(x.p, x.len));
      x.nh = $urandom; x.port = 3'($urandom);
      pfx.push_back(x);
    end
  endtask

  // reference: linear longest-prefix search
  function automatic int ref_lpm(logic [31:0] ip);
    int best = -1;
    foreach (pfx[i])
      if ((ip & mask_of(pfx[i].len)) == pfx[i].p && (best < 0 || pfx[i].len > pfx[best].len)) best = i;
    return best;
  endfunction

  // ------------------------------------------------------------ control plane
  logic [15:0] q [32];
  bt_image     img [17];
  int          n_rehash = 0, n_update = 0;

  task automatic cfg_write(cfg_target_e t, int bt, int addr, logic [79:0] d);
    @(negedge clk);
    cfg.we = 1; cfg.target = t; cfg.bt = 5'(bt); cfg.addr = 15'(addr); cfg.data = d;
    @(negedge clk);
    cfg.we = 0;
  endtask

  // choose Q until all 17 trees build, then load everything
  task automatic build_and_load();
    bit ok;
    int tries = 0;
    do begin
      ok = 1;
      for (int k = 0; k < 32; k++) q[k] = 16'($urandom);
      for (int b = 0; b < 17 && ok; b++) begin
        logic [15:0] keys [$];
        int unsigned addr_of [$];
        keys = {};
        foreach (pfx[i]) if (pfx[i].len == 16 + b) keys.push_back(h3_ref(q, pfx[i].p, pfx[i].len));
        if (img[b] == null) img[b] = new();
        ok = img[b].build(keys, b * 8192, addr_of);
      end
      tries++;
      if (!ok) n_rehash++;
    end while (!ok && tries < 2000);
    checks++;
    if (!ok) begin failures++; $display("no collision-free Q found"); end
    // SRAM entries
    u_sram.clear();
    for (int b = 0; b < 17; b++) begin
      logic [15:0] keys [$];
      int unsigned addr_of [$];
      int idx [$];
      keys = {}; idx = {};
      foreach (pfx[i]) if (pfx[i].len == 16 + b) begin
        keys.push_back(h3_ref(q, pfx[i].p, pfx[i].len)); idx.push_back(i);
      end
      void'(img[b].build(keys, b * 8192, addr_of));
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
  endtask

  // ------------------------------------------------------------ checking
  typedef struct { logic [31:0] ip; int t; } req_t;
  req_t reqq [$];
  int n_bt_hit = 0, n_miss = 0, n_fp = 0, n_fallback = 0;
  int n_stall = 0, total_reads = 0, n_lookups = 0, n_lat = 0;
  bit check_latency = 0;

  always @(posedge clk) if (rst_n && in_valid && !in_ready) n_stall++;

  always @(posedge clk) if (rst_n && out_valid) begin
    req_t r;
    int   best;
    bit   exp_hit, exp_bt, bad;
    int   exp_reads_min;
    r = reqq.pop_front();
    best = ref_lpm(r.ip);
    exp_hit = best >= 0;
    exp_bt  = exp_hit && pfx[best].len >= 16;
    bad = (out_route.hit !== exp_hit);
    if (exp_hit && !bad)
      bad = out_route.next_hop !== pfx[best].nh || out_route.port !== pfx[best].port ||
            out_plen !== (exp_bt ? 6'(pfx[best].len) : 6'd0);
    checks++;
    if (bad) begin
      failures++;
      if (failures < 10) $display("ip %h: hit %0d len %0d nh %h, expected prefix %0d len %0d",
                                  r.ip, out_route.hit, out_plen, out_route.next_hop, best,
                                  exp_hit ? pfx[best].len : -1);
    end
    if (check_latency) begin
      int exp_lat;
      exp_lat = 5 + int'(out_nreads) * (SRAM_LAT + 2) - (out_route.hit ? 1 : 0);
      checks++; n_lat++;
      // out_valid is registered exp_lat edges after the accepting edge and seen here
      // one edge later
      if (cycle - r.t != exp_lat + 1) begin
        failures++;
        $display("latency %0d, expected %0d (%0d reads)", cycle - r.t, exp_lat, out_nreads);
      end
    end
    n_lookups++;
    total_reads += int'(out_nreads);
    if (exp_bt) begin
      n_bt_hit++;
      if (out_nreads > 1) n_fallback++;
      n_fp += int'(out_nreads) - 1;
    end else begin
      n_fp += int'(out_nreads);
      n_miss++;
    end
  end

  task automatic lookup(logic [31:0] ip);
    req_t r;
    @(negedge clk);
    in_valid = 1; in_ip = ip;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    r.ip = ip; r.t = cycle;
    reqq.push_back(r);
    @(negedge clk) in_valid = 0;
  endtask

  // stream of lookups with random gaps, no waiting for answers
  task automatic stream(int n);
    for (int i = 0; i < n; i++) begin
      logic [31:0] ip;
      int sel;
      sel = $urandom % 4;
      ip = $urandom;
      @(negedge clk);
      if (sel < 3) begin
        int k;
        k = $urandom % pfx.size();
        ip = pfx[k].p | ($urandom & ~mask_of(pfx[k].len));
      end
      in_valid = 1; in_ip = ip;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      begin
        req_t r;
        r.ip = ip; r.t = cycle;
        reqq.push_back(r);
      end
      // back to back, or a short gap now and then
      if ($urandom % 4 == 0) begin
        @(negedge clk) in_valid = 0;
        repeat ($urandom % 3) @(negedge clk);
      end
    end
    @(negedge clk) in_valid = 0;
  endtask

  task automatic drain();
    int guard = 0;
    while (reqq.size() != 0 && guard < 10000) begin @(posedge clk); guard++; end
    repeat (3) @(posedge clk);
  endtask

  initial begin
    int reads0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    add_prefixes(N_PER_LEN, 0);
    $display("table drawn at cycle %0d", cycle);
    build_and_load();
    $display("loaded at cycle %0d after %0d Q changes", cycle, n_rehash);
    // isolated lookups: latency
    check_latency = 1;
    for (int i = 0; i < 200; i++) begin
      int k;
      k = $urandom % pfx.size();
      lookup(pfx[k].p | ($urandom & ~mask_of(pfx[k].len)));
      drain();
    end
    check_latency = 0;
    reads0 = u_sram.reads;
    total_reads = 0;
    stream(N_LOOKUP);
    drain();
    checks++;
    if (u_sram.reads - reads0 != total_reads) begin
      failures++; $display("SRAM reads %0d, reported %0d", u_sram.reads - reads0, total_reads);
    end
    // update: new BT prefixes, a new Q matrix and rebuilt tables
    add_prefixes(4, 0);
    n_update++;
    build_and_load();
    stream(N_LOOKUP);
    drain();
    checks++;
    if (reqq.size() != 0) begin failures++; $display("%0d lookups unanswered", reqq.size()); end
    $display("lookups %0d: hits %0d (%0d after a false positive), misses %0d",
             n_lookups, n_bt_hit, n_fallback, n_miss);
    $display("false positives rejected %0d, stall cycles %0d, Q changes after collision %0d, updates %0d, latency checks %0d",
             n_fp, n_stall, n_rehash, n_update, n_lat);
    $display("SRAM reads per lookup: %0.4f", real'(n_bt_hit + n_fp) / real'(n_lookups));
    checks++;
    if (n_bt_hit == 0 || n_miss == 0 || n_fp == 0 ||
        n_fallback == 0 || n_stall == 0 || n_rehash == 0 || n_update == 0 || n_lat == 0) begin
      failures++; $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
