// tb_sram_query: random lookups against a behavioural SRAM. For each lookup a random
// set of the 17 BTs "matches"; at each matching length the SRAM holds either the true
// entry (the address's own prefix) or the entry of some other prefix (a false
// positive). The expected answer is the longest length holding a true entry, reached
// after one read per matching length from the top down to it; with no true entry the
// lookup misses after reading every candidate.
module tb_sram_query;
  import iplookup_pkg::*;
  import tb_lookup_pkg::mask_of;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge so that asynchronous resets take effect
  always #5 clk = ~clk;

  logic        in_valid = 0, in_ready;
  logic [31:0] in_ip = '0;
  logic [16:0] in_match = '0;
  logic [19:0] in_addr [17];
  logic        sram_req, sram_rvalid;
  logic [19:0] sram_addr;
  sram_entry_t sram_rdata;
  logic        out_valid;
  route_t      out_route;
  logic [5:0]  out_plen;
  logic [4:0]  out_nreads;

  sram_query dut (.*);
  sram_model #(.LAT(3)) u_sram (.clk(clk), .req(sram_req), .addr(sram_addr),
                                .rvalid(sram_rvalid), .rdata(sram_rdata));

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_fp_fallback = 0, n_empty = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 17; i++) in_addr[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      logic [31:0] ip;
      logic [16:0] m, truth;
      int exp_len, exp_reads;
      logic [31:0] exp_nh;
      logic [2:0]  exp_port;
      ip = $urandom;
      m  = (n % 10 == 0) ? '0 : 17'($urandom) & 17'($urandom);
      truth = 17'($urandom) & 17'($urandom) & m;
      u_sram.clear();
      exp_len = 0; exp_reads = 0; exp_nh = '0; exp_port = '0;
      for (int i = 16; i >= 0; i--) begin
        sram_entry_t e;
        in_addr[i] = 20'(n * 64 + i);
        e.plen = 6'(16 + i);
        e.next_hop = $urandom;
        e.port = 3'($urandom);
        e.prefix = ip & mask_of(16 + i);
        if (!truth[i]) begin                          // the entry of another prefix
          int unsigned r;
          r = 32 - (16 + i) + ($urandom % (16 + i));
          e.prefix = e.prefix ^ (32'd1 << r);
        end
        if (m[i]) u_sram.write(in_addr[i], e);
        if (m[i] && exp_len == 0) begin
          exp_reads++;
          if (truth[i]) begin exp_len = 16 + i; exp_nh = e.next_hop; exp_port = e.port; end
        end
      end
      @(negedge clk);
      in_valid = 1; in_ip = ip; in_match = m;
      do @(posedge clk); while (!in_ready);
      @(negedge clk) in_valid = 0;
      do @(posedge clk); while (!out_valid);
      #1;
      checks++;
      if (out_route.hit !== (exp_len != 0) || out_nreads !== 5'(exp_reads) ||
          (exp_len != 0 && (out_plen !== 6'(exp_len) || out_route.next_hop !== exp_nh ||
                            out_route.port !== exp_port))) begin
        failures++;
        if (failures < 10) $display("lookup %0d: hit %0d len %0d reads %0d, expected len %0d reads %0d",
                                    n, out_route.hit, out_plen, out_nreads, exp_len, exp_reads);
      end
      if (m == 0) n_empty++;
      else if (exp_len == 0) n_miss++;
      else begin n_hit++; if (exp_reads > 1) n_fp_fallback++; end
    end
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_fp_fallback == 0 || n_empty == 0) failures++;
    $display("hits %0d (after false positives %0d), misses %0d, no candidate %0d",
             n_hit, n_fp_fallback, n_miss, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
