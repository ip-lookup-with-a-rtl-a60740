// tb_output_controller: feeds random Direct Addressing results and, later and in the
// same order, random BT-array results, with random gaps and up to DEPTH results
// waiting. Each output must come one cycle after its BT-array result and be the
// BT-array route when it hit, otherwise the DA route when valid, otherwise a miss.
module tb_output_controller;
  import iplookup_pkg::*;

  localparam int DEPTH = 4;   // the module's default FIFO depth
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge so that asynchronous resets take effect
  always #5 clk = ~clk;

  logic       da_valid = 0, bt_valid = 0;
  da_entry_t  da_entry = '0;
  route_t     bt_route = '0;
  logic [5:0] bt_plen = '0;
  logic [4:0] bt_nreads = '0;
  logic       out_valid, out_from_bt;
  route_t     out_route;
  logic [5:0] out_plen;
  logic [4:0] out_nreads;

  output_controller dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int n_bt = 0, n_da = 0, n_none = 0, n_both = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  da_entry_t das [$];
  typedef struct { route_t r; logic [5:0] plen; bit from_bt; logic [4:0] nr; int t; } exp_t;
  exp_t expq [$];
  int   pending = 0;

  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t e;
    e = expq.pop_front();
    checks++;
    if (out_route !== e.r || out_plen !== e.plen || out_from_bt !== e.from_bt ||
        out_nreads !== e.nr || cycle - e.t != 1) begin
      failures++;
      if (failures < 5) $display("got %h expected %h", out_route, e.r);
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      da_valid = 0; bt_valid = 0;
      // DA side: new lookup
      if (pending < DEPTH && ($urandom % 2)) begin
        da_entry = da_entry_t'({$urandom, $urandom});
        da_valid = 1;
        das.push_back(da_entry);
        pending++;
      end
      // BT side: oldest lookup finishes
      if (das.size() > 0 && !(da_valid && das.size() == 1) && ($urandom % 2)) begin
        exp_t e;
        da_entry_t d;
        d = das.pop_front();
        bt_route = route_t'({$urandom, $urandom});
        bt_route.hit = ($urandom % 3) == 0;
        bt_plen = bt_route.hit ? 6'(16 + $urandom % 17) : '0;
        bt_nreads = 5'($urandom % 4);
        bt_valid = 1;
        pending--;
        e.nr = bt_nreads; e.t = cycle;
        if (bt_route.hit) begin
          e.r = bt_route; e.plen = bt_plen; e.from_bt = 1; n_bt++;
          if (d.valid) n_both++;
        end else begin
          e.from_bt = 0; e.plen = '0;
          e.r.hit = d.valid; e.r.next_hop = d.valid ? d.next_hop : '0; e.r.port = d.valid ? d.port : '0;
          if (d.valid) n_da++; else n_none++;
        end
        expq.push_back(e);
      end
    end
    @(negedge clk) begin da_valid = 0; bt_valid = 0; end
    repeat (3) @(posedge clk);
    checks++;
    if (expq.size() != 0 || n_bt == 0 || n_da == 0 || n_none == 0 || n_both == 0) failures++;
    $display("BT wins %0d (over a DA match %0d), DA %0d, none %0d", n_bt, n_both, n_da, n_none);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
