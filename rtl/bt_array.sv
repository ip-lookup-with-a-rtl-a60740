// bt_array: lookup of the prefixes of length 16..32. The destination address is
// hashed (h3_hash_bank, one H3 key per prefix length), the 17 keys query 17 Blooming-Tree
// minimal perfect hash functions (mphf, "BT-16" .. "BT-32") in parallel, and their match
// bits form a 17-bit result bus. Each BT also gives the SRAM address where its candidate
// entry is stored. sram_query then walks the result bus from the longest length down
// (priority encoder), reading the SRAM until a stored entry really matches; BT false
// positives are discarded there.
//
// Pipeline: hash (1 cycle) -> BT memories and tree walk (2 cycles) -> candidate FIFO ->
// SRAM check (1 lookup at a time, 1 + false-positive reads). Up to DEPTH lookups may be
// in flight: in_ready drops when DEPTH lookups have been accepted and not yet answered,
// which also bounds the candidate FIFO. Latency from the accepting clock edge to the edge
// that raises out_valid, for an idle engine and an SRAM answering S cycles after it
// samples a read: 5 cycles when no BT matches; every SRAM read adds S + 2 cycles, and a
// confirmed hit ends one cycle earlier than a lookup whose last read was a false positive
// (a hit with one read: 5 + S + 1).
//
// Interface: cfg (single-cycle writes: Q rows, and per-BT lookup table, layer 0, 1 and 2
// rows selected by cfg.bt); in_valid/in_ready/in_ip; SRAM read port; out_valid with
// out_route, out_plen and out_nreads (SRAM reads spent on the lookup).
//
// Follows the published design: Hashing -> 17 BTs -> 17-bit result bus -> priority encoder and
// SRAM query, with 16-bit keys. Own choices: the FIFO, the credit limit and DEPTH.
module bt_array
  import iplookup_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  cfg_wr_t             cfg,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [IP_W-1:0]     in_ip,
  output logic                sram_req,
  output logic [SRAM_AW-1:0]  sram_addr,
  input  logic                sram_rvalid,
  input  sram_entry_t         sram_rdata,
  output logic                out_valid,
  output route_t              out_route,
  output logic [5:0]          out_plen,
  output logic [4:0]          out_nreads
);

  // ---------------- hashing
  logic             h_valid;
  logic [IP_W-1:0]  h_ip;
  logic [KEY_W-1:0] h_key [NUM_BT];
  logic             accept;

  assign accept = in_valid && in_ready;

  h3_hash_bank #(.IP_W(IP_W), .KEY_W(KEY_W), .NUM_BT(NUM_BT), .MIN_LEN(MIN_BT_LEN)) u_hash (
    .clk       (clk),
    .rst_n     (rst_n),
    .q_we      (cfg.we && cfg.target == CFG_Q),
    .q_addr    (cfg.addr[$clog2(IP_W)-1:0]),
    .q_data    (cfg.data[KEY_W-1:0]),
    .in_valid  (accept),
    .in_ip     (in_ip),
    .out_valid (h_valid),
    .out_ip    (h_ip),
    .out_key   (h_key)
  );

  // ---------------- the 17 Blooming Trees
  logic                bt_valid [NUM_BT];
  logic [NUM_BT-1:0]   bt_match;
  logic [SRAM_AW-1:0]  bt_addr [NUM_BT];
  logic                bt_tbl_we;

  assign bt_tbl_we = cfg.we && (cfg.target inside {CFG_LUT, CFG_CBF, CFG_L1, CFG_L2});

  for (genvar g = 0; g < int'(NUM_BT); g++) begin : g_bt
    mphf #(.KEY_W(KEY_W), .SECTIONS(128), .BINS(16), .BIN_W(5), .ADDR_W(SRAM_AW)) u_mphf (
      .clk       (clk),
      .rst_n     (rst_n),
      .wr_en     (bt_tbl_we && cfg.bt == 5'(g)),
      .wr_sel    (cfg.target),
      .wr_addr   (cfg.addr[6:0]),
      .wr_data   (cfg.data),
      .in_valid  (h_valid),
      .in_key    (h_key[g]),
      .out_valid (bt_valid[g]),
      .out_match (bt_match[g]),
      .out_addr  (bt_addr[g])
    );
  end

  // address travels beside the 2-cycle BT pipeline
  logic [IP_W-1:0] ip_d1, ip_d2;
  always_ff @(posedge clk) begin
    ip_d1 <= h_ip;
    ip_d2 <= ip_d1;
  end

  // ---------------- candidate FIFO
  localparam int unsigned CW = IP_W + NUM_BT + NUM_BT*SRAM_AW;
  logic [CW-1:0] c_din, c_dout;
  logic          c_empty, c_full, c_pop;
  logic [IP_W-1:0]    q_ip;
  logic [NUM_BT-1:0]  q_match;
  logic [SRAM_AW-1:0] q_addr [NUM_BT];

  always_comb begin
    c_din[CW-1 -: IP_W]             = ip_d2;
    c_din[NUM_BT*SRAM_AW +: NUM_BT] = bt_match;
    for (int i = 0; i < int'(NUM_BT); i++) c_din[i*SRAM_AW +: SRAM_AW] = bt_addr[i];
    q_ip    = c_dout[CW-1 -: IP_W];
    q_match = c_dout[NUM_BT*SRAM_AW +: NUM_BT];
    for (int i = 0; i < int'(NUM_BT); i++) q_addr[i] = c_dout[i*SRAM_AW +: SRAM_AW];
  end

  sync_fifo #(.WIDTH(CW), .DEPTH(DEPTH)) u_cand_fifo (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (bt_valid[0]),
    .din   (c_din),
    .pop   (c_pop),
    .dout  (c_dout),
    .empty (c_empty),
    .full  (c_full)
  );

  // ---------------- SRAM check
  logic sq_ready;
  assign c_pop = !c_empty && sq_ready;

  sram_query #(.IP_W(IP_W), .NUM_BT(NUM_BT), .MIN_LEN(MIN_BT_LEN), .ADDR_W(SRAM_AW)) u_sq (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_valid    (!c_empty),
    .in_ready    (sq_ready),
    .in_ip       (q_ip),
    .in_match    (q_match),
    .in_addr     (q_addr),
    .sram_req    (sram_req),
    .sram_addr   (sram_addr),
    .sram_rvalid (sram_rvalid),
    .sram_rdata  (sram_rdata),
    .out_valid   (out_valid),
    .out_route   (out_route),
    .out_plen    (out_plen),
    .out_nreads  (out_nreads)
  );

  // ---------------- credit limit on lookups in flight
  logic [$clog2(DEPTH+1)-1:0] inflight;
  assign in_ready = (inflight < ($clog2(DEPTH+1))'(DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) inflight <= '0;
    else        inflight <= inflight + ($clog2(DEPTH+1))'(accept) - ($clog2(DEPTH+1))'(out_valid);
  end

endmodule
