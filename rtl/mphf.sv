// mphf: one Blooming-Tree minimal perfect hash function (one "BT-L" of the BT-array).
// Given the H3 key of an address masked to this BT's prefix length, it says whether the
// key may belong to the stored set and, if so, returns the key's unique SRAM address.
//
// Fixed-size Blooming Tree with three layers:
//   layer 0  Counting Bloom Filter of SECTIONS sections x BINS bins, each bin a 5-bit
//            Huffman code (j ones then a zero: j = 0..4 elements in the bin);
//   layer 1  two bits per layer-0 bin;
//   layer 2  two bits per layer-1 bit (SECTIONS*BINS*4 bits in all);
// plus a lookup table of SECTIONS rows, each holding the SRAM address of the first
// element of its section. Key fields, most significant first:
//   [section | bin | b1 | b2 | unused]   (7 + 4 + 1 + 1 + 3 bits for a 16-bit key)
// A tree node holding one element is a leaf and has an all-zero ("zero") block in the
// next layer; a node holding two or more has a non-zero block whose bit v is 1 when
// child v is occupied. Layer-2 bits are leaves. A key's address is
//   LUT[section] + (elements in the section's earlier bins, a popcount of their codes)
//                + (leaves to the left of the key inside its own bin's tree).
// An empty bin, or an unoccupied child on the key's path, is a definite miss; anything
// else is a match that may be a false positive and is checked in SRAM later.
//
// Timing: in_valid/in_key are sampled; the four memories are read synchronously (one
// section row each) in the first cycle and the popcounts and tree walk are done in the
// second, so out_valid/out_match/out_addr appear 2 cycles after the key. One key per
// cycle. Writes (wr_en, wr_sel, wr_addr = section, wr_data) replace a whole section row
// of the selected memory and may be mixed with lookups.
//
// Follows the published design: three layers, 128 sections x 16 bins, 5-bit Huffman bins,
// 2 bits per bin / per layer-1 bit, 128 x 20-bit lookup table. Own choices: the key
// field layout, the meaning of layer bits in the fixed-size tree, row-wide memories
// and the 2-cycle pipeline.
module mphf #(
  parameter int unsigned KEY_W    = 16,
  parameter int unsigned SECTIONS = 128,
  parameter int unsigned BINS     = 16,
  parameter int unsigned BIN_W    = 5,
  parameter int unsigned ADDR_W   = 20
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // table writes (control plane)
  input  logic                         wr_en,
  input  iplookup_pkg::cfg_target_e    wr_sel,   // CFG_LUT, CFG_CBF, CFG_L1 or CFG_L2
  input  logic [$clog2(SECTIONS)-1:0]  wr_addr,
  input  logic [BINS*BIN_W-1:0]        wr_data,
  // lookup
  input  logic                         in_valid,
  input  logic [KEY_W-1:0]             in_key,
  output logic                         out_valid,
  output logic                         out_match,
  output logic [ADDR_W-1:0]            out_addr
);

  localparam int unsigned SEC_W = $clog2(SECTIONS);
  localparam int unsigned BIX_W = $clog2(BINS);
  localparam int unsigned CNT_W = $clog2(BINS*BIN_W + 1);

  // key fields
  logic [SEC_W-1:0] k_sec;
  logic [BIX_W-1:0] k_bin;
  logic             k_b1, k_b2;
  assign k_sec = in_key[KEY_W-1 -: SEC_W];
  assign k_bin = in_key[KEY_W-1-SEC_W -: BIX_W];
  assign k_b1  = in_key[KEY_W-1-SEC_W-BIX_W];
  assign k_b2  = in_key[KEY_W-2-SEC_W-BIX_W];

  // memories, one row per section
  logic [BINS*BIN_W-1:0] cbf_mem [SECTIONS];
  logic [BINS*2-1:0]     l1_mem  [SECTIONS];
  logic [BINS*4-1:0]     l2_mem  [SECTIONS];
  logic [ADDR_W-1:0]     lut_mem [SECTIONS];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      unique case (wr_sel)
        iplookup_pkg::CFG_CBF: cbf_mem[wr_addr] <= wr_data;
        iplookup_pkg::CFG_L1:  l1_mem[wr_addr]  <= wr_data[BINS*2-1:0];
        iplookup_pkg::CFG_L2:  l2_mem[wr_addr]  <= wr_data[BINS*4-1:0];
        iplookup_pkg::CFG_LUT: lut_mem[wr_addr] <= wr_data[ADDR_W-1:0];
        default: ;
      endcase
    end
  end

  // stage 1: synchronous read of the section rows
  logic [BINS*BIN_W-1:0] s1_cbf;
  logic [BINS*2-1:0]     s1_l1;
  logic [BINS*4-1:0]     s1_l2;
  logic [ADDR_W-1:0]     s1_lut;
  logic                  s1_valid;
  logic [BIX_W-1:0]      s1_bin;
  logic                  s1_b1, s1_b2;

  always_ff @(posedge clk) begin
    s1_cbf <= cbf_mem[k_sec];
    s1_l1  <= l1_mem[k_sec];
    s1_l2  <= l2_mem[k_sec];
    s1_lut <= lut_mem[k_sec];
    s1_bin <= k_bin;
    s1_b1  <= k_b1;
    s1_b2  <= k_b2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid;
  end

  // stage 2: popcounts and tree walk
  logic [CNT_W-1:0]  prev_cnt;   // elements in earlier bins of the section
  logic [BIN_W-1:0]  code;       // Huffman code of the key's bin
  logic [2:0]        bin_cnt;    // elements in the key's bin
  logic [1:0]        l1_blk, l2_blk0, l2_blk1, l2_path;
  logic [2:0]        leaves0;    // leaves under layer-1 child 0
  logic [2:0]        pos;        // leaves left of the key inside its bin
  logic              hit;

  always_comb begin
    prev_cnt = '0;
    for (int j = 0; j < int'(BINS); j++)
      if (j < int'(s1_bin))
        prev_cnt = prev_cnt + CNT_W'($countones(s1_cbf[j*BIN_W +: BIN_W]));

    code    = s1_cbf[s1_bin*BIN_W +: BIN_W];
    bin_cnt = 3'($countones(code));
    l1_blk  = s1_l1[s1_bin*2 +: 2];
    l2_blk0 = s1_l2[{s1_bin, 1'b0}*2 +: 2];
    l2_blk1 = s1_l2[{s1_bin, 1'b1}*2 +: 2];
    l2_path = s1_b1 ? l2_blk1 : l2_blk0;
    leaves0 = !l1_blk[0] ? 3'd0 : (l2_blk0 == 2'b00) ? 3'd1 : 3'($countones(l2_blk0));

    hit = 1'b0;
    pos = '0;
    if (bin_cnt == 3'd1) begin
      hit = 1'b1;                       // the bin is a single leaf
    end else if (bin_cnt >= 3'd2 && l1_blk[s1_b1]) begin
      pos = s1_b1 ? leaves0 : 3'd0;
      if (l2_path == 2'b00) begin
        hit = 1'b1;                     // layer-1 child is a leaf
      end else if (l2_path[s1_b2]) begin
        hit = 1'b1;                     // layer-2 leaf
        pos = pos + ((s1_b2 && l2_path[0]) ? 3'd1 : 3'd0);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_match <= 1'b0;
      out_addr  <= '0;
    end else begin
      out_valid <= s1_valid;
      out_match <= s1_valid && hit;
      out_addr  <= s1_lut + ADDR_W'(prev_cnt) + ADDR_W'(pos);
    end
  end

endmodule
