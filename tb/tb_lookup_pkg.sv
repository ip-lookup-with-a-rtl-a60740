// tb_lookup_pkg: testbench-side model of the control software. It holds
//  * h3_ref: the H3 hash computed directly from its definition
//    (XOR of the Q rows selected by the set bits of the masked address);
//  * bt_image: builds the tables of one fixed-size Blooming Tree (lookup table,
//    layer 0 Huffman-coded bins, layer 1 and layer 2 blocks) from a list of 16-bit keys,
//    numbering the leaves one by one in tree order, and a path table giving, for every
//    13-bit key path, the SRAM address a correct BT must return (or none);
//  * helpers for random numbers and prefix masks.
// The builder fails when a bin would need more than 4 elements or two keys share a
// full path (section, bin, layer-1 bit, layer-2 bit); the software then picks a new Q.
package tb_lookup_pkg;

  localparam int SECTIONS = 128;
  localparam int BINS     = 16;
  localparam int NBINS    = SECTIONS * BINS;   // 2048

  function automatic logic [31:0] mask_of(int len);
    logic [31:0] m = '0;
    for (int i = 0; i < len; i++) m[31-i] = 1'b1;
    return m;
  endfunction

  function automatic logic [15:0] h3_ref(logic [15:0] q [32], logic [31:0] ip, int len);
    logic [31:0] x = ip & mask_of(len);
    logic [15:0] h = '0;
    for (int k = 0; k < 32; k++) if (x[k]) h ^= q[k];
    return h;
  endfunction

  class bt_image;
    logic [79:0] cbf [SECTIONS];
    logic [31:0] l1  [SECTIONS];
    logic [63:0] l2  [SECTIONS];
    logic [19:0] lut [SECTIONS];
    bit          path_ok   [8192];   // key[15:3] leads to a leaf
    int unsigned path_addr [8192];   // that leaf's SRAM address
    int unsigned n_elems;
    int          max_bin;            // most elements found in one bin

    // keys: the set; addr_of[i] receives the SRAM address of keys[i]
    function bit build(logic [15:0] keys [$], int unsigned base, ref int unsigned addr_of [$]);
      int members [NBINS][$];
      int unsigned next;
      addr_of.delete();
      foreach (keys[i]) addr_of.push_back(0);
      for (int b = 0; b < NBINS; b++) members[b] = {};
      foreach (keys[i]) members[keys[i][15:5]].push_back(i);
      for (int p = 0; p < 8192; p++) begin path_ok[p] = 0; path_addr[p] = 0; end
      max_bin = 0;
      next = base;
      for (int s = 0; s < SECTIONS; s++) begin
        cbf[s] = '0; l1[s] = '0; l2[s] = '0;
        lut[s] = 20'(next);
        for (int j = 0; j < BINS; j++) begin
          int b = s*BINS + j;
          int c = members[b].size();
          if (c > max_bin) max_bin = c;
          if (c > 4) return 0;
          // Huffman code: c ones followed by a zero, first symbol in the top bit
          for (int t = 0; t < c; t++) cbf[s][j*5 + 4 - t] = 1'b1;
          if (c == 1) begin
            addr_of[members[b][0]] = next;
            for (int t = 0; t < 4; t++) begin path_ok[b*4+t] = 1; path_addr[b*4+t] = next; end
            next++;
          end else if (c >= 2) begin
            for (int v = 0; v < 2; v++) begin
              int kids [$];
              kids = {};
              foreach (members[b][m]) if (keys[members[b][m]][4] == v[0]) kids.push_back(members[b][m]);
              if (kids.size() == 0) continue;
              l1[s][j*2 + v] = 1'b1;
              if (kids.size() == 1) begin
                addr_of[kids[0]] = next;
                for (int w = 0; w < 2; w++) begin path_ok[b*4+v*2+w] = 1; path_addr[b*4+v*2+w] = next; end
                next++;
              end else begin
                for (int w = 0; w < 2; w++) begin
                  int g [$];
                  g = {};
                  foreach (kids[m]) if (keys[kids[m]][3] == w[0]) g.push_back(kids[m]);
                  if (g.size() > 1) return 0;          // unresolved collision
                  if (g.size() == 1) begin
                    l2[s][(j*2+v)*2 + w] = 1'b1;
                    addr_of[g[0]] = next;
                    path_ok[b*4+v*2+w] = 1; path_addr[b*4+v*2+w] = next;
                    next++;
                  end
                end
              end
            end
          end
        end
      end
      n_elems = next - base;
      return 1;
    endfunction
  endclass

endpackage
