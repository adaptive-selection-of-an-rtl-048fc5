// tb_pkg: shared testbench helpers.
//
// texel_of() defines the content of every texture: a fixed hash of the
// texel address {tid, v, u}, so that a testbench can predict any texel
// without storing images. cache_model is an independent behavioural model
// of the A-index cache's hit/miss behaviour (two ways, LRU, one direction
// bit per line) that keeps full block addresses instead of split tags.
package tb_pkg;
  import tex_pkg::*;

  function automatic texel_t texel_of(input logic [TIDW-1:0] tid,
                                      input logic [UW-1:0] u, input logic [VW-1:0] v);
    logic [31:0] x;
    x = {4'h0, tid, v, u};
    x = x * 32'h9E37_79B1;
    x = x ^ (x >> 15);
    x = x * 32'h85EB_CA6B;
    x = x ^ (x >> 13);
    return x;
  endfunction

  class cache_model;
    int sets;
    bit            valid [][2];
    bit            vdir  [][2];
    bit [BLKAW-1:0] blk  [][2];
    int            span  [][2];
    bit            lru   [];
    // results of the last access
    bit last_victim_valid;
    int last_victim_span;

    function new(int sets_);
      sets  = sets_;
      valid = new[sets];
      vdir  = new[sets];
      blk   = new[sets];
      span  = new[sets];
      lru   = new[sets];
      for (int s = 0; s < sets; s++) begin
        valid[s] = '{0, 0};
        lru[s]   = 0;
      end
    endfunction

    // Returns 1 on a hit. On a miss the block is installed.
    function bit access(logic [TIDW-1:0] tid, logic [UW-1:0] u, logic [VW-1:0] v,
                        bit dir, int sp);
      int ub, vb, iu, iv, s, w;
      logic [BLKAW-1:0] b;
      ub = int'(u) / 4;
      vb = int'(v) / 4;
      b  = {tid, VBW'(vb), UBW'(ub)};
      iu = ub % sets;
      iv = vb % sets;
      for (int k = 0; k < 2; k++) begin
        if (valid[iu][k] && vdir[iu][k] == 0 && blk[iu][k] == b) begin
          lru[iu] = !k[0];
          return 1;
        end
        if (valid[iv][k] && vdir[iv][k] == 1 && blk[iv][k] == b) begin
          lru[iv] = !k[0];
          return 1;
        end
      end
      s = dir ? iv : iu;
      if (!valid[s][0])      w = 0;
      else if (!valid[s][1]) w = 1;
      else                   w = int'(lru[s]);
      last_victim_valid = valid[s][w];
      last_victim_span  = span[s][w];
      valid[s][w] = 1;
      vdir[s][w]  = dir;
      blk[s][w]   = b;
      span[s][w]  = sp;
      lru[s]      = (w == 0);
      return 0;
    endfunction
  endclass

endpackage
