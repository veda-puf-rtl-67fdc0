// veda_ref_pkg: reference models used by the Veda-PUF testbenches.
//
// The models are written from the algorithm's definition, not from the RTL:
// - ghana_ref() lists the bits of Eqn. 1 for every 3-bit window and of
//   Eqn. 2 for the final pair, straight from the formulas.
// - arbiter_ref() follows the difference of the two edge arrival times
//   through the switch stages (straight: the difference grows by the delay
//   difference; crossed: it changes sign first), a different formulation from
//   the arrival-time race of the behavioural cell. Only the per-multiplexer
//   delay values, which define the modelled chip, are shared with the RTL.
// - key_ref() runs the whole controller algorithm on a bit queue.
package veda_ref_pkg;
  import veda_puf_pkg::*;

  typedef bit bitq_t[$];

  function automatic bitq_t ghana_ref(bitq_t b);
    bitq_t o;
    int n = b.size();
    if (n < 2) return b;
    for (int i = 0; i + 2 < n; i++) begin
      // [bi,bi+1] [bi+1,bi] [bi,bi+1,bi+2] [bi+2,bi+1,bi] [bi,bi+1,bi+2]
      o.push_back(b[i]);   o.push_back(b[i+1]);
      o.push_back(b[i+1]); o.push_back(b[i]);
      o.push_back(b[i]);   o.push_back(b[i+1]); o.push_back(b[i+2]);
      o.push_back(b[i+2]); o.push_back(b[i+1]); o.push_back(b[i]);
      o.push_back(b[i]);   o.push_back(b[i+1]); o.push_back(b[i+2]);
    end
    // [bn-1,bn] [bn,bn-1] [bn-1,bn]
    o.push_back(b[n-2]); o.push_back(b[n-1]);
    o.push_back(b[n-1]); o.push_back(b[n-2]);
    o.push_back(b[n-2]); o.push_back(b[n-1]);
    return o;
  endfunction

  function automatic int ref_delay(int unsigned seed, int unsigned i, int unsigned m,
                                   int unsigned nominal, int unsigned var_);
    logic [31:0] h;
    h = mix32(seed ^ mix32(32'(i * 4 + m) + 32'h9e3779b9));
    return int'(nominal) + int'(h % (2 * var_ + 1)) - int'(var_);
  endfunction

  // 1 when the top edge arrives strictly first.
  function automatic bit arbiter_ref(int unsigned seed, bitq_t c,
                                     int unsigned nominal = 100, int unsigned var_ = 8);
    int diff = 0;  // arrival(top) - arrival(bottom)
    for (int i = 0; i < c.size(); i++) begin
      if (c[i]) diff = -diff + ref_delay(seed, i, 1, nominal, var_) - ref_delay(seed, i, 3, nominal, var_);
      else      diff =  diff + ref_delay(seed, i, 0, nominal, var_) - ref_delay(seed, i, 2, nominal, var_);
    end
    return diff < 0;
  endfunction

  function automatic int unsigned cell_seed(int unsigned device_seed, int unsigned g);
    return mix32(device_seed * 32'h01000193 ^ 32'(g));
  endfunction

  // Response of an array of npuf cells, each with a chain as long as c.
  function automatic bitq_t puf_ref(int unsigned device_seed, bitq_t c, int unsigned npuf);
    bitq_t r;
    for (int unsigned g = 0; g < npuf; g++) r.push_back(arbiter_ref(cell_seed(device_seed, g), c));
    return r;
  endfunction

  // Whole key: C1 -> R1, then per round expand, chunk into w-bit words
  // padded with zeros, answer each word, keep as many bits as the challenge.
  function automatic bitq_t key_ref(int unsigned device_seed, bitq_t c1, int unsigned rounds);
    bitq_t r, pc, chunk, ans;
    int unsigned w = c1.size();
    r = puf_ref(device_seed, c1, w);
    for (int unsigned k = 0; k < rounds; k++) begin
      pc = ghana_ref(r);
      r.delete();
      for (int unsigned base = 0; base < pc.size(); base += w) begin
        chunk.delete();
        for (int unsigned j = 0; j < w; j++) chunk.push_back(base + j < pc.size() ? pc[base + j] : 1'b0);
        ans = puf_ref(device_seed, chunk, w);
        for (int unsigned j = 0; j < w && base + j < pc.size(); j++) r.push_back(ans[j]);
      end
    end
    return r;
  endfunction

endpackage
