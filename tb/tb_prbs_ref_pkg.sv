// tb_prbs_ref_pkg: reference model of one PRBS pattern for the testbenches.
//
// Models a pattern as the bit sequence it produces rather than as a
// register: bit s[t] = NOT(s[t-1-N] XOR s[t-1-M]) with s[t] = 0 before
// reset is released. The register word D0..DN at time t is then
// s[t], s[t-1], ..., s[t-N] (D0 = newest bit).
package tb_prbs_ref_pkg;

  class prbs_ref;
    int unsigned n;
    int unsigned m;
    bit          hist[$];  // hist[0] is the newest bit

    function new(int unsigned n_i, int unsigned m_i);
      n = n_i;
      m = m_i;
      clear();
    endfunction

    function void clear();
      hist.delete();
      for (int unsigned i = 0; i <= n; i++) hist.push_back(1'b0);
    endfunction

    function void step();
      bit b;
      b = !(hist[n] != hist[m]);
      hist.push_front(b);
      void'(hist.pop_back());
    endfunction

    function logic [255:0] word();
      logic [255:0] w;
      w = '0;
      for (int unsigned k = 0; k <= n; k++) w[k] = hist[k];
      return w;
    endfunction
  endclass

endpackage
