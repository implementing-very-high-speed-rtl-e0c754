// tb_ref_pkg: reference model used by the testbenches. It has nothing in
// common with the RTL beyond the number formats.
//
// act_ref() evaluates the PLAN sigmoid approximation in real arithmetic.
// mlp_net holds one network with its weights as plain integers. It computes
// the outputs and the ranked class list directly from the MLP formula, and
// it produces the 16-bit weight memory words in the layout the chip reads:
//   layer 1: neuron j, word k  -> {W1[j][2k+1], W1[j][2k]}, k < ceil((n_in+1)/2)
//   layer 2: row j, word q     -> {W2[2q+1][j], W2[2q][j]},  j <= n_hid
// Column n_in of W1 and column n_hid of W2 are the biases. Unused byte lanes
// are filled with random junk, which the chip must ignore.
package tb_ref_pkg;

  function automatic int act_ref(longint acc);
    real z, a, v;
    int  fpos;
    z = $floor(real'(acc) / 128.0) / 32.0;   // neuron sum cut to 1/32 steps
    a = (z < 0.0) ? -z : z;
    if (a >= 5.0)        v = 1.0;
    else if (a >= 2.375) v = 0.03125 * a + 0.84375;
    else if (a >= 1.0)   v = 0.125 * a + 0.625;
    else                 v = 0.25 * a + 0.5;
    fpos = int'($floor(v * 128.0 + 1.0e-9));
    if (z < 0.0) fpos = 128 - fpos;
    return (fpos > 127) ? 127 : fpos;
  endfunction

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom_range(hi - lo));
  endfunction

  class mlp_net;
    int n_in, n_hid, n_out;
    int w1 [128][66];     // [hidden][input], column n_in = bias
    int w2 [64][130];     // [output][hidden], column n_hid = bias
    int junk;

    function new(int ni, int nh, int no, int wmax = 40);
      n_in = ni; n_hid = nh; n_out = no;
      for (int j = 0; j < 128; j++)
        for (int i = 0; i < 66; i++) w1[j][i] = (i <= ni) ? rnd(-wmax, wmax) : rnd(-128, 127);
      for (int k = 0; k < 64; k++)
        for (int j = 0; j < 130; j++) w2[k][j] = (j <= nh && k < no) ? rnd(-wmax, wmax) : rnd(-128, 127);
    endfunction

    function int l1_words();  return (n_in + 2) / 2;  endfunction
    function int l2_words();  return (n_out + 1) / 2; endfunction
    function int l1_size();   return n_hid * l1_words(); endfunction
    function int l2_size();   return (n_hid + 1) * l2_words(); endfunction

    function logic [15:0] w1_word(int idx);
      int j, k;
      j = idx / l1_words(); k = idx % l1_words();
      return {8'(w1[j][2*k+1]), 8'(w1[j][2*k])};
    endfunction

    function logic [15:0] w2_word(int idx);
      int j, q;
      j = idx / l2_words(); q = idx % l2_words();
      return {8'(w2[2*q+1][j]), 8'(w2[2*q][j])};
    endfunction

    function void hidden(input int x [64], output int h [128]);
      for (int j = 0; j < n_hid; j++) begin
        longint s = 0;
        for (int i = 0; i < n_in; i++) s += longint'(w1[j][i]) * x[i];
        s += longint'(w1[j][n_in]) * 128;
        h[j] = act_ref(s);
      end
    endfunction

    function void outputs_from_hidden(input int h [128], output int o [64]);
      for (int k = 0; k < n_out; k++) begin
        longint s = 0;
        for (int j = 0; j < n_hid; j++) s += longint'(w2[k][j]) * h[j];
        s += longint'(w2[k][n_hid]) * 128;
        o[k] = act_ref(s);
      end
    endfunction

    function void outputs(input int x [64], output int o [64]);
      int h [128];
      hidden(x, h);
      outputs_from_hidden(h, o);
    endfunction
  endclass

  // ranked list: classes by decreasing value, equal values by lower index
  function automatic void rank(input int o [64], input int n, output int order [64]);
    bit used [64];
    for (int k = 0; k < 64; k++) used[k] = 0;
    for (int r = 0; r < n; r++) begin
      int best = -1;
      for (int k = 0; k < n; k++)
        if (!used[k] && (best < 0 || o[k] > o[best])) best = k;
      order[r] = best;
      used[best] = 1;
    end
  endfunction

  function automatic void random_input(input int n, output int x [64]);
    for (int i = 0; i < 64; i++) x[i] = (i < n) ? rnd(-128, 127) : 0;
  endfunction

endpackage
