// tb_ref_pkg: reference models shared by the testbenches. They compute the
// expected routing straight from the definition of a compressor, without any
// of the network's structure.
package tb_ref_pkg;

  // dest[i] = output port that input i must reach in an n-port compressor
  // with start address d. Active packets, in input order, take d, d+1, ...;
  // idle packets take d-1, d-2, ... (all mod n). With inv set, the roles are
  // exchanged: idle packets take d, d+1, ... and active ones d-1, d-2, ...
  function automatic void compress_ref(input int n, input int d, input bit inv,
                                       input bit act [], output int dest []);
    int a_cnt;
    int i_cnt;
    bit lead;
    dest  = new[n];
    a_cnt = 0;
    i_cnt = 0;
    for (int i = 0; i < n; i++) begin
      lead = act[i] ^ inv;
      if (lead) begin
        dest[i] = (d + a_cnt) % n;
        a_cnt++;
      end else begin
        dest[i] = ((d - 1 - i_cnt) % n + n) % n;
        i_cnt++;
      end
    end
  endfunction

  // Start addresses of the two halves of a 2^lg-port baseline-swap
  // compressor with start d: upper half (even outputs) and lower half (odd).
  function automatic int upper_start(input int d, input int lg);
    return ((d >> 1) + (d & 1)) % (1 << (lg - 1));
  endfunction
  function automatic int lower_start(input int d);
    return d >> 1;
  endfunction

  // Initial running parity RP(i,j) by recursive translation of the start
  // address: halve it stage by stage, taking the upper-half start for a 0 in
  // j (MSB first) and the lower-half start for a 1; RP is the LSB reached.
  function automatic bit rp_ref(input int d, input int lg, input int i, input int j);
    int cur;
    int l;
    cur = d;
    l   = lg;
    for (int b = i - 1; b >= 0; b--) begin
      if (((j >> b) & 1) == 0) cur = upper_start(cur, l);
      else                     cur = lower_start(cur);
      l--;
    end
    return cur[0];
  endfunction

endpackage
