// wze_ref_pkg: testbench-side reference model of the working-zone encoding
// and an address-stream generator with locality.
//
// wze_ref_enc applies the encoding algorithm reference by reference with
// integer arithmetic: a signed difference to each Pref, a range test against
// -k/2 .. k/2-1 (k = N unless given), the lowest hitting zone, the same-offset test, the one-hot
// bit position (offset modulo k) XORed into the previous word, and LRU kept
// as last-use time stamps (initially zone i last used at time -i). It is
// written independently of the RTL and is used to predict the bus fields.
//
// wze_stream produces addresses that wander around NZONES base addresses
// with small strides, occasional stride changes, repeated strides and
// occasional jumps to a new base, so that every encoder case occurs.
package wze_ref_pkg;

  class wze_ref_enc;
    int n, b, k;
    int pref[], prev_off[];
    longint last_use[];
    longint now;
    int prev_sent, prev_ident, prev_miss;
    // outcome of the last encode() call
    bit last_hit, last_same;
    int last_zone, last_off;

    function new(int n_, int b_, int k_ = 0);
      n = n_; b = b_; k = (k_ == 0) ? n_ : k_;
      pref = new[b]; prev_off = new[b]; last_use = new[b];
      foreach (pref[j]) begin
        pref[j] = 0; prev_off[j] = 0; last_use[j] = -longint'(j);
      end
      now = 1; prev_sent = 0; prev_ident = 0; prev_miss = 0;
    endfunction

    function int wrap_signed(int d);
      int m;
      m = 1 << n;
      d = ((d % m) + m) % m;
      if (d >= m / 2) d -= m;
      return d;
    endfunction

    function void encode(int addr, output int word, output int ident, output int miss);
      int r, d, v;
      longint oldest;
      r = -1; v = 0;
      for (int j = 0; j < b; j++) begin
        d = wrap_signed(addr - pref[j]);
        if (r < 0 && d >= -(k / 2) && d <= k / 2 - 1) begin r = j; v = d; end
      end
      if (r >= 0) begin
        miss = 0; ident = r;
        last_same = (v == prev_off[r]);
        if (last_same) word = prev_sent;
        else           word = prev_sent ^ (1 << ((v + k) % k));
        pref[r] = addr; prev_off[r] = v; last_use[r] = now;
        last_hit = 1; last_zone = r; last_off = v;
      end else begin
        miss = 1; ident = prev_ident; word = addr;
        r = 0; oldest = last_use[0];
        for (int j = 1; j < b; j++) if (last_use[j] < oldest) begin oldest = last_use[j]; r = j; end
        pref[r] = addr; last_use[r] = now;
        last_hit = 0; last_same = 0; last_zone = r; last_off = 0;
      end
      now++;
      prev_sent = word; prev_ident = ident; prev_miss = miss;
    endfunction
  endclass

  class wze_stream;
    int n, nzones;
    int base[], stride[];
    int zone;

    function new(int n_, int nzones_);
      n = n_; nzones = nzones_;
      base = new[nzones]; stride = new[nzones];
      foreach (base[z]) begin
        base[z] = $urandom_range((1 << n) - 1);
        stride[z] = 1;
      end
      zone = 0;
    endfunction

    function int next();
      int p;
      p = $urandom_range(99);
      if (p < 30) zone = $urandom_range(nzones - 1);
      p = $urandom_range(99);
      if (p < 5)       base[zone] = $urandom_range((1 << n) - 1);         // far jump
      else if (p < 15) stride[zone] = $urandom_range(n + 4) - (n / 2 + 2); // new stride, sometimes out of range
      else if (p < 20) base[zone] = base[zone] + $urandom_range(2 * n) - n;
      base[zone] = (base[zone] + stride[zone]) & ((1 << n) - 1);
      return base[zone];
    endfunction
  endclass

endpackage
