// dsss_ref_pkg: reference model used by the testbenches.
//
// Computes, independently of the RTL, what the transmitter must produce: PN
// chips from the linear recurrences of the two m-sequences, half-sine sample
// values from sin(pi*k/4), the frame from its field list, and differential
// encoding from the +-1 product rule.
package dsss_ref_pkg;

  localparam int CHIPS = 127;
  localparam int SPC   = 4;
  localparam int NSYM  = 64;
  localparam int AMP   = 2047;
  localparam int CLKS_PER_SAMPLE = 2;

  // chip n (n >= 0) of the sequence a[n+7] = a[n] ^ a[n+m], a[0..6] = 1
  // (m = 1 for PN_I, m = 3 for PN_Q)
  function automatic bit pn_chip(int m, int n);
    bit a[$];
    for (int i = 0; i < 7; i++) a.push_back(1'b1);
    for (int i = 7; i <= n; i++) a.push_back(a[i-7] ^ a[i-7+m]);
    return a[n];
  endfunction

  function automatic void pn_table(int m, output bit t[CHIPS]);
    bit a[CHIPS+7];
    for (int i = 0; i < 7; i++) a[i] = 1'b1;
    for (int i = 7; i < CHIPS + 7; i++) a[i] = a[i-7] ^ a[i-7+m];
    for (int i = 0; i < CHIPS; i++) t[i] = a[i];
  endfunction

  function automatic int mag(int k);
    real pi = 3.14159265358979;
    return int'(AMP * $sin(pi * k / 4.0));  // int'() rounds to nearest
  endfunction

  function automatic int shaped(bit chip, int k);
    return chip ? mag(k) : -mag(k);
  endfunction

  // frame bits in send order: f[0] is sent first
  function automatic void build_frame(int unit_id, int seq, int s[6], output bit f[128]);
    int p = 0;
    bit [15:0] pre  = 16'hED37;  // 1110 1101 0011 0111
    bit [7:0]  sync = 8'h8F;     // 1000 1111
    for (int i = 15; i >= 0; i--) f[p++] = pre[i];
    for (int i = 7;  i >= 0; i--) f[p++] = sync[i];
    for (int i = 15; i >= 0; i--) f[p++] = unit_id[i];
    for (int i = 15; i >= 0; i--) f[p++] = seq[i];
    for (int j = 0; j < 6; j++)
      for (int i = 11; i >= 0; i--) f[p++] = s[j][i];
  endfunction

  // +-1 product: 1 -> +1, 0 -> -1
  function automatic bit prod(bit a, bit b);
    int pa = a ? 1 : -1;
    int pb = b ? 1 : -1;
    return (pa * pb) > 0;
  endfunction

  // value the A/D model returns for its n-th conversion
  function automatic int adc_value(int n);
    return (n * 1237 + 291) % 4096;
  endfunction

endpackage
