// sbox_ref_pkg: reference model of the S-BOX code for the testbenches.
//
// Written independently of the RTL: a Hamming code word is built so that the
// XOR of the 1-based indices of all its set bits is zero (the defining
// property of the Hamming code), the data positions are found by skipping
// indices with exactly one bit set, and decoding flips the bit whose index
// equals that XOR. Also provides random error-pattern generators for the
// 117-wire link: k distinct random wires, and bursts of adjacent wires.
package sbox_ref_pkg;

  localparam int MSG = 32;
  localparam int HAM = 38;
  localparam int CW  = 39;
  localparam int LNK = 117;

  typedef logic [MSG-1:0] msg_t;
  typedef logic [CW-1:0]  cw_t;
  typedef logic [LNK-1:0] lnk_t;

  typedef struct {
    msg_t       msg;        // decoded message (single error corrected)
    logic [6:0] syn;        // {parity check, index xor}
    logic       de;         // double error flag
  } dec_t;

  function automatic int ref_data_pos(int d);
    int n = 0;
    for (int p = 1; p <= HAM; p++) begin
      if ($countones(p) != 1) begin
        if (n == d) return p;
        n++;
      end
    end
    return -1;
  endfunction

  function automatic int index_xor(cw_t w);
    int s = 0;
    for (int p = 1; p <= HAM; p++) if (w[p-1]) s ^= p;
    return s;
  endfunction

  function automatic cw_t ref_encode(msg_t m);
    cw_t w = '0;
    int  s;
    for (int d = 0; d < MSG; d++) w[ref_data_pos(d)-1] = m[d];
    s = index_xor(w);
    for (int k = 0; k < 6; k++) w[(1<<k)-1] = s[k];
    w[CW-1] = ^w[HAM-1:0];
    return w;
  endfunction

  function automatic lnk_t ref_triplicate(cw_t w);
    lnk_t l;
    for (int j = 0; j < CW; j++) for (int g = 0; g < 3; g++) l[3*j+g] = w[j];
    return l;
  endfunction

  function automatic cw_t ref_group(lnk_t l, int g);
    cw_t w;
    for (int j = 0; j < CW; j++) w[j] = l[3*j+g];
    return w;
  endfunction

  function automatic dec_t ref_decode(cw_t w);
    dec_t r;
    int   s = index_xor(w);
    logic pe = ^w;
    cw_t  c = w;
    if (s >= 1 && s <= HAM) c[s-1] = ~c[s-1];
    for (int d = 0; d < MSG; d++) r.msg[d] = c[ref_data_pos(d)-1];
    r.syn = {pe, 6'(s)};
    r.de  = (s != 0) && !pe;
    return r;
  endfunction

  // k distinct random wires of the link
  function automatic lnk_t rand_errors(int k);
    lnk_t e = '0;
    while ($countones(e) < k) e[$urandom_range(LNK-1)] = 1'b1;
    return e;
  endfunction

  // burst of len adjacent wires starting at a random wire
  function automatic lnk_t rand_burst(int len);
    lnk_t e = '0;
    int   s = $urandom_range(LNK-len);
    for (int i = 0; i < len; i++) e[s+i] = 1'b1;
    return e;
  endfunction

  // na, nb, nc distinct random errors in groups A, B and C
  function automatic lnk_t rand_dist(int na, int nb, int nc);
    lnk_t e = '0;
    int   n[3] = '{na, nb, nc};
    for (int g = 0; g < 3; g++) begin
      int placed = 0;
      while (placed < n[g]) begin
        int j = $urandom_range(CW-1);
        if (!e[3*j+g]) begin
          e[3*j+g] = 1'b1;
          placed++;
        end
      end
    end
    return e;
  endfunction

  // error count of group g
  function automatic int group_errors(lnk_t e, int g);
    return $countones(ref_group(e, g));
  endfunction

  function automatic msg_t rand_msg();
    return $urandom();
  endfunction

endpackage
