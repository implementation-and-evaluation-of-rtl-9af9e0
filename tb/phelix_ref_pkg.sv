// Behavioural reference model of the Phelix cipher, for the testbenches.
//
// Written straight from the algorithm, independent of the RTL's four-stage
// split: the half-block function H is coded as the ten-line sequence of
// add / xor / rotate statements, a block is H(H(Z, 0, X0), P, X1), the
// keystream is Y4 + Z4 of four blocks earlier, key mixing runs the
// 12-word recursion over a 40-entry array, and a whole message (init,
// data blocks, MAC set-up and tag blocks) is processed in one function.
package phelix_ref_pkg;

  typedef logic [31:0]      w32_t;
  typedef logic [4:0][31:0] st_t;     // st[0] = Z0 ... st[4] = Z4

  localparam int unsigned MAXW = 300; // longest message in words

  function automatic w32_t rol(input w32_t x, input int n);
    return (x << n) | (x >> (32 - n));
  endfunction

  // H(w0..w4, K0, K1)
  function automatic st_t ref_h(input st_t s, input w32_t k0, input w32_t k1);
    w32_t a, b, c, d, e;
    a = s[0]; b = s[1]; c = s[2]; d = s[3]; e = s[4];
    a = a + (d ^ k0); d = rol(d, 15);
    b = b + e;        e = rol(e, 25);
    c = c ^ a;        a = rol(a, 9);
    d = d ^ b;        b = rol(b, 10);
    e = e + c;        c = rol(c, 17);
    a = a ^ (d + k1); d = rol(d, 30);
    b = b ^ e;        e = rol(e, 13);
    c = c + a;        a = rol(a, 20);
    d = d + b;        b = rol(b, 11);
    e = e ^ c;        c = rol(c, 5);
    return {e, d, c, b, a};
  endfunction

  // Working key from the raw 256-bit key (8 words).
  function automatic void ref_keymix(input w32_t raw [8], output w32_t kw [8]);
    w32_t kk [40];
    st_t  s;
    for (int m = 0; m < 8; m++) kk[32+m] = raw[m];
    for (int i = 7; i >= 0; i--) begin
      s = {32'd96, kk[4*i+7], kk[4*i+6], kk[4*i+5], kk[4*i+4]};
      s = ref_h(ref_h(s, 32'd0, 32'd0), 32'd0, 32'd0);
      for (int m = 0; m < 4; m++) kk[4*i+m] = s[m] ^ kk[4*i+8+m];
    end
    for (int m = 0; m < 8; m++) kw[m] = kk[m];
  endfunction

  function automatic void ref_nonce(input w32_t n4 [4], output w32_t n8 [8]);
    for (int k = 0; k < 4; k++) n8[k] = n4[k];
    for (int k = 4; k < 8; k++) n8[k] = w32_t'(k % 4) - n8[k-4];
  endfunction

  // Block key words for block number i = j - 8.
  function automatic void ref_xkey(input w32_t kw [8], input w32_t n8 [8],
                                   input logic [63:0] j, input int lu,
                                   output w32_t x0, output w32_t x1);
    logic [63:0] i64, ip8, xp;
    i64 = j - 64'd8;
    ip8 = i64 + 64'd8;
    if (i64[1:0] == 2'd3)      xp = ip8 / 64'h8000_0000;
    else if (i64[1:0] == 2'd1) xp = 64'(4 * lu);
    else                       xp = '0;
    x0 = kw[i64[2:0]];
    x1 = kw[3'(i64[2:0] + 3'd4)] + n8[i64[2:0]] + xp[31:0] + ip8[31:0];
  endfunction

  // Complete message: returns the data outputs (C for encryption, P for
  // decryption) and the four tag words.
  function automatic void ref_message(input w32_t kw [8], input w32_t n4 [4],
                                      input w32_t din [MAXW], input int nw,
                                      input bit dec, input int lp_mod4,
                                      output w32_t dout [MAXW],
                                      output w32_t tag [4]);
    w32_t n8 [8];
    w32_t hist [4];               // hist[0] = Z4 of block i-4
    st_t  z, y;
    w32_t x0, x1, ks, p, z4old;
    logic [63:0] j;
    int nblk;
    ref_nonce(n4, n8);
    for (int k = 0; k < 4; k++) z[k] = kw[k+3] ^ n8[k];
    z[4] = kw[7];
    for (int k = 0; k < 4; k++) hist[k] = '0;
    for (int k = 0; k < MAXW; k++) dout[k] = '0;
    j = 0;
    nblk = 8 + nw + 12;
    for (int b = 0; b < nblk; b++) begin
      ref_xkey(kw, n8, j, 32, x0, x1);
      z4old = z[4];
      y  = ref_h(z, 32'd0, x0);
      ks = y[4] + hist[0];
      if (b < 8) p = '0;
      else if (b < 8 + nw) begin
        if (dec) begin p = din[b-8] ^ ks; dout[b-8] = p; end
        else     begin p = din[b-8];      dout[b-8] = p ^ ks; end
      end else p = w32_t'(lp_mod4);
      if (b >= 8 + nw + 8) tag[b-(8+nw+8)] = ks;
      z = ref_h(y, p, x1);
      if (b == 8 + nw - 1) z[0] = z[0] ^ 32'h912d94f1;
      hist[0] = hist[1]; hist[1] = hist[2]; hist[2] = hist[3]; hist[3] = z4old;
      j = j + 1;
    end
  endfunction

endpackage
