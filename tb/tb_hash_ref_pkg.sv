// tb_hash_ref_pkg: reference models used by the testbenches.
//
// Written from the description of the hash function, independently of the
// RTL structure: a function block is evaluated bit by bit from its
// configuration fields, a hash by running the stages one after another in
// a loop, and cuckoo insertion on two plain arrays. pack_fb() states the
// configuration word layout {en, selD, selC, selB, selA, mask}.
package tb_hash_ref_pkg;

  typedef struct {
    int unsigned mask;
    int unsigned sel[4];   // selA, selB, selC, selD
    bit          en;
  } fb_t;

  typedef struct {
    bit          v;
    int unsigned ip;
  } rec_t;

  function automatic int unsigned selw(input int unsigned hb);
    return (hb > 1) ? $clog2(hb) : 1;
  endfunction

  function automatic int unsigned hmask(input int unsigned hb);
    return (hb >= 32) ? 32'hffff_ffff : ((32'd1 << hb) - 1);
  endfunction

  function automatic bit bit_of(input int unsigned s, input int unsigned j);
    return (j < 32) ? bit'((s >> j) & 1) : 1'b0;
  endfunction

  function automatic bit fb_eval(input int unsigned s, input bit in_bit,
                                 input fb_t c, input int unsigned hb);
    bit r;
    r = in_bit;
    for (int unsigned j = 0; j < hb; j++)
      if (bit_of(c.mask, j)) r ^= bit_of(s, j);
    r ^= (c.sel[0] < hb ? bit_of(s, c.sel[0]) : 1'b0) &
         (c.sel[1] < hb ? bit_of(s, c.sel[1]) : 1'b0);
    if (c.en)
      r ^= (c.sel[2] < hb ? bit_of(s, c.sel[2]) : 1'b0) &
           (c.sel[3] < hb ? bit_of(s, c.sel[3]) : 1'b0);
    return r;
  endfunction

  function automatic logic [63:0] pack_fb(input fb_t c, input int unsigned hb);
    logic [63:0] w;
    int unsigned sw, pos;
    sw  = selw(hb);
    w   = 64'(c.mask & hmask(hb));
    pos = hb;
    for (int k = 0; k < 4; k++) begin
      w |= 64'(c.sel[k] & ((1 << sw) - 1)) << pos;
      pos += sw;
    end
    w |= 64'(c.en) << pos;
    return w;
  endfunction

  function automatic fb_t rand_fb(input int unsigned hb);
    fb_t c;
    c.mask = $urandom & hmask(hb);
    for (int k = 0; k < 4; k++) c.sel[k] = $urandom_range(hb - 1, 0);
    c.en = bit'($urandom & 1);
    return c;
  endfunction

  // Random block whose stage is invertible for a fixed input bit: the
  // state MSB (the bit the stage drops) enters the XOR, the products use
  // only the other bits. No state information is lost in such a stage.
  function automatic fb_t rand_fb_inv(input int unsigned hb);
    fb_t c;
    c = rand_fb(hb);
    c.mask |= 1 << (hb - 1);
    for (int k = 0; k < 4; k++) c.sel[k] = $urandom_range(hb - 2, 0);
    return c;
  endfunction

  // Hash of a 32-bit address: stages 1..32+hb-1, shift towards the MSB.
  function automatic int unsigned hash(input int unsigned ip, input fb_t cfg[],
                                       input int unsigned seed, input int unsigned hb);
    int unsigned s;
    bit in_bit, f;
    s = seed & hmask(hb);
    for (int unsigned i = 0; i < 32 + hb - 1; i++) begin
      in_bit = (i < 32) ? bit_of(ip, i) : 1'b0;
      f = fb_eval(s, in_bit, cfg[i], hb);
      s = ((s << 1) | int'(f)) & hmask(hb);
    end
    return s;
  endfunction

  // Cuckoo insertion into part 0 (indexed by h) and part 1 (indexed by g).
  function automatic void cuckoo_insert(ref rec_t t0[], ref rec_t t1[],
      input int unsigned ip, input fb_t ch[], input fb_t cg[],
      input int unsigned hb, input int unsigned max_kicks,
      output bit ok, output int unsigned lost, output int unsigned kicks);
    int unsigned cur, pos, k;
    bit part;
    rec_t old;
    cur = ip; part = 0; k = 0;
    forever begin
      pos = part ? hash(cur, cg, 1, hb) : hash(cur, ch, 0, hb);
      old = part ? t1[pos] : t0[pos];
      if (old.v && old.ip == cur) begin
        ok = 1; lost = cur; kicks = k; return;
      end
      if (part) t1[pos] = '{v: 1'b1, ip: cur};
      else      t0[pos] = '{v: 1'b1, ip: cur};
      if (!old.v) begin
        ok = 1; lost = ip; kicks = k; return;
      end
      if (old.ip == ip || k == max_kicks) begin
        ok = 0; lost = old.ip; kicks = k + 1; return;
      end
      cur = old.ip; part = !part; k++;
    end
  endfunction

  function automatic bit in_table(ref rec_t t0[], ref rec_t t1[], input int unsigned ip,
                                  input fb_t ch[], input fb_t cg[], input int unsigned hb);
    rec_t a, b;
    a = t0[hash(ip, ch, 0, hb)];
    b = t1[hash(ip, cg, 1, hb)];
    return (a.v && a.ip == ip) || (b.v && b.ip == ip);
  endfunction

endpackage
