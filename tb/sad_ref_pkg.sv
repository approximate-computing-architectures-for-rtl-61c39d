// Reference model of the approximate SAD datapath, for the testbenches.
//
// Works on integers and bit-slices rather than on carry chains: every
// approximate adder is described by which operand slice produces each
// carry, evaluated with ordinary '+'. ref_pe, ref_tree and ref_acc mirror
// the datapath structure (pairing order, widths, approximated regions).
package sad_ref_pkg;
  import sad_pkg::*;

  function automatic longint unsigned msk(input int n);
    return (n <= 0) ? 0 : ((64'd1 << n) - 1);
  endfunction

  function automatic longint unsigned bitof(input longint unsigned v, input int i);
    return (v >> i) & 1;
  endfunction

  // carry out of adding slices [st, t) of x and y with carry c0
  function automatic longint unsigned slice_carry(input longint unsigned x, y,
                                                  input int st, t,
                                                  input longint unsigned c0);
    longint unsigned sx, sy;
    if (t <= st) return c0;
    sx = (x >> st) & msk(t - st);
    sy = (y >> st) & msk(t - st);
    return ((sx + sy + c0) >> (t - st)) & 1;
  endfunction

  // (w+1)-bit result of a + b + cin on the given adder
  function automatic longint unsigned ref_add(input longint unsigned a, b,
                                              input longint unsigned cin,
                                              input int w, input adder_e t,
                                              input bit approx, input int exact_lsbs,
                                              input int k);
    int lo, s, l, st, seg, j;
    longint unsigned low, clo, x, y, sec, m, hit;
    a = a & msk(w);
    b = b & msk(w);
    if (!approx || t == ADD_RCA || t == ADD_CLA) return (a + b + cin) & msk(w + 1);
    lo  = (exact_lsbs > w) ? w : exact_lsbs;
    s   = w - lo;
    low = (a & msk(lo)) + (b & msk(lo)) + cin;
    clo = (low >> lo) & 1;
    x   = a >> lo;
    y   = b >> lo;
    l   = (k > s) ? s : k;
    case (t)
      ADD_LOA: begin
        sec = ((x >> l) + (y >> l) + ((l > 0) ? (bitof(x, l-1) & bitof(y, l-1)) : 0)) << l;
        sec = sec | ((x | y) & msk(l));
      end
      ADD_ETAI: begin
        sec = ((x >> l) + (y >> l)) << l;
        hit = x & y & msk(l);
        if (hit == 0) sec = sec | ((x ^ y) & msk(l));
        else begin
          m = 0;
          for (int i = 0; i < l; i++) if (bitof(hit, i) != 0) m = i;
          sec = sec | ((x ^ y) & msk(l) & ~msk(int'(m) + 1)) | msk(int'(m) + 1);
        end
      end
      default: begin
        sec = 0;
        for (int i = 0; i <= s; i++) begin
          if (t == ADD_ACA) st = (i > k) ? i - k : 0;
          else begin
            seg = (t == ADD_ACAA) ? ((k / 2 < 1) ? 1 : k / 2) : k;
            j   = ((i == s && i > 0) ? i - 1 : i) / seg;   // window of this bit
            st  = (j >= 1) ? (j - 1) * seg : 0;
          end
          if (i < s)
            sec |= (bitof(x, i) ^ bitof(y, i) ^ slice_carry(x, y, st, i, (st == 0) ? clo : 0)) << i;
          else
            sec |= slice_carry(x, y, st, i, (st == 0) ? clo : 0) << i;
        end
      end
    endcase
    return ((sec << lo) | (low & msk(lo))) & msk(w + 1);
  endfunction

  // pairwise tree of n values of width in_w
  function automatic longint unsigned ref_tree(input longint unsigned v[], input int in_w,
                                               input adder_e t, input bit approx,
                                               input int exact_lsbs, input int k);
    longint unsigned cur[$], nxt[$];
    int w;
    cur = v;
    w = in_w;
    while (cur.size() > 1) begin
      nxt = {};
      for (int i = 0; i < cur.size(); i += 2)
        nxt.push_back(ref_add(cur[i], cur[i+1], 0, w, t, approx, exact_lsbs, k));
      cur = nxt;
      w++;
    end
    return cur[0];
  endfunction

  // one PE: 16 (cur, ref) pairs
  function automatic longint unsigned ref_pe(input byte unsigned c[16], input byte unsigned r[16],
                                             input adder_e t, input subst_e sb, input int k);
    longint unsigned v[] = new[16];
    longint unsigned d;
    for (int i = 0; i < 16; i++) begin
      d = ref_add(c[i], (~r[i]) & 8'hff, 1, 8, t, sb == SUBST_3, 0, k);
      v[i] = (bitof(d, 8) != 0) ? (d & 8'hff) : ((256 - (d & 8'hff)) & 8'hff);
    end
    return ref_tree(v, 8, t, sb == SUBST_1, 0, k);
  endfunction

  // one 256-pair vector through PEs and tree adder
  function automatic longint unsigned ref_vec(input byte unsigned c[256], input byte unsigned r[256],
                                              input adder_e t, input subst_e sb, input int k);
    longint unsigned pv[] = new[16];
    byte unsigned cc[16], rr[16];
    for (int p = 0; p < 16; p++) begin
      for (int i = 0; i < 16; i++) begin
        cc[i] = c[16*p+i];
        rr[i] = r[16*p+i];
      end
      pv[p] = ref_pe(cc, rr, t, sb, k);
    end
    return ref_tree(pv, 12, t, sb == SUBST_1 || sb == SUBST_2, (sb == SUBST_2) ? 12 : 0, k);
  endfunction

  // accumulator step (20 bits, carry out dropped)
  function automatic longint unsigned ref_acc(input longint unsigned acc, input longint unsigned v,
                                              input adder_e t, input subst_e sb, input int k);
    return ref_add(acc, v, 0, 20, t, sb == SUBST_1 || sb == SUBST_2,
                   (sb == SUBST_2) ? 12 : 0, k) & msk(20);
  endfunction

endpackage
