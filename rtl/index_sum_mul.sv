// index_sum_mul: modular multiplier for one residue channel using the index-sum method.
//
// A product modulo m is formed like a product of logarithms: each operand is mapped to an
// index code by a table, the codes are added, and a reverse table maps the sum back.
//  * m prime (GF(p)): x = g^a mod p for a primitive root g; a is one index in [0, p-2]
//    and the sum is taken modulo p-1. Zero has no index and is detected separately.
//  * m = 2^k (k >= 3): x = 2^a * |5^b * (-1)^c|_m, a triple code <a, b, c>; the sum is
//    <a1+a2, (b1+b2) mod 2^(k-2), c1 xor c2>, and the product is zero when a1+a2 >= k.
//  * m = 2 or 4: the product is formed directly (tables would be larger than the logic).
// The method and the two code forms follow the source design. The tables are built at
// elaboration from m alone: the primitive root is the smallest one found by search, the
// GF(p) tables hold p entries and the 2^k tables 2^(k-1) entries. Moduli that are powers
// of an odd prime are not supported (they are not used by the default base set).
//
// Interface: x, y in [0, m); p = |x*y|_m. Purely combinational: two table reads and an
// adder, so it fits in the single EXE cycle of a subcore.
module index_sum_mul
  import rrns_pkg::*;
#(
  parameter int unsigned MOD = 139
) (
  input  residue_t x,
  input  residue_t y,
  output residue_t p
);

  localparam bit IS_P2 = is_pow2(MOD);
  localparam int unsigned K = clog2u(MOD);          // for m = 2^K
  localparam int unsigned TSZ = IS_P2 ? ((MOD >= 8) ? MOD / 2 : 1) : MOD;

  typedef residue_t [TSZ-1:0] tab_t;

  // smallest primitive root of a prime
  function automatic int unsigned prim_root();
    for (int unsigned g = 2; g < MOD; g++) begin
      int unsigned v = g;
      int unsigned ord = 1;
      while (v != 1) begin
        v = (v * g) % MOD;
        ord++;
      end
      if (ord == MOD - 1) return g;
    end
    return 1;
  endfunction

  // GF(p): LOG[x] = a with g^a = x (x >= 1); EXP[a] = g^a
  function automatic tab_t make_log();
    tab_t t = '0;
    int unsigned v = 1;
    int unsigned g = prim_root();
    for (int unsigned a = 0; a < MOD - 1; a++) begin
      t[v] = residue_t'(a);
      v = (v * g) % MOD;
    end
    return t;
  endfunction

  function automatic tab_t make_exp();
    tab_t t = '0;
    int unsigned v = 1;
    int unsigned g = prim_root();
    for (int unsigned a = 0; a < MOD - 1; a++) begin
      t[a] = residue_t'(v);
      v = (v * g) % MOD;
    end
    return t;
  endfunction

  // 2^k: CODE[u >> 1] = {c, b} for odd u = |5^b (-1)^c|_m; UNCODE[{c, b}] = u
  function automatic tab_t make_code();
    tab_t t = '0;
    int unsigned v = 1;
    for (int unsigned b = 0; b < TSZ / 2; b++) begin
      t[v >> 1]               = residue_t'(b);                  // c = 0
      t[((MOD - v) % MOD) >> 1] = residue_t'(b | (TSZ / 2));    // c = 1
      v = (v * 5) % MOD;
    end
    return t;
  endfunction

  function automatic tab_t make_uncode();
    tab_t t = '0;
    int unsigned v = 1;
    for (int unsigned b = 0; b < TSZ / 2; b++) begin
      t[b]            = residue_t'(v);
      t[b | (TSZ / 2)] = residue_t'((MOD - v) % MOD);
      v = (v * 5) % MOD;
    end
    return t;
  endfunction

  if (!IS_P2) begin : g_prime
    localparam tab_t LOG = make_log();
    localparam tab_t EXP = make_exp();
    logic [RW:0] s;
    always_comb begin
      s = {1'b0, LOG[x]} + {1'b0, LOG[y]};
      if (s >= (RW+1)'(MOD - 1)) s = s - (RW+1)'(MOD - 1);
      if (x == '0 || y == '0) p = '0;
      else                    p = EXP[s[RW-1:0]];
    end
  end else if (MOD >= 8) begin : g_pow2
    localparam tab_t CODE   = make_code();
    localparam tab_t UNCODE = make_uncode();
    localparam int unsigned BW = K - 2;              // width of b
    logic [4:0]     ax, ay, a;
    residue_t       ux, uy, cx, cy, u;
    logic [BW-1:0]  b;
    logic           c;
    always_comb begin
      // a = number of trailing zeros, u = odd part
      ax = '0; ay = '0;
      for (int i = K - 1; i >= 0; i--) if (x[i]) ax = 5'(i);
      for (int i = K - 1; i >= 0; i--) if (y[i]) ay = 5'(i);
      ux = x >> ax;
      uy = y >> ay;
      cx = CODE[ux >> 1];
      cy = CODE[uy >> 1];
      a  = ax + ay;
      b  = cx[BW-1:0] + cy[BW-1:0];
      c  = cx[BW] ^ cy[BW];
      u  = UNCODE[{c, b}];
      if (x == '0 || y == '0 || a >= 5'(K)) p = '0;
      else                                  p = residue_t'((u << a) & residue_t'(MOD - 1));
    end
  end else begin : g_small
    assign p = residue_t'((x * y) % MOD);
  end

endmodule
