// sc_ref_model.svh - behavioural reference of the chip generators, included
// inside testbench modules. It recomputes the generator outputs in closed
// form from the chip index (residue_k = (seed_k mod p_k + t) mod p_k) rather
// than by stepping counters, and the phase arithmetic with plain integers.

localparam int REF_BULK_P [4] = '{251, 241, 239, 233};
localparam int REF_PERT_P [4] = '{229, 227, 223, 211};
localparam int unsigned REF_BULK_SALT = 32'h0000_0000;
localparam int unsigned REF_PERT_SALT = 32'h6A09_E667;

function automatic int unsigned ref_hash(int unsigned salt, int k, int x);
  int unsigned h;
  h = int'(x) * 32'h9E37_79B1 + (k + 1) * 32'h85EB_CA77 + salt;
  h ^= h >> 15;
  h *= 32'h2C1B_3C6D;
  h ^= h >> 12;
  h *= 32'h297A_2D39;
  h ^= h >> 15;
  return h;
endfunction

// Output of an RNS generator with moduli p, t chips after loading seed.
function automatic int ref_rns(int p [4], int unsigned salt, int outw,
                               logic [3:0][7:0] seed, longint t);
  int r = 0;
  for (int k = 0; k < 4; k++) begin
    int s0, res;
    s0  = int'(seed[k]) % p[k];
    res = int'((longint'(s0) + t) % longint'(p[k]));
    r ^= int'(ref_hash(salt, k, res) >> (32 - outw));
  end
  return r;
endfunction

function automatic int ref_theta(logic [3:0][7:0] key, longint t);
  return ref_rns(REF_BULK_P, REF_BULK_SALT, 8, key, t);
endfunction

function automatic int ref_psi(logic [3:0][7:0] pseed, longint t, int m);
  return (ref_rns(REF_PERT_P, REF_PERT_SALT, 12, pseed, t) % m) - (m / 2);
endfunction

function automatic int ref_mod256(int x);
  return ((x % 256) + 256) % 256;
endfunction
