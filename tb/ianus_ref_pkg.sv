// ianus_ref_pkg: reference models used by the testbenches.
//
// pr_ref_wheel produces the Parisi-Rapuano sequence one element at a time,
// straight from I(k) = I(k-24) + I(k-55), R(k) = I(k) ^ I(k-61).
// spin_ref holds the two spin lattices, the three coupling lattices, the
// probability table and the wheels of one SP and performs half-sweeps with
// signed +1/-1 arithmetic (dE = 2 s_i sum_j J_ij s_j), independently of the
// bit tricks used in the RTL. Sites are stored at index z*L*L + x*L + y, so
// the L*L bits of plane z are contiguous and match the RTL plane layout.
package ianus_ref_pkg;

  localparam int MAXP = 4096;   // largest plane the helpers handle (L <= 64)

  class pr_ref_wheel;
    bit [31:0] h [61];          // h[j] = I(k-61+j)
    function void seed(int idx, bit [31:0] v);
      h[idx] = v;
    endfunction
    function bit [31:0] next();
      bit [31:0] i, r;
      i = h[37] + h[6];         // I(k-24) + I(k-55)
      r = i ^ h[0];             // ^ I(k-61)
      for (int j = 0; j < 60; j++) h[j] = h[j+1];
      h[60] = i;
      return r;
    endfunction
  endclass

  class spin_ref;
    int L, rpw, nwheel;
    bit spin [2][];             // bank A, bank B
    bit jl   [3][];             // Jx, Jy, Jz
    bit [31:0] lut [8];
    pr_ref_wheel wheel [];
    int flips;

    function new(int l, int r);
      L = l; rpw = r; nwheel = (l*l + r - 1) / r;
      for (int b = 0; b < 2; b++) spin[b] = new[l*l*l];
      for (int a = 0; a < 3; a++) jl[a]   = new[l*l*l];
      wheel = new[nwheel];
      foreach (wheel[w]) wheel[w] = new();
      flips = 0;
    endfunction

    function int idx(int x, int y, int z);
      return ((z % L) * L + (x % L)) * L + (y % L);
    endfunction

    function void randomize_all(int pj);  // pj: percent of +1 couplings
      for (int i = 0; i < L*L*L; i++) begin
        spin[0][i] = 1'($urandom);
        spin[1][i] = 1'($urandom);
        for (int a = 0; a < 3; a++) jl[a][i] = (($urandom % 100) < pj);
      end
    endfunction

    function bit [MAXP-1:0] plane(ref bit lat [], input int z);
      bit [MAXP-1:0] p = '0;
      for (int i = 0; i < L*L; i++) p[i] = lat[z*L*L + i];
      return p;
    endfunction

    // One half-sweep: every site of bank sb is updated from bank 1-sb.
    function void half_sweep(int sb);
      int nb = 1 - sb;
      bit [31:0] r [];
      r = new[nwheel * rpw];
      for (int z = 0; z < L; z++) begin
        for (int w = 0; w < nwheel; w++)
          for (int n = 0; n < rpw; n++) r[w*rpw + n] = wheel[w].next();
        for (int x = 0; x < L; x++)
          for (int y = 0; y < L; y++) begin
            int s, h, de, u;
            s = spin[sb][idx(x,y,z)] ? 1 : -1;
            h = 0;
            h += (jl[0][idx(x,y,z)]       ? 1 : -1) * (spin[nb][idx(x+1,y,z)]   ? 1 : -1);
            h += (jl[0][idx(x+L-1,y,z)]   ? 1 : -1) * (spin[nb][idx(x+L-1,y,z)] ? 1 : -1);
            h += (jl[1][idx(x,y,z)]       ? 1 : -1) * (spin[nb][idx(x,y+1,z)]   ? 1 : -1);
            h += (jl[1][idx(x,y+L-1,z)]   ? 1 : -1) * (spin[nb][idx(x,y+L-1,z)] ? 1 : -1);
            h += (jl[2][idx(x,y,z)]       ? 1 : -1) * (spin[nb][idx(x,y,z+1)]   ? 1 : -1);
            h += (jl[2][idx(x,y,z+L-1)]   ? 1 : -1) * (spin[nb][idx(x,y,z+L-1)] ? 1 : -1);
            de = 2 * s * h;                 // E' - E
            u  = (de + 12) / 4;
            if (r[x*L + y] <= lut[u]) begin
              spin[sb][idx(x,y,z)] = ~spin[sb][idx(x,y,z)];
              flips++;
            end
          end
      end
    endfunction

    function void sweeps(int n);
      for (int k = 0; k < n; k++) begin
        half_sweep(0);
        half_sweep(1);
      end
    endfunction

    // Total energy of both replicas. The bond (x, x+d) joins bank A and bank B
    // in both replicas, so H1 + H2 = -sum J_d(x) [A(x) B(x+d) + B(x) A(x+d)].
    function int energy();
      int e = 0;
      for (int z = 0; z < L; z++)
        for (int x = 0; x < L; x++)
          for (int y = 0; y < L; y++) begin
            int i, j, jv;
            i = idx(x,y,z);
            for (int d = 0; d < 3; d++) begin
              j  = (d == 0) ? idx(x+1,y,z) : (d == 1) ? idx(x,y+1,z) : idx(x,y,z+1);
              jv = jl[d][i] ? 1 : -1;
              e -= jv * ((spin[0][i] ? 1 : -1) * (spin[1][j] ? 1 : -1)
                       + (spin[1][i] ? 1 : -1) * (spin[0][j] ? 1 : -1));
            end
          end
      return e;
    endfunction

    // Metropolis table: P(u) = min(1, exp(-beta*dE)), dE = 4u - 12, 1.0 = 2^32-1
    function void set_beta(real beta);
      for (int u = 0; u < 8; u++) begin
        real p;
        p = (u > 6) ? 0.0 : $exp(-beta * real'(4*u - 12));
        if (p >= 1.0) lut[u] = 32'hFFFF_FFFF;
        else          lut[u] = 32'(longint'(p * 4294967295.0));
      end
    endfunction
  endclass

endpackage
