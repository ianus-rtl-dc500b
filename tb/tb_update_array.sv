// tb_update_array: random planes, couplings and random numbers fed to the
// L x L cell array; every new spin is compared with a coordinate-based
// signed-arithmetic Metropolis reference (periodic wrap in x and y, z+1 and
// z-1 from their own planes, -z coupling from plane z-1). The shared tables
// are loaded with random probabilities so every entry matters.
module tb_update_array;
  import ianus_pkg::*;
  localparam int L = 16, N = L * L;
  logic clk = 0;
  logic [N-1:0] s_plane, n_m, n_c, n_p, jx, jy, jz, jzp, s_new, flip;
  logic [N-1:0][31:0] rnd;
  logic lut_we = 0;
  logic [2:0] lut_waddr = 0;
  logic [31:0] lut_wdata = 0;
  logic [31:0] lut [8];
  int checks = 0, failures = 0;

  update_array #(.L(L), .W(32)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] rp();
    logic [N-1:0] p;
    for (int i = 0; i < N; i += 32) p[i +: 32] = $urandom;
    return p;
  endfunction

  function automatic int pm(logic b);
    return b ? 1 : -1;
  endfunction

  initial begin
    int nflip = 0;
    for (int a = 0; a < 8; a++) begin
      @(negedge clk);
      lut_we = 1; lut_waddr = 3'(a); lut_wdata = $urandom; lut[a] = lut_wdata;
    end
    @(negedge clk); lut_we = 0;
    for (int t = 0; t < 40; t++) begin
      int bad;
      bad = 0;
      s_plane = rp(); n_m = rp(); n_c = rp(); n_p = rp();
      jx = rp(); jy = rp(); jz = rp(); jzp = rp();
      for (int i = 0; i < N; i++) rnd[i] = $urandom;
      #1;
      for (int x = 0; x < L; x++)
        for (int y = 0; y < L; y++) begin
          int i, h, u;
          logic e;
          i = x*L + y;
          h = pm(jx[i])                     * pm(n_c[((x+1)%L)*L + y])
            + pm(jx[((x+L-1)%L)*L + y])     * pm(n_c[((x+L-1)%L)*L + y])
            + pm(jy[i])                     * pm(n_c[x*L + (y+1)%L])
            + pm(jy[x*L + (y+L-1)%L])       * pm(n_c[x*L + (y+L-1)%L])
            + pm(jz[i])  * pm(n_p[i])
            + pm(jzp[i]) * pm(n_m[i]);
          u = (2 * pm(s_plane[i]) * h + 12) / 4;
          e = s_plane[i] ^ (rnd[i] <= lut[u]);
          if (s_new[i] !== e) bad++;
          if (e != s_plane[i]) nflip++;
        end
      checks++;
      if (bad != 0) begin
        failures++;
        $display("FAIL trial %0d: %0d cells wrong", t, bad);
      end
    end
    checks++;
    if (nflip == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
