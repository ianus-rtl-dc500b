// tb_workload_models: the two physical models the processor is built for,
// run on one SP at the default size (L = 16, two replicas).
//   1. Infinite temperature (beta = 0, every table entry 1.0): every move is
//      accepted, so one sweep must invert every spin of both banks.
//   2. Ising ferromagnet (all couplings +1) quenched from a random start to
//      beta = 0.5, well inside the ordered phase: 10 sweeps.
//   3. Edwards-Anderson spin glass (random +-1 couplings) quenched to
//      beta = 1.0: 10 sweeps.
// For 2 and 3 the lattices read back after every sweep must equal the
// reference model, and the energy per spin (computed from the read-back
// state) must fall from about 0 to below -2.0 (Ising) and -1.2 (spin glass).
module tb_workload_models;
  import ianus_pkg::*;
  import ianus_ref_pkg::*;

  localparam int L = 16, RPW = 128, N = L * L, AW = $clog2(L);

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0, rd_req = 0, start = 0;
  mem_sel_e cfg_sel = SEL_SPIN_A, rd_sel = SEL_SPIN_A;
  logic [15:0] cfg_addr = 0, n_sweeps = 0;
  logic [N-1:0] cfg_wdata = 0, rd_data;
  logic [AW-1:0] rd_addr = 0;
  logic rd_valid, busy, done;
  int checks = 0, failures = 0;

  spin_engine dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic wr(mem_sel_e sel, int addr, logic [N-1:0] data);
    @(negedge clk);
    cfg_we = 1; cfg_sel = sel; cfg_addr = 16'(addr); cfg_wdata = data;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic rd(mem_sel_e sel, int z, output logic [N-1:0] data);
    @(negedge clk);
    rd_req = 1; rd_sel = sel; rd_addr = AW'(z);
    @(negedge clk);
    rd_req = 0;
    data = rd_data;
  endtask

  task automatic load(spin_ref m);
    for (int z = 0; z < L; z++) begin
      wr(SEL_SPIN_A, z, N'(m.plane(m.spin[0], z)));
      wr(SEL_SPIN_B, z, N'(m.plane(m.spin[1], z)));
      wr(SEL_JX, z, N'(m.plane(m.jl[0], z)));
      wr(SEL_JY, z, N'(m.plane(m.jl[1], z)));
      wr(SEL_JZ, z, N'(m.plane(m.jl[2], z)));
    end
    for (int u = 0; u < 7; u++) wr(SEL_LUT, u, N'(m.lut[u]));
    for (int w = 0; w < m.nwheel; w++)
      for (int j = 0; j < 61; j++) begin
        bit [31:0] v = $urandom;
        m.wheel[w].seed(j, v);
        wr(SEL_SEED, w*64 + j, N'(v));
      end
  endtask

  // read both banks back into a model; returns the number of differing planes
  task automatic readback(spin_ref m, spin_ref hw, output int bad);
    logic [N-1:0] p;
    bad = 0;
    for (int b = 0; b < 2; b++)
      for (int z = 0; z < L; z++) begin
        rd(b == 0 ? SEL_SPIN_A : SEL_SPIN_B, z, p);
        if (p !== N'(m.plane(m.spin[b], z))) bad++;
        for (int i = 0; i < N; i++) hw.spin[b][z*N + i] = p[i];
      end
  endtask

  task automatic sweep1();
    @(negedge clk);
    start = 1; n_sweeps = 1;
    @(negedge clk);
    start = 0;
    wait (done);
  endtask

  task automatic quench(string name, int pj, real beta, int nsw, real e_max);
    spin_ref m, hw;
    int bad, e0, e;
    m  = new(L, RPW);
    hw = new(L, RPW);
    m.randomize_all(pj);
    m.set_beta(beta);
    hw.jl = m.jl;
    load(m);
    e0 = m.energy();
    for (int k = 0; k < nsw; k++) begin
      sweep1();
      m.sweeps(1);
      readback(m, hw, bad);
      check(bad == 0, $sformatf("%s sweep %0d: %0d planes differ", name, k + 1, bad));
    end
    e = hw.energy();
    $display("%s: energy per spin %0.3f -> %0.3f after %0d sweeps",
             name, real'(e0) / (2.0 * L*L*L), real'(e) / (2.0 * L*L*L), nsw);
    check(real'(e) / (2.0 * L*L*L) < e_max, $sformatf("%s energy per spin below %0.2f", name, e_max));
  endtask

  initial begin
    spin_ref m, hw;
    int bad, inv;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. beta = 0: every move accepted
    m  = new(L, RPW);
    hw = new(L, RPW);
    m.randomize_all(50);
    m.set_beta(0.0);
    load(m);
    sweep1();
    inv = 0;
    readback(m, hw, bad);     // compares with the unswept model
    for (int b = 0; b < 2; b++)
      for (int i = 0; i < L*L*L; i++) if (hw.spin[b][i] != m.spin[b][i]) inv++;
    check(inv == 2*L*L*L, $sformatf("beta = 0: %0d of %0d spins flipped", inv, 2*L*L*L));

    // 2. Ising ferromagnet, 3. Edwards-Anderson spin glass
    quench("Ising J=+1, beta 0.5", 100, 0.5, 10, -2.0);
    quench("EA spin glass, beta 1.0", 50, 1.0, 10, -1.2);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
