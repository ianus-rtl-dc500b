// tb_spin_engine: end-to-end check of one SP.
//
// Loads random spins and couplings (half and 80% ferromagnetic bonds), a
// Metropolis table for a given beta and random wheel seeds through the host
// port, runs a number of sweeps and compares both spin banks and the coupling
// memories with the reference model plane by plane. Also checks the run time
// (2*(L+3) cycles per sweep), that writes are ignored while busy, and that a
// run of zero sweeps finishes at once.
module tb_spin_engine;
  import ianus_pkg::*;
  import ianus_ref_pkg::*;

  localparam int L   = 16;
  localparam int RPW = 128;
  localparam int N   = L * L;
  localparam int AW  = $clog2(L);

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0, rd_req = 0, start = 0;
  mem_sel_e cfg_sel = SEL_SPIN_A, rd_sel = SEL_SPIN_A;
  logic [15:0] cfg_addr = 0, n_sweeps = 0;
  logic [N-1:0] cfg_wdata = 0, rd_data;
  logic [AW-1:0] rd_addr = 0;
  logic rd_valid, busy, done;

  int checks = 0, failures = 0;

  spin_engine #(.L(L), .RND_PER_WHEEL(RPW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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
    check(rd_valid == 1'b1, "rd_valid one cycle after rd_req");
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

  task automatic compare(spin_ref m, string tag);
    logic [N-1:0] p;
    int bad = 0;
    for (int z = 0; z < L; z++) begin
      rd(SEL_SPIN_A, z, p); if (p !== N'(m.plane(m.spin[0], z))) bad++;
      rd(SEL_SPIN_B, z, p); if (p !== N'(m.plane(m.spin[1], z))) bad++;
    end
    check(bad == 0, $sformatf("%s: %0d spin planes differ from the reference", tag, bad));
  endtask

  task automatic run(int n, output int cycles);
    @(negedge clk);
    start = 1; n_sweeps = 16'(n);
    @(posedge clk);
    #1 start = 0;
    cycles = 0;
    while (!done && cycles < 100000) begin
      @(posedge clk);
      #1 cycles++;
    end
  endtask

  initial begin
    spin_ref m;
    int cyc, f0;
    logic [N-1:0] p;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- spin glass, random couplings ----
    m = new(L, RPW);
    m.randomize_all(50);
    m.set_beta(0.4);
    load(m);
    for (int z = 0; z < L; z++) begin
      rd(SEL_JZ, z, p);
      check(p === N'(m.plane(m.jl[2], z)), "Jz plane read-back");
    end
    compare(m, "after load");

    run(1, cyc);
    check(cyc == 2*(L+3), $sformatf("one sweep took %0d cycles, expected %0d", cyc, 2*(L+3)));
    m.sweeps(1);
    compare(m, "after 1 sweep");

    // writes while busy must be ignored
    @(negedge clk);
    start = 1; n_sweeps = 16'd2;
    @(negedge clk);
    start = 0;
    check(busy, "busy during a run");
    cfg_we = 1; cfg_sel = SEL_SPIN_A; cfg_addr = 0; cfg_wdata = '1;
    @(negedge clk);
    cfg_we = 0;
    wait (done);
    m.sweeps(2);
    compare(m, "after 2 more sweeps (with a write during the run)");

    f0 = m.flips;
    run(3, cyc);
    check(cyc == 6*(L+3), $sformatf("three sweeps took %0d cycles", cyc));
    m.sweeps(3);
    compare(m, "after 3 more sweeps");
    check(m.flips > f0 && m.flips < f0 + 6*L*L*L, "some but not all moves accepted");

    // zero sweeps: immediate done, nothing changes
    run(0, cyc);
    check(cyc == 0, $sformatf("zero-sweep run took %0d cycles", cyc));
    compare(m, "after zero sweeps");

    // ---- ferromagnet-leaning couplings, low temperature, new seeds ----
    m = new(L, RPW);
    m.randomize_all(80);
    m.set_beta(1.0);
    load(m);
    run(4, cyc);
    m.sweeps(4);
    compare(m, "ferromagnetic, beta 1.0, 4 sweeps");

    $display("reference flips in last run: %0d", m.flips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
