// tb_ianus_board: whole-board test at the default size (16 SPs, L = 16).
//
// The testbench plays the host. Every SP gets its own spin-glass sample,
// coupling mix, temperature and seeds, loaded through the IOP. Runs are then
// launched on all SPs at once, on a subset, with zero sweeps and with a write
// attempted during a run; all spin planes are read back through the IOP and
// compared with the reference model. Mechanisms counted and required at least
// once: plane writes of every memory, table and seed loads, N-plane prologue
// fetches, plane updates, S/N role swaps, writes refused while busy, a
// zero-sweep run, a masked start that leaves other SPs idle, sticky done
// flags and read-back merging from every SP. Run time per sweep is checked
// against 2*(L+3) cycles.
module tb_ianus_board;
  import ianus_pkg::*;
  import ianus_ref_pkg::*;

  localparam int NSP = 16;
  localparam int L   = 16;
  localparam int RPW = 128;
  localparam int N   = L * L;
  localparam int AW  = $clog2(L);
  localparam int SW  = $clog2(NSP);

  logic clk = 0, rst_n = 0;
  logic h_we = 0, h_rd_req = 0, h_start = 0;
  logic [SW-1:0] h_sp = 0, h_rd_sp = 0;
  mem_sel_e h_sel = SEL_SPIN_A, h_rd_sel = SEL_SPIN_A;
  logic [15:0] h_addr = 0, h_n_sweeps = 0;
  logic [N-1:0] h_wdata = 0;
  logic [AW-1:0] h_rd_addr = 0;
  logic [NSP-1:0] h_start_mask = 0;
  logic h_rd_valid;
  logic [SW-1:0] h_rd_src;
  logic [N-1:0] h_rd_data;
  logic [NSP-1:0] h_busy, h_done;

  ianus_board dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_wr [8];
  int n_loadm = 0, n_comp = 0, n_swap = 0, n_refused = 0, n_zero = 0;
  int n_masked_idle = 0, n_sticky = 0;
  int n_src [NSP];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, observed on SP 0's controller
  logic bank_q = 0;
  always @(posedge clk) begin
    if (dut.g_sp[0].u_sp.act == ACT_LOADM) n_loadm++;
    if (dut.g_sp[0].u_sp.act == ACT_COMP)  n_comp++;
    if (dut.g_sp[0].u_sp.bank_s != bank_q) n_swap++;
    bank_q <= dut.g_sp[0].u_sp.bank_s;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic wr(int sp, mem_sel_e sel, int addr, logic [N-1:0] data);
    @(negedge clk);
    h_we = 1; h_sp = SW'(sp); h_sel = sel; h_addr = 16'(addr); h_wdata = data;
    n_wr[sel]++;
    @(negedge clk);
    h_we = 0;
  endtask

  task automatic rd(int sp, mem_sel_e sel, int z, output logic [N-1:0] data);
    int lat = 0;
    @(negedge clk);
    h_rd_req = 1; h_rd_sp = SW'(sp); h_rd_sel = sel; h_rd_addr = AW'(z);
    @(negedge clk);
    h_rd_req = 0;
    while (!h_rd_valid && lat < 10) begin
      @(negedge clk);
      lat++;
    end
    check(h_rd_valid && lat == 2, $sformatf("read-back latency %0d", lat));
    check(h_rd_src == SW'(sp), "read-back tagged with the answering SP");
    if (h_rd_src == SW'(sp)) n_src[sp]++;
    data = h_rd_data;
  endtask

  task automatic load(int sp, spin_ref m);
    for (int z = 0; z < L; z++) begin
      wr(sp, SEL_SPIN_A, z, N'(m.plane(m.spin[0], z)));
      wr(sp, SEL_SPIN_B, z, N'(m.plane(m.spin[1], z)));
      wr(sp, SEL_JX, z, N'(m.plane(m.jl[0], z)));
      wr(sp, SEL_JY, z, N'(m.plane(m.jl[1], z)));
      wr(sp, SEL_JZ, z, N'(m.plane(m.jl[2], z)));
    end
    for (int u = 0; u < 7; u++) wr(sp, SEL_LUT, u, N'(m.lut[u]));
    for (int w = 0; w < m.nwheel; w++)
      for (int j = 0; j < 61; j++) begin
        bit [31:0] v = $urandom;
        m.wheel[w].seed(j, v);
        wr(sp, SEL_SEED, w*64 + j, N'(v));
      end
  endtask

  task automatic compare(int sp, spin_ref m, string tag);
    logic [N-1:0] p;
    int bad = 0;
    for (int z = 0; z < L; z++) begin
      rd(sp, SEL_SPIN_A, z, p); if (p !== N'(m.plane(m.spin[0], z))) bad++;
      rd(sp, SEL_SPIN_B, z, p); if (p !== N'(m.plane(m.spin[1], z))) bad++;
    end
    check(bad == 0, $sformatf("SP %0d %s: %0d planes differ", sp, tag, bad));
  endtask

  // start the SPs in mask; returns cycles until every started SP shows done
  task automatic run(logic [NSP-1:0] mask, int n, output int cycles);
    @(negedge clk);
    h_start = 1; h_start_mask = mask; h_n_sweeps = 16'(n);
    @(negedge clk);
    h_start = 0;
    cycles = 0;
    while ((h_done & mask) != mask && cycles < 100000) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  initial begin
    spin_ref m [NSP];
    int cyc;
    logic [NSP-1:0] sub;
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int s = 0; s < NSP; s++) begin
      m[s] = new(L, RPW);
      m[s].randomize_all(30 + 4 * s);
      m[s].set_beta(0.2 + 0.05 * s);
      load(s, m[s]);
    end

    // all SPs, two sweeps; host sees done 2*(L+3) cycles per sweep plus
    // one IOP register each way and the controller's start cycle
    run('1, 2, cyc);
    check(cyc == 2*2*(L+3) + 2, $sformatf("two-sweep run seen after %0d cycles", cyc));
    for (int s = 0; s < NSP; s++) m[s].sweeps(2);
    for (int s = 0; s < NSP; s++) compare(s, m[s], "after 2 sweeps");

    // subset of SPs; check the others stay idle; try a write while busy
    sub = 16'hA5C3;
    @(negedge clk);
    h_start = 1; h_start_mask = sub; h_n_sweeps = 16'd3;
    @(negedge clk);
    h_start = 0;
    @(negedge clk);
    @(negedge clk);
    check(h_busy == sub, "only the started SPs are busy");
    check(h_done == ~sub, "start clears the done flags of the started SPs only");
    for (int s = 0; s < NSP; s++) if (!sub[s] && !h_busy[s]) n_masked_idle++;
    wr(0, SEL_SPIN_A, 0, '1);            // SP 0 is in the subset: refused
    if (sub[0]) n_refused++;
    while ((h_done & sub) != sub) @(negedge clk);
    check(h_done == '1, "done flags set again for the started SPs");
    repeat (5) @(negedge clk);
    check(h_done == '1, "done flags held after the pulse");
    if (h_done == '1) n_sticky++;
    for (int s = 0; s < NSP; s++) if (sub[s]) m[s].sweeps(3);
    for (int s = 0; s < NSP; s++) compare(s, m[s], "after subset run");

    // zero sweeps on SP 5
    run(16'h0020, 0, cyc);
    check(cyc <= 4, $sformatf("zero-sweep run took %0d cycles", cyc));
    if (cyc <= 4) n_zero++;
    compare(5, m[5], "after zero-sweep run");

    // mechanism coverage
    check(n_wr[SEL_SPIN_A] > 0 && n_wr[SEL_SPIN_B] > 0, "spin planes written");
    check(n_wr[SEL_JX] > 0 && n_wr[SEL_JY] > 0 && n_wr[SEL_JZ] > 0, "coupling planes written");
    check(n_wr[SEL_LUT] > 0, "tables loaded");
    check(n_wr[SEL_SEED] > 0, "wheels seeded");
    check(n_loadm > 0, "prologue plane fetches happened");
    check(n_comp == 5 * 2 * L, $sformatf("SP 0 updated %0d planes", n_comp));
    check(n_swap == 10, $sformatf("SP 0 swapped S and N %0d times", n_swap));
    check(n_refused > 0, "write refused while busy");
    check(n_zero > 0, "zero-sweep run");
    check(n_masked_idle > 0, "masked start left SPs idle");
    check(n_sticky > 0, "sticky done flags");
    for (int s = 0; s < NSP; s++) check(n_src[s] > 0, $sformatf("read-back from SP %0d", s));
    $display("mechanisms: loadm=%0d comp=%0d swap=%0d refused=%0d zero=%0d masked_idle=%0d sticky=%0d",
             n_loadm, n_comp, n_swap, n_refused, n_zero, n_masked_idle, n_sticky);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
