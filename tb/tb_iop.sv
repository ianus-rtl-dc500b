// tb_iop: the IO processor with four SPs played by the testbench.
// Checks that configuration writes reach exactly the addressed SP with their
// fields, one cycle later; that starts follow the mask; that read-back from
// any SP comes back merged and tagged with the SP number; and that done
// flags are held until the SP is started again.
module tb_iop;
  import ianus_pkg::*;
  localparam int NSP = 4, L = 4, N = L * L;
  logic clk = 0, rst_n = 0;
  logic h_we = 0, h_rd_req = 0, h_start = 0;
  logic [1:0] h_sp = 0, h_rd_sp = 0, h_rd_src;
  mem_sel_e h_sel = SEL_SPIN_A, h_rd_sel = SEL_SPIN_A, sp_cfg_sel, sp_rd_sel;
  logic [15:0] h_addr = 0, h_n_sweeps = 0, sp_cfg_addr, sp_n_sweeps;
  logic [N-1:0] h_wdata = 0, h_rd_data, sp_cfg_wdata;
  logic [1:0] h_rd_addr = 0, sp_rd_addr;
  logic [NSP-1:0] h_start_mask = 0, h_busy, h_done;
  logic h_rd_valid;
  logic [NSP-1:0] sp_cfg_we, sp_rd_req, sp_rd_valid, sp_start, sp_busy, sp_done;
  logic [NSP-1:0][N-1:0] sp_rd_data;
  int checks = 0, failures = 0;

  iop #(.NSP(NSP), .L(L)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
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

  // SP models: answer a read one cycle later with a pattern of (sp, addr);
  // a start makes the SP busy for 5 cycles, then pulses done.
  int busy_cnt [NSP];
  always_ff @(posedge clk) begin
    for (int i = 0; i < NSP; i++) begin
      sp_rd_valid[i] <= sp_rd_req[i];
      sp_rd_data[i]  <= N'(16'h1000 * (i + 1) + sp_rd_addr);
      sp_done[i]     <= 1'b0;
      if (sp_start[i]) busy_cnt[i] <= 5;
      else if (busy_cnt[i] > 0) begin
        busy_cnt[i] <= busy_cnt[i] - 1;
        if (busy_cnt[i] == 1) sp_done[i] <= 1'b1;
      end
    end
  end
  always_comb for (int i = 0; i < NSP; i++) sp_busy[i] = busy_cnt[i] > 0;

  initial begin
    for (int i = 0; i < NSP; i++) busy_cnt[i] = 0;
    sp_rd_valid = '0;
    sp_done = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      int sp;
      sp = $urandom % NSP;
      @(negedge clk);
      h_we = 1; h_sp = 2'(sp); h_sel = mem_sel_e'($urandom % 7); h_addr = 16'($urandom);
      h_wdata = N'($urandom);
      @(negedge clk);
      h_we = 0;
      check(sp_cfg_we == NSP'(1 << sp) && sp_cfg_sel == h_sel && sp_cfg_addr == h_addr
            && sp_cfg_wdata == h_wdata, "write routed to the addressed SP");
      @(negedge clk);
      check(sp_cfg_we == '0, "write enable is one cycle");
    end
    for (int i = 0; i < 20; i++) begin
      int sp, lat;
      sp = $urandom % NSP; lat = 0;
      @(negedge clk);
      h_rd_req = 1; h_rd_sp = 2'(sp); h_rd_addr = 2'($urandom);
      @(negedge clk);
      h_rd_req = 0;
      check(sp_rd_req == NSP'(1 << sp), "read request routed");
      while (!h_rd_valid && lat < 5) begin @(negedge clk); lat++; end
      check(lat == 2 && h_rd_src == 2'(sp) && h_rd_data == N'(16'h1000 * (sp + 1) + h_rd_addr),
            $sformatf("merged read-back sp %0d lat %0d src %0d data %h", sp, lat, h_rd_src, h_rd_data));
    end
    @(negedge clk);
    h_start = 1; h_start_mask = 4'b0101; h_n_sweeps = 7;
    @(negedge clk);
    h_start = 0;
    check(sp_start == 4'b0101 && sp_n_sweeps == 7, "start follows the mask");
    @(negedge clk);
    check(h_busy == 4'b0101, "busy vector");
    repeat (8) @(negedge clk);
    check(h_done == 4'b0101 && h_busy == 0, "done flags held");
    h_start = 1; h_start_mask = 4'b0001;
    @(negedge clk);
    h_start = 0;
    @(negedge clk);
    check(h_done == 4'b0100, "start clears that SP's done flag only");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
