// tb_sweep_ctrl: records the controller's read addresses, action tags and
// bank select cycle by cycle for a two-sweep run and compares them with the
// schedule worked out here: per half-sweep PRE0 (N, Jz at L-1), PRE1 (N at 0),
// L RUN steps (N at z+1 mod L, S and J at z), one drain cycle; actions one
// cycle after the reads; S/N swap after each half-sweep; done after
// 2*n*(L+3) cycles. Also a zero-sweep start.
module tb_sweep_ctrl;
  import ianus_pkg::*;
  localparam int L = 16;
  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] n_sweeps = 0;
  logic busy, done, bank_s, rd_n_en, rd_s_en, rd_j_en;
  logic [3:0] rd_n_addr, rd_s_addr, rd_j_addr, wr_z;
  dp_act_e act;
  int checks = 0, failures = 0;

  sweep_ctrl #(.L(L), .NW(16)) dut (.*);
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

  initial begin
    int cyc;
    dp_act_e exp_act;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1; n_sweeps = 2;
    @(negedge clk);
    start = 0;
    exp_act = ACT_NONE;
    for (int h = 0; h < 4; h++) begin
      for (int c = 0; c < L + 3; c++) begin
        // c = 0 PRE0, 1 PRE1, 2..L+1 RUN z = c-2, L+2 DRAIN
        check(bank_s == 1'(h % 2), $sformatf("half %0d cycle %0d: bank_s", h, c));
        check(act == exp_act, $sformatf("half %0d cycle %0d: act %0d exp %0d", h, c, act, exp_act));
        if (c == 0) begin
          check(rd_n_en && rd_j_en && !rd_s_en && rd_n_addr == 4'(L-1) && rd_j_addr == 4'(L-1), "PRE0 reads");
          exp_act = ACT_LOADM;
        end else if (c == 1) begin
          check(rd_n_en && !rd_s_en && rd_n_addr == 0, "PRE1 reads");
          exp_act = ACT_LOADC;
        end else if (c < L + 2) begin
          int z;
          z = c - 2;
          check(rd_n_en && rd_s_en && rd_j_en && rd_s_addr == 4'(z) && rd_j_addr == 4'(z)
                && rd_n_addr == 4'((z + 1) % L), $sformatf("RUN z=%0d reads", z));
          if (act == ACT_COMP) check(wr_z == 4'(z - 1), "write-back address");
          exp_act = ACT_COMP;
        end else begin
          check(!rd_n_en && !rd_s_en && !rd_j_en, "DRAIN does not read");
          check(wr_z == 4'(L - 1), "last write-back address");
          exp_act = ACT_NONE;
        end
        check(busy, "busy during the run");
        @(negedge clk);
      end
    end
    check(done && !busy, "done after 2*n*(L+3) cycles");
    check(bank_s == 1'b0, "roles back to the start after whole sweeps");
    @(negedge clk);
    check(!done, "done is a single pulse");
    // zero sweeps
    start = 1; n_sweeps = 0;
    @(negedge clk);
    start = 0;
    check(done && !busy, "zero-sweep run ends at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
