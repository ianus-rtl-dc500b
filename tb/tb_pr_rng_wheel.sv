// tb_pr_rng_wheel: the unrolled wheel against a one-element-at-a-time
// reference. Checks every output over many cycles with the enable toggling,
// for the default cascade of 128 outputs per cycle (longer than both taps).
module tb_pr_rng_wheel;
  import ianus_pkg::*;
  import ianus_ref_pkg::*;
  localparam int NOUT = 128;
  logic clk = 0, en = 0, seed_we = 0;
  logic [5:0] seed_idx = 0;
  logic [31:0] seed_data = 0;
  logic [NOUT-1:0][31:0] rnd;
  int checks = 0, failures = 0;

  pr_rng_wheel #(.W(32), .NOUT(NOUT)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pr_ref_wheel ref_w = new();
    bit [31:0] exp_v [NOUT];
    for (int j = 0; j < 61; j++) begin
      @(negedge clk);
      seed_we = 1; seed_idx = 6'(j); seed_data = $urandom;
      ref_w.seed(j, seed_data);
    end
    @(negedge clk); seed_we = 0;
    for (int c = 0; c < 60; c++) begin
      int bad;
      bad = 0;
      for (int n = 0; n < NOUT; n++) exp_v[n] = ref_w.next();
      for (int n = 0; n < NOUT; n++) if (rnd[n] !== exp_v[n]) bad++;
      checks++;
      if (bad != 0) begin
        failures++;
        $display("FAIL cycle %0d: %0d outputs differ", c, bad);
      end
      // hold one cycle with enable low: the outputs must not move
      en = 0;
      @(negedge clk);
      bad = 0;
      for (int n = 0; n < NOUT; n++) if (rnd[n] !== exp_v[n]) bad++;
      checks++;
      if (bad != 0) failures++;
      en = 1;
      @(negedge clk);
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
