// tb_boltzmann_lut: loads a table and reads it through both ports at once,
// at independent addresses, then overwrites entries and reads again.
module tb_boltzmann_lut;
  logic clk = 0, we = 0;
  logic [2:0] waddr = 0, raddr0 = 0, raddr1 = 0;
  logic [31:0] wdata = 0, rdata0, rdata1;
  logic [31:0] model [8];
  int checks = 0, failures = 0;

  boltzmann_lut #(.W(32), .AW(3)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 8; a++) begin
      @(negedge clk);
      we = 1; waddr = 3'(a); wdata = $urandom; model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      raddr0 = 3'($urandom); raddr1 = 3'($urandom);
      #1;
      checks++;
      if (rdata0 !== model[raddr0] || rdata1 !== model[raddr1]) begin
        failures++;
        $display("FAIL %0d %0d", raddr0, raddr1);
      end
      if (i % 5 == 0) begin
        we = 1; waddr = 3'($urandom); wdata = $urandom;
        @(posedge clk); model[waddr] = wdata;
        @(negedge clk); we = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
