// tb_plane_ram: random writes and reads against an array model, including the
// one-cycle read latency, read-enable hold and read-during-write (old data).
module tb_plane_ram;
  localparam int W = 16, D = 16;
  logic clk = 0, we = 0, re = 0;
  logic [3:0] waddr = 0, raddr = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;

  plane_ram #(.W(W), .D(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp_q;
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      we = 1; waddr = 4'(a); wdata = W'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      re = 1; raddr = 4'($urandom);
      we = ($urandom % 2) == 1; waddr = 4'($urandom); wdata = W'($urandom);
      exp_q = model[raddr];                 // old contents even if written now
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== exp_q) begin
        failures++;
        $display("FAIL addr %0d got %h exp %h", raddr, rdata, exp_q);
      end
    end
    // read enable low holds the output
    @(negedge clk); re = 0; we = 0; exp_q = rdata;
    repeat (3) @(negedge clk);
    checks++;
    if (rdata !== exp_q) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
