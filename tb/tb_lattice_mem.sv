// tb_lattice_mem: whole-plane writes and reads against a model, plus a check
// that plane bits x*L + y land in RAM block x at bit y.
module tb_lattice_mem;
  localparam int L = 16, N = L * L;
  logic clk = 0, we = 0, re = 0;
  logic [3:0] waddr = 0, raddr = 0;
  logic [N-1:0] wdata = 0, rdata;
  logic [N-1:0] model [L];
  int checks = 0, failures = 0;
  logic [L-1:0] col5 [L];   // word 5 of every RAM block

  lattice_mem #(.L(L)) dut (.*);
  for (genvar gx = 0; gx < L; gx++) begin : g_peek
    assign col5[gx] = dut.g_col[gx].u_ram.mem[5];
  end

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] rnd_plane();
    logic [N-1:0] p;
    for (int i = 0; i < N; i += 32) p[i +: 32] = $urandom;
    return p;
  endfunction

  initial begin
    for (int z = 0; z < L; z++) begin
      @(negedge clk);
      we = 1; waddr = 4'(z); wdata = rnd_plane(); model[z] = wdata;
    end
    @(negedge clk); we = 0;
    // block x holds column x
    for (int x = 0; x < L; x++) begin
      checks++;
      if (col5[x] !== model[5][x*L +: L]) failures++;
    end
    for (int i = 0; i < 200; i++) begin
      int z;
      @(negedge clk);
      z = $urandom % L;
      re = 1; raddr = 4'(z);
      @(negedge clk);
      re = 0;
      checks++;
      if (rdata !== model[z]) begin
        failures++;
        $display("FAIL plane %0d", z);
      end
      if (i % 7 == 0) begin
        we = 1; waddr = 4'($urandom); wdata = rnd_plane(); model[waddr] = wdata;
        @(negedge clk); we = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
