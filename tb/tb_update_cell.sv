// tb_update_cell: all 2^13 combinations of spin, neighbours and couplings.
// The table index is checked against u = (dE + 12) / 4 with dE computed in
// signed +1/-1 arithmetic, and the flip decision against rnd <= prob for
// random numbers below, equal to and above the probability.
module tb_update_cell;
  import ianus_pkg::*;
  logic s;
  logic [5:0] nb, j;
  logic [2:0] lut_addr;
  logic [31:0] lut_data, rnd;
  logic s_new, flip;
  int checks = 0, failures = 0;

  update_cell #(.W(32)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 13); v++) begin
      int si, h, de, u;
      {s, nb, j} = 13'(v);
      si = s ? 1 : -1;
      h = 0;
      for (int k = 0; k < 6; k++) h += (j[k] ? 1 : -1) * (nb[k] ? 1 : -1);
      de = 2 * si * h;
      u = (de + 12) / 4;
      for (int t = 0; t < 3; t++) begin
        lut_data = $urandom;
        case (t)
          0: rnd = lut_data;
          1: rnd = (lut_data == 0) ? 0 : lut_data - 1;
          default: rnd = (lut_data == '1) ? '1 : lut_data + 1;
        endcase
        #1;
        checks++;
        if (lut_addr !== 3'(u) || flip !== (rnd <= lut_data) || s_new !== (s ^ (rnd <= lut_data))) begin
          failures++;
          if (failures < 10) $display("FAIL v=%h addr=%0d exp %0d", v, lut_addr, u);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
