// tb_xover_point_gen: random decisions and points against a reference of the
// pc test and of the 1..L-1 point mapping.
module tb_xover_point_gen;
  import ecans_pkg::*;
  localparam int L = CHROM_LEN;
  xover_e mode;
  logic [15:0] pc;
  logic [47:0] rnd;
  logic [7:0] lo, hi;
  logic xo_hit;
  int checks = 0, failures = 0;
  int n_simple = 0, n_two = 0, n_none = 0;

  xover_point_gen dut (.mode, .pc, .rnd, .lo, .hi, .xo_hit);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int a, b, elo, ehi, ehit;
      mode = xover_e'($urandom_range(0, 2));
      pc   = 16'($urandom);
      rnd  = {16'($urandom), 16'($urandom), 16'($urandom)};
      #1;
      a = 1 + ((int'(rnd[31:16]) * (L - 1)) / 65536);
      b = 1 + ((int'(rnd[47:32]) * (L - 1)) / 65536);
      elo = 0; ehi = 0; ehit = 0;
      if (int'(rnd[15:0]) < int'(pc)) begin
        if (mode == XO_SIMPLE) begin elo = a; ehi = L; ehit = 1; end
        if (mode == XO_TWO) begin elo = (a < b) ? a : b; ehi = (a < b) ? b : a; ehit = 1; end
      end
      if (ehit == 0) n_none++; else if (mode == XO_SIMPLE) n_simple++; else n_two++;
      checks++;
      if (int'(lo) != elo || int'(hi) != ehi || int'(xo_hit) != ehit) begin
        failures++;
        $display("mode %0d pc %h rnd %h: got %0d %0d exp %0d %0d", mode, pc, rnd, lo, hi, elo, ehi);
      end
      checks++;
      if (ehit && (elo < 1 || elo > L - 1)) failures++;
    end
    if (n_simple == 0 || n_two == 0 || n_none == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
