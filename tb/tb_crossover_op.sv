// tb_crossover_op: random parents and ranges; every offspring bit is checked
// against the rule "swapped inside [lo, hi), kept outside".
module tb_crossover_op;
  import ecans_pkg::*;
  localparam int L = CHROM_LEN;
  logic [L-1:0] pa, pb, ca, cb;
  logic [7:0] lo, hi;
  int checks = 0, failures = 0;

  crossover_op dut (.pa, .pb, .lo, .hi, .ca, .cb);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      int a, b, bad;
      for (int k = 0; k < L; k++) begin
        pa[k] = 1'($urandom);
        pb[k] = 1'($urandom);
      end
      a = $urandom_range(0, L);
      b = $urandom_range(0, L);
      lo = 8'((a < b) ? a : b);
      hi = 8'((a < b) ? b : a);
      if (i % 5 == 0) begin lo = 0; hi = 0; end
      #1;
      bad = 0;
      for (int k = 0; k < L; k++) begin
        if (k >= lo && k < hi) begin
          if (ca[k] !== pb[k] || cb[k] !== pa[k]) bad++;
        end else begin
          if (ca[k] !== pa[k] || cb[k] !== pb[k]) bad++;
        end
      end
      checks++;
      if (bad != 0) begin failures++; $display("lo %0d hi %0d: %0d bad bits", lo, hi, bad); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
