// tb_reproductor: a fitness-memory model answers the reproductor's reads; the
// testbench pairs the reads into tournaments, picks the winners itself and
// checks every instruction's parents, op-code and directions (2k, 2k+1 in the
// generation model, the tournament losers in the steady-state model). The
// pool is held full for a while to exercise back-pressure.
module tb_reproductor;
  import ecans_pkg::*;
  localparam int P = 20;
  logic clk = 0, rst_n = 0, start = 0, full = 0;
  opcode_t op;
  logic f_re;
  logic [ID_W-1:0] f_addr;
  logic [15:0] f_rdata, fit [P];
  logic push, busy, done;
  instr_t instr;
  int checks = 0, failures = 0, stalls = 0;
  int reads[$];

  reproductor #(.POP_N(P)) dut (.clk, .rst_n, .start, .op, .f_re, .f_addr, .f_rdata, .push, .instr, .full, .busy, .done);

  always #5 clk = ~clk;
  always_ff @(posedge clk) f_rdata <= fit[f_addr];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && f_re) begin
    if (int'(f_addr) >= P) begin failures++; $display("address out of range"); end
    reads.push_back(int'(f_addr));
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int mode = 0; mode < 2; mode++) begin
      int k;
      for (int i = 0; i < P; i++) fit[i] = 16'($urandom);
      op = '0; op.xover = XO_TWO; op.mut_en = 1; op.steady = (mode == 1);
      reads.delete();
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      k = 0;
      while (!done) begin
        full = (mode == 0 && k == 3 && stalls < 5);
        if (full) stalls++;
        #1;
        if (push) begin
          int a, b, c, d, w1, l1, w2, l2;
          if (reads.size() != 4) begin failures++; $display("reads %0d", reads.size()); end
          else begin
            a = reads[0]; b = reads[1]; c = reads[2]; d = reads[3];
            w1 = (fit[a] >= fit[b]) ? a : b; l1 = (fit[a] >= fit[b]) ? b : a;
            w2 = (fit[c] >= fit[d]) ? c : d; l2 = (fit[c] >= fit[d]) ? d : c;
            checks++;
            if (int'(instr.p1) != w1 || int'(instr.p2) != w2 || instr.op != op) begin
              failures++; $display("parents %0d %0d exp %0d %0d", instr.p1, instr.p2, w1, w2);
            end
            checks++;
            if (mode == 0 && (int'(instr.d1) != 2 * k || int'(instr.d2) != 2 * k + 1)) failures++;
            if (mode == 1 && (int'(instr.d1) != l1 || int'(instr.d2) != l2)) failures++;
          end
          reads.delete();
          k++;
        end
        @(negedge clk);
      end
      checks++;
      if (k != P / 2) begin failures++; $display("instructions %0d", k); end
    end
    checks++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
