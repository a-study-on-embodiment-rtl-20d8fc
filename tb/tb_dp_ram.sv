// tb_dp_ram: random port-A writes and reads and port-B reads against an
// array model, including read-during-write (old data).
module tb_dp_ram;
  logic clk = 0, a_en = 0, a_we = 0;
  logic [4:0] a_addr, b_addr;
  logic [15:0] a_wdata, a_rdata, b_rdata;
  logic [15:0] model [32];
  int checks = 0, failures = 0;

  dp_ram #(.W(16), .DEPTH(32)) dut (.clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata, .b_addr, .b_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp_a, exp_b;
    logic        rd_a;
    // fill
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = 5'(i); a_wdata = 16'($urandom); model[i] = a_wdata;
    end
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      a_en   = ($urandom_range(0, 3) != 0);
      a_we   = a_en && ($urandom_range(0, 1) == 1);
      a_addr = 5'($urandom);
      b_addr = (i % 7 == 0) ? a_addr : 5'($urandom);
      a_wdata = 16'($urandom);
      exp_a = model[a_addr];
      exp_b = model[b_addr];
      rd_a  = a_en;
      @(posedge clk);
      if (a_en && a_we) model[a_addr] = a_wdata;
      @(negedge clk);
      a_en = 0;
      if (rd_a) begin checks++; if (a_rdata !== exp_a) failures++; end
      checks++; if (b_rdata !== exp_b) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
