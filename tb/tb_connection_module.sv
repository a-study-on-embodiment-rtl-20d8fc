// tb_connection_module: all combinations of state, left link and input pulses
// against the connection rules (bit 0: upper input, bit 1: right link, left
// neighbour's bit 1: left link).
module tb_connection_module;
  logic [1:0] state;
  logic left_link, y_up, y_left, y_right, in_up, in_left, in_right;
  int checks = 0, failures = 0;

  connection_module dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {state, left_link, y_up, y_left, y_right} = 6'(v);
      #1;
      checks++;
      if (in_up !== (state == 2'b01 || state == 2'b11 ? y_up : 1'b0)) failures++;
      checks++;
      if (in_right !== (state >= 2'b10 ? y_right : 1'b0)) failures++;
      checks++;
      if (in_left !== (left_link ? y_left : 1'b0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
