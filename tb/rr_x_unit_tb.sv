// Testbench of rr_x_unit: random and corner operands, sum compared with a
// 33-bit sum truncated to 32 bits.
module rr_x_unit_tb;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;
  rr_x_unit dut (.a, .b, .y);
  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [32:0] s;
      a = (i < 4) ? {32{i[0]}} : $urandom;
      b = (i < 4) ? {32{i[1]}} : $urandom;
      #1;
      s = {1'b0, a} + {1'b0, b};
      checks++;
      if (y != s[31:0]) begin failures++; $display("FAIL %h + %h = %h", a, b, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
