// Testbench of rr_y_unit: one operation per cycle with random gaps; each
// result must appear exactly four cycles after its operands, with its tag,
// and equal the low 32 bits of a 64-bit product.
module rr_y_unit_tb;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic        in_val = 1'b0, out_val;
  logic [7:0]  in_tag, out_tag;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0, cycle = 0;
  typedef struct { int cyc; logic [7:0] tag; logic [31:0] p; } exp_t;
  exp_t q [$];
  rr_y_unit #(.TAG_W(8)) dut (.clk, .rst, .in_val, .in_tag, .a, .b, .out_val, .out_tag, .y);

  always @(posedge clk) if (!rst) begin
    cycle++;
    if (out_val) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        e = q.pop_front();
        if (cycle - e.cyc != 4 || out_tag != e.tag || y != e.p) begin
          failures++;
          $display("FAIL latency %0d tag %0d/%0d y %h/%h", cycle - e.cyc, out_tag, e.tag, y, e.p);
        end
      end
    end
    if (in_val) q.push_back('{cycle, in_tag, 32'(64'(a) * 64'(b))});
  end

  initial begin
    repeat (2) @(posedge clk);
    rst = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      in_val = ($urandom_range(3) != 0);
      in_tag = 8'($urandom);
      a = $urandom; b = (i % 7 == 0) ? 32'hffff_ffff : $urandom;
      @(posedge clk);
    end
    in_val = 1'b0;
    repeat (6) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL results missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
