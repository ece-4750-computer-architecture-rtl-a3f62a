// Testbench of rr_free_list: after reset the free registers are 31..63 and
// the first one offered is p31; random allocations and frees are mirrored
// in a bit vector, and the offered register must always be the lowest free
// one. Draining the list must clear alloc_ok.
module rr_free_list_tb;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic       alloc = 1'b0, alloc_ok, free_en = 1'b0;
  logic [5:0] alloc_preg, free_preg;
  logic [63:0] free_bits, model;
  int checks = 0, failures = 0;
  rr_free_list #(.NUM_PREGS(64), .NUM_RESERVED(31)) dut (.clk, .rst, .alloc, .alloc_ok,
    .alloc_preg, .free_en, .free_preg, .free_bits);

  function automatic int lowest(logic [63:0] v);
    for (int i = 0; i < 64; i++) if (v[i]) return i;
    return -1;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst = 1'b0;
    #1;
    model = {{33{1'b1}}, 31'b0};
    for (int i = 0; i < 3000; i++) begin
      int lo;
      lo = lowest(model);
      // phase 1 drains the list, phase 2 mixes
      alloc   = (i < 40) ? 1'b1 : (lo >= 0 && ($urandom_range(1) == 1));
      free_en = (i >= 40) && ($urandom_range(1) == 1);
      free_preg = 6'($urandom);
      if (free_en) begin
        int tries = 0;
        while (model[free_preg] && tries < 64) begin free_preg++; tries++; end
        if (model[free_preg]) free_en = 1'b0;
      end
      if (!(lo >= 0)) alloc = 1'b0;
      #1;
      checks++;
      if (alloc_ok != (lo >= 0) || (lo >= 0 && alloc_preg != 6'(lo)) || free_bits != model) begin
        failures++; $display("FAIL cycle %0d: ok %0d preg %0d expected %0d", i, alloc_ok, alloc_preg, lo);
      end
      @(posedge clk);
      if (alloc)   model[lo] = 1'b0;
      if (free_en) model[free_preg] = 1'b1;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
