// tb_xts_tweak_gen: self-checking testbench for xts_tweak_gen.
//
// Loads seeds and steps the generator, comparing tweak and tweak_next at each
// step with a byte-wise model of the IEEE 1619 multiplication by alpha, plus
// two hand-worked values (a carry out of byte 0, and the reduction by 0x87
// when the top bit of byte 15 falls out).  Also checks that load wins over
// step and that the tweak holds when neither is asserted.
`timescale 1ns/1ps
module tb_xts_tweak_gen;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, step = 0;
  block_t seed = '0, tweak, tweak_next;
  int checks = 0, failures = 0;

  xts_tweak_gen dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input blk_t got, input blk_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    blk_t model;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // hand-worked: bytes 80 00 .. 00 -> 00 01 00 .. 00 (carry into byte 1)
    @(negedge clk); seed = 128'h80000000000000000000000000000000; load = 1;
    @(negedge clk); load = 0;
    chk(tweak_next, 128'h00010000000000000000000000000000, "carry");
    // hand-worked: byte 15 = 0x80 -> byte 0 gets 0x87
    @(negedge clk); seed = 128'h00000000000000000000000000000080; load = 1;
    @(negedge clk); load = 0;
    chk(tweak_next, 128'h87000000000000000000000000000000, "reduction");
    // random seeds, 50 steps each
    for (int s = 0; s < 10; s++) begin
      model = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk); seed = model; load = 1; step = 1;   // load has priority
      @(negedge clk); load = 0; step = 0;
      chk(tweak, model, "load");
      for (int j = 0; j < 50; j++) begin
        chk(tweak_next, xts_alpha(model), "next");
        step = ($urandom % 3) != 0;
        @(negedge clk);
        if (step) model = xts_alpha(model);
        chk(tweak, model, "step");
      end
      step = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
