// tb_round_key_regs: self-checking testbench for round_key_regs.
//
// Checks that reset clears every entry, that each write lands in exactly the
// addressed key set and round slot, that writes with an out-of-range index
// are ignored, and that nothing changes when write enable is low.
`timescale 1ns/1ps
module tb_round_key_regs;
  import aes_pkg::*;

  logic clk = 0, rst_n = 0, we = 0, wset = 0;
  logic [3:0] widx = '0;
  block_t wdata = '0;
  block_t rk [2][NUM_RK];
  block_t model [2][NUM_RK];
  int checks = 0, failures = 0;

  round_key_regs #(.NKEYS(2)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int s = 0; s < 2; s++)
      for (int r = 0; r < 15; r++) begin
        checks++;
        if (rk[s][r] !== model[s][r]) begin
          failures++;
          $display("rk[%0d][%0d] = %h, expected %h", s, r, rk[s][r], model[s][r]);
        end
      end
  endtask

  initial begin
    model = '{default: '{default: '0}};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    for (int i = 0; i < 300; i++) begin
      we    = ($urandom % 4) != 0;
      wset  = 1'($urandom);
      widx  = 4'($urandom);        // 15 is out of range and must be ignored
      wdata = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk);
      if (we && widx < 15) model[wset][widx] = wdata;
      compare();
    end
    we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
