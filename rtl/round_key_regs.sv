// round_key_regs: register file holding the expanded AES key(s) inside the
// kernel, so that every unrolled round stage reads its round key directly
// from flip-flops instead of from local or global memory.
//
// At the start of each kernel run the round keys are copied in from global
// memory, one 128-bit round key per clock through the write port (the source
// stores the round key in registers, "private memory", after finding that
// this removes load/store units from the datapath).  All NKEYS x NUM_RK
// entries are read in parallel on rk.  Key set 0 is the data key (XTS key 1);
// key set 1 is the XTS tweak key (key 2).  A write takes effect at the next
// clock edge; reset clears every entry.  The number of key sets, the
// one-round-key-per-write port and the reset value are this design's choices.
module round_key_regs
  import aes_pkg::*;
#(
  parameter int unsigned NKEYS = 2,
  localparam int unsigned KS_W = (NKEYS > 1) ? $clog2(NKEYS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            we,
  input  logic [KS_W-1:0] wset,
  input  logic [3:0]      widx,
  input  block_t          wdata,
  output block_t          rk [NKEYS][NUM_RK]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(NKEYS); s++)
        for (int r = 0; r < int'(NUM_RK); r++)
          rk[s][r] <= '0;
    end else if (we && 32'(wset) < NKEYS && 32'(widx) < NUM_RK) begin
      rk[wset][widx] <= wdata;
    end
  end

endmodule
