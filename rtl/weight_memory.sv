// weight_memory: the weight store of one computing core, one block RAM of
// DEPTH words of 18 bits (1024 x 18 by default, so ten cores hold 10,240
// synapses).
//
// The read port is addressed by the weight select bus that the control logic
// shares among all cores: every core reads the same address, and each core's
// memory holds the weights of the neurons that core computes. The read is
// synchronous: rd_data is valid the clock after rd_addr. The write port loads
// coefficients from the host (the network is trained off-chip).
//
// From the source design: one block RAM per core, 1024 words, 18-bit mode,
// shared address bus. Chosen here: the separate host write port and the
// registered read.
module weight_memory
  import ann_pkg::*;
#(
  parameter int DEPTH = MEM_DEPTH,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  data_t         wr_data,
  input  logic [AW-1:0] rd_addr,
  output data_t         rd_data
);

  data_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
