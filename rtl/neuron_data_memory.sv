// neuron_data_memory: dual-port RAM holding one 18-bit word per neuron of the
// network (1024 by default), so a network can have up to DEPTH neurons,
// network inputs included.
//
// Port A writes: the control logic stores there the network inputs and, as
// they leave the activation function, the outputs of every computed neuron.
// Port B reads: the control logic fetches the outputs of the previous layer
// to broadcast them to the cores on the data bus. Both ports are clocked; a
// read returns data one clock after its address. Reading the address written
// in the same clock returns the old word (read-first); the control logic
// never does this, it only reads words written in an earlier clock.
//
// From the source design: dual-port RAM, 1024 neuron outputs, written from
// the activation function and read by the control logic. Chosen here: the
// port roles and read timing.
module neuron_data_memory
  import ann_pkg::*;
#(
  parameter int DEPTH = MEM_DEPTH,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  // port A: write
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  data_t         a_wdata,
  // port B: read
  input  logic [AW-1:0] b_addr,
  output data_t         b_rdata
);

  data_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
  end

  always_ff @(posedge clk) begin
    b_rdata <= mem[b_addr];
  end

endmodule
