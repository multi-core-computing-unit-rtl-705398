// neuron_output_bus: the output bus shared by all computing cores.
//
// The core holding the (one-hot) grant drives its result onto the bus; the
// bus is an AND-OR multiplexer, and its value is registered together with a
// valid flag before it enters the activation function. Latency: one clock
// from grant to bus_valid/bus_data.
//
// From the source design: one output bus shared by all cores, fed under
// control of the priority decoder. Chosen here: the AND-OR form and the
// output register that cuts the long path from the cores to the
// activation-function lookup memories.
module neuron_output_bus
  import ann_pkg::*;
#(
  parameter int N = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] grant,
  input  data_t        result [N],
  output logic         bus_valid,
  output data_t        bus_data
);

  data_t mux;

  always_comb begin
    mux = '0;
    for (int k = 0; k < N; k++) begin
      mux = mux | (result[k] & {DATA_W{grant[k]}});
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_valid <= 1'b0;
      bus_data  <= '0;
    end else begin
      bus_valid <= |grant;
      bus_data  <= mux;
    end
  end

endmodule
