// priority_decoder: decides which computing core may put its result on the
// shared neuron output bus.
//
// Every core with a result waiting holds its req bit high. Each clock the
// decoder grants exactly one of them, the lowest-numbered, with a one-cycle
// grant pulse (the "impulse" the core waits for); the core drops its request
// on that pulse, so the next request is served on the following clock. The
// results thus reach the activation function one per clock with no FIFO.
// The decoder is combinational: grant follows req in the same clock.
//
// From the source design: a priority decoder that serialises the cores onto
// one bus. Chosen here: fixed priority with core 0 highest, which also keeps
// the results of one group of neurons in neuron order.
module priority_decoder #(
  parameter int N = 10
) (
  input  logic [N-1:0] req,
  output logic [N-1:0] grant,
  output logic         any_req
);

  always_comb begin
    grant = '0;
    for (int k = N - 1; k >= 0; k--) begin
      if (req[k]) grant = N'(1) << k;
    end
  end

  assign any_req = |req;

  always_comb begin
    a_onehot: assert ($onehot0(grant));
  end

endmodule
