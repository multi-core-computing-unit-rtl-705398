// neuron_block: one computing core. It accumulates the inner potential of one
// neuron, sum(w_n * in_n) + bias, one product per clock.
//
// The core is a register pipeline driven by its own command bus:
//   stage 0  input registers for command, data and weight;
//   stage 1  the multiplier: CMD_MAC forms data*weight, CMD_BIAS forms
//            weight*1.0, any other command forms 0; the product is registered;
//   stage 2  the adder with the accumulator register: CMD_RESET clears it,
//            CMD_MAC and CMD_BIAS add the product;
//   stage 3  on CMD_SEND the accumulated potential, scaled back to Q6.12 and
//            saturated to 18 bits, is copied to the result register and
//            the request-to-send flag is raised. The result stays there until
//            the priority decoder grants the shared output bus (grant high
//            for one cycle), which clears the request.
// CMD_RESET clears only the accumulator: a result still waiting in stage 3 is
// kept, so the core can start its next neuron at once.
//
// Interface: cmd/data/weight are sampled every clock; req/result come from
// registers. A SEND is seen on req six clocks after it is issued by the
// control logic, four clocks after this core samples it. Timing: one MAC
// per clock, fully pipelined.
//
// From the source design: the three pipeline stages, the four commands, the
// bias command and the reset behaviour. Chosen here: the ACC_W-bit
// accumulator that keeps full product precision (the source only says the
// word format is the same everywhere), truncation and saturation on SEND,
// and the bias being the weight word added at weight*1.0.
module neuron_block
  import ann_pkg::*;
#(
  parameter int ACC_W = 48  // accumulator width, products are Q12.24
) (
  input  logic  clk,
  input  logic  rst_n,
  input  cmd_t  cmd,
  input  data_t data,
  input  data_t weight,
  output logic  req,     // result waiting for the output bus
  input  logic  grant,   // one-cycle bus grant from the priority decoder
  output data_t result
);

  localparam int PROD_W = 2 * DATA_W;
  localparam logic signed [ACC_W-1:0] MAX_POT = ACC_W'(2 ** (DATA_W - 1) - 1);
  localparam logic signed [ACC_W-1:0] MIN_POT = -ACC_W'(2 ** (DATA_W - 1));

  cmd_t  cmd0, cmd1, cmd2;
  data_t data0, weight0;
  logic signed [PROD_W-1:0] prod1;
  logic signed [ACC_W-1:0]  acc;
  logic signed [ACC_W-1:0]  acc_scaled;
  data_t pot_sat;

  // Stage 0: input registers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd0    <= CMD_NOP;
      data0   <= '0;
      weight0 <= '0;
    end else begin
      cmd0    <= cmd;
      data0   <= data;
      weight0 <= weight;
    end
  end

  // Stage 1: multiplier selected by the command.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd1  <= CMD_NOP;
      prod1 <= '0;
    end else begin
      cmd1 <= cmd0;
      unique case (cmd0)
        CMD_MAC:  prod1 <= PROD_W'(data0) * PROD_W'(weight0);
        CMD_BIAS: prod1 <= PROD_W'(weight0) <<< FRAC_W;
        default:  prod1 <= '0;
      endcase
    end
  end

  // Stage 2: adder and accumulator.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd2 <= CMD_NOP;
      acc  <= '0;
    end else begin
      cmd2 <= cmd1;
      unique case (cmd1)
        CMD_RESET:         acc <= '0;
        CMD_MAC, CMD_BIAS: acc <= acc + ACC_W'(prod1);
        default:           acc <= acc;
      endcase
    end
  end

  // Scale Q.24 back to Q.12 (truncation) and saturate to one word.
  always_comb begin
    acc_scaled = acc >>> FRAC_W;
    if (acc_scaled > MAX_POT)      pot_sat = data_t'(MAX_POT);
    else if (acc_scaled < MIN_POT) pot_sat = data_t'(MIN_POT);
    else                           pot_sat = data_t'(acc_scaled);
  end

  // Stage 3: result register and request-to-send.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req    <= 1'b0;
      result <= '0;
    end else if (cmd2 == CMD_SEND) begin
      req    <= 1'b1;
      result <= pot_sat;
    end else if (grant) begin
      req    <= 1'b0;
    end
  end

  // A new SEND must not overwrite a result that has not been granted yet.
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    (cmd2 == CMD_SEND) |-> (!req || grant));
  // The bus is only granted to a core that asks for it.
  a_grant_req: assert property (@(posedge clk) disable iff (!rst_n)
    grant |-> req);

endmodule
