// ann_pkg: types and constants shared by the multi-core neural network unit.
//
// All data in the unit (network inputs, weights, neuron potentials after
// scaling, activation outputs) is an 18-bit two's-complement fixed-point word:
// 6 integer bits (including the sign) and 12 fraction bits (Q6.12), which
// matches the 18-bit inputs of the FPGA's hard multipliers and the 18-bit mode
// of its block RAMs. The word format and the four core commands (reset, MAC,
// bias, send result) follow the source design; the binary command encoding,
// the idle command CMD_NOP and the configuration-target encoding are choices
// of this implementation.
package ann_pkg;

  localparam int DATA_W = 18;  // word width
  localparam int FRAC_W = 12;  // fraction bits of a word

  // Depth of every block RAM used by the unit (1024 x 18 mode).
  localparam int MEM_DEPTH = 1024;
  localparam int MEM_AW    = 10;

  // Cycles from the control logic issuing a SEND command to the addressed
  // neuron block raising its request: two control-logic registers (address
  // stage, memory-data stage) plus the four register stages of the core.
  localparam int SEND_LAT = 6;

  typedef logic signed [DATA_W-1:0] data_t;

  // Command carried by each core's individual command bus.
  typedef enum logic [2:0] {
    CMD_NOP   = 3'd0,  // no operation: the core keeps its state
    CMD_RESET = 3'd1,  // clear the inner potential
    CMD_MAC   = 3'd2,  // potential += data * weight
    CMD_BIAS  = 3'd3,  // potential += weight (weight times 1.0)
    CMD_SEND  = 3'd4   // move potential to the result register, request bus
  } cmd_t;

  // What a host configuration write goes to.
  typedef enum logic [1:0] {
    CFG_WEIGHT   = 2'd0,  // weight memory of one core
    CFG_INTERVAL = 2'd1,  // activation interval-offset table
    CFG_GRADIENT = 2'd2,  // activation gradient table
    CFG_MAP      = 2'd3   // network map (layer sizes)
  } cfg_target_t;

endpackage
