// ann_unit: multi-core computing unit for multilayer perceptrons.
//
// A neural network is computed layer by layer on N parallel computing cores
// (neuron blocks). Each core computes one neuron's inner potential at a time,
// one multiply-accumulate per clock, reading its weights from its own block
// RAM; all cores receive the same input word on a shared data bus and the same
// weight address on a shared weight select bus, but each has its own command
// bus. Finished potentials queue in the cores; a priority decoder lets them,
// one per clock, onto a single shared output bus into a pipelined sigmoid
// (lookup table with linear interpolation), whose outputs are written to the
// neuron data memory. From there the control logic feeds them to the next
// layer, and the outputs of the last layer leave on the network response
// port.
//
//   host cfg ----> weight memories (one per core), activation tables, map
//   in_* -------> control_logic --cmd_bus[k]--> neuron_block[k] --req/grant--
//                  |  ^  weight_addr -> weight_memory[k] ^          |
//                  |  |  data_bus ----------------------/   priority_decoder
//                  |  neuron_data_memory <- activation_function <- output bus
//   out_* <--------/
//
// Configuration (before start, one word per clock when cfg_we is high):
//   CFG_WEIGHT    weight memory of core cfg_core, word cfg_addr;
//   CFG_INTERVAL  activation interval-offset table, entry cfg_addr[8:0];
//   CFG_GRADIENT  activation gradient table, entry cfg_addr[8:0];
//   CFG_MAP       network map entry cfg_addr (entry 0: number of inputs,
//                 entry l: neurons of layer l, 0 ends the list).
// Run: pulse start while busy is low, then offer the inputs in order on
// in_valid/in_data (taken when in_ready is high). The outputs of the last
// layer appear on out_valid/out_data/out_index, in neuron order; done pulses
// after the last one.
//
// From the source design: the block structure and buses (10 cores, 1024-word
// weight memories, 1024-word neuron data memory, 18-bit Q6.12 data, shared
// output bus with priority decoder, interpolating activation function).
// Chosen here: the configuration port, the run handshakes, and the schedule
// described in control_logic.
module ann_unit
  import ann_pkg::*;
#(
  parameter int N          = 10,   // computing cores
  parameter int MAX_LAYERS = 8,    // network map entries, inputs included
  parameter int ACC_W      = 48    // core accumulator width
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // configuration
  input  logic                         cfg_we,
  input  cfg_target_t                  cfg_target,
  input  logic [$clog2(N)-1:0]         cfg_core,
  input  logic [MEM_AW-1:0]            cfg_addr,
  input  data_t                        cfg_data,
  // run control
  input  logic                         start,
  output logic                         busy,
  output logic                         done,
  // network input
  input  logic                         in_valid,
  input  data_t                        in_data,
  output logic                         in_ready,
  // network response
  output logic                         out_valid,
  output data_t                        out_data,
  output logic [MEM_AW-1:0]            out_index,
  // one-clock event flags: input starved, data hazard, send held back,
  // several cores competing for the output bus
  output logic [3:0]                   events
);

  localparam int LAW = $clog2(MAX_LAYERS);

  cmd_t          cmd_bus [N];
  data_t         data_bus;
  logic [MEM_AW-1:0] weight_addr;
  data_t         weight [N];
  data_t         result [N];
  logic [N-1:0]  req, grant;
  logic          any_req;
  logic          bus_valid;
  data_t         bus_data;
  logic          act_valid;
  data_t         act_data;
  logic          nmem_we;
  logic [MEM_AW-1:0] nmem_waddr, nmem_raddr;
  data_t         nmem_wdata, nmem_rdata;
  logic          stall_input, stall_data, stall_send;

  control_logic #(.N(N), .MAX_LAYERS(MAX_LAYERS), .AW(MEM_AW)) u_ctrl (
    .clk, .rst_n,
    .map_we     (cfg_we && cfg_target == CFG_MAP),
    .map_addr   (cfg_addr[LAW-1:0]),
    .map_data   ((MEM_AW + 1)'(unsigned'(cfg_data[MEM_AW:0]))),
    .start, .busy, .done,
    .in_valid, .in_data, .in_ready,
    .cmd_bus, .data_bus, .weight_addr,
    .core_req   (req),
    .act_valid, .act_data,
    .nmem_we, .nmem_waddr, .nmem_wdata, .nmem_raddr, .nmem_rdata,
    .out_valid, .out_data, .out_index,
    .stall_input, .stall_data, .stall_send
  );

  for (genvar k = 0; k < N; k++) begin : g_core
    weight_memory #(.DEPTH(MEM_DEPTH)) u_wmem (
      .clk,
      .wr_en   (cfg_we && cfg_target == CFG_WEIGHT && cfg_core == k),
      .wr_addr (cfg_addr),
      .wr_data (cfg_data),
      .rd_addr (weight_addr),
      .rd_data (weight[k])
    );

    neuron_block #(.ACC_W(ACC_W)) u_core (
      .clk, .rst_n,
      .cmd    (cmd_bus[k]),
      .data   (data_bus),
      .weight (weight[k]),
      .req    (req[k]),
      .grant  (grant[k]),
      .result (result[k])
    );
  end

  priority_decoder #(.N(N)) u_prio (
    .req, .grant, .any_req
  );

  neuron_output_bus #(.N(N)) u_obus (
    .clk, .rst_n, .grant, .result, .bus_valid, .bus_data
  );

  activation_function u_act (
    .clk, .rst_n,
    .in_valid        (bus_valid),
    .in_data         (bus_data),
    .out_valid       (act_valid),
    .out_data        (act_data),
    .tbl_we_interval (cfg_we && cfg_target == CFG_INTERVAL),
    .tbl_we_gradient (cfg_we && cfg_target == CFG_GRADIENT),
    .tbl_addr        (cfg_addr[8:0]),
    .tbl_data        (cfg_data)
  );

  neuron_data_memory #(.DEPTH(MEM_DEPTH)) u_nmem (
    .clk,
    .a_we    (nmem_we),
    .a_addr  (nmem_waddr),
    .a_wdata (nmem_wdata),
    .b_addr  (nmem_raddr),
    .b_rdata (nmem_rdata)
  );

  assign events = {any_req && ((req & (req - 1'b1)) != 0), stall_send, stall_data, stall_input};

endmodule
