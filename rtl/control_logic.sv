// control_logic: the sequencer of the unit. It holds the map of the neural
// network and, from it, drives every core's command bus, the shared data bus
// and the shared weight select bus; it stores network inputs and neuron
// outputs in the neuron data memory and returns the last layer's outputs as
// the network response.
//
// Network map: MAX_LAYERS entries, entry 0 = number of network inputs,
// entry l = number of neurons in layer l; the first zero entry ends the
// network. Neurons are numbered consecutively, inputs first, and neuron n's
// output is kept at address n of the neuron data memory.
//
// Schedule: the neurons of a layer are computed in groups of N cores, neuron
// g*N+k of the layer on core k. For each group the control logic issues
//   CMD_RESET to every core,
//   one CMD_MAC per input of the layer (data on the data bus, weight address
//     on the weight select bus),
//   one CMD_BIAS (the next weight address),
//   CMD_SEND to the cores that hold a neuron of the group.
// Cores without a neuron in a partly filled group get only the reset. The
// weight select address runs on from 0 through the whole network, so core k
// must hold, group after group, the n_in weights and then the bias of its
// neuron. The data of the first group of the first layer come from the
// network input port (valid/ready); each accepted input is also stored in
// the neuron data memory, from which all later groups read.
//
// Stalls: a MAC waits while its input word has not yet been written to the
// neuron data memory (the previous layer is still in the activation
// pipeline), or while the input port has no data. A SEND waits until no
// core still holds an unsent result and the previous SEND has reached the
// cores, so results always leave in neuron order and are written to
// consecutive addresses by a single write pointer.
//
// Timing: addresses and commands are issued together; the memories answer
// one clock later, when the command is presented on cmd_bus together with
// the data on data_bus (both registered), so weight memory output, data and
// command reach the cores in the same clock. done pulses one clock after the
// last neuron of the network has been written.
//
// From the source design: the network map, the four commands on individual
// command buses, the shared weight select and data buses, the choice between
// memory data and the input port, the output of last-layer results. Chosen
// here: the whole schedule above, the map format, the input and output
// handshakes, the stall rules and the weight layout.
module control_logic
  import ann_pkg::*;
#(
  parameter int N          = 10,         // computing cores
  parameter int MAX_LAYERS = 8,          // map entries, inputs included
  parameter int AW         = MEM_AW,     // neuron and weight memory address
  parameter int LAW        = $clog2(MAX_LAYERS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // network map write port
  input  logic          map_we,
  input  logic [LAW-1:0] map_addr,
  input  logic [AW:0]   map_data,
  // run control
  input  logic          start,
  output logic          busy,
  output logic          done,
  // network input
  input  logic          in_valid,
  input  data_t         in_data,
  output logic          in_ready,
  // buses to the cores
  output cmd_t          cmd_bus [N],
  output data_t         data_bus,
  output logic [AW-1:0] weight_addr,
  input  logic [N-1:0]  core_req,
  // activation function output
  input  logic          act_valid,
  input  data_t         act_data,
  // neuron data memory
  output logic          nmem_we,
  output logic [AW-1:0] nmem_waddr,
  output data_t         nmem_wdata,
  output logic [AW-1:0] nmem_raddr,
  input  data_t         nmem_rdata,
  // network response
  output logic          out_valid,
  output data_t         out_data,
  output logic [AW-1:0] out_index,
  // event flags, one clock each (observability)
  output logic          stall_input,
  output logic          stall_data,
  output logic          stall_send
);

  typedef enum logic [2:0] {S_IDLE, S_RESET, S_MAC, S_BIAS, S_SEND, S_DRAIN} state_t;

  logic [AW:0]   layer_map [MAX_LAYERS];
  state_t        state;
  logic [LAW:0]  layer;        // layer being issued, 1 .. MAX_LAYERS-1
  logic [AW:0]   n_in, n_out;  // inputs and neurons of that layer
  logic [AW:0]   in_base;      // address of the layer's first input
  logic [AW:0]   out_base;     // address of the layer's first neuron
  logic [AW:0]   grp;          // first neuron of the group, within the layer
  logic [AW:0]   idx;          // MAC index within the group
  logic [AW:0]   end_addr;     // one past the last neuron of the network
  logic          last_layer;
  logic [AW:0]   wr_ptr;       // words written to the neuron data memory
  logic [AW:0]   wptr;         // next weight address (top bit: overflow)
  logic [$clog2(SEND_LAT+1)-1:0] send_wait;

  // issue stage (clock 0) and data stage (clock 1) registers
  cmd_t          cmd0 [N];
  logic          from_port0;
  data_t         port_data0;

  logic          take_input, issue_mac, issue_send;
  logic [AW:0]   rd_addr;
  logic [N-1:0]  used;
  logic [AW:0]   next_grp;
  logic          more_groups, more_layers;
  logic          use_port;

  // ---------------------------------------------------------------- map
  always_ff @(posedge clk) begin
    if (map_we) layer_map[map_addr] <= map_data;
  end

  // ---------------------------------------------------------------- decisions
  always_comb begin
    for (int k = 0; k < N; k++) used[k] = (grp + (AW + 1)'(k)) < n_out;
    use_port    = (layer == 1) && (grp == 0);
    rd_addr     = in_base + idx;
    take_input  = (state == S_MAC) && use_port && in_valid && !act_valid;
    issue_mac   = (state == S_MAC) && (use_port ? take_input : (rd_addr < wr_ptr));
    issue_send  = (state == S_SEND) && (send_wait == 0) && (core_req == '0);
    next_grp    = grp + (AW + 1)'(N);
    more_groups = next_grp < n_out;
    more_layers = ((layer + 1) < (LAW + 1)'(MAX_LAYERS)) &&
                  (layer_map[LAW'(layer + 1)] != 0);
  end

  assign in_ready    = take_input;
  assign busy        = (state != S_IDLE);
  assign stall_input = (state == S_MAC) && use_port && !take_input;
  assign stall_data  = (state == S_MAC) && !use_port && !issue_mac;
  assign stall_send  = (state == S_SEND) && !issue_send;

  // ---------------------------------------------------------------- sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      layer      <= '0;
      n_in       <= '0;
      n_out      <= '0;
      in_base    <= '0;
      out_base   <= '0;
      grp        <= '0;
      idx        <= '0;
      end_addr   <= '0;
      last_layer <= 1'b0;
      wptr       <= '0;
      send_wait  <= '0;
      done       <= 1'b0;
      from_port0 <= 1'b0;
      port_data0 <= '0;
      nmem_raddr <= '0;
      weight_addr <= '0;
      for (int k = 0; k < N; k++) cmd0[k] <= CMD_NOP;
    end else begin
      done <= 1'b0;
      if (send_wait != 0) send_wait <= send_wait - 1'b1;
      for (int k = 0; k < N; k++) cmd0[k] <= CMD_NOP;
      from_port0 <= 1'b0;

      unique case (state)
        S_IDLE: begin
          if (start && layer_map[0] != 0 && layer_map[1] != 0) begin
            layer      <= 1;
            n_in       <= layer_map[0];
            n_out      <= layer_map[1];
            in_base    <= '0;
            out_base   <= layer_map[0];
            grp        <= '0;
            wptr       <= '0;
            last_layer <= !(MAX_LAYERS > 2 && layer_map[LAW'(2)] != 0);
            state      <= S_RESET;
          end
        end

        S_RESET: begin
          for (int k = 0; k < N; k++) cmd0[k] <= CMD_RESET;
          idx   <= '0;
          state <= S_MAC;
        end

        S_MAC: begin
          if (issue_mac) begin
            for (int k = 0; k < N; k++) cmd0[k] <= used[k] ? CMD_MAC : CMD_NOP;
            weight_addr <= wptr[AW-1:0];
            wptr        <= wptr + 1'b1;
            nmem_raddr  <= rd_addr[AW-1:0];
            from_port0  <= use_port;
            port_data0  <= in_data;
            idx         <= idx + 1'b1;
            if (idx + 1'b1 == n_in) state <= S_BIAS;
          end
        end

        S_BIAS: begin
          for (int k = 0; k < N; k++) cmd0[k] <= used[k] ? CMD_BIAS : CMD_NOP;
          weight_addr <= wptr[AW-1:0];
          wptr        <= wptr + 1'b1;
          state       <= S_SEND;
        end

        S_SEND: begin
          if (issue_send) begin
            for (int k = 0; k < N; k++) cmd0[k] <= used[k] ? CMD_SEND : CMD_NOP;
            send_wait <= ($bits(send_wait))'(SEND_LAT);
            if (more_groups) begin
              grp   <= next_grp;
              state <= S_RESET;
            end else if (more_layers) begin
              layer      <= layer + 1'b1;
              n_in       <= n_out;
              n_out      <= layer_map[LAW'(layer + 1)];
              in_base    <= out_base;
              out_base   <= out_base + n_out;
              grp        <= '0;
              last_layer <= !(((layer + 2) < (LAW + 1)'(MAX_LAYERS)) &&
                              (layer_map[LAW'(layer + 2)] != 0));
              state      <= S_RESET;
            end else begin
              end_addr <= out_base + n_out;
              state    <= S_DRAIN;
            end
          end
        end

        S_DRAIN: begin
          if (wr_ptr == end_addr) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- data stage
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) cmd_bus[k] <= CMD_NOP;
    end else begin
      cmd_bus <= cmd0;
    end
  end

  logic  from_port1;
  data_t port_data1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      from_port1 <= 1'b0;
      port_data1 <= '0;
    end else begin
      from_port1 <= from_port0;
      port_data1 <= port_data0;
    end
  end

  assign data_bus = from_port1 ? port_data1 : nmem_rdata;

  // ---------------------------------------------------------------- results
  // Network inputs and activation outputs share port A of the neuron data
  // memory; an input is only accepted in a clock with no activation output.
  always_comb begin
    nmem_we    = take_input || act_valid;
    nmem_waddr = wr_ptr[AW-1:0];
    nmem_wdata = act_valid ? act_data : in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr    <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_index <= '0;
    end else begin
      out_valid <= 1'b0;
      if (state == S_IDLE && start) wr_ptr <= '0;
      else if (nmem_we)             wr_ptr <= wr_ptr + 1'b1;
      if (act_valid && last_layer && wr_ptr >= out_base) begin
        out_valid <= 1'b1;
        out_data  <= act_data;
        out_index <= AW'(wr_ptr - out_base);
      end
    end
  end

  a_no_write_clash: assert property (@(posedge clk) disable iff (!rst_n)
    !(take_input && act_valid));
  // The network must fit in the weight memories (2**AW words per core).
  a_weights_fit: assert property (@(posedge clk) disable iff (!rst_n)
    (issue_mac || state == S_BIAS) |-> !wptr[AW]);
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    nmem_we |-> (wr_ptr < (AW + 1)'(2 ** AW)));

endmodule
