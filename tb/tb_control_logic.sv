// tb_control_logic: runs the sequencer against behavioural stand-ins for
// the cores, weight memories, output bus, activation function and neuron
// data memory, and checks the network response against a reference
// computed from the map alone.
//
// Network: 5 inputs, layers of 7, 4 and 2 neurons on 3 cores, so groups are
// full and partly filled. Weights are a fixed function of (core, address);
// the reference places neuron g*3+k of each layer on core k and walks the
// weight address through n_in weights and a bias per group. The stand-in
// activation is f(p) = p/2 + 7 with the real pipeline's 4-clock latency.
// Inputs arrive with random gaps. Checked: every output word and index,
// done, the number of sends to each core (none to a core left unused by a
// partly filled group, none over a waiting result), and that
// input starvation, data-hazard stalls and held-back sends all happened.
module tb_control_logic;
  import ann_pkg::*;
  import ann_ref_pkg::*;
  int checks = 0, failures = 0;

  localparam int N = 3;
  localparam int ML = 4;
  localparam int NL = 4;
  int sizes [NL] = '{5, 7, 4, 2};

  logic clk = 0, rst_n = 0;
  logic map_we = 0;
  logic [1:0] map_addr = '0;
  logic [10:0] map_data = '0;
  logic start = 0, busy, done;
  logic in_valid = 0, in_ready;
  data_t in_data = '0;
  cmd_t cmd_bus [N];
  data_t data_bus;
  logic [9:0] weight_addr;
  logic [N-1:0] core_req = '0;
  logic act_valid;
  data_t act_data;
  logic nmem_we;
  logic [9:0] nmem_waddr, nmem_raddr;
  data_t nmem_wdata, nmem_rdata = '0;
  logic out_valid;
  data_t out_data;
  logic [9:0] out_index;
  logic stall_input, stall_data, stall_send;

  control_logic #(.N(N), .MAX_LAYERS(ML)) dut (
    .clk, .rst_n, .map_we, .map_addr, .map_data, .start, .busy, .done,
    .in_valid, .in_data, .in_ready, .cmd_bus, .data_bus, .weight_addr,
    .core_req, .act_valid, .act_data, .nmem_we, .nmem_waddr, .nmem_wdata,
    .nmem_raddr, .nmem_rdata, .out_valid, .out_data, .out_index,
    .stall_input, .stall_data, .stall_send
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int wfun(int k, int a);
    return ((k * 7919 + a * 104729 + 13) % 2001) - 1000;
  endfunction

  function automatic int f_act(int p);
    return wrap18(longint'(p >>> 1) + 7);
  endfunction

  // ---------------- stand-ins
  data_t w_q [N];
  longint acc [N];
  int send_cnt [N];
  int pot [N];
  data_t nmem [1024];
  logic [3:0] pipe_v = '0;
  int pipe_d [4];
  logic [N-1:0] grant;
  int bad_cmd = 0;
  int sends [N];

  always_comb begin
    grant = '0;
    for (int k = N - 1; k >= 0; k--) if (core_req[k]) grant = N'(1) << k;
  end

  assign act_valid = pipe_v[3];
  assign act_data  = data_t'(pipe_d[3]);

  always @(posedge clk) begin
    for (int k = 0; k < N; k++) begin
      w_q[k] <= data_t'(wfun(k, int'(weight_addr)));
      case (cmd_bus[k])
        CMD_RESET: acc[k] <= 0;
        CMD_MAC:   acc[k] <= acc[k] + longint'(data_bus) * longint'(w_q[k]);
        CMD_BIAS:  acc[k] <= acc[k] + longint'(w_q[k]) * 4096;
        CMD_SEND: begin
          send_cnt[k] <= 3;
          pot[k] <= pot_ref(acc[k]);
          if (core_req[k] && !grant[k]) bad_cmd++;
        end
        default: ;
      endcase
      if (rst_n && cmd_bus[k] == CMD_SEND) sends[k]++;
      if (send_cnt[k] > 0 && cmd_bus[k] != CMD_SEND) begin
        send_cnt[k] <= send_cnt[k] - 1;
        if (send_cnt[k] == 1) core_req[k] <= 1'b1;
      end
      if (grant[k]) core_req[k] <= 1'b0;
    end
    pipe_v <= {pipe_v[2:0], |grant};
    pipe_d[0] <= 0;
    for (int k = 0; k < N; k++) if (grant[k]) pipe_d[0] <= f_act(pot[k]);
    for (int s = 1; s < 4; s++) pipe_d[s] <= pipe_d[s - 1];
    if (nmem_we) nmem[nmem_waddr] <= nmem_wdata;
    nmem_rdata <= nmem[nmem_raddr];
  end

  // ---------------- reference
  int xin [64];
  int ref_out [64];
  int n_out_seen = 0;
  int cnt_in = 0, cnt_data = 0, cnt_send = 0;

  always @(posedge clk) begin
    if (stall_input) cnt_in++;
    if (stall_data)  cnt_data++;
    if (stall_send)  cnt_send++;
    if (rst_n && out_valid) begin
      checks++;
      if (int'(out_index) >= sizes[NL-1] || out_data != data_t'(ref_out[out_index]) ||
          int'(out_index) != n_out_seen) begin
        failures++;
        $display("FAIL output %0d (#%0d): got %0d want %0d", out_index, n_out_seen,
                 out_data, ref_out[out_index]);
      end
      n_out_seen++;
    end
  end

  task automatic compute_reference();
    int vals [64];
    int nxt [64];
    int wa = 0;
    for (int i = 0; i < sizes[0]; i++) vals[i] = xin[i];
    for (int l = 1; l < NL; l++) begin
      for (int g = 0; g < sizes[l]; g += N) begin
        for (int k = 0; k < N && g + k < sizes[l]; k++) begin
          automatic longint a = 0;
          for (int i = 0; i < sizes[l-1]; i++)
            a += longint'(vals[i]) * longint'(wfun(k, wa + i));
          a += longint'(wfun(k, wa + sizes[l-1])) * 4096;
          nxt[g + k] = f_act(pot_ref(a));
        end
        wa += sizes[l-1] + 1;
      end
      for (int j = 0; j < sizes[l]; j++) vals[j] = nxt[j];
    end
    for (int j = 0; j < sizes[NL-1]; j++) ref_out[j] = vals[j];
  endtask

  initial begin
    for (int k = 0; k < N; k++) begin
      acc[k] = 0; send_cnt[k] = 0; pot[k] = 0; w_q[k] = '0; sends[k] = 0;
    end
    for (int s = 0; s < 4; s++) pipe_d[s] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int l = 0; l < ML; l++) begin
      map_we <= 1; map_addr <= 2'(l); map_data <= 11'(sizes[l]);
      @(posedge clk);
    end
    map_we <= 0;
    for (int run = 0; run < 3; run++) begin
      int waited;
      for (int i = 0; i < sizes[0]; i++) xin[i] = int'($urandom_range(4096));
      compute_reference();
      n_out_seen = 0;
      start <= 1;
      @(posedge clk);
      start <= 0;
      for (int i = 0; i < sizes[0]; i++) begin
        while ($urandom_range(2) == 0) begin
          in_valid <= 0;
          @(posedge clk);
        end
        in_valid <= 1;
        in_data  <= data_t'(xin[i]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
      in_valid <= 0;
      waited = 0;
      while (!done && waited < 2000) begin
        @(posedge clk);
        waited++;
      end
      checks++;
      if (!done || n_out_seen != sizes[NL-1]) begin
        failures++;
        $display("FAIL run %0d: done=%b outputs=%0d", run, done, n_out_seen);
      end
      @(posedge clk);
    end
    // core k holds neuron g+k of every group of every layer where it exists
    for (int k = 0; k < N; k++) begin
      automatic int want = 0;
      for (int l = 1; l < NL; l++)
        for (int g = 0; g < sizes[l]; g += N) if (g + k < sizes[l]) want += 3;
      checks++;
      if (sends[k] != want) begin
        failures++;
        $display("FAIL core %0d got %0d sends, want %0d", k, sends[k], want);
      end
    end
    checks++;
    if (bad_cmd != 0 || cnt_in == 0 || cnt_data == 0 || cnt_send == 0) begin
      failures++;
      $display("FAIL bad commands=%0d stalls: input=%0d data=%0d send=%0d",
               bad_cmd, cnt_in, cnt_data, cnt_send);
    end
    $display("stalls: input=%0d data=%0d send=%0d", cnt_in, cnt_data, cnt_send);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
