// tb_ann_unit_full: the unit at its default size (10 cores, 1024-word
// memories) computing the handwritten-digit network of the source design:
// 88 inputs, 40 hidden neurons, 10 outputs, all with sigmoid activation.
// Weights and inputs are random (the trained weights are not available);
// the network's shape, and so its timing, is the real one. Two
// classifications are run back to back with inputs offered on every clock.
// Checked: all 10 outputs of each run against the bit-exact reference, the
// number of clocks from start to done against the schedule of the control
// logic (reported next to the 396 clocks of the source design), and that
// results queued on the shared output bus.
module tb_ann_unit_full;
  import ann_pkg::*;
  import ann_ref_pkg::*;
  int checks = 0, failures = 0;

  localparam int N  = 10;
  localparam int ML = 8;
  localparam int NL = 3;
  localparam int RUNS = 2;
  localparam bit GAPS = 0;
  // Start clock, then per group of 10 neurons: reset, one MAC per input,
  // bias, send (4 hidden groups of 88 inputs, 1 output group of 40); then
  // the last send reaching the cores (SEND_LAT), 10 results leaving one per
  // clock, the output bus register, the 3-clock activation pipeline and done.
  localparam int EXP_CYCLES = 1 + 4 * (88 + 3) + (40 + 3) + SEND_LAT + 10 + 1 + 3 + 1;
  int sizes [NL] = '{88, 40, 10};

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  cfg_target_t cfg_target = CFG_WEIGHT;
  logic [$clog2(N)-1:0] cfg_core = '0;
  logic [9:0] cfg_addr = '0;
  data_t cfg_data = '0;
  logic start = 0, busy, done;
  logic in_valid = 0, in_ready;
  data_t in_data = '0;
  logic out_valid;
  data_t out_data;
  logic [9:0] out_index;
  logic [3:0] events;

  ann_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- weights and reference
  int wmem [N][1024];
  int xin [1024];
  int ref_out [1024];
  int n_sat = 0;

  task automatic make_weights();
    int wa = 0;
    for (int l = 1; l < NL; l++) begin
      for (int g = 0; g < sizes[l]; g += N) begin
        for (int k = 0; k < N; k++) begin
          for (int i = 0; i <= sizes[l-1]; i++) begin
            automatic int w = int'($urandom_range(2048)) - 1024;      // -0.25 .. 0.25
            wmem[k][wa + i] = w;
          end
        end
        wa += sizes[l-1] + 1;
      end
    end
  endtask

  task automatic compute_reference();
    int vals [1024];
    int nxt [1024];
    int wa = 0;
    for (int i = 0; i < sizes[0]; i++) vals[i] = xin[i];
    for (int l = 1; l < NL; l++) begin
      for (int g = 0; g < sizes[l]; g += N) begin
        for (int k = 0; k < N && g + k < sizes[l]; k++) begin
          automatic longint a = 0;
          int p;
          for (int i = 0; i < sizes[l-1]; i++)
            a += longint'(vals[i]) * longint'(wmem[k][wa + i]);
          a += longint'(wmem[k][wa + sizes[l-1]]) * 4096;
          p = pot_ref(a);
          if (p == 131071 || p == -131072) n_sat++;
          nxt[g + k] = act_ref(p);
        end
        wa += sizes[l-1] + 1;
      end
      for (int j = 0; j < sizes[l]; j++) vals[j] = nxt[j];
    end
    for (int j = 0; j < sizes[NL-1]; j++) ref_out[j] = vals[j];
  endtask

  task automatic cfg_write(cfg_target_t t, int core, int addr, int value);
    cfg_we <= 1; cfg_target <= t; cfg_core <= ($clog2(N))'(core);
    cfg_addr <= 10'(addr); cfg_data <= data_t'(value);
    @(posedge clk);
  endtask

  // ---------------- monitors
  int n_out_seen = 0;
  int ev [4] = '{0, 0, 0, 0};
  int n_partial = 0, n_reset_wait = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      for (int e = 0; e < 4; e++) if (events[e]) ev[e]++;
      for (int k = 0; k < N; k++)
        if ((dut.cmd_bus[k] == CMD_RESET || dut.cmd_bus[k] == CMD_MAC) && dut.req[k])
          n_reset_wait++;
      if (dut.cmd_bus[N-1] == CMD_BIAS && dut.cmd_bus[0] == CMD_BIAS) ;
      else if (dut.cmd_bus[0] == CMD_BIAS) n_partial++;
      if (out_valid) begin
        checks++;
        if (int'(out_index) != n_out_seen || out_data != data_t'(ref_out[out_index])) begin
          failures++;
          $display("FAIL output %0d (#%0d): got %0d want %0d", out_index, n_out_seen,
                   out_data, ref_out[out_index]);
        end
        n_out_seen++;
      end
    end
  end

  initial begin
    int cycles;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int a = 0; a < 512; a++) cfg_write(CFG_INTERVAL, 0, a, tbl_offset(a));
    for (int a = 0; a < 512; a++) cfg_write(CFG_GRADIENT, 0, a, tbl_gradient(a));
    for (int l = 0; l < ML; l++) cfg_write(CFG_MAP, 0, l, (l < NL) ? sizes[l] : 0);
    make_weights();
    for (int k = 0; k < N; k++)
      for (int a = 0; a < 1024; a++) cfg_write(CFG_WEIGHT, k, a, wmem[k][a]);
    cfg_we <= 0;
    @(posedge clk);
    for (int run = 0; run < RUNS; run++) begin
      for (int i = 0; i < sizes[0]; i++) xin[i] = int'($urandom_range(4096));
      compute_reference();
      n_out_seen = 0;
      start <= 1;
      @(posedge clk);
      start <= 0;
      cycles = 1;
      fork
        begin
          for (int i = 0; i < sizes[0]; i++) begin
            while (GAPS && $urandom_range(3) == 0) begin
              in_valid <= 0;
              @(posedge clk);
            end
            in_valid <= 1;
            in_data  <= data_t'(xin[i]);
            @(posedge clk);
            while (!in_ready) @(posedge clk);
          end
          in_valid <= 0;
        end
        begin
          while (!done && cycles < 20000) begin
            @(posedge clk);
            cycles++;
          end
        end
      join
      checks++;
      if (!done || n_out_seen != sizes[NL-1]) begin
        failures++;
        $display("FAIL run %0d: done=%b outputs=%0d", run, done, n_out_seen);
      end
      $display("run %0d: %0d clocks from start to done (source design: 396)", run, cycles);
      checks++;
      if (cycles != EXP_CYCLES) begin
        failures++;
        $display("FAIL run %0d took %0d clocks, schedule gives %0d", run, cycles, EXP_CYCLES);
      end
      @(posedge clk);
    end
    $display("events: input-starved=%0d data-hazard=%0d send-held=%0d bus-contention=%0d",
             ev[0], ev[1], ev[2], ev[3]);
    $display("partly filled groups=%0d saturated potentials=%0d next-neuron-while-waiting=%0d",
             n_partial, n_sat, n_reset_wait);
    checks++;
    if (ev[3] == 0) begin
      failures++;
      $display("FAIL results never queued for the output bus");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
