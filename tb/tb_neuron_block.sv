// tb_neuron_block: runs a random program of neurons through one core and
// checks every result against an exact reference sum.
//
// Each neuron is RESET, 1..24 MACs with random data and weights (some
// neurons with large values so that the potential saturates), BIAS and
// SEND, with random idle clocks in between. The bus grant comes at random,
// often late, so that the next neuron is reset and accumulated while the
// previous result still waits. Checked: the result at each grant, that req
// rises exactly four clocks after the SEND is sampled, that req falls after
// the grant, and that both saturation and reset-while-waiting occurred.
module tb_neuron_block;
  import ann_pkg::*;
  import ann_ref_pkg::*;
  int checks = 0, failures = 0;
  int n_sat = 0, n_reset_wait = 0;

  logic clk = 0, rst_n = 0;
  cmd_t cmd = CMD_NOP;
  data_t data = '0, weight = '0;
  logic req, grant = 0;
  data_t result;

  neuron_block dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int expq [$];
  logic [3:0] sendhist = '0;
  logic req_q = 0;
  logic grant_q = 0;

  // Bus grant: a late, random one-clock pulse.
  always @(posedge clk) grant <= req && !grant && ($urandom_range(29) == 0);

  // Monitor: result at grant, req timing.
  always @(posedge clk) begin
    if (rst_n) begin
      if (req && grant) begin
        checks++;
        if (expq.size() == 0) begin
          failures++;
          $display("FAIL grant with nothing expected");
        end else begin
          automatic int w = expq.pop_front();
          if (result != data_t'(w)) begin
            failures++;
            $display("FAIL result %0d want %0d", result, w);
          end
        end
      end
      if ((req && !req_q) || sendhist[3]) begin
        checks++;
        if (!(req && !req_q && sendhist[3])) begin
          failures++;
          $display("FAIL req timing: rise=%b send4=%b", req && !req_q, sendhist[3]);
        end
      end
      if (req_q && grant_q && !sendhist[3]) begin
        checks++;
        if (req) begin
          failures++;
          $display("FAIL req not cleared by grant");
        end
      end
    end
    sendhist <= {sendhist[2:0], cmd == CMD_SEND};
    req_q    <= req;
    grant_q  <= grant;
  end

  task automatic issue(cmd_t c, data_t d, data_t w);
    cmd <= c; data <= d; weight <= w;
    @(posedge clk);
    while ($urandom_range(3) == 0) idle();
  endtask

  task automatic idle();
    cmd <= CMD_NOP; data <= data_t'($urandom); weight <= data_t'($urandom);
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      longint acc;
      int nmac;
      bit big;
      acc  = 0;
      nmac = int'($urandom_range(24, 1));
      big  = ($urandom_range(5) == 0);
      if (req) n_reset_wait++;
      issue(CMD_RESET, data_t'($urandom), data_t'($urandom));
      for (int i = 0; i < nmac; i++) begin
        data_t d, w;
        if (big) begin
          d = data_t'($urandom_range(131071, 60000));
          w = data_t'($urandom_range(131071, 60000));
          if (n % 2 == 1) w = -w;
        end else begin
          d = data_t'(int'($urandom_range(16384)) - 8192);
          w = data_t'(int'($urandom_range(16384)) - 8192);
        end
        acc += longint'(d) * longint'(w);
        issue(CMD_MAC, d, w);
      end
      begin
        data_t b;
        b = data_t'(int'($urandom_range(16384)) - 8192);
        acc += longint'(b) * 4096;
        issue(CMD_BIAS, data_t'($urandom), b);
      end
      if (pot_ref(acc) == 131071 || pot_ref(acc) == -131072) n_sat++;
      // a new SEND only when the previous result has left
      while (expq.size() != 0 || req) idle();
      expq.push_back(pot_ref(acc));
      issue(CMD_SEND, data_t'($urandom), data_t'($urandom));
    end
    while (expq.size() != 0) @(posedge clk);
    repeat (5) @(posedge clk);
    checks++;
    if (n_sat == 0 || n_reset_wait == 0) begin
      failures++;
      $display("FAIL coverage: saturations=%0d resets-while-waiting=%0d", n_sat, n_reset_wait);
    end
    $display("saturations=%0d resets-while-waiting=%0d", n_sat, n_reset_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
