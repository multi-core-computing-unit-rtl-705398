// tb_neuron_data_memory: writes random words through port A and reads them
// through port B, checking the one-clock read latency, that both ports work
// in the same clock on different addresses, and that a read of the address
// being written returns the old word.
module tb_neuron_data_memory;
  import ann_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0;
  logic a_we = 0;
  logic [9:0] a_addr = '0, b_addr = '0;
  data_t a_wdata = '0, b_rdata;
  int model [1024];

  neuron_data_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int want, string what);
    checks++;
    if (b_rdata != data_t'(want)) begin
      failures++;
      $display("FAIL %s: got %0d want %0d", what, b_rdata, want);
    end
  endtask

  initial begin
    @(posedge clk);
    for (int a = 0; a < 1024; a++) begin
      model[a] = int'(data_t'($urandom));
      a_we <= 1; a_addr <= 10'(a); a_wdata <= data_t'(model[a]);
      @(posedge clk);
    end
    a_we <= 0;
    for (int t = 0; t < 2000; t++) begin
      automatic int r = int'($urandom_range(1023));
      automatic int w = int'($urandom_range(1023));
      automatic int old = model[r];
      automatic int nw  = int'(data_t'($urandom));
      b_addr <= 10'(r);
      a_we <= 1; a_addr <= 10'(w); a_wdata <= data_t'(nw);
      @(posedge clk);
      #1;
      model[w] = nw;
      check(old, "read during write");
    end
    a_we <= 0;
    for (int a = 0; a < 1024; a++) begin
      b_addr <= 10'(a);
      @(posedge clk);
      #1;
      check(model[a], "final read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
