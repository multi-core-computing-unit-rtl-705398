// tb_neuron_output_bus: drives random results from ten cores and random
// one-hot (or empty) grants, and checks that one clock later the bus holds
// the granted core's result with valid set, or valid clear with no grant.
module tb_neuron_output_bus;
  import ann_pkg::*;
  int checks = 0, failures = 0;

  localparam int N = 10;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] grant = '0;
  data_t result [N];
  logic bus_valid;
  data_t bus_data;

  neuron_output_bus dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) result[k] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 2000; t++) begin
      automatic int g = int'($urandom_range(N));  // N means no grant
      int want;
      for (int k = 0; k < N; k++) result[k] = data_t'($urandom);
      grant = (g == N) ? '0 : N'(1) << g;
      want  = (g == N) ? 0 : int'(result[g]);
      @(posedge clk);
      #1;
      checks++;
      if (bus_valid != (g != N) || (g != N && bus_data != data_t'(want))) begin
        failures++;
        $display("FAIL grant=%b valid=%b data=%0d want %0d", grant, bus_valid, bus_data, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
