// tb_weight_memory: fills the whole 1024 x 18 weight memory with random
// words, then reads every address back, in order and at random, checking
// that each word appears exactly one clock after its address; also checks
// that writing while reading does not disturb another address.
module tb_weight_memory;
  import ann_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0;
  logic wr_en = 0;
  logic [9:0] wr_addr = '0, rd_addr = '0;
  data_t wr_data = '0, rd_data;
  int model [1024];

  weight_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(int a);
    rd_addr <= 10'(a);
    @(posedge clk);
    #1;
    checks++;
    if (rd_data != data_t'(model[a])) begin
      failures++;
      $display("FAIL addr %0d: got %0d want %0d", a, rd_data, model[a]);
    end
  endtask

  initial begin
    @(posedge clk);
    for (int a = 0; a < 1024; a++) begin
      model[a] = int'(data_t'($urandom));
      wr_en <= 1; wr_addr <= 10'(a); wr_data <= data_t'(model[a]);
      @(posedge clk);
    end
    wr_en <= 0;
    for (int a = 0; a < 1024; a++) read_check(a);
    for (int t = 0; t < 500; t++) begin
      automatic int a = int'($urandom_range(1023));
      automatic int b = (a + 1) % 1024;
      // write b while reading a
      model[b] = int'(data_t'($urandom));
      wr_en <= 1; wr_addr <= 10'(b); wr_data <= data_t'(model[b]);
      read_check(a);
      wr_en <= 0;
      read_check(b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
