// tb_activation_function: loads the sigmoid interval and gradient tables,
// then feeds every one of the 2^18 input words, one per clock, with random
// gaps in the valid signal. Checks each output against the bit-exact
// reference interpolation, that it arrives exactly three clocks after its
// input, and that it stays within 3/4096 of the true 1/(1+e^-x).
module tb_activation_function;
  import ann_pkg::*;
  import ann_ref_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  data_t in_data = '0;
  logic out_valid;
  data_t out_data;
  logic tbl_we_interval = 0, tbl_we_gradient = 0;
  logic [8:0] tbl_addr = '0;
  data_t tbl_data = '0;

  activation_function dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (700000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected outputs, indexed by the clock their input was sampled in
  int cyc = 0;
  int exp_at [int];
  int max_err = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_valid) exp_at[cyc + 3] = int'(in_data);
    if (rst_n) begin
      if (exp_at.exists(cyc) || out_valid) begin
        checks++;
        if (!exp_at.exists(cyc) || !out_valid) begin
          failures++;
          $display("FAIL valid timing at %0d", cyc);
        end else begin
          automatic int x = exp_at[cyc];
          automatic int want = act_ref(x);
          automatic real t = 4096.0 / (1.0 + $exp(-real'(x) / 4096.0));
          automatic int err = int'($floor((real'(out_data) > t ? real'(out_data) - t : t - real'(out_data)) + 0.5));
          if (err > max_err) max_err = err;
          if (out_data != data_t'(want) || err > 3) begin
            failures++;
            if (failures < 10) $display("FAIL x=%0d got %0d want %0d (ideal %f)", x, out_data, want, t);
          end
          exp_at.delete(cyc);
        end
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int a = 0; a < 512; a++) begin
      tbl_we_interval <= 1; tbl_we_gradient <= 0;
      tbl_addr <= 9'(a); tbl_data <= data_t'(tbl_offset(a));
      @(posedge clk);
      tbl_we_interval <= 0; tbl_we_gradient <= 1;
      tbl_data <= data_t'(tbl_gradient(a));
      @(posedge clk);
    end
    tbl_we_gradient <= 0;
    for (int x = 0; x < 262144; x++) begin
      in_valid <= 1;
      in_data  <= data_t'(x);
      @(posedge clk);
      if ($urandom_range(15) == 0) begin
        in_valid <= 0;
        in_data  <= data_t'($urandom);
        @(posedge clk);
      end
    end
    in_valid <= 0;
    repeat (6) @(posedge clk);
    $display("max error against the ideal sigmoid: %0d LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
