// tb_priority_decoder: checks the bus priority decoder for every request
// pattern of an 8-input instance and random patterns of a 10-input one:
// exactly one grant when anything requests, none otherwise, and always the
// lowest-numbered requester.
module tb_priority_decoder;
  int checks = 0, failures = 0;

  logic [7:0] req8, grant8;
  logic       any8;
  logic [9:0] req10, grant10;
  logic       any10;

  priority_decoder #(.N(8)) dut8 (.req(req8), .grant(grant8), .any_req(any8));
  priority_decoder dut10 (.req(req10), .grant(grant10), .any_req(any10));

  function automatic logic [9:0] expect_grant(logic [9:0] r, int n);
    for (int k = 0; k < n; k++) if (r[k]) return 10'(1) << k;
    return '0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 256; r++) begin
      req8 = 8'(r);
      #1;
      checks++;
      if (grant8 != 8'(expect_grant(10'(r), 8)) || any8 != (r != 0)) begin
        failures++;
        $display("FAIL N=8 req=%b grant=%b any=%b", req8, grant8, any8);
      end
    end
    for (int t = 0; t < 500; t++) begin
      req10 = 10'($urandom);
      if (t % 3 == 0) req10 = req10 & 10'($urandom);
      #1;
      checks++;
      if (grant10 != expect_grant(req10, 10) || any10 != (req10 != 0)) begin
        failures++;
        $display("FAIL N=10 req=%b grant=%b", req10, grant10);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
