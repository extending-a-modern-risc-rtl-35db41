// tb_rni_vpu_error: exhaustive test of the combinational RespErr/Excl to VPU
// error rule. All eight {excl, resp_err} inputs are applied; after 1 time unit
// the error bit must match a literal truth table: for an exclusive access only
// EXOK succeeds, for a normal one only OK. That the error depends on RespErr and
// Excl is the design's; the exact table is this design's reading of the CHI
// RespErr encoding.
module tb_rni_vpu_error;
  logic       excl;
  logic [1:0] resp_err;
  logic       error;
  int checks = 0, failures = 0;
  // expected error, indexed by {excl, resp_err}
  // excl=1: only EXOK (01) succeeds; excl=0: only OK (00) succeeds
  localparam logic [7:0] EXPECTED_X = {1'b1, 1'b1, 1'b0, 1'b1, 1'b1, 1'b1, 1'b1, 1'b0};

  rni_vpu_error dut (.excl_i(excl), .resp_err_i(resp_err), .error_o(error));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {excl, resp_err} = 3'(i);
      #1;
      checks++;
      if (error != EXPECTED_X[i]) begin
        failures++;
        $display("FAIL: excl=%0d resperr=%b error=%0d expected %0d", excl, resp_err, error, EXPECTED_X[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
