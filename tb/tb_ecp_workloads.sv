// tb_ecp_workloads: the evaluated workload on the smaller configurations.
//
// Each of the four programs multiplies a random point by one 192-bit key of
// Hamming weight 96 on processors with 1 ALU (single-port RAM), 2 ALUs and
// 3 and 4 ALUs (dual-port RAM). Every
// result and cycle count is checked by ecp_pm_driver; the cycle counts are
// printed for comparison between configurations, together with the ALU
// efficiency (multiplications per multiplication stage and ALU).
module tb_ecp_workloads;
  // 192-bit key, top bit set, 96 ones
  localparam logic [191:0] KEY = {64'hC5A3_96E1_0F3C_5A69, 64'h96A5_3C0F_E169_5A3C, 64'h0FF0_A55A_3CC3_6996};

  int   c1, f1, c2, f2, c3, f3, c4, f4;
  logic fin1, fin2, fin3, fin4;
  int   checks, failures;

  ecp_pm_driver #(.NALU(1), .DUAL_PORT(1'b0), .KEY(KEY)) d1 (.n_checks(c1), .n_failures(f1), .fin(fin1));
  ecp_pm_driver #(.NALU(2), .DUAL_PORT(1'b1), .KEY(KEY)) d2 (.n_checks(c2), .n_failures(f2), .fin(fin2));
  ecp_pm_driver #(.NALU(3), .DUAL_PORT(1'b1), .KEY(KEY)) d3 (.n_checks(c3), .n_failures(f3), .fin(fin3));
  ecp_pm_driver #(.NALU(4), .DUAL_PORT(1'b1), .KEY(KEY)) d4 (.n_checks(c4), .n_failures(f4), .fin(fin4));

  initial begin
    #400_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2 + c3 + c4, f1 + f2 + f3 + f4 + 1);
    $finish;
  end

  initial begin
    wait (fin1 && fin2 && fin3 && fin4);
    checks   = c1 + c2 + c3 + c4 + 1;
    failures = f1 + f2 + f3 + f4;
    if ($countones(KEY) != 96) begin failures++; $display("key weight %0d", $countones(KEY)); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
