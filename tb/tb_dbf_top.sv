// tb_dbf_top: end-to-end test of the deblocking filter core at its default
// configuration on a 3 x 2 macroblock picture (48 x 32 luma). Five
// macroblocks run back to back, the sixth starts from idle; the filtered
// picture must match a standard-order reference exactly, macroblocks must
// follow every 300 cycles, the idle one must take 304, and every filter path
// and schedule mechanism must occur. The test body is dbf_frame_test.
module tb_dbf_top;
  dbf_frame_test #(.MBW(3), .MBH(2), .IDLE_LAST(1'b1), .MAX_CYCLES(0)) u_test ();
  // watchdog
  initial begin
    repeat (310 * 6 + 2000) @(posedge u_test.clk);
    u_test.failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", u_test.checks, u_test.failures);
    $finish;
  end
endmodule
