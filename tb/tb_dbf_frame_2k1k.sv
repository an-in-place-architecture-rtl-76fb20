// tb_dbf_frame_2k1k: the real-time workload of the design, one complete
// 2048 x 1024 picture (128 x 64 = 8192 macroblocks, 4:2:0) streamed through
// the core back to back. Besides the exact match with the standard-order
// reference, the whole picture must fit in 2,457,666 cycles, one thirtieth
// of a second at 73.73 MHz, i.e. 30 pictures per second at that clock.
// The test body is dbf_frame_test.
module tb_dbf_frame_2k1k;
  dbf_frame_test #(.MBW(128), .MBH(64), .IDLE_LAST(1'b0), .MAX_CYCLES(2457666)) u_test ();
  // watchdog
  initial begin
    repeat (310 * 8192 + 2000) @(posedge u_test.clk);
    u_test.failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", u_test.checks, u_test.failures);
    $finish;
  end
endmodule
