// tb_dbf_shift_buffer: streams random blocks through the 4-word shift
// buffer with idle cycles in between, and checks that every word comes out
// of the head exactly four shifts after it went in, and that nothing moves
// while shift is low.
module tb_dbf_shift_buffer;
  import dbf_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b1;
  logic  shift = 1'b0;
  word_t din, dout;
  always #5 clk = !clk;

  dbf_shift_buffer dut (.clk(clk), .rst_n(rst_n), .shift_i(shift), .data_i(din), .data_o(dout));

  int checks = 0, failures = 0;
  word_t hist [$];

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    checks++;
    if (dout != '0) begin failures++; $display("FAIL not cleared by reset"); end
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      shift = ($urandom_range(0, 3) != 0);
      din   = $urandom;
      if (shift) begin
        if (hist.size() >= 4) begin
          checks++;
          if (dout != hist[hist.size() - 4]) begin
            failures++;
            $display("FAIL t=%0d head %h expected %h", t, dout, hist[hist.size() - 4]);
          end
        end
        hist.push_back(din);
      end else if (hist.size() >= 4) begin
        checks++;
        if (dout != hist[hist.size() - 4]) begin
          failures++;
          $display("FAIL t=%0d idle head %h expected %h", t, dout, hist[hist.size() - 4]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
