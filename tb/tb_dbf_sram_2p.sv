// tb_dbf_sram_2p: random reads and writes on the 16x32 two-port buffer
// against an array model. Checks the one-cycle read latency, that a read
// and a write to the same address in one cycle return the old word, and
// that the read register holds when no read is enabled.
module tb_dbf_sram_2p;
  import dbf_pkg::*;

  logic       clk = 1'b0;
  logic       ren = 1'b0, wen = 1'b0;
  logic [3:0] raddr = '0, waddr = '0;
  word_t      wdata = '0, rdata;
  always #5 clk = !clk;

  dbf_sram_2p dut (.clk(clk), .rd_en_i(ren), .rd_addr_i(raddr), .rd_data_o(rdata),
                   .wr_en_i(wen), .wr_addr_i(waddr), .wr_data_i(wdata));

  int checks = 0, failures = 0, n_collide = 0;
  word_t model [16];
  word_t expect_q;

  initial begin
    // fill every word
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      wen = 1'b1; waddr = 4'(a); wdata = $urandom; model[a] = wdata;
    end
    @(negedge clk);
    wen = 1'b0;
    ren = 1'b1; raddr = 4'd0;
    expect_q = model[0];
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (rdata != expect_q) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d read %h expected %h", t, rdata, expect_q);
      end
      ren   = ($urandom_range(0, 4) != 0);
      raddr = 4'($urandom_range(0, 15));
      wen   = $urandom_range(0, 1);
      waddr = ($urandom_range(0, 5) == 0) ? raddr : 4'($urandom_range(0, 15));
      wdata = $urandom;
      if (ren) expect_q = model[raddr];
      if (ren && wen && raddr == waddr) n_collide++;
      if (wen) model[waddr] = wdata;
    end
    checks++;
    if (n_collide == 0) begin failures++; $display("FAIL no same-address access"); end
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
