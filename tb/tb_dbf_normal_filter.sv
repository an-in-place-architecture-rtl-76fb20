// tb_dbf_normal_filter: random lines through the bS < 4 filter, luma and
// chroma, compared with the reference equations. Clipping of the delta by
// tc, clipping to the sample range and the L1/R1 corrections all occur.
module tb_dbf_normal_filter;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = !clk;

  line_t      li, lo;
  logic [4:0] beta, tc0;
  logic       chroma;
  logic [1:0] side1;

  dbf_normal_filter dut (
    .line_i(li), .beta_i(beta), .tc0_i(tc0), .chroma_i(chroma),
    .line_o(lo), .side1_o(side1)
  );

  int checks = 0, failures = 0, n_p1 = 0, n_sat = 0;

  initial begin
    side_t p, q, ep, eq;
    for (int t = 0; t < 4000; t++) begin
      rand_line(p, q, (t % 4 == 0) ? 30 : 8);
      if (t % 50 == 0) begin p[0] = 2; q[0] = 253; end   // range clipping
      ep = p; eq = q;
      beta   = 5'($urandom_range(0, 18));
      tc0    = 5'($urandom_range(0, 25));
      chroma = ($urandom_range(0, 3) == 0);
      for (int i = 0; i < 4; i++) begin
        li.l[i] = pix_t'(p[i]);
        li.r[i] = pix_t'(q[i]);
      end
      ref_normal(ep, eq, int'(beta), int'(tc0), chroma);
      @(posedge clk);
      for (int i = 0; i < 4; i++) begin
        checks += 2;
        if (int'(lo.l[i]) != ep[i] || int'(lo.r[i]) != eq[i]) begin
          failures++;
          if (failures < 10)
            $display("FAIL t=%0d i=%0d: got L=%0d R=%0d expected L=%0d R=%0d",
                     t, i, lo.l[i], lo.r[i], ep[i], eq[i]);
        end
      end
      if (side1 != 2'b00) n_p1++;
      if (ep[0] == 0 || ep[0] == 255 || eq[0] == 0 || eq[0] == 255) n_sat++;
    end
    checks++;
    if (n_p1 == 0 || n_sat == 0) begin
      failures++;
      $display("FAIL coverage p1=%0d saturated=%0d", n_p1, n_sat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
