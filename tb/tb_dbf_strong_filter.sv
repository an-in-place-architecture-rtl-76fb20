// tb_dbf_strong_filter: random lines through the bS = 4 filter, luma and
// chroma, compared with the reference equations. Lines are drawn with small
// and large steps so that both the full smoothing and the 3-tap form occur
// on each side; both are counted and must be seen.
module tb_dbf_strong_filter;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = !clk;

  line_t      li, lo;
  logic [7:0] alpha;
  logic [4:0] beta;
  logic       chroma;
  logic [1:0] strong_flag;

  dbf_strong_filter dut (
    .line_i(li), .alpha_i(alpha), .beta_i(beta), .chroma_i(chroma),
    .line_o(lo), .strong_o(strong_flag)
  );

  int checks = 0, failures = 0, n_full = 0, n_three = 0;

  initial begin
    side_t p, q, ep, eq;
    for (int t = 0; t < 4000; t++) begin
      rand_line(p, q, (t % 3 == 0) ? 40 : 6);
      ep = p; eq = q;
      alpha  = 8'($urandom_range(0, 255));
      beta   = 5'($urandom_range(0, 18));
      chroma = ($urandom_range(0, 3) == 0);
      for (int i = 0; i < 4; i++) begin
        li.l[i] = pix_t'(p[i]);
        li.r[i] = pix_t'(q[i]);
      end
      ref_strong(ep, eq, int'(alpha), int'(beta), chroma);
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
      if (strong_flag != 2'b00) n_full++; else n_three++;
    end
    checks++;
    if (n_full == 0 || n_three == 0) begin
      failures++;
      $display("FAIL coverage full=%0d three_tap=%0d", n_full, n_three);
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
