// tb_dbf_edge_filter: random lines and parameters through the complete
// 8-pixel edge filter, with the words packed as on the datapath (L0 in the
// top byte of the left word, R0 in the bottom byte of the right word), and
// compared with the reference edge filter including the bS and alpha/beta
// decisions. Each outcome (bS = 0, rejected, normal, strong_flag) is counted and
// must occur, and the filtered flag must agree with the reference.
module tb_dbf_edge_filter;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = !clk;

  word_t       l_in, r_in, l_out, r_out;
  line_param_t prm;
  logic        chroma, filtered, strong_flag, strong_full, normal_p1;

  dbf_edge_filter dut (
    .left_i(l_in), .right_i(r_in), .prm_i(prm), .chroma_i(chroma),
    .left_o(l_out), .right_o(r_out), .filtered_o(filtered), .strong_o(strong_flag),
    .strong_full_o(strong_full), .normal_p1_o(normal_p1)
  );

  int checks = 0, failures = 0;
  int n_bs0 = 0, n_off = 0, n_normal = 0, n_strong = 0;

  initial begin
    side_t p, q;
    bit on;
    for (int t = 0; t < 5000; t++) begin
      rand_line(p, q, (t % 3 == 0) ? 40 : 8);
      prm.alpha = 8'($urandom_range(0, 120));
      prm.beta  = 5'($urandom_range(0, 18));
      prm.tc0   = 5'($urandom_range(0, 25));
      prm.bs    = 3'($urandom_range(0, 4));
      chroma    = ($urandom_range(0, 3) == 0);
      for (int i = 0; i < 4; i++) begin
        l_in[8*(3-i) +: 8] = 8'(p[i]);
        r_in[8*i +: 8]     = 8'(q[i]);
      end
      on = ref_filter_line(p, q, int'(prm.bs), int'(prm.alpha), int'(prm.beta),
                           int'(prm.tc0), chroma);
      @(posedge clk);
      for (int i = 0; i < 4; i++) begin
        checks += 2;
        if (int'(l_out[8*(3-i) +: 8]) != p[i] || int'(r_out[8*i +: 8]) != q[i]) begin
          failures++;
          if (failures < 10)
            $display("FAIL t=%0d i=%0d bs=%0d: got L=%0d R=%0d expected L=%0d R=%0d",
                     t, i, prm.bs, l_out[8*(3-i) +: 8], r_out[8*i +: 8], p[i], q[i]);
        end
      end
      checks++;
      if (filtered != on) begin
        failures++;
        $display("FAIL t=%0d filtered flag %0d expected %0d", t, filtered, on);
      end
      if (prm.bs == 0) n_bs0++;
      else if (!on) n_off++;
      else if (prm.bs == 4) n_strong++;
      else n_normal++;
    end
    checks++;
    if (n_bs0 == 0 || n_off == 0 || n_normal == 0 || n_strong == 0) begin
      failures++;
      $display("FAIL coverage bs0=%0d off=%0d normal=%0d strong_flag=%0d",
               n_bs0, n_off, n_normal, n_strong);
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
