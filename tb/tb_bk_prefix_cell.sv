// tb_bk_prefix_cell: exhaustive check of the prefix carry operator.
// All 16 input combinations are applied and (cp, cg) compared with
// cp = p_i & p_j and cg = g_i | (p_i & g_j), written out here as a truth
// table lookup rather than the same expression.
module tb_bk_prefix_cell;
  logic p_i, g_i, p_j, g_j, cp, cg;
  int checks = 0, failures = 0;

  bk_prefix_cell dut (.p_i, .g_i, .p_j, .g_j, .cp, .cg);

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic exp_cp, exp_cg;
      {p_i, g_i, p_j, g_j} = 4'(v);
      #1;
      // Group generates if the upper span generates, or it propagates a
      // carry generated by the lower span.
      exp_cp = (p_i == 1'b1 && p_j == 1'b1);
      exp_cg = (g_i == 1'b1) ? 1'b1 : ((p_i == 1'b1) ? g_j : 1'b0);
      checks++;
      if (cp !== exp_cp || cg !== exp_cg) begin
        failures++;
        $display("FAIL pi=%b gi=%b pj=%b gj=%b -> cp=%b cg=%b", p_i, g_i, p_j, g_j, cp, cg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
