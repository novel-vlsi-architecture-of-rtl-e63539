// tb_lutless_partial_sum: checks the multiplexer bank and adder tree at the
// default size (4 taps, 16-bit signed coefficients, 18-bit result). For
// every one of the 16 select patterns and many random coefficient sets
// (plus the extremes -32768 and 32767 on every tap) the result must equal
// the signed sum of the coefficients whose select bit is 1.
module tb_lutless_partial_sum;
  localparam int TAPS = 4, W = 16;
  logic [TAPS*W-1:0] h;
  logic [TAPS-1:0]   b;
  logic [W+1:0]      psum;
  int checks = 0, failures = 0;

  lutless_partial_sum dut (.h, .b, .psum);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_all_selects();
    for (int s = 0; s < 16; s++) begin
      int exp_v = 0;
      b = 4'(s);
      #1;
      for (int k = 0; k < TAPS; k++)
        if (s[k]) exp_v += int'($signed(h[k*W +: W]));
      checks++;
      if (int'($signed(psum)) != exp_v) begin
        failures++;
        $display("FAIL h=%h b=%b psum=%0d exp=%0d", h, b, $signed(psum), exp_v);
      end
    end
  endtask

  initial begin
    h = {4{16'h8000}}; run_all_selects();
    h = {4{16'h7fff}}; run_all_selects();
    h = {16'h7fff, 16'h8000, 16'h0001, 16'hffff}; run_all_selects();
    for (int i = 0; i < 300; i++) begin
      h = {$urandom, $urandom};
      run_all_selects();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
