// tb_da_accumulator: checks the shift-accumulate stage at its default size
// (18-bit partial sums, 16-bit words, 64-bit accumulator). Words of 16
// random signed partial sums P_0..P_15 are fed one per clock, with first on
// P_0 and sign on P_15, back to back. After each word y must equal
// sum_(i<15) P_i*2^i - P_15*2^15, computed here with 64-bit integer
// arithmetic, and y_valid must be 1 in exactly the cycle after the sign
// bit, i.e. once every 16 clocks. Extreme partial sums are included.
module tb_da_accumulator;
  localparam int N = 16, IN_W = 18;
  logic clk = 0, rst = 1, first = 0, sign = 0;
  logic [IN_W-1:0] psum = '0;
  logic [63:0] acc, y;
  logic y_valid;
  int checks = 0, failures = 0;

  da_accumulator dut (.clk, .rst, .first, .sign, .psum, .acc, .y, .y_valid);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp_y;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    checks++;
    if (y_valid !== 1'b0 || y !== '0) begin
      failures++;
      $display("FAIL after reset");
    end
    for (int w = 0; w < 300; w++) begin
      exp_y = 0;
      for (int i = 0; i < N; i++) begin
        longint p;
        case (w)
          0: psum = 18'h1ffff;          // most positive
          1: psum = 18'h20000;          // most negative
          default: psum = 18'($urandom);
        endcase
        p = longint'($signed(psum));
        first = (i == 0);
        sign  = (i == N - 1);
        exp_y += sign ? -(p <<< i) : (p <<< i);
        @(posedge clk); #1;
        // y_valid only right after the sign bit.
        checks++;
        if (y_valid !== sign) begin
          failures++;
          $display("FAIL y_valid=%b at bit %0d", y_valid, i);
        end
      end
      checks++;
      if (y !== 64'(exp_y)) begin
        failures++;
        $display("FAIL word %0d y=%0d exp=%0d", w, $signed(y), exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
