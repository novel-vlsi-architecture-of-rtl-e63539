// tb_da_bit_counter: checks the bit-position counter at its default word
// size of 16 bits. After reset the count must run 0..15 and wrap, with
// first high only at position 0 and sign (the sign-bit timing signal) only
// at position 15, i.e. once every 16 clocks. A reset in mid-word must bring
// the count back to 0. The expected count is kept by the testbench itself.
module tb_da_bit_counter;
  localparam int unsigned N = 16;
  logic clk = 0, rst = 1;
  logic [3:0] bit_idx;
  logic first, sign;
  int checks = 0, failures = 0;
  int exp_idx;
  int last_sign_cycle = -1, cycle = 0;

  da_bit_counter dut (.clk, .rst, .bit_idx, .first, .sign);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state();
    checks++;
    if (int'(bit_idx) != exp_idx || first != (exp_idx == 0) || sign != (exp_idx == N - 1)) begin
      failures++;
      $display("FAIL cycle %0d idx=%0d exp=%0d first=%b sign=%b", cycle, bit_idx, exp_idx, first, sign);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    exp_idx = 0;
    for (int i = 0; i < 5 * N + 7; i++) begin
      check_state();
      if (sign) begin
        // The sign bit recurs once per word.
        if (last_sign_cycle >= 0) begin
          checks++;
          if (cycle - last_sign_cycle != N) begin
            failures++;
            $display("FAIL sign period %0d", cycle - last_sign_cycle);
          end
        end
        last_sign_cycle = cycle;
      end
      @(posedge clk); #1;
      cycle++;
      exp_idx = (exp_idx + 1) % N;
    end
    // Reset in mid-word.
    rst = 1;
    @(posedge clk); #1;
    rst = 0;
    exp_idx = 0;
    for (int i = 0; i < N + 3; i++) begin
      check_state();
      @(posedge clk); #1;
      cycle++;
      exp_idx = (exp_idx + 1) % N;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
