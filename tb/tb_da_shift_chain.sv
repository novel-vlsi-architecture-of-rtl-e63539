// tb_da_shift_chain: checks the serial tapped delay line at its default size
// (4 registers of 16 bits). Random bits are shifted in; the testbench keeps
// its own history of every bit sent and checks, each clock, that register k
// holds the 16 bits sent between 16*(k+1) and 16*k clocks ago (the newest at
// the top) and that b[k] is the oldest of them. Whole words are also sent
// in step with a word counter to check that a sample moves one register on
// every 16 clocks. A reset must clear the chain.
module tb_da_shift_chain;
  localparam int unsigned TAPS = 4, N = 16;
  logic clk = 0, rst = 1, xin = 0;
  logic [TAPS-1:0] b;
  logic [N-1:0] words [TAPS];
  int checks = 0, failures = 0;
  bit hist [$];   // hist[0] is the newest bit

  da_shift_chain dut (.clk, .rst, .xin, .b, .words);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_chain();
    for (int k = 0; k < TAPS; k++) begin
      logic [N-1:0] exp_w;
      for (int j = 0; j < N; j++) begin
        int age = k * N + (N - 1 - j);  // bit j of register k
        exp_w[j] = (age < hist.size()) ? hist[age] : 1'b0;
      end
      checks++;
      if (words[k] !== exp_w || b[k] !== exp_w[0]) begin
        failures++;
        $display("FAIL reg %0d = %h exp %h b=%b", k, words[k], exp_w, b[k]);
      end
    end
  endtask

  initial begin
    logic [N-1:0] samples [8];
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check_chain();
    // Random bit stream.
    for (int i = 0; i < 200; i++) begin
      xin = 1'($urandom);
      @(posedge clk); #1;
      hist.push_front(xin);
      check_chain();
    end
    // Reset clears it.
    rst = 1;
    @(posedge clk); #1;
    rst = 0;
    hist.delete();
    check_chain();
    // Whole words, LSB first: after word w is complete, register k holds w-k.
    for (int w = 0; w < 8; w++) begin
      samples[w] = 16'($urandom);
      for (int j = 0; j < N; j++) begin
        xin = samples[w][j];
        @(posedge clk); #1;
        hist.push_front(xin);
      end
      for (int k = 0; k < TAPS; k++) begin
        checks++;
        if (words[k] !== ((w - k >= 0) ? samples[w-k] : '0)) begin
          failures++;
          $display("FAIL word %0d reg %0d = %h", w, k, words[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
