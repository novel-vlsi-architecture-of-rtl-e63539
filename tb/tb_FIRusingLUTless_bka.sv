// tb_FIRusingLUTless_bka: end-to-end test of the LUT-less DA FIR filter at
// its default size (4 taps, 16-bit signed coefficients and samples, 64-bit
// output), with no parameter overridden.
//
// Samples are sent bit-serially on Xin, LSB first, back to back from the
// first clock after reset. At the end of every 16-clock sample period m the
// filter must raise Yvalid and present Yout = sum_k h[k] * x[m-1-k], where h
// is the coefficient set applied during that period and x[j] = 0 before the
// first sample. The expected value is computed here with 64-bit integer
// multiplication. Yvalid must come exactly every 16 clocks and at no other
// time (the throughput of one output per sample word, one bit per clock).
//
// Mechanisms counted, each of which must occur at least once:
//   sign_sub    - a negative sample in the taps, so the sign-bit cycle
//                 subtracts a non-zero partial sum,
//   coef_reload - coefficients changed at run time at a sample boundary,
//   neg_out     - a negative filter output,
//   wide_out    - an output outside the 32-bit range (extreme operands),
//   reset_run   - reset applied in the middle of a stream, after which the
//                 delay line must start from zeros again,
//   impulse     - a unit impulse (1 followed by zeros) after a reset, whose
//                 response must read back h[0], h[1], h[2], h[3], then 0.
module tb_FIRusingLUTless_bka;
  localparam int TAPS = 4, W = 16, N = 16, PERIODS = 400;

  logic clock = 0, reset = 1, Xin = 0;
  logic [TAPS*W-1:0] h = '0;
  logic [63:0] Yout;
  logic Yvalid;

  int checks = 0, failures = 0;
  int sign_sub = 0, coef_reload = 0, neg_out = 0, wide_out = 0, reset_run = 0, impulse = 0;

  FIRusingLUTless_bka dut (.clock, .reset, .Xin, .h, .Yout, .Yvalid);

  always #5 clock = ~clock;

  initial begin : watchdog
    repeat (2 * PERIODS * N + 1000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] pick(int m);
    // Mostly random values, with runs of the extremes.
    case ($urandom_range(0, 9))
      0: return 16'h8000;
      1: return 16'h7fff;
      default: return 16'($urandom);
    endcase
  endfunction

  // Runs `periods` sample periods starting right after reset release.
  task automatic run_stream(int periods);
    logic [W-1:0] x [$];   // x[0] is the newest complete sample
    for (int m = 0; m < periods; m++) begin
      logic [W-1:0] s;
      longint exp_y;
      // New coefficients now and then, at the period boundary.
      if (m == 0 || $urandom_range(0, 3) == 0) begin
        if (m == 0 || (m % 50) == 7) h = {4{16'h8000}};  // extreme set
        else h = {pick(m), pick(m), pick(m), pick(m)};
        if (m != 0) coef_reload++;
      end
      s = (m % 50 == 9) ? 16'h8000 : pick(m);
      for (int i = 0; i < N; i++) begin
        Xin = s[i];
        @(posedge clock); #1;
        checks++;
        if (Yvalid !== (i == N - 1)) begin
          failures++;
          $display("FAIL period %0d bit %0d: Yvalid=%b", m, i, Yvalid);
        end
      end
      // Output of this period uses the samples of the previous periods.
      exp_y = 0;
      for (int k = 0; k < TAPS; k++) begin
        longint xv = (k < x.size()) ? longint'($signed(x[k])) : 0;
        longint hv = longint'($signed(h[k*W +: W]));
        exp_y += hv * xv;
        if (xv < 0 && hv != 0) sign_sub++;
      end
      if (exp_y < 0) neg_out++;
      if (exp_y > 64'sd2147483647 || exp_y < -64'sd2147483648) wide_out++;
      checks++;
      if (Yout !== 64'(exp_y)) begin
        failures++;
        $display("FAIL period %0d: Yout=%0d exp=%0d", m, $signed(Yout), exp_y);
      end
      x.push_front(s);
      if (x.size() > TAPS) void'(x.pop_back());
    end
  endtask

  // Impulse response: x = 1, 0, 0, ... from reset; the output after
  // period m+1 must be h[m] (0 after the last tap).
  task automatic run_impulse();
    logic [W-1:0] hs [TAPS] = '{16'sd1234, -16'sd77, 16'h7fff, 16'h8000};
    for (int k = 0; k < TAPS; k++) h[k*W +: W] = hs[k];
    reset = 1;
    @(posedge clock); #1;
    reset = 0;
    for (int m = 0; m < TAPS + 2; m++) begin
      logic [W-1:0] s = (m == 0) ? 16'd1 : 16'd0;
      for (int i = 0; i < N; i++) begin
        Xin = s[i];
        @(posedge clock); #1;
      end
      checks++;
      if (Yvalid !== 1'b1 ||
          Yout !== ((m >= 1 && m <= TAPS) ? 64'($signed(hs[m-1])) : 64'd0)) begin
        failures++;
        $display("FAIL impulse period %0d: Yout=%0d", m, $signed(Yout));
      end
    end
    impulse++;
  endtask

  initial begin
    repeat (3) @(posedge clock);
    #1 reset = 0;
    run_stream(PERIODS / 2);
    // Reset in mid-stream, partway into a word.
    Xin = 1'b1;
    repeat (5) @(posedge clock);
    #1 reset = 1;
    @(posedge clock); #1;
    checks++;
    if (Yvalid !== 1'b0 || Yout !== '0) begin
      failures++;
      $display("FAIL reset did not clear the output");
    end
    reset = 0;
    reset_run++;
    run_stream(PERIODS / 2);
    run_impulse();

    $display("mechanisms: sign_sub=%0d coef_reload=%0d neg_out=%0d wide_out=%0d reset_run=%0d impulse=%0d",
             sign_sub, coef_reload, neg_out, wide_out, reset_run, impulse);
    checks += 6;
    if (sign_sub == 0)    begin failures++; $display("FAIL no sign-bit subtraction"); end
    if (coef_reload == 0) begin failures++; $display("FAIL no coefficient reload"); end
    if (neg_out == 0)     begin failures++; $display("FAIL no negative output"); end
    if (wide_out == 0)    begin failures++; $display("FAIL no wide output"); end
    if (reset_run == 0)   begin failures++; $display("FAIL no mid-stream reset"); end
    if (impulse == 0)     begin failures++; $display("FAIL no impulse response"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
