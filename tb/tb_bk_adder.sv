// tb_bk_adder: checks the Brent-Kung adder against integer addition.
// The default 32-bit adder and 4-, 5-, 17- and 64-bit instances (the 4-bit
// size is the small example of the structure; 5 and 17 are not powers of
// two) are each given corner cases (all ones, carry chains through every
// bit, with and without carry in) and random operands. The 4- and 5-bit
// adders are also checked exhaustively.
module tb_bk_adder;
  int checks = 0, failures = 0;

  logic [31:0] a32, b32, s32;  logic ci32, co32;
  logic [3:0]  a4,  b4,  s4;   logic ci4,  co4;
  logic [4:0]  a5,  b5,  s5;   logic ci5,  co5;
  logic [16:0] a17, b17, s17;  logic ci17, co17;
  logic [63:0] a64, b64, s64;  logic ci64, co64;

  bk_adder               dut32 (.a(a32), .b(b32), .cin(ci32), .sum(s32), .cout(co32));
  bk_adder #(.WIDTH(4))  dut4  (.a(a4),  .b(b4),  .cin(ci4),  .sum(s4),  .cout(co4));
  bk_adder #(.WIDTH(5))  dut5  (.a(a5),  .b(b5),  .cin(ci5),  .sum(s5),  .cout(co5));
  bk_adder #(.WIDTH(17)) dut17 (.a(a17), .b(b17), .cin(ci17), .sum(s17), .cout(co17));
  bk_adder #(.WIDTH(64)) dut64 (.a(a64), .b(b64), .cin(ci64), .sum(s64), .cout(co64));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string tag, logic [64:0] got, logic [64:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", tag, got, exp);
    end
  endtask

  // Applies one operand set to every width (each takes the low bits).
  task automatic apply(logic [63:0] a, logic [63:0] b, logic c);
    logic [64:0] e;
    a32 = a[31:0]; b32 = b[31:0]; ci32 = c;
    a4  = a[3:0];  b4  = b[3:0];  ci4  = c;
    a5  = a[4:0];  b5  = b[4:0];  ci5  = c;
    a17 = a[16:0]; b17 = b[16:0]; ci17 = c;
    a64 = a;       b64 = b;       ci64 = c;
    #1;
    e = 65'(a[31:0]) + 65'(b[31:0]) + 65'(c); check("w32", 65'({co32, s32}), e);
    e = 65'(a[3:0])  + 65'(b[3:0])  + 65'(c); check("w4",  65'({co4,  s4}),  e);
    e = 65'(a[4:0])  + 65'(b[4:0])  + 65'(c); check("w5",  65'({co5,  s5}),  e);
    e = 65'(a[16:0]) + 65'(b[16:0]) + 65'(c); check("w17", 65'({co17, s17}), e);
    e = 65'(a)       + 65'(b)       + 65'(c); check("w64", {co64, s64}, e);
  endtask

  initial begin
    // Exhaustive over 5 bits (covers the 4-bit adder too).
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++)
        for (int c = 0; c < 2; c++)
          apply(64'(x), 64'(y), 1'(c));
    // Carry rippling through every position.
    apply('1, 64'd0, 1'b1);
    apply('1, 64'd1, 1'b0);
    apply('1, '1, 1'b1);
    for (int i = 0; i < 64; i++) begin
      apply(~(64'd0) >> i, 64'd1, 1'b0);
      apply(64'd1 << i, 64'd1 << i, 1'b1);
    end
    // Random operands.
    for (int i = 0; i < 3000; i++)
      apply({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
