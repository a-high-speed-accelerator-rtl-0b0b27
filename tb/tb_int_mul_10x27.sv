// tb_int_mul_10x27: random and corner operands; checks the registered product one cycle
// after each operand pair against a 64-bit product computed here.
module tb_int_mul_10x27;
  import he_pkg::*;
  logic clk = 0, en;
  logic [BIN_W-1:0] a;
  logic [CHUNK_W-1:0] b;
  logic [BIN_W+CHUNK_W-1:0] p;
  int checks = 0, failures = 0;

  int_mul_10x27 dut (.clk, .en, .a, .b, .p);
  always #5 clk = !clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp;
    en = 1;
    for (int t = 0; t < 300; t++) begin
      a = (t == 0) ? '1 : BIN_W'($urandom);
      b = (t == 0) ? '1 : CHUNK_W'($urandom);
      exp = longint'(a) * longint'(b);
      @(posedge clk); #1;
      checks++;
      if (64'(p) != exp) begin
        failures++;
        $display("mismatch %0d*%0d: got %0d", a, b, p);
      end
    end
    // hold: with en low the product register keeps its value
    en = 0; exp = longint'(p); a = 3; b = 5;
    @(posedge clk); #1;
    checks++;
    if (64'(p) != exp) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
