// tb_post_recursion: for random pairs of 10-coefficient polynomials A, B it forms, here,
// the three half-size products A_L*B_L, A_H*B_H, (A_L+A_H)*(B_L+B_H) modulo q, feeds them
// in that order (with random idle cycles between), and compares the 19-coefficient result
// with the schoolbook product A*B modulo q computed directly.
module tb_post_recursion;
  import he_pkg::*;
  localparam int N = 5, NOPS = 40;
  logic clk = 0, rst_n = 0, in_valid, out_valid;
  coef_t [2*N-2:0] in_prod;
  coef_t [4*N-2:0] out_prod;
  logic [255:0] A [2*N], B [2*N];
  logic [255:0] Qw;
  int checks = 0, failures = 0;

  post_recursion #(.N(N)) dut (.*);
  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic coef_t half_prod(input logic [255:0] x [N], input logic [255:0] y [N],
                                      input int k);
    logic [255:0] s;
    s = 0;
    for (int i = 0; i < N; i++)
      if (k - i >= 0 && k - i < N) s += x[i] * y[k-i];
    return coef_t'(s % Qw);
  endfunction

  initial begin
    logic [255:0] xl [N], xh [N], xm [N], yl [N], yh [N], ym [N];
    Qw = 256'(Q_DEFAULT);
    in_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int op = 0; op < NOPS; op++) begin
      for (int i = 0; i < 2*N; i++) begin
        A[i] = {$urandom, $urandom, $urandom, $urandom} % Qw;
        B[i] = 256'($urandom % 1024);
      end
      for (int i = 0; i < N; i++) begin
        xl[i] = A[i]; xh[i] = A[i+N]; xm[i] = A[i] + A[i+N];
        yl[i] = B[i]; yh[i] = B[i+N]; ym[i] = B[i] + B[i+N];
      end
      for (int part = 0; part < 3; part++) begin
        @(negedge clk);
        for (int k = 0; k < 2*N-1; k++)
          in_prod[k] = (part == 0) ? half_prod(xl, yl, k) :
                       (part == 1) ? half_prod(xh, yh, k) : half_prod(xm, ym, k);
        in_valid = 1;
        @(negedge clk);
        in_valid = 0;
        if (part == 2) break;       // out_valid is high now, for one cycle
        repeat ($urandom % 3) @(negedge clk);
      end
      checks++;
      if (!out_valid) failures++;
      for (int k = 0; k < 4*N-1; k++) begin
        logic [255:0] s;
        s = 0;
        for (int i = 0; i < 2*N; i++) if (k - i >= 0 && k - i < 2*N) s += A[i] * B[k-i];
        s = s % Qw;
        checks++;
        if (256'(out_prod[k]) != s) begin
          failures++; $display("op %0d coef %0d: got %h exp %h", op, k, out_prod[k], s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
