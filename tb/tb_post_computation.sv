// tb_post_computation: one complete group, as the hardware sees it. For random 160-
// coefficient polynomials A (public key, values below 2^100) and B (binary-lane values
// below 2^10) it forms here the 243 sub-polynomial pairs of five Karatsuba levels (halves
// of 80, 40, 20, 10, 5 coefficients; low, high, sum; depth-first), multiplies each pair
// with the schoolbook method modulo q and feeds the 243 products with random gaps. The
// 319-coefficient output must equal A*B modulo q computed directly. Two groups are run.
module tb_post_computation;
  import he_pkg::*;
  localparam int NA = 160, NGROUPS = 2;
  logic clk = 0, rst_n = 0, in_valid, out_valid;
  coef_t [N_PROD-1:0] in_prod;
  coef_t [N_OUT-1:0]  out_prod;
  logic [255:0] A [NA], B [NA];
  logic [255:0] Qw;
  int checks = 0, failures = 0, n_valid = 0;

  post_computation dut (.*);
  always #5 clk = !clk;
  always @(posedge clk) if (rst_n && out_valid) n_valid++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // coefficient i of sub-polynomial "idx" (five base-3 digits, most significant first)
  function automatic logic [255:0] sub_coef(input logic [255:0] P [NA], input int idx,
                                            input int i);
    logic [255:0] s;
    int d [5];
    int t;
    t = idx;
    for (int k = 4; k >= 0; k--) begin d[k] = t % 3; t = t / 3; end
    s = 0;
    for (int m = 0; m < 32; m++) begin        // m: choice of half at each level
      int off;
      bit ok;
      off = i; ok = 1;
      for (int k = 0; k < 5; k++) begin
        int h;
        h = (m >> k) & 1;
        if (!(d[k] == 2 || d[k] == h)) ok = 0;
        off += h * (80 >> k);
      end
      if (ok) s += P[off];
    end
    return s;
  endfunction

  initial begin
    Qw = 256'(Q_DEFAULT);
    in_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < NGROUPS; g++) begin
      for (int i = 0; i < NA; i++) begin
        A[i] = {4'($urandom), $urandom, $urandom, $urandom};
        B[i] = 256'($urandom % 1024);
      end
      for (int idx = 0; idx < 243; idx++) begin
        logic [255:0] a [N_SUB], b [N_SUB];
        for (int i = 0; i < N_SUB; i++) begin
          a[i] = sub_coef(A, idx, i); b[i] = sub_coef(B, idx, i);
        end
        @(negedge clk);
        for (int k = 0; k < N_PROD; k++) begin
          logic [255:0] s;
          s = 0;
          for (int i = 0; i < N_SUB; i++) if (k - i >= 0 && k - i < N_SUB) s += a[i] * b[k-i];
          in_prod[k] = coef_t'(s % Qw);
        end
        in_valid = 1;
        @(negedge clk);
        in_valid = 0;
        repeat ($urandom % 2) @(negedge clk);
      end
      repeat (8) @(negedge clk);
      checks++;
      if (n_valid != g + 1) begin failures++; $display("out_valid count %0d", n_valid); end
      for (int k = 0; k < N_OUT; k++) begin
        logic [255:0] s;
        s = 0;
        for (int i = 0; i < NA; i++) if (k - i >= 0 && k - i < NA) s += A[i] * B[k-i];
        s = s % Qw;
        checks++;
        if (256'(out_prod[k]) != s) begin
          failures++;
          if (failures < 5) $display("group %0d coef %0d: got %h exp %h", g, k, out_prod[k], s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
