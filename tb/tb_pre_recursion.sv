// tb_pre_recursion: the public-key configuration (40 coefficients, 135-bit containers in
// 27-bit chunks). Random inputs, several with all-ones chunks so that every inter-chunk
// carry is exercised; outputs A_L, A_H and A_L + A_H (mod 2^135) are compared with values
// computed here with a plain 135-bit add. Random out_ready stalls check that a held result
// is not overwritten.
module tb_pre_recursion;
  import he_pkg::*;
  localparam int N = 40, P = 1, W = PK_W;
  localparam int NOPS = 30;
  logic clk = 0, rst_n = 0;
  logic [P-1:0][N-1:0][W-1:0] in_poly;
  logic [3*P-1:0][N/2-1:0][W-1:0] out_poly;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [P-1:0][N-1:0][W-1:0] sent [NOPS];
  int n_in = 0, n_out = 0, checks = 0, failures = 0;

  pre_recursion #(.N(N), .P(P), .W(W), .CW(CHUNK_W)) dut (.*);
  always #5 clk = !clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    in_valid  <= rst_n && n_in < NOPS && ($urandom % 4 != 0);
    out_ready <= ($urandom % 3 != 0);
    for (int i = 0; i < N; i++)
      in_poly[0][i] <= (n_in % 3 == 0) ? {W{1'b1}} >> ($urandom % 30)
                                       : {7'($urandom), $urandom, $urandom, $urandom, $urandom};
  end

  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin sent[n_in] = in_poly; n_in++; end
    if (rst_n && out_valid && out_ready) begin
      for (int i = 0; i < N/2; i++) begin
        logic [W-1:0] lo, hi, sm;
        lo = sent[n_out][0][i]; hi = sent[n_out][0][i + N/2]; sm = lo + hi;
        checks += 3;
        if (out_poly[0][i] != lo) failures++;
        if (out_poly[1][i] != hi) failures++;
        if (out_poly[2][i] != sm) begin
          failures++;
          $display("op %0d coef %0d sum got %h exp %h", n_out, i, out_poly[2][i], sm);
        end
      end
      n_out++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (n_out == NOPS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
