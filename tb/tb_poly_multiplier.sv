// tb_poly_multiplier: random 5-coefficient public-key and binary sub-polynomials, issued
// back to back; each 9-coefficient product of each encryption is compared with a
// schoolbook convolution reduced with % here. Checks the fixed latency of every product and that
// back-to-back products complete every 26 cycles.
module tb_poly_multiplier;
  import he_pkg::*;
  localparam int NOPS = 12;
  logic clk = 0, rst_n = 0, start, ready, done;
  logic [N_SUB-1:0][PK_W-1:0] b;
  logic [N_ENC-1:0][N_SUB-1:0][BIN_W-1:0] a;
  coef_t [N_ENC-1:0][N_PROD-1:0] prod;
  int checks = 0, failures = 0;

  logic [N_SUB-1:0][PK_W-1:0]             b_log [NOPS];
  logic [N_ENC-1:0][N_SUB-1:0][BIN_W-1:0] a_log [NOPS];
  int start_cyc [NOPS];
  int cyc = 0, n_start = 0, n_done = 0, done_cyc = 0;

  poly_multiplier dut (.clk, .rst_n, .start, .ready, .b, .a, .done, .prod);
  always #5 clk = !clk;
  always @(negedge clk) cyc++;  // counted between edges: no race with the samplers

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    if (rst_n && start && ready) begin
      a_log[n_start] = a; b_log[n_start] = b; start_cyc[n_start] = cyc;
      n_start++;
    end

  always @(negedge clk) begin
    start <= rst_n && (n_start < NOPS);
    for (int u = 0; u < N_SUB; u++) begin
      b[u] <= (n_start == 0) ? {2'b0, {(PK_W-2){1'b1}}} :
              {1'b0, 38'($urandom), $urandom, $urandom, $urandom};
      for (int e = 0; e < N_ENC; e++) a[e][u] <= (n_start == 0) ? '1 : BIN_W'($urandom);
    end
  end

  always @(posedge clk)
    if (rst_n && done) begin
      for (int e = 0; e < N_ENC; e++)
        for (int k = 0; k < N_PROD; k++) begin
          logic [255:0] s;
          s = 0;
          for (int u = 0; u < N_SUB; u++)
            if (k - u >= 0 && k - u < N_SUB)
              s += 256'(b_log[n_done][u]) * 256'(a_log[n_done][e][k-u]);
          s = s % 256'(Q_DEFAULT);
          checks++;
          if (256'(prod[e][k]) != s) begin
            failures++;
            $display("op %0d enc %0d coef %0d: got %h exp %h", n_done, e, k, prod[e][k], s);
          end
        end
      // every product: done set by the 29th edge after its start, sampled at the 30th;
      // back to back, one product every 26 cycles
      checks++;
      if (cyc - start_cyc[n_done] != 30 || (n_done > 0 && cyc - done_cyc != 26)) begin
        failures++;
        $display("op %0d: %0d cycles after start, %0d after previous", n_done,
                 cyc - start_cyc[n_done], cyc - done_cyc);
      end
      done_cyc = cyc;
      n_done++;
    end

  initial begin
    start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (n_done == NOPS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
