// tb_pre_computation: both lane configurations side by side, the public-key lane (one
// 40-coefficient polynomial, 135-bit values in 27-bit chunks) and the binary lane (four
// polynomials, 10-bit values from 7-bit inputs). Sub-polynomial 27p + 9x + 3y + z is checked
// against a direct formula: coefficient i is the sum of A[i + ox + oy + oz] over
// ox in S(x,20), oy in S(y,10), oz in S(z,5), with S(0,h) = {0}, S(1,h) = {h},
// S(2,h) = {0,h}. Also checks the 3-cycle latency without stalls.
module tb_pre_computation;
  import he_pkg::*;
  localparam int NOPS = 6;
  logic clk = 0, rst_n = 0;
  logic [0:0][N_IN-1:0][PK_W-1:0]         pk_in;
  logic [N_ENC-1:0][N_IN-1:0][BIN_W-1:0]  bin_in;
  logic [26:0][N_SUB-1:0][PK_W-1:0]       pk_out;
  logic [107:0][N_SUB-1:0][BIN_W-1:0]     bin_out;
  logic in_valid, pk_in_ready, bin_in_ready, pk_out_valid, bin_out_valid, out_ready;
  logic [0:0][N_IN-1:0][PK_W-1:0]         pk_log  [NOPS];
  logic [N_ENC-1:0][N_IN-1:0][BIN_W-1:0]  bin_log [NOPS];
  int in_cyc [NOPS];
  int cyc = 0, n_in = 0, n_out = 0, checks = 0, failures = 0;

  pre_computation #(.P0(1), .W(PK_W), .CW(CHUNK_W)) u_pk (.clk, .rst_n,
    .in_poly(pk_in), .in_valid, .in_ready(pk_in_ready),
    .out_poly(pk_out), .out_valid(pk_out_valid), .out_ready);
  pre_computation #(.P0(N_ENC), .W(BIN_W), .CW(BIN_W)) u_bin (.clk, .rst_n,
    .in_poly(bin_in), .in_valid, .in_ready(bin_in_ready),
    .out_poly(bin_out), .out_valid(bin_out_valid), .out_ready);

  always #5 clk = !clk;
  always @(negedge clk) cyc++;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sel_has(int x, int which);   // which: 0 low offset, 1 high offset
    return (x == 2) || (x == which);
  endfunction

  always @(negedge clk) begin
    in_valid  <= rst_n && n_in < NOPS;
    out_ready <= 1'b1;
    for (int i = 0; i < N_IN; i++) begin
      pk_in[0][i] <= {3'($urandom), $urandom, $urandom, $urandom, $urandom};
      for (int e = 0; e < N_ENC; e++) bin_in[e][i] <= BIN_W'(7'($urandom));
    end
  end

  always @(posedge clk) begin
    if (rst_n && in_valid && pk_in_ready && bin_in_ready) begin
      pk_log[n_in] = pk_in; bin_log[n_in] = bin_in; in_cyc[n_in] = cyc; n_in++;
    end
    if (rst_n && pk_out_valid && out_ready) begin
      checks++;
      if (!bin_out_valid) failures++;
      checks++;
      if (cyc - in_cyc[n_out] != 3) begin
        failures++; $display("latency %0d", cyc - in_cyc[n_out]);
      end
      for (int x = 0; x < 3; x++) for (int y = 0; y < 3; y++) for (int z = 0; z < 3; z++)
        for (int i = 0; i < N_SUB; i++) begin
          logic [PK_W-1:0] spk;
          logic [N_ENC-1:0][BIN_W-1:0] sb;
          spk = '0; sb = '0;
          for (int hx = 0; hx < 2; hx++) if (sel_has(x, hx))
            for (int hy = 0; hy < 2; hy++) if (sel_has(y, hy))
              for (int hz = 0; hz < 2; hz++) if (sel_has(z, hz)) begin
                int k;
                k = i + 20*hx + 10*hy + 5*hz;
                spk += pk_log[n_out][0][k];
                for (int e = 0; e < N_ENC; e++) sb[e] += bin_log[n_out][e][k];
              end
          checks++;
          if (pk_out[9*x + 3*y + z][i] != spk) begin
            failures++;
            $display("pk sub %0d%0d%0d coef %0d: got %h exp %h", x, y, z, i,
                     pk_out[9*x + 3*y + z][i], spk);
          end
          for (int e = 0; e < N_ENC; e++) begin
            checks++;
            if (bin_out[27*e + 9*x + 3*y + z][i] != sb[e]) failures++;
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
