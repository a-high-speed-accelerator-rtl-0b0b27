// tb_packager: streams random sub-polynomials in the five-bursts-per-coefficient format
// with random gaps and a random out_ready, so both ping-pong buffers fill and rx_ready
// drops. Each delivered sub-polynomial is compared with what was sent: public-key
// coefficient i is the concatenation of bits [26:0] of bursts 5i..5i+4, binary coefficient
// i of polynomial k is bits [33:27] of burst 5i+k.
module tb_packager;
  import he_pkg::*;
  localparam int NSUB = 6;
  logic clk = 0, rst_n = 0;
  logic [BURST_W-1:0] rx_data;
  logic rx_valid, rx_ready, out_valid, out_ready;
  logic [N_IN-1:0][PK_W-1:0] out_pk;
  logic [N_ENC-1:0][N_IN-1:0][BIN_W-1:0] out_bin;
  logic [BURST_W-1:0] bursts [NSUB*N_IN*BURSTS_PER_COEF];
  int n_burst = 0, n_out = 0, checks = 0, failures = 0, stalls = 0;

  packager dut (.*);
  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial
    for (int i = 0; i < NSUB*N_IN*BURSTS_PER_COEF; i++)
      bursts[i] = {$urandom, $urandom, $urandom, $urandom};

  always @(negedge clk) begin
    rx_valid  <= rst_n && n_burst < NSUB*N_IN*BURSTS_PER_COEF && ($urandom % 5 != 0);
    rx_data   <= bursts[n_burst < NSUB*N_IN*BURSTS_PER_COEF ? n_burst : 0];
    out_ready <= (n_out < 2) ? ($urandom % 400 == 0) : ($urandom % 50 == 0);
  end

  always @(posedge clk) begin
    if (rst_n && rx_valid && !rx_ready) stalls++;
    if (rst_n && rx_valid && rx_ready) n_burst++;
    if (rst_n && out_valid && out_ready) begin
      for (int i = 0; i < N_IN; i++) begin
        logic [PK_W-1:0] pk;
        int base;
        base = (n_out*N_IN + i) * BURSTS_PER_COEF;
        for (int c = 0; c < N_CHUNKS; c++) pk[c*CHUNK_W +: CHUNK_W] = bursts[base + c][26:0];
        checks++;
        if (out_pk[i] != pk) begin
          failures++; $display("sub %0d coef %0d pk got %h exp %h", n_out, i, out_pk[i], pk);
        end
        for (int e = 0; e < N_ENC; e++) begin
          checks++;
          if (out_bin[e][i] != BIN_W'(bursts[base + e][33:27])) failures++;
        end
      end
      n_out++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (n_out == NSUB);
    checks++;
    if (stalls == 0) begin failures++; $display("rx_ready never dropped"); end
    $display("rx stall cycles: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
