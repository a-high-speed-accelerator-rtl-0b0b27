// tb_post_crossbar: drives rounds in which a random subset of the lanes (always a prefix,
// as the scheduler issues them) reports done with random products, spaced as the
// multipliers space them. The emitted sequence must be those lanes' products, lowest lane
// first, one per cycle, with nothing else in between.
module tb_post_crossbar;
  import he_pkg::*;
  localparam int L = N_LANES, NROUNDS = 30;
  logic clk = 0, rst_n = 0, out_valid;
  logic [L-1:0] lane_done;
  coef_t [L-1:0][N_ENC-1:0][N_PROD-1:0] lane_prod;
  coef_t [N_ENC-1:0][N_PROD-1:0] out_prod;
  coef_t [N_ENC-1:0][N_PROD-1:0] expq [$];
  int checks = 0, failures = 0, n_emit = 0;

  post_crossbar dut (.*);
  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    if (rst_n && out_valid) begin
      checks++;
      if (expq.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        coef_t [N_ENC-1:0][N_PROD-1:0] e;
        e = expq.pop_front();
        if (out_prod != e) begin failures++; $display("wrong product at emit %0d", n_emit); end
      end
      n_emit++;
    end

  initial begin
    lane_done = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < NROUNDS; r++) begin
      int nl;
      @(negedge clk);
      nl = (r % 7 == 6) ? 3 : 1 + ($urandom % L);
      for (int k = 0; k < L; k++) begin
        for (int e = 0; e < N_ENC; e++)
          for (int c = 0; c < N_PROD; c++)
            lane_prod[k][e][c] = {$urandom, $urandom, $urandom, $urandom};
        lane_done[k] = (k < nl);
        if (k < nl) expq.push_back(lane_prod[k]);
      end
      @(negedge clk);
      lane_done = '0;
      repeat (5 + $urandom % 20) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d products never emitted", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
