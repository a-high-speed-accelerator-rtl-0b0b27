// tb_pre_crossbar: loads sets of 27 random sub-polynomial payloads and drains them with a
// random issue_ready. Each issued round r must carry payload 4r + k on lane k, lane_valid
// must be low exactly for the missing lanes of the seventh round, issue_last must mark
// round 7, and a new set must only be accepted once the previous one has been issued.
module tb_pre_crossbar;
  localparam int EW = 24, NSUB = 27, LANES = 4, NSETS = 8;
  logic clk = 0, rst_n = 0;
  logic [NSUB-1:0][EW-1:0] in_sub, cur;
  logic in_valid, in_ready, issue_valid, issue_last, issue_ready;
  logic [LANES-1:0][EW-1:0] lane_data;
  logic [LANES-1:0] lane_valid;
  int checks = 0, failures = 0, n_sets = 0, round = 0, partial = 0;

  pre_crossbar #(.ELEM_W(EW), .NSUB(NSUB), .LANES(LANES)) dut (.*);
  always #5 clk = !clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    in_valid    <= rst_n && ($urandom % 2 == 0);
    issue_ready <= ($urandom % 3 != 0);
    for (int s = 0; s < NSUB; s++) in_sub[s] <= EW'($urandom);
  end

  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin
      checks++;
      if (round != 0) begin failures++; $display("set accepted mid-issue"); end
      cur = in_sub;
      n_sets++;
    end
    if (rst_n && issue_valid && issue_ready) begin
      for (int k = 0; k < LANES; k++) begin
        int idx;
        idx = round * LANES + k;
        checks++;
        if (lane_valid[k] != (idx < NSUB)) failures++;
        if (idx < NSUB) begin
          checks++;
          if (lane_data[k] != cur[idx]) failures++;
        end
      end
      if (lane_valid != '1) partial++;
      checks++;
      if (issue_last != (round == 6)) failures++;
      round = (round == 6) ? 0 : round + 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (n_sets == NSETS && round == 0);
    checks++;
    if (partial != NSETS - 1 && partial != NSETS) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
