// tb_int_mul_4x10x135: feeds back-to-back random 10 x 135-bit operand sets, checks each
// of the four results against (a*b) mod q computed here with a plain % on 256-bit values,
// and checks the 7-cycle latency and the one-start-per-5-cycles throughput.
module tb_int_mul_4x10x135;
  import he_pkg::*;
  localparam int NOPS = 40;
  logic clk = 0, rst_n = 0, start, ready, done;
  logic [N_ENC-1:0][BIN_W-1:0] a;
  logic [PK_W-1:0] b;
  coef_t [N_ENC-1:0] r;
  int checks = 0, failures = 0;

  logic [N_ENC-1:0][BIN_W-1:0] a_log [NOPS];
  logic [PK_W-1:0]             b_log [NOPS];
  int start_cyc [NOPS];
  int cyc = 0, n_start = 0, n_done = 0;

  int_mul_4x10x135 dut (.clk, .rst_n, .start, .ready, .a, .b, .done, .r);
  always #5 clk = !clk;
  always @(negedge clk) cyc++;  // counted between edges: no race with the samplers

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // driver: a new operand set whenever ready
  always @(posedge clk) begin
    if (rst_n && start && ready) begin
      a_log[n_start] = a; b_log[n_start] = b; start_cyc[n_start] = cyc;
      n_start++;
    end
  end
  always @(negedge clk) begin
    start <= rst_n && (n_start < NOPS);
    for (int j = 0; j < N_ENC; j++) a[j] <= (n_start == 0) ? '1 : BIN_W'($urandom);
    b <= (n_start == 0) ? '1 : {$urandom, $urandom, $urandom, $urandom, $urandom};
  end

  // checker
  always @(posedge clk) begin
    if (rst_n && done) begin
      for (int j = 0; j < N_ENC; j++) begin
        logic [255:0] exp;
        exp = (256'(a_log[n_done][j]) * 256'(b_log[n_done])) % 256'(Q_DEFAULT);
        checks++;
        if (256'(r[j]) != exp) begin
          failures++;
          $display("op %0d lane %0d: got %h exp %h", n_done, j, r[j], exp);
        end
      end
      checks++;
      if (cyc - start_cyc[n_done] != 8) begin  // done set by the 7th edge, sampled at the 8th
        failures++;
        $display("op %0d latency %0d", n_done, cyc - start_cyc[n_done]);
      end
      n_done++;
    end
  end

  initial begin
    start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (n_done == NOPS);
    checks++;
    if (start_cyc[NOPS-1] - start_cyc[0] != 5 * (NOPS - 1)) begin
      failures++;
      $display("throughput: %0d cycles for %0d starts", start_cyc[NOPS-1] - start_cyc[0], NOPS);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
