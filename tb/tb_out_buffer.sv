// tb_out_buffer: delivers groups of four random 319-coefficient products (only while room
// is high and at least 1300 cycles apart, as the datapath does) and drains the transmit
// side with a random tx_ready, including a long pause that fills the FIFO and drops room.
// Checks: every word equals the expected coefficient (encryption 0..3 in turn, coefficient
// order, zero-extended); a transfer starts only with a full transfer stored; once started,
// tx_valid stays high until all 1276 words of the transfer have gone out.
module tb_out_buffer;
  import he_pkg::*;
  localparam int DEPTH = 4096, XW = N_ENC * N_OUT, NGROUPS = 6;
  logic clk = 0, rst_n = 0, in_valid, room, tx_valid, tx_ready, xfer_start;
  coef_t [N_ENC-1:0][N_OUT-1:0] in_poly;
  logic [BURST_W-1:0] tx_data;
  logic [BURST_W-1:0] expq [$];
  int checks = 0, failures = 0, n_groups = 0, n_words = 0, in_xfer = 0, n_xfer = 0;
  int room_low = 0, pause = 0, cyc = 0;
  int deliver_cyc [NGROUPS];

  out_buffer #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = !clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) tx_ready <= (pause > 0) ? 1'b0 : ($urandom % 4 != 0);
  always @(negedge clk) if (pause > 0) pause--;
  always @(negedge clk) cyc++;

  always @(posedge clk) if (rst_n) begin
    if (!room) room_low++;
    if (xfer_start) begin
      checks++;
      if (in_xfer != 0) begin failures++; $display("transfer restarted early"); end
      // the group is written one word per cycle: a complete transfer needs XW cycles
      checks++;
      if (cyc - deliver_cyc[n_xfer] < XW) begin
        failures++; $display("transfer %0d started before the group was stored", n_xfer);
      end
      n_xfer++;
    end
    if (tx_valid && tx_ready) begin
      checks++;
      if (expq.size() == 0 || tx_data != expq[0]) begin
        failures++;
        if (failures < 5) $display("word %0d: got %h", n_words, tx_data);
      end
      if (expq.size() != 0) void'(expq.pop_front());
      n_words++;
      in_xfer = (in_xfer == XW - 1) ? 0 : in_xfer + 1;
    end
    if (in_xfer != 0) begin
      checks++;
      if (!tx_valid) begin failures++; $display("transfer interrupted"); end
    end
  end

  initial begin
    in_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < NGROUPS; g++) begin
      @(negedge clk);
      while (!room) @(negedge clk);
      for (int e = 0; e < N_ENC; e++)
        for (int i = 0; i < N_OUT; i++) begin
          in_poly[e][i] = {29'($urandom), $urandom, $urandom, $urandom};
          expq.push_back(BURST_W'(in_poly[e][i]));
        end
      // a word must not be sent before the whole group is stored
      checks++;
      if (g == 0 && tx_valid) failures++;
      in_valid = 1;
      deliver_cyc[g] = cyc;
      @(negedge clk);
      in_valid = 0;
      if (g == 1) pause = 6000;
      repeat (1300) @(negedge clk);
    end
    while (expq.size() != 0) @(negedge clk);
    checks += 2;
    if (n_xfer != NGROUPS) begin failures++; $display("%0d transfers", n_xfer); end
    if (room_low == 0) begin failures++; $display("room never dropped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
