// tb_karatsuba_accel_full: end-to-end test of karatsuba_accel at its default parameters, one complete operation:
// all 729 input sub-polynomials of one public-key polynomial times four binary polynomials,
// sent at one burst per cycle, with the transmit side always ready.
//
// The testbench plays the host. For each group it draws a random 160-coefficient public-key
// polynomial A (values below 2^129) and four binary-lane polynomials U[e] (values below 32),
// performs the two host-side Karatsuba recursions (halves of 80 and 40 coefficients; low,
// high, sum; depth-first) to get nine 40-coefficient input sub-polynomials, and streams them
// in the burst format: for every coefficient, five bursts, burst k holding chunk k of the
// public-key coefficient in [26:0] and the coefficient of U[k] in [33:27]. Every output word
// is compared with the schoolbook product A*U[e] modulo q, computed here directly.
// It counts how often each mechanism of the design occurred: three-lane rounds, complete
// uploads and waiting for a complete upload. It also checks the rate: the input is taken
// without a single stall, 145,800 bursts in 145,800 cycles.
module tb_karatsuba_accel_full;
  import he_pkg::*;
  localparam int NGROUPS = 81;
  localparam int NB_GROUP = N_GROUP * N_IN * BURSTS_PER_COEF;   // 1800 bursts
  localparam int WATCHDOG = 400000;

  logic clk = 0, rst_n = 0;
  logic [BURST_W-1:0] rx_data, tx_data;
  logic rx_valid, rx_ready, tx_valid, tx_ready;
  logic [255:0] A [NGROUPS][160];
  logic [6:0]   U [NGROUPS][N_ENC][160];
  logic [255:0] Qw;
  int checks = 0, failures = 0, cyc = 0;
  int n_burst = 0, n_word = 0, first_cyc = -1, last_cyc = 0;
  int m_rx_stall = 0, m_partial = 0, m_xfer = 0, m_wait = 0, m_tx_stall = 0, m_room = 0;
  coef_t expw [N_ENC*N_OUT];

  karatsuba_accel dut (.clk, .rst_n, .rx_data, .rx_valid, .rx_ready,
                               .tx_data, .tx_valid, .tx_ready);

  always #2 clk = !clk;
  always @(negedge clk) cyc++;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog: %0d bursts in, %0d words out", n_burst, n_word);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // coefficient i of host sub-polynomial s (two base-3 digits) of polynomial P
  function automatic logic [255:0] host_sub(input logic [255:0] P [160], input int s,
                                            input int i);
    logic [255:0] r;
    int dx, dy;
    dx = s / 3; dy = s % 3;
    r = 0;
    for (int hx = 0; hx < 2; hx++) if (dx == 2 || dx == hx)
      for (int hy = 0; hy < 2; hy++) if (dy == 2 || dy == hy)
        r += P[i + 80*hx + 40*hy];
    return r;
  endfunction

  function automatic logic [BURST_W-1:0] burst(input int n);
    int g, s, i, k, e;
    logic [255:0] a, u;
    logic [255:0] Ue [160];
    g = n / NB_GROUP; n = n % NB_GROUP;
    s = n / (N_IN * BURSTS_PER_COEF); n = n % (N_IN * BURSTS_PER_COEF);
    i = n / BURSTS_PER_COEF; k = n % BURSTS_PER_COEF;
    a = host_sub(A[g], s, i);
    burst = {$urandom, $urandom, $urandom, $urandom};   // unused bits carry noise
    burst[26:0] = a[27*k +: 27];
    if (k < N_ENC) begin
      for (int j = 0; j < 160; j++) Ue[j] = 256'(U[g][k][j]);
      u = host_sub(Ue, s, i);
      burst[33:27] = u[6:0];
    end
  endfunction

  task automatic expect_group(input int g);
    for (int e = 0; e < N_ENC; e++)
      for (int c = 0; c < N_OUT; c++) begin
        logic [255:0] s;
        s = 0;
        for (int i = 0; i < 160; i++)
          if (c - i >= 0 && c - i < 160) s += A[g][i] * 256'(U[g][e][c-i]);
        expw[e*N_OUT + c] = coef_t'(s % Qw);
      end
  endtask

  // host: sends bursts
  always @(negedge clk) begin
    if (!rst_n || n_burst >= NGROUPS*NB_GROUP) rx_valid <= 1'b0;
    else begin
      rx_valid <= 1'b1;
      rx_data  <= burst(n_burst);
    end
    tx_ready <= 1'b1;
  end

  always @(posedge clk) if (rst_n) begin
    if (rx_valid && rx_ready) begin
      if (first_cyc < 0) first_cyc = cyc;
      last_cyc = cyc;
      n_burst++;
    end
    if (rx_valid && !rx_ready) m_rx_stall++;
    if (dut.issue_fire && dut.lane_valid != '1) m_partial++;
    if (dut.u_buffer.xfer_start) m_xfer++;
    if (!tx_valid && dut.u_buffer.count != 0) m_wait++;
    if (tx_valid && !tx_ready) m_tx_stall++;
    if (!dut.room) m_room++;
    if (tx_valid && tx_ready) begin
      int g, w;
      g = n_word / (N_ENC*N_OUT); w = n_word % (N_ENC*N_OUT);
      if (w == 0) expect_group(g);
      checks++;
      if (tx_data != BURST_W'(expw[w])) begin
        failures++;
        if (failures < 6)
          $display("group %0d enc %0d coef %0d: got %h exp %h", g, w / N_OUT, w % N_OUT,
                   tx_data, expw[w]);
      end
      n_word++;
    end
  end

  initial begin
    Qw = 256'(Q_DEFAULT);
    for (int g = 0; g < NGROUPS; g++)
      for (int i = 0; i < 160; i++) begin
        A[g][i] = {1'b0, $urandom, $urandom, $urandom, $urandom};
        for (int e = 0; e < N_ENC; e++) U[g][e][i] = 7'($urandom % 32);
      end
    // extreme values in the first group: largest inputs the format carries
    for (int i = 0; i < 160; i++) begin
      A[0][i] = (i % 7 == 0) ? {127'b0, {129{1'b1}}} : A[0][i];
      for (int e = 0; e < N_ENC; e++) U[0][e][i] = (i % 5 == 0) ? 7'd31 : U[0][e][i];
    end
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (n_word == NGROUPS * N_ENC * N_OUT);
    repeat (20) @(posedge clk);
    checks++;
    if (tx_valid) begin failures++; $display("extra output words"); end
    $display("input: %0d bursts in %0d cycles", n_burst, last_cyc - first_cyc + 1);
    $display("mechanisms: rx_stall=%0d partial_round=%0d transfers=%0d buffer_wait=%0d tx_stall=%0d room_low=%0d",
             m_rx_stall, m_partial, m_xfer, m_wait, m_tx_stall, m_room);
    checks++;
    if (m_xfer != NGROUPS) failures++;
    checks++;
    if (m_partial != NGROUPS * N_GROUP) failures++;
    checks++;
    if (m_wait == 0) failures++;
    checks += 2;
    if (m_rx_stall != 0) failures++;
    if (last_cyc - first_cyc + 1 != NGROUPS * NB_GROUP) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
