// int_mul_4x10x135: four 10 x 135-bit integer multiplications in parallel, one per
// encryption, each followed by reduction modulo q.
//
// One 135-bit public-key coefficient b is multiplied by the four 10-bit binary coefficients
// a[0..3]. As in the document the unit has a pre-crossbar that sends a[j] to lane j, four
// 10 x 27-bit multipliers that walk through the five chunks of b, one chunk per cycle, and
// a reconstruction stage that adds the shifted partial products and reduces the 145-bit
// result modulo q. The document's schedule figure starts lane j one cycle after lane j-1,
// following the burst order of the link; here all four lanes start together, since the
// operands are already complete. Restoring reduction (mod_reduce) is this design's choice.
//
// Timing: start is accepted when ready is high; ready is high when idle and in the last
// chunk cycle, so back-to-back products are taken every 5 cycles. done pulses with r valid
// 7 cycles after the start edge, in start order.
module int_mul_4x10x135
  import he_pkg::*;
#(
  parameter coef_t Q = Q_DEFAULT
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  output logic                        ready,
  input  logic [N_ENC-1:0][BIN_W-1:0] a,
  input  logic [PK_W-1:0]             b,
  output logic                        done,
  output coef_t [N_ENC-1:0]           r
);

  localparam int PP_W = BIN_W + CHUNK_W;

  logic [N_ENC-1:0][BIN_W-1:0]    a_q;
  logic [PK_W-1:0]                b_q;
  logic                           busy;
  logic [2:0]                     cnt;
  logic                           m_valid;
  logic [2:0]                     m_cnt;
  logic [N_ENC-1:0][PP_W-1:0]     pp;
  logic [N_ENC-1:0][PROD_W-1:0]   acc;
  logic                           acc_done;

  assign ready = !busy || (cnt == 3'(N_CHUNKS - 1));

  // pre-crossbar: binary coefficient j to lane j, current chunk of b to every lane
  for (genvar j = 0; j < N_ENC; j++) begin : g_lane
    int_mul_10x27 u_mul (
      .clk, .en(busy), .a(a_q[j]), .b(b_q[int'(cnt)*CHUNK_W +: CHUNK_W]), .p(pp[j]));
  end

  always_ff @(posedge clk) begin
    if (start && ready) begin
      a_q <= a;
      b_q <= b;
    end
    // reconstruction: add the partial product at its chunk position
    if (m_valid)
      for (int j = 0; j < N_ENC; j++)
        acc[j] <= ((m_cnt == 0) ? '0 : acc[j]) + (PROD_W'(pp[j]) << (int'(m_cnt) * CHUNK_W));
    // modular reduction of the finished products
    if (acc_done)
      for (int j = 0; j < N_ENC; j++)
        r[j] <= mod_reduce(acc[j], Q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      cnt      <= '0;
      m_valid  <= 1'b0;
      m_cnt    <= '0;
      acc_done <= 1'b0;
      done     <= 1'b0;
    end else begin
      if (start && ready) begin
        busy <= 1'b1;
        cnt  <= '0;
      end else if (busy) begin
        if (cnt == 3'(N_CHUNKS - 1)) busy <= 1'b0;
        else                         cnt  <= cnt + 1'b1;
      end
      m_valid  <= busy;
      m_cnt    <= cnt;
      acc_done <= m_valid && (m_cnt == 3'(N_CHUNKS - 1));
      done     <= acc_done;
    end
  end

endmodule
