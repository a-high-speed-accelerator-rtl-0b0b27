// poly_multiplier: schoolbook product of one 5-coefficient public-key sub-polynomial B with
// four 5-coefficient binary sub-polynomials A[0..3], coefficients reduced modulo q.
//
// As in the document the unit is a pre-crossbar, five 4 x {10 x 135-bit} integer
// multipliers and one reconstruction per encryption. The pre-crossbar carries out the
// convolution schedule: in step s (0..4) multiplier u (0..4) receives b[u] and the four
// coefficients a[0..3][s], so its four results belong to product coefficient u + s. The
// reconstruction adds them modulo q into nine accumulators per encryption; after the fifth
// step the four 9-coefficient products are presented on prod with a one-cycle done pulse.
// Which pairs meet in which step is this design's choice.
//
// Timing: start is taken when ready is high, that is when no step is pending and the
// integer multipliers can take a new operand on the next edge. Step 0 therefore always
// issues on the edge after the start, and done is set by the 29th edge after the start
// edge for every product; back-to-back products complete every 26 cycles. The fixed
// latency keeps the four lanes of a round in step, which the post-crossbar relies on.
// prod holds its value until the next done.
module poly_multiplier
  import he_pkg::*;
#(
  parameter coef_t Q = Q_DEFAULT
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   start,
  output logic                                   ready,
  input  logic [N_SUB-1:0][PK_W-1:0]             b,
  input  logic [N_ENC-1:0][N_SUB-1:0][BIN_W-1:0] a,
  output logic                                   done,
  output coef_t [N_ENC-1:0][N_PROD-1:0]          prod
);

  logic [N_SUB-1:0][PK_W-1:0]             b_q;
  logic [N_ENC-1:0][N_SUB-1:0][BIN_W-1:0] a_q;
  logic                                   issuing;
  logic [2:0]                             step;
  logic [2:0]                             res_step;
  logic [N_SUB-1:0]                       u_ready, u_done;
  logic [N_ENC-1:0][BIN_W-1:0]            u_a;
  coef_t [N_SUB-1:0][N_ENC-1:0]           u_r;
  coef_t [N_ENC-1:0][N_PROD-1:0]          acc, acc_next;

  wire issue = issuing && u_ready[0];
  assign ready = !issuing && u_ready[0];

  // pre-crossbar: coefficient s of every binary polynomial goes to all five multipliers
  always_comb
    for (int e = 0; e < N_ENC; e++) u_a[e] = a_q[e][step];

  for (genvar u = 0; u < N_SUB; u++) begin : g_mul
    int_mul_4x10x135 #(.Q(Q)) u_imul (
      .clk, .rst_n, .start(issue), .ready(u_ready[u]),
      .a(u_a), .b(b_q[u]), .done(u_done[u]), .r(u_r[u]));
  end

  // reconstruction: results of step res_step land on coefficients u + res_step
  always_comb begin
    acc_next = (res_step == 0) ? '0 : acc;
    for (int u = 0; u < N_SUB; u++)
      for (int e = 0; e < N_ENC; e++)
        acc_next[e][u + int'(res_step)] = mod_add(acc_next[e][u + int'(res_step)], u_r[u][e], Q);
  end

  always_ff @(posedge clk) begin
    if (start && ready) begin
      b_q <= b;
      a_q <= a;
    end
    if (u_done[0]) acc <= acc_next;
    if (u_done[0] && res_step == 3'(N_SUB - 1)) prod <= acc_next;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing  <= 1'b0;
      step     <= '0;
      res_step <= '0;
      done     <= 1'b0;
    end else begin
      if (start && ready) begin
        issuing <= 1'b1;
        step    <= '0;
      end else if (issue) begin
        if (step == 3'(N_SUB - 1)) issuing <= 1'b0;
        else                       step    <= step + 1'b1;
      end
      if (u_done[0]) res_step <= (res_step == 3'(N_SUB - 1)) ? '0 : res_step + 1'b1;
      done <= u_done[0] && (res_step == 3'(N_SUB - 1));
    end
  end

endmodule
