// karatsuba_accel: FPGA side of a hardware/software Karatsuba multiplier for the
// encryption step of the FV homomorphic scheme, computing P_key[i] * U for four binary
// polynomials U at once (four encryptions).
//
// The host performs six Karatsuba recursions on the 2560-coefficient operands and streams
// 729 sub-polynomials of 40 coefficients over a 128-bit link (RIFFA over PCI-E in the
// document), five bursts per coefficient index. The datapath here:
//   packager        -> collects one sub-polynomial (public key + four binary polynomials)
//   pre_computation -> recursions 7..9, one instance per lane type: 27 sub-polynomials of
//                      5 coefficients (public key in 27-bit chunks, binary in 10 bits)
//   pre_crossbar    -> one per lane type, issues the 27 pairs to 4 multiplier lanes
//   poly_multiplier -> x4, schoolbook 5x5 products for 4 encryptions, reduced modulo q
//   post_crossbar   -> restores Karatsuba order
//   post_computation-> x4 (one per encryption), recursions 9..5: nine consecutive inputs
//                      give one 319-coefficient product
//   out_buffer      -> holds results and uploads them in complete transfers
// The block structure, widths and counts follow the document; handshakes, schedules, the
// modulus and the buffer sizes are this design's choices (see each module).
//
// Interface: rx_* is the receive stream (burst format in packager), tx_* the transmit
// stream: per group of nine inputs, 319 words for each of the four encryptions in turn,
// each word a coefficient modulo q in bits [124:0].
// Timing: the datapath accepts one burst per cycle without stalls as long as the transmit
// side drains (one input sub-polynomial per 200 cycles, 729 in 145,800 cycles).
module karatsuba_accel
  import he_pkg::*;
#(
  parameter coef_t Q          = Q_DEFAULT,
  parameter int    BUF_DEPTH  = 65536,
  parameter int    XFER_WORDS = N_ENC * N_OUT
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [BURST_W-1:0]  rx_data,
  input  logic                rx_valid,
  output logic                rx_ready,
  output logic [BURST_W-1:0]  tx_data,
  output logic                tx_valid,
  input  logic                tx_ready
);

  localparam int PK_ELEM  = N_SUB * PK_W;          // 675 bits per public-key sub-polynomial
  localparam int BIN_ELEM = N_ENC * N_SUB * BIN_W;  // 200 bits per binary sub-polynomial set

  // ---------------- packager ----------------
  logic [N_IN-1:0][PK_W-1:0]             pk_in;
  logic [N_ENC-1:0][N_IN-1:0][BIN_W-1:0] bin_in;
  logic                                  pkg_valid, pre_ready, pre_pk_ready, pre_bin_ready;

  packager u_packager (
    .clk, .rst_n, .rx_data, .rx_valid, .rx_ready,
    .out_pk(pk_in), .out_bin(bin_in), .out_valid(pkg_valid), .out_ready(pre_ready));

  assign pre_ready = pre_pk_ready && pre_bin_ready;

  // ---------------- pre-computation 7 to 9 ----------------
  logic [N_SUBPOLY-1:0][N_SUB-1:0][PK_W-1:0]         pk_sub;
  logic [N_ENC*N_SUBPOLY-1:0][N_SUB-1:0][BIN_W-1:0]  bin_sub;
  logic pk_sub_valid, bin_sub_valid, xbar_ready, xbar_pk_ready, xbar_bin_ready;

  pre_computation #(.N0(N_IN), .P0(1), .W(PK_W), .CW(CHUNK_W)) u_pre_pk (
    .clk, .rst_n, .in_poly(pk_in), .in_valid(pkg_valid && pre_ready), .in_ready(pre_pk_ready),
    .out_poly(pk_sub), .out_valid(pk_sub_valid), .out_ready(xbar_ready));

  pre_computation #(.N0(N_IN), .P0(N_ENC), .W(BIN_W), .CW(BIN_W)) u_pre_bin (
    .clk, .rst_n, .in_poly(bin_in), .in_valid(pkg_valid && pre_ready), .in_ready(pre_bin_ready),
    .out_poly(bin_sub), .out_valid(bin_sub_valid), .out_ready(xbar_ready));

  assign xbar_ready = xbar_pk_ready && xbar_bin_ready;

  // ---------------- pre-crossbars ----------------
  logic [N_SUBPOLY-1:0][PK_ELEM-1:0]  pk_xin;
  logic [N_SUBPOLY-1:0][BIN_ELEM-1:0] bin_xin;
  logic [N_LANES-1:0][PK_ELEM-1:0]    pk_lane;
  logic [N_LANES-1:0][BIN_ELEM-1:0]   bin_lane;
  logic [N_LANES-1:0]                 lane_valid, lane_valid_bin;
  logic issue_valid, issue_valid_bin, issue_last, issue_last_bin, issue_ready, room;
  logic [N_LANES-1:0]                 mul_ready;

  always_comb
    for (int s = 0; s < N_SUBPOLY; s++) begin
      pk_xin[s] = pk_sub[s];
      for (int e = 0; e < N_ENC; e++)
        bin_xin[s][e*N_SUB*BIN_W +: N_SUB*BIN_W] = bin_sub[e*N_SUBPOLY + s];
    end

  wire xbar_load = pk_sub_valid && bin_sub_valid && xbar_ready;

  pre_crossbar #(.ELEM_W(PK_ELEM), .NSUB(N_SUBPOLY), .LANES(N_LANES)) u_xbar_pk (
    .clk, .rst_n, .in_sub(pk_xin), .in_valid(xbar_load), .in_ready(xbar_pk_ready),
    .lane_data(pk_lane), .lane_valid(lane_valid), .issue_valid(issue_valid),
    .issue_last(issue_last), .issue_ready(issue_ready));

  pre_crossbar #(.ELEM_W(BIN_ELEM), .NSUB(N_SUBPOLY), .LANES(N_LANES)) u_xbar_bin (
    .clk, .rst_n, .in_sub(bin_xin), .in_valid(xbar_load), .in_ready(xbar_bin_ready),
    .lane_data(bin_lane), .lane_valid(lane_valid_bin), .issue_valid(issue_valid_bin),
    .issue_last(issue_last_bin), .issue_ready(issue_ready));

  assign issue_ready = (&mul_ready) && room;
  wire   issue_fire  = issue_valid && issue_valid_bin && issue_ready;

  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
      issue_valid == issue_valid_bin && lane_valid == lane_valid_bin &&
      issue_last == issue_last_bin)
    else $error("karatsuba_accel: the two pre-crossbars are out of step");

  // ---------------- polynomial multipliers ----------------
  logic  [N_LANES-1:0]                         mul_done;
  coef_t [N_LANES-1:0][N_ENC-1:0][N_PROD-1:0]  mul_prod;

  for (genvar k = 0; k < N_LANES; k++) begin : g_lane
    poly_multiplier #(.Q(Q)) u_pmul (
      .clk, .rst_n, .start(issue_fire && lane_valid[k]), .ready(mul_ready[k]),
      .b(pk_lane[k]), .a(bin_lane[k]), .done(mul_done[k]), .prod(mul_prod[k]));
  end

  // ---------------- post-crossbar + post-computation 1 to 5 ----------------
  logic                          pc_valid;
  coef_t [N_ENC-1:0][N_PROD-1:0] pc_prod;
  logic  [N_ENC-1:0]             post_valid;
  coef_t [N_ENC-1:0][N_OUT-1:0]  post_prod;

  post_crossbar #(.LANES(N_LANES)) u_post_xbar (
    .clk, .rst_n, .lane_done(mul_done), .lane_prod(mul_prod),
    .out_valid(pc_valid), .out_prod(pc_prod));

  for (genvar e = 0; e < N_ENC; e++) begin : g_enc
    post_computation #(.Q(Q)) u_post (
      .clk, .rst_n, .in_valid(pc_valid), .in_prod(pc_prod[e]),
      .out_valid(post_valid[e]), .out_prod(post_prod[e]));
  end

  // ---------------- output buffer ----------------
  out_buffer #(.DEPTH(BUF_DEPTH), .XFER_WORDS(XFER_WORDS)) u_buffer (
    .clk, .rst_n, .in_valid(post_valid[0]), .in_poly(post_prod), .room,
    .tx_data, .tx_valid, .tx_ready, .xfer_start());

  a_enc_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
      post_valid == '0 || post_valid == '1)
    else $error("karatsuba_accel: post-computation units out of step");

endmodule
