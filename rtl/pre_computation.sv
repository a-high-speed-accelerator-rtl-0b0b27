// pre_computation: the hardware Karatsuba pre-computation, recursions 7 to 9.
//
// Three pre_recursion units in cascade, one per recursion, as the document describes:
// the first splits the P0 input polynomials of N0 coefficients, the second splits each of
// its 3*P0 outputs, the third each of the 9*P0 outputs of the second. The result is
// 27*P0 sub-polynomials of N0/8 coefficients in depth-first Karatsuba order: for input p,
// output 27p + 9x + 3y + z where x, y, z are 0 (low half), 1 (high half) or 2 (sum).
// The design has two instances: the public-key lane (P0 = 1, 135-bit containers added in
// 27-bit chunks) and the binary lane (P0 = 4, one input per encryption, 10-bit values).
//
// Timing: three register stages with valid/ready; latency 3 cycles, one input per cycle.
module pre_computation
  import he_pkg::*;
#(
  parameter int N0 = N_IN,
  parameter int P0 = 1,
  parameter int W  = PK_W,
  parameter int CW = CHUNK_W
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [P0-1:0][N0-1:0][W-1:0]         in_poly,
  input  logic                                 in_valid,
  output logic                                 in_ready,
  output logic [27*P0-1:0][N0/8-1:0][W-1:0]    out_poly,
  output logic                                 out_valid,
  input  logic                                 out_ready
);

  logic [3*P0-1:0][N0/2-1:0][W-1:0] s1;
  logic [9*P0-1:0][N0/4-1:0][W-1:0] s2;
  logic v1, v2, r1, r2;

  pre_recursion #(.N(N0),   .P(P0),   .W(W), .CW(CW)) u_rec7 (
    .clk, .rst_n, .in_poly(in_poly), .in_valid(in_valid), .in_ready(in_ready),
    .out_poly(s1), .out_valid(v1), .out_ready(r1));

  pre_recursion #(.N(N0/2), .P(3*P0), .W(W), .CW(CW)) u_rec8 (
    .clk, .rst_n, .in_poly(s1), .in_valid(v1), .in_ready(r1),
    .out_poly(s2), .out_valid(v2), .out_ready(r2));

  pre_recursion #(.N(N0/4), .P(9*P0), .W(W), .CW(CW)) u_rec9 (
    .clk, .rst_n, .in_poly(s2), .in_valid(v2), .in_ready(r2),
    .out_poly(out_poly), .out_valid(out_valid), .out_ready(out_ready));

endmodule
