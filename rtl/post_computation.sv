// post_computation: hardware Karatsuba post-computation, recursions 9 down to 5, for one
// encryption.
//
// Five post_recursion units in cascade, one per recursion level (N = 5, 10, 20, 40, 80).
// The products of the 27 sub-polynomials of one input (9 coefficients each) become one
// 79-coefficient product after three levels; the last two levels, which the document adds
// in hardware to save link bandwidth, combine nine consecutive inputs into one
// 319-coefficient product. Inputs must arrive in depth-first Karatsuba order (low, high,
// sum), which the pre-computation and the crossbars preserve. Each level keeps only the
// products it still needs, so the storage is small.
//
// Timing: one product per cycle at most; out_valid pulses one cycle after the product that
// completes the tree (243rd product of a group) has passed all five levels (5 cycles).
module post_computation
  import he_pkg::*;
#(
  parameter coef_t Q = Q_DEFAULT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  coef_t [N_PROD-1:0]   in_prod,
  output logic                 out_valid,
  output coef_t [N_OUT-1:0]    out_prod
);

  logic            v9, v8, v7, v6;
  coef_t [18:0]    p9;
  coef_t [38:0]    p8;
  coef_t [78:0]    p7;
  coef_t [158:0]   p6;

  post_recursion #(.N(5),  .Q(Q)) u_rec9 (.clk, .rst_n, .in_valid(in_valid), .in_prod(in_prod),
                                          .out_valid(v9), .out_prod(p9));
  post_recursion #(.N(10), .Q(Q)) u_rec8 (.clk, .rst_n, .in_valid(v9), .in_prod(p9),
                                          .out_valid(v8), .out_prod(p8));
  post_recursion #(.N(20), .Q(Q)) u_rec7 (.clk, .rst_n, .in_valid(v8), .in_prod(p8),
                                          .out_valid(v7), .out_prod(p7));
  post_recursion #(.N(40), .Q(Q)) u_rec6 (.clk, .rst_n, .in_valid(v7), .in_prod(p7),
                                          .out_valid(v6), .out_prod(p6));
  post_recursion #(.N(80), .Q(Q)) u_rec5 (.clk, .rst_n, .in_valid(v6), .in_prod(p6),
                                          .out_valid(out_valid), .out_prod(out_prod));

endmodule
