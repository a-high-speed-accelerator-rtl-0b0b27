// post_recursion: one Karatsuba post-computation (reconstruction) step, modulo q.
//
// It receives, one after another, the three products of a Karatsuba split of two
// 2N-coefficient polynomials, each with 2N-1 coefficients: LL = A_L*B_L, HH = A_H*B_H and
// MM = (A_L+A_H)*(B_L+B_H), in that order. After the third it forms the 4N-1-coefficient
// product LL + (MM - LL - HH) x^N + HH x^(2N), all coefficients modulo q. The formula is
// the document's; the modular arithmetic on every step is this design's choice.
//
// Timing: accepts one product per cycle on in_valid (no back-pressure needed); out_valid
// pulses for one cycle, on the edge after the third product, and out_prod holds until the
// next result.
module post_recursion
  import he_pkg::*;
#(
  parameter int    N = 5,
  parameter coef_t Q = Q_DEFAULT
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  coef_t [2*N-2:0]       in_prod,
  output logic                  out_valid,
  output coef_t [4*N-2:0]       out_prod
);

  coef_t [2*N-2:0] ll, hh;
  coef_t [4*N-2:0] comb;
  logic  [1:0]     cnt;

  always_comb begin
    comb = '0;
    for (int i = 0; i < 2*N-1; i++) begin
      comb[i]       = ll[i];
      comb[i + 2*N] = hh[i];
    end
    for (int i = 0; i < 2*N-1; i++)
      comb[i + N] = mod_add(comb[i + N],
                            mod_sub(mod_sub(in_prod[i], ll[i], Q), hh[i], Q), Q);
  end

  always_ff @(posedge clk) begin
    if (in_valid && cnt == 2'd0) ll <= in_prod;
    if (in_valid && cnt == 2'd1) hh <= in_prod;
    if (in_valid && cnt == 2'd2) out_prod <= comb;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
    end else begin
      if (in_valid) cnt <= (cnt == 2'd2) ? 2'd0 : cnt + 1'b1;
      out_valid <= in_valid && (cnt == 2'd2);
    end
  end

endmodule
