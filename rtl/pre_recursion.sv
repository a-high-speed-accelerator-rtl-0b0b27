// pre_recursion: one Karatsuba pre-computation unit (one recursion level).
//
// For each of P input polynomials A with N coefficients it produces, as in the document,
// three polynomials of N/2 coefficients: A_L (low half), A_H (high half) and A_L + A_H.
// Output polynomial 3p+0 is A_L, 3p+1 is A_H and 3p+2 is A_L + A_H of input p, so the
// order is the depth-first order of the Karatsuba tree that the post-computation expects.
// Coefficients sit in W-bit containers; the addition is done chunk by chunk (CW-bit chunks)
// with the carry passed from chunk to chunk, which is the document's five-step 27-bit
// addition for the public-key lane (W = 135, CW = 27) and a plain add for the binary lane
// (W = CW = 10). All chunks are added in the same cycle here, a choice of this design.
//
// Timing: one register stage with a valid/ready handshake; a result is valid the cycle
// after its input is accepted, and a new input is accepted every cycle unless the output
// is held by out_ready low.
module pre_recursion
  import he_pkg::*;
#(
  parameter int N  = 40,   // coefficients per input polynomial
  parameter int P  = 1,    // polynomials processed side by side
  parameter int W  = PK_W, // container width
  parameter int CW = CHUNK_W
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [P-1:0][N-1:0][W-1:0]      in_poly,
  input  logic                            in_valid,
  output logic                            in_ready,
  output logic [3*P-1:0][N/2-1:0][W-1:0]  out_poly,
  output logic                            out_valid,
  input  logic                            out_ready
);

  logic [3*P-1:0][N/2-1:0][W-1:0] split;

  // Chunk-wise addition: CW-bit steps, the carry of each chunk going into the next.
  function automatic logic [W-1:0] chunk_add(input logic [W-1:0] a, input logic [W-1:0] b);
    logic [W-1:0] s;
    logic         c;
    s = '0;
    c = 1'b0;
    for (int k = 0; k < W / CW; k++) begin
      logic [CW:0] t;
      t = {1'b0, a[k*CW +: CW]} + {1'b0, b[k*CW +: CW]} + {{CW{1'b0}}, c};
      s[k*CW +: CW] = t[CW-1:0];
      c = t[CW];
    end
    return s;
  endfunction

  always_comb begin
    for (int p = 0; p < P; p++)
      for (int i = 0; i < N/2; i++) begin
        split[3*p + 0][i] = in_poly[p][i];
        split[3*p + 1][i] = in_poly[p][i + N/2];
        split[3*p + 2][i] = chunk_add(in_poly[p][i], in_poly[p][i + N/2]);
      end
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) out_poly <= split;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        out_valid <= 1'b0;
    else if (in_ready) out_valid <= in_valid;
  end

endmodule
