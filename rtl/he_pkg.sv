// he_pkg: sizes, types and arithmetic shared by the Karatsuba encryption accelerator.
//
// The accelerator multiplies one public-key polynomial by four binary polynomials
// (four encryptions at once). The host splits each degree-2559 input polynomial with six
// Karatsuba recursions into 729 sub-polynomials of 40 coefficients; the hardware performs
// recursions 7 to 9 (40 -> 20 -> 10 -> 5 coefficients), multiplies the 27 resulting
// 5-coefficient pairs with the schoolbook method, reduces every coefficient modulo q,
// and recombines five post-recursions so that nine consecutive input sub-polynomials give
// one 319-coefficient product per encryption.
//
// Public-key coefficients travel as five 27-bit chunks (135 bits); binary coefficients
// arrive with 7 bits and grow to 10 bits after three pre-recursions. These numbers follow
// the document. The modulus q is not given there: Q_DEFAULT is this design's choice
// (2^125 - 159); any q with 2^124 <= q < 2^125 works with mod_reduce below.
package he_pkg;

  localparam int CHUNK_W      = 27;                  // public-key chunk width
  localparam int N_CHUNKS     = 5;                   // chunks per public-key coefficient
  localparam int PK_W         = CHUNK_W * N_CHUNKS;  // 135-bit container
  localparam int BIN_IN_W     = 7;                   // binary coefficient width on the link
  localparam int BIN_W        = 10;                  // binary width after three pre-recursions
  localparam int N_ENC        = 4;                   // parallel encryptions
  localparam int N_IN         = 40;                  // coefficients per input sub-polynomial
  localparam int N_SUBPOLY    = 27;                  // 3^3 sub-polynomials per input
  localparam int N_SUB        = 5;                   // coefficients per sub-polynomial (40/2^3)
  localparam int N_PROD       = 2 * N_SUB - 1;       // 9 coefficients per sub-product
  localparam int N_LANES      = 4;                   // polynomial-multiplier lanes
  localparam int N_GROUP      = 9;                   // input sub-polynomials per output polynomial
  localparam int N_OUT        = 319;                 // coefficients per output polynomial
  localparam int Q_W          = 125;                 // width of a reduced coefficient
  localparam int PROD_W       = BIN_W + PK_W;        // 145-bit integer product
  localparam int BURST_W      = 128;                 // RIFFA stream width
  localparam int BURSTS_PER_COEF = N_CHUNKS;         // one chunk per burst

  localparam logic [Q_W-1:0] Q_DEFAULT = {{(Q_W-8){1'b1}}, 8'h61}; // 2^125 - 159

  typedef logic [Q_W-1:0]   coef_t;   // a coefficient reduced modulo q
  typedef logic [PK_W-1:0]  pk_t;     // a public-key coefficient in five chunks
  typedef logic [BIN_W-1:0] bin_t;    // a binary-polynomial coefficient

  function automatic coef_t mod_add(input coef_t a, input coef_t b, input coef_t q);
    logic [Q_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (s >= {1'b0, q}) s = s - {1'b0, q};
    return s[Q_W-1:0];
  endfunction

  function automatic coef_t mod_sub(input coef_t a, input coef_t b, input coef_t q);
    logic [Q_W:0] s;
    s = {1'b0, a} - {1'b0, b};
    if (a < b) s = s + {1'b0, q};
    return s[Q_W-1:0];
  endfunction

  // Restoring reduction of a 145-bit product: subtract q*2^k for k = 20 .. 0 when it fits.
  // Valid for q >= 2^124, since then q*2^21 >= 2^145 exceeds every input.
  function automatic coef_t mod_reduce(input logic [PROD_W-1:0] x, input coef_t q);
    logic [PROD_W-1:0] r;
    logic [PROD_W-1:0] qs;
    r = x;
    for (int k = PROD_W - Q_W; k >= 0; k--) begin
      qs = {{(PROD_W-Q_W){1'b0}}, q} << k;
      if (r >= qs) r = r - qs;
    end
    return r[Q_W-1:0];
  endfunction

endpackage
