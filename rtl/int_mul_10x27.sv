// int_mul_10x27: the elementary integer multiplier of the design, a 10-bit binary-lane
// coefficient times one 27-bit public-key chunk, giving a 37-bit partial product.
// The 10 x 27 size is the document's; the single output register is this design's choice.
// Timing: p is valid the cycle after en is high with the operands.
module int_mul_10x27
  import he_pkg::*;
(
  input  logic                    clk,
  input  logic                    en,
  input  logic [BIN_W-1:0]        a,
  input  logic [CHUNK_W-1:0]      b,
  output logic [BIN_W+CHUNK_W-1:0] p
);

  always_ff @(posedge clk) begin
    if (en) p <= (BIN_W+CHUNK_W)'(a) * (BIN_W+CHUNK_W)'(b);
  end

endmodule
