// post_crossbar: gathers the products of the polynomial-multiplier lanes and hands them to
// the per-encryption post-computation units in Karatsuba order.
//
// The lanes of one round finish on the same edge (they start together and have a fixed
// latency). The crossbar stores the products of every lane that reports done and then
// emits them one per cycle, lowest lane first, which restores the order 4r + k of the
// sub-polynomials. Each emitted word carries the four encryptions' products of one
// sub-polynomial; output e feeds post-computation unit e. The reordering role is the
// document's; storing one round and serialising it is this design's choice.
//
// Timing: products captured on edge t appear on out_prod from cycle t+1, one lane per
// cycle. A new round may arrive only once the previous one has been emitted, which the
// 26-cycle spacing of multiplier rounds guarantees; an assertion checks it.
module post_crossbar
  import he_pkg::*;
#(
  parameter int LANES = N_LANES
) (
  input  logic                                        clk,
  input  logic                                        rst_n,
  input  logic [LANES-1:0]                            lane_done,
  input  coef_t [LANES-1:0][N_ENC-1:0][N_PROD-1:0]    lane_prod,
  output logic                                        out_valid,
  output coef_t [N_ENC-1:0][N_PROD-1:0]               out_prod
);

  coef_t [LANES-1:0][N_ENC-1:0][N_PROD-1:0] store;
  logic  [LANES-1:0]                        pending;
  logic  [$clog2(LANES)-1:0]                sel;

  always_comb begin
    sel = '0;
    for (int k = LANES - 1; k >= 0; k--)
      if (pending[k]) sel = k[$clog2(LANES)-1:0];
  end

  assign out_valid = |pending;
  assign out_prod  = store[sel];

  always_ff @(posedge clk) begin
    for (int k = 0; k < LANES; k++)
      if (lane_done[k]) store[k] <= lane_prod[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          pending <= '0;
    else if (|lane_done) pending <= lane_done;
    else if (out_valid)  pending[sel] <= 1'b0;
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 (|lane_done) |-> !(|pending))
    else $error("post_crossbar: new round before the previous one was emitted");

endmodule
