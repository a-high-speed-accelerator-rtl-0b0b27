// pre_crossbar: schedules the sub-polynomials of one input onto the multiplier lanes.
//
// After three pre-recursions one input sub-polynomial has become NSUB = 27 sub-polynomials,
// more than the LANES = 4 polynomial multipliers can take at once. The crossbar stores the
// whole set and issues it in rounds: in round r, lane k receives sub-polynomial 4r + k,
// with lane_valid[k] low where 4r + k >= 27 (the seventh round uses three lanes). That a
// crossbar narrows the recursion outputs to four lanes is the document's; this round-robin
// schedule is this design's own. One instance serves the public-key lane and one the binary
// lane; they receive identical handshakes and so issue in step.
//
// Timing: in_ready is high while no set is stored. A round is issued on each edge with
// issue_valid and issue_ready high; the set is released with the last round.
module pre_crossbar #(
  parameter int ELEM_W = 675,  // bits of one sub-polynomial payload
  parameter int NSUB   = 27,
  parameter int LANES  = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NSUB-1:0][ELEM_W-1:0]   in_sub,
  input  logic                          in_valid,
  output logic                          in_ready,
  output logic [LANES-1:0][ELEM_W-1:0]  lane_data,
  output logic [LANES-1:0]              lane_valid,
  output logic                          issue_valid,
  output logic                          issue_last,
  input  logic                          issue_ready
);

  localparam int ROUNDS = (NSUB + LANES - 1) / LANES;

  logic [NSUB-1:0][ELEM_W-1:0] store;
  logic                        full;
  logic [$clog2(ROUNDS+1)-1:0] round;

  assign in_ready    = !full;
  assign issue_valid = full;
  assign issue_last  = (int'(round) == ROUNDS - 1);

  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      int idx;
      idx = int'(round) * LANES + k;
      lane_valid[k] = full && (idx < NSUB);
      lane_data[k]  = (idx < NSUB) ? store[idx] : '0;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) store <= in_sub;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full  <= 1'b0;
      round <= '0;
    end else if (in_valid && in_ready) begin
      full  <= 1'b1;
      round <= '0;
    end else if (issue_valid && issue_ready) begin
      if (issue_last) full <= 1'b0;
      round <= issue_last ? '0 : round + 1'b1;
    end
  end

endmodule
