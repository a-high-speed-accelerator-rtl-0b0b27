// packager: input side of the link between the 128-bit RIFFA receive stream and the
// Karatsuba datapath.
//
// Every coefficient index of a 40-coefficient input sub-polynomial arrives as five
// consecutive bursts. Burst k carries chunk k (27 bits, least significant chunk first) of
// the public-key coefficient in bits [26:0] and, for k = 0..3, the 7-bit coefficient of
// binary polynomial k in bits [33:27]; the binary slot of the fifth burst and bits
// [127:34] are unused. The five-bursts-per-coefficient layout, the 27- and 7-bit slot
// widths and the four used binary slots follow the document; the bit positions inside the
// burst are this design's choice.
//
// Two sub-polynomial buffers are used in ping-pong fashion, so one sub-polynomial can be
// received while the previous one waits for the datapath: the datapath always gets a
// complete sub-polynomial in one transfer. rx_ready drops only when both buffers are full.
// Handshakes are valid/ready; a word moves on a clock edge with valid and ready both high.
// Timing: out_valid rises on the edge that stores the 200th burst of a sub-polynomial.
module packager
  import he_pkg::*;
(
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic [BURST_W-1:0]                    rx_data,
  input  logic                                  rx_valid,
  output logic                                  rx_ready,
  output logic [N_IN-1:0][PK_W-1:0]             out_pk,   // public-key sub-polynomial
  output logic [N_ENC-1:0][N_IN-1:0][BIN_W-1:0] out_bin,  // four binary sub-polynomials
  output logic                                  out_valid,
  input  logic                                  out_ready
);

  logic [N_IN-1:0][PK_W-1:0]                 pk_buf  [2];
  logic [N_ENC-1:0][N_IN-1:0][BIN_IN_W-1:0]  bin_buf [2];
  logic [1:0]                                full;
  logic                                      wsel, rsel;
  logic [$clog2(N_IN)-1:0]                   coef_idx;
  logic [$clog2(BURSTS_PER_COEF)-1:0]        burst_idx;

  assign rx_ready  = !full[wsel];
  assign out_valid = full[rsel];

  always_comb begin
    out_pk = pk_buf[rsel];
    for (int e = 0; e < N_ENC; e++)
      for (int i = 0; i < N_IN; i++)
        out_bin[e][i] = BIN_W'(bin_buf[rsel][e][i]);
  end

  wire last_burst = (int'(burst_idx) == BURSTS_PER_COEF - 1) && (int'(coef_idx) == N_IN - 1);

  always_ff @(posedge clk) begin
    if (rx_valid && rx_ready) begin
      pk_buf[wsel][coef_idx][burst_idx*CHUNK_W +: CHUNK_W] <= rx_data[CHUNK_W-1:0];
      if (int'(burst_idx) < N_ENC)
        bin_buf[wsel][burst_idx][coef_idx] <= rx_data[CHUNK_W +: BIN_IN_W];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full      <= '0;
      wsel      <= 1'b0;
      rsel      <= 1'b0;
      coef_idx  <= '0;
      burst_idx <= '0;
    end else begin
      if (out_valid && out_ready) begin
        full[rsel] <= 1'b0;
        rsel       <= !rsel;
      end
      if (rx_valid && rx_ready) begin
        if (int'(burst_idx) == BURSTS_PER_COEF - 1) begin
          burst_idx <= '0;
          coef_idx  <= (int'(coef_idx) == N_IN - 1) ? '0 : coef_idx + 1'b1;
        end else begin
          burst_idx <= burst_idx + 1'b1;
        end
        if (last_burst) begin
          full[wsel] <= 1'b1;
          wsel       <= !wsel;
        end
      end
    end
  end

endmodule
