// out_buffer: the output-stream buffer between the post-computation units and the
// 128-bit RIFFA transmit stream.
//
// When the four post-computation units deliver their 319-coefficient products, the buffer
// copies them into a holding register and writes them into a FIFO one coefficient per
// cycle: all of encryption 0, then encryption 1, 2 and 3 (1276 words per group). Each
// 125-bit coefficient fills one 128-bit word, zero-extended. The upload side starts a
// transfer only when XFER_WORDS words are stored, then sends them as one uninterrupted
// transfer, so the link sees long bursts although the datapath produces in spurts. That the
// buffer stores results until a complete transfer can be made, and that it is the large
// memory of the design, is the document's; the word format, the transfer length (one group)
// and the depth (65536 words, about the 8.4 Mbit the document reports for the interface)
// are this design's choices.
//
// room tells the upstream scheduler that two more groups still fit (one may be in flight);
// the top stops issuing multiplications without it, which back-pressures the input.
// Timing: tx_valid stays high for the XFER_WORDS words of a transfer while tx_ready allows;
// a word is read from the FIFO without a read latency (first-word fall-through).
module out_buffer
  import he_pkg::*;
#(
  parameter int DEPTH      = 65536,
  parameter int XFER_WORDS = N_ENC * N_OUT
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            in_valid,
  input  coef_t [N_ENC-1:0][N_OUT-1:0]    in_poly,
  output logic                            room,
  output logic [BURST_W-1:0]              tx_data,
  output logic                            tx_valid,
  input  logic                            tx_ready,
  output logic                            xfer_start   // pulses when a transfer begins
);

  localparam int AW = $clog2(DEPTH);
  localparam int GW = N_ENC * N_OUT;

  logic [BURST_W-1:0]           mem [DEPTH];
  logic [AW-1:0]                wr_ptr, rd_ptr;
  logic [AW:0]                  count;
  coef_t [N_ENC-1:0][N_OUT-1:0] hold;
  logic                         ser_busy;
  logic [$clog2(N_ENC)-1:0]     ser_enc;
  logic [$clog2(N_OUT)-1:0]     ser_idx;
  logic [$clog2(GW+1)-1:0]      ser_left;
  logic                         sending;
  logic [$clog2(XFER_WORDS)-1:0] sent;

  wire fifo_full = (count == (AW+1)'(DEPTH));
  wire wr_en     = ser_busy && !fifo_full;
  wire rd_en     = tx_valid && tx_ready;

  assign room     = (32'(count) + 32'(ser_left) + 32'(2 * GW)) <= 32'(DEPTH);
  assign tx_valid = sending;
  assign tx_data  = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (in_valid) hold <= in_poly;
    if (wr_en) mem[wr_ptr] <= BURST_W'(hold[ser_enc][ser_idx]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr     <= '0;
      rd_ptr     <= '0;
      count      <= '0;
      ser_busy   <= 1'b0;
      ser_enc    <= '0;
      ser_idx    <= '0;
      ser_left   <= '0;
      sending    <= 1'b0;
      sent       <= '0;
      xfer_start <= 1'b0;
    end else begin
      xfer_start <= 1'b0;
      if (in_valid) begin
        ser_busy <= 1'b1;
        ser_enc  <= '0;
        ser_idx  <= '0;
        ser_left <= ($clog2(GW+1))'(GW);
      end else if (wr_en) begin
        wr_ptr   <= wr_ptr + 1'b1;
        ser_left <= ser_left - 1'b1;
        if (ser_idx == ($clog2(N_OUT))'(N_OUT - 1)) begin
          ser_idx <= '0;
          ser_enc <= ser_enc + 1'b1;
          if (ser_enc == ($clog2(N_ENC))'(N_ENC - 1)) ser_busy <= 1'b0;
        end else begin
          ser_idx <= ser_idx + 1'b1;
        end
      end
      count <= count + (AW+1)'(wr_en) - (AW+1)'(rd_en);
      if (rd_en) begin
        rd_ptr <= rd_ptr + 1'b1;
        sent   <= sent + 1'b1;
        if (sent == ($clog2(XFER_WORDS))'(XFER_WORDS - 1)) begin
          sending <= 1'b0;
          sent    <= '0;
        end
      end else if (!sending && count >= (AW+1)'(XFER_WORDS)) begin
        sending    <= 1'b1;
        xfer_start <= 1'b1;
      end
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> !ser_busy)
    else $error("out_buffer: new group while the previous one is still being written");

endmodule
