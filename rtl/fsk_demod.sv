// fsk_demod -- FSK demodulator working by counting.
//
// The two band-pass filters of the processor are tuned to the two tones of a
// binary FSK signal: filter 0 to the tone of a '1', filter 1 to the tone of a
// '0'. For every output sample pair the demodulator notes which filter has
// the larger envelope and counts, over one symbol of SYM_LEN samples, the
// samples in which filter 0 wins. The envelope of a filter is the larger of
// the magnitudes of its last two samples: a single sample of a tone can lie
// near a zero crossing (a tone at a quarter of the sample rate is zero in
// every other sample), two consecutive ones rarely both do. At the end of the symbol the bit is '1' when
// that count is above half the symbol length, '0' otherwise (a majority vote).
//
// Interface and timing: in_valid marks a sample pair (y0, y1), both two's
// complement. The envelope memory runs across symbol boundaries. Symbols are counted from the first sample after reset (no
// symbol-timing recovery); bit_valid pulses for one cycle, the clock after
// the last sample of a symbol arrives, with the decision in bit_out and the
// raw count in count_out. That the demodulator counts comes from the design;
// what is counted, the symbol framing and the threshold are this
// implementation's choices.
module fsk_demod #(
  parameter int unsigned Y_W     = 15,
  parameter int unsigned SYM_LEN = 100
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic signed [Y_W-1:0]        y0,
  input  logic signed [Y_W-1:0]        y1,
  output logic                         bit_valid,
  output logic                         bit_out,
  output logic [$clog2(SYM_LEN+1)-1:0] count_out
);

  localparam int unsigned CNT_W = $clog2(SYM_LEN + 1);

  logic [CNT_W-1:0] n_q, wins_q;
  logic [Y_W-1:0]   mag0, mag1, mag0_q, mag1_q, env0, env1;
  logic             win;
  logic [CNT_W-1:0] wins_d;

  // magnitudes; the most negative value maps to its unsigned absolute value
  assign mag0 = y0[Y_W-1] ? Y_W'(-y0) : Y_W'(y0);
  assign mag1 = y1[Y_W-1] ? Y_W'(-y1) : Y_W'(y1);
  assign env0   = (mag0 > mag0_q) ? mag0 : mag0_q;
  assign env1   = (mag1 > mag1_q) ? mag1 : mag1_q;
  assign win    = env0 > env1;
  assign wins_d = wins_q + CNT_W'(win);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_q       <= '0;
      wins_q    <= '0;
      mag0_q    <= '0;
      mag1_q    <= '0;
      bit_valid <= 1'b0;
      bit_out   <= 1'b0;
      count_out <= '0;
    end else begin
      bit_valid <= 1'b0;
      if (in_valid) begin
        mag0_q <= mag0;
        mag1_q <= mag1;
        if (n_q == CNT_W'(SYM_LEN - 1)) begin
          n_q       <= '0;
          wins_q    <= '0;
          bit_valid <= 1'b1;
          bit_out   <= (32'(wins_d) * 2) > SYM_LEN;
          count_out <= wins_d;
        end else begin
          n_q    <= n_q + 1'b1;
          wins_q <= wins_d;
        end
      end
    end
  end

endmodule
