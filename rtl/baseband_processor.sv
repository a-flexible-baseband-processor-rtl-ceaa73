// baseband_processor -- reconfigurable FSK baseband processor with two
// multi-resolution band-pass filters.
//
// The ADC samples of a low-IF receiver enter two identical band-pass filters
// (da_iir_bpf), each a fourth-order IIR filter evaluated by distributed
// arithmetic from two dual-port partial-sum SRAMs. Filter 0 is tuned to the
// tone of a '1', filter 1 to the tone of a '0'; the FSK demodulator counts,
// per symbol, which filter responds more strongly and decides the bit. The
// channel (centre frequency and bandwidth) is selected by writing new partial
// sums into the four SRAMs through the cfg port; no multiplier is involved.
//
// Interface and timing: adc_valid / adc_ready hand over one 10-bit sample;
// both filters take it in the same clock and run in lock step, one sample per
// 8 clocks at most (2 MHz at a 16 MHz clock). y_valid pulses with the two
// filter outputs of the previous sample (15 bits each); bit_valid pulses once
// per SYM_LEN filter outputs with the demodulated bit and the count behind
// it. cfg writes one partial sum per clock; tables should be written while
// no sample is being processed (adc_ready high and adc_valid low).
// The structure (two DA band-pass filters, their SRAMs and a counting FSK
// demodulator) follows the design; the handshake, the symbol length and the
// configuration port are this implementation's choices.
module baseband_processor
  import bbp_pkg::*;
#(
  parameter int unsigned SYM_LEN = 100
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // ADC samples
  input  logic                         adc_valid,
  output logic                         adc_ready,
  input  logic signed [X_W-1:0]        adc_data,
  // partial-sum SRAM writes
  input  cfg_wr_t                      cfg,
  // filter outputs
  output logic                         y_valid,
  output logic signed [Y_W-1:0]        y_ch0,
  output logic signed [Y_W-1:0]        y_ch1,
  // demodulated data
  output logic                         bit_valid,
  output logic                         bit_out,
  output logic [$clog2(SYM_LEN+1)-1:0] bit_count
);

  logic rdy0, rdy1, yv0, yv1;

  da_iir_bpf #(.FILTER_ID(1'b0)) u_bpf0 (
    .clk     (clk),
    .rst_n   (rst_n),
    .in_valid(adc_valid && adc_ready),
    .in_ready(rdy0),
    .x_in    (adc_data),
    .y_valid (yv0),
    .y       (y_ch0),
    .cfg     (cfg)
  );

  da_iir_bpf #(.FILTER_ID(1'b1)) u_bpf1 (
    .clk     (clk),
    .rst_n   (rst_n),
    .in_valid(adc_valid && adc_ready),
    .in_ready(rdy1),
    .x_in    (adc_data),
    .y_valid (yv1),
    .y       (y_ch1),
    .cfg     (cfg)
  );

  assign adc_ready = rdy0 && rdy1;
  assign y_valid   = yv0;

  fsk_demod #(.Y_W(Y_W), .SYM_LEN(SYM_LEN)) u_demod (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (yv0),
    .y0       (y_ch0),
    .y1       (y_ch1),
    .bit_valid(bit_valid),
    .bit_out  (bit_out),
    .count_out(bit_count)
  );

  a_filters_lockstep: assert property (@(posedge clk) disable iff (!rst_n) yv0 == yv1)
    else $error("baseband_processor: filters out of step");

endmodule
