// da_accumulator -- shift-accumulate unit of one distributed-arithmetic block.
//
// The DA block computes Y = sum_k C_k * w_k for five two's-complement words
// w_k of T_W bits, processing two bit planes per clock, least significant
// first. In step m (m = 1 .. T_W/2) the SRAM returns the odd partial sum
// S(2m-1) and the even partial sum S(2m) (the SRAM output registers hold
// them). The two are combined into P = S(2m-1) + 2*S(2m), the running result
// is shifted right by two bits and P is added. The top bit plane carries the sign of
// every word, so in the last step the even partial sum is subtracted
// (its two's complement is added) instead of added.
//
// The accumulator carries GUARD = T_W-2 extra fraction bits, so no bit is lost
// in the right shifts and the final value equals sum_k C_k*w_k exactly. The
// result is the OUT_W-bit field whose least significant bit has the weight of
// one state LSB (coefficients carry COEF_FRAC fraction bits, so that field
// starts COEF_FRAC bits above the integer product, plus the guard). Bits above
// the field are dropped (two's-complement wrap), as the design takes the
// result by slicing the accumulator.
//
// Interface and timing: in_valid marks a cycle with a partial-sum pair;
// in_first marks step 1, which starts a new sum; in_last marks step T_W/2.
// The pair is combined and accumulated in the cycle it arrives, so one step
// takes one clock and a word of T_W bits takes T_W/2 clocks. result_next /
// done_next present the finished sum combinationally in the cycle of its last
// addition (so the feedback result can enter the state registers at that same
// clock edge); result / done hold it registered one cycle later. The step
// order (LSB first, right shift by two, negation of the top plane) follows
// the design; forming P and accumulating in one cycle, and the guard bits,
// are this implementation's choices.
module da_accumulator #(
  parameter int unsigned PS_W      = 19,
  parameter int unsigned T_W       = 14,
  parameter int unsigned OUT_W     = 14,
  parameter int unsigned COEF_FRAC = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    in_first,
  input  logic                    in_last,
  input  logic signed [PS_W-1:0]  s_odd,
  input  logic signed [PS_W-1:0]  s_even,
  output logic signed [OUT_W-1:0] result_next,
  output logic                    done_next,
  output logic signed [OUT_W-1:0] result,
  output logic                    done
);

  localparam int unsigned GUARD = T_W - 2;
  localparam int unsigned P_W   = PS_W + 2;
  // |sum| <= |P|max * 4/3 * 2^GUARD; two extra integer bits cover the 4/3
  localparam int unsigned ACC_W = P_W + GUARD + 2;
  localparam int unsigned LSB   = COEF_FRAC;   // state-LSB weight in the accumulator

  logic signed [P_W-1:0]   p;
  logic signed [ACC_W-1:0] acc_q, acc_d;

  always_comb begin
    logic signed [ACC_W-1:0] base;
    if (in_last)
      p = P_W'(s_odd) - (P_W'(s_even) <<< 1);
    else
      p = P_W'(s_odd) + (P_W'(s_even) <<< 1);
    if (in_first) base = '0;
    else          base = acc_q >>> 2;   // arithmetic shift
    acc_d = base + (ACC_W'(p) <<< GUARD);
  end

  assign result_next = acc_d[LSB +: OUT_W];
  assign done_next   = in_valid & in_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q  <= '0;
      result <= '0;
      done   <= 1'b0;
    end else begin
      done <= done_next;
      if (in_valid)  acc_q  <= acc_d;
      if (done_next) result <= result_next;
    end
  end

endmodule
