// addr_gen -- combined address generator of one band-pass filter, with the
// filter's state registers.
//
// The fourth-order IIR filter keeps its input sample X (sign-extended from 10
// to 14 bits, i.e. scaled by 1/16) and five state words t0..t4. The feedback
// DA block needs the bit planes of (X, t1, t2, t3, t4), the feed-forward block
// those of (t0, t1, t2, t3, t4). Both blocks read two bit planes per clock:
// in step m the odd plane (bit 2m-1, counting the LSB as bit 1) and the even
// plane (bit 2m). The four SRAM addresses are formed from the same state
// registers, which is what keeps the address logic small. Address bit k-1
// carries tap k, so X (feedback) and t0 (feed-forward) are the address LSB.
//
// Pipelining: the feedback block of sample n produces t0(n) while the
// feed-forward block, in the same frame, computes the output of sample n-1
// from t0(n-1) .. t0(n-5). The registers r[0..4] hold t0(n-1) .. t0(n-5)
// during frame n, so the feedback taps t1..t4 are r[0..3] and the
// feed-forward taps t0..t4 are r[0..4]: four of the five registers are
// shared by both address pairs.
//
// Interface and timing: load_x stores a new sample (sign-extended) at the
// clock edge; shift pushes t0_new into r[0] and moves r[0..3] to r[1..4].
// step selects the bit planes (0 .. T_W/2-1 for m = 1 .. T_W/2); the
// addresses are combinational. Reset clears X and the state. The address
// layout follows the design; the register sharing across a one-sample
// pipeline is this implementation's reading of the combined generator.
module addr_gen
  import bbp_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load_x,
  input  logic signed [X_W-1:0] x_in,
  input  logic                  shift,
  input  logic signed [T_W-1:0] t0_new,
  input  logic [STEP_W-1:0]     step,
  output logic [TAPS-1:0]       addr_odd_b,
  output logic [TAPS-1:0]       addr_even_b,
  output logic [TAPS-1:0]       addr_odd_f,
  output logic [TAPS-1:0]       addr_even_f
);

  logic signed [T_W-1:0] x_q;
  logic signed [T_W-1:0] r_q [TAPS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0;
      for (int k = 0; k < TAPS; k++) r_q[k] <= '0;
    end else begin
      if (load_x) x_q <= T_W'(x_in);   // sign extension: X / 16 in state units
      if (shift) begin
        r_q[0] <= t0_new;
        for (int k = 1; k < TAPS; k++) r_q[k] <= r_q[k-1];
      end
    end
  end

  always_comb begin
    logic [$clog2(T_W)-1:0] bo, be;
    bo = {step, 1'b0};          // bit 2m-1 (1-based) = index 2(m-1)
    be = {step, 1'b1};          // bit 2m   (1-based) = index 2m-1
    addr_odd_b[0]  = x_q[bo];
    addr_even_b[0] = x_q[be];
    for (int k = 1; k < TAPS; k++) begin
      addr_odd_b[k]  = r_q[k-1][bo];
      addr_even_b[k] = r_q[k-1][be];
    end
    for (int k = 0; k < TAPS; k++) begin
      addr_odd_f[k]  = r_q[k][bo];
      addr_even_f[k] = r_q[k][be];
    end
  end

endmodule
