// bbp_pkg -- widths, constants and shared types of the distributed-arithmetic
// (DA) baseband processor.
//
// The word lengths follow the design: a 10-bit ADC sample X, 16-bit filter
// coefficients, 14-bit IIR state words t0..t4 and a 15-bit filter output Y.
// The partial-sum width, the frame length and the configuration-write record
// are choices of this implementation:
//   * a partial sum is the sum of up to five 16-bit coefficients, so it needs
//     16 + 3 = 19 bits to be exact;
//   * two state bits are consumed per clock (odd and even bit planes read
//     through the two ports of one SRAM), so a 14-bit word takes 7 DA steps;
//     one more cycle closes the frame, giving 8 clocks per sample
//     (16 MHz clock / 8 = 2 MHz sample rate, the rate at which the coefficient
//     sets place their pass bands at 400-650 kHz).
package bbp_pkg;

  localparam int unsigned X_W        = 10;  // ADC sample width
  localparam int unsigned T_W        = 14;  // IIR state word width (t0..t4)
  localparam int unsigned Y_W        = 15;  // filter output width
  localparam int unsigned COEF_W     = 16;  // coefficient width (4 integer, 12 fraction bits)
  localparam int unsigned COEF_FRAC  = 12;  // fraction bits of a coefficient
  localparam int unsigned TAPS       = 5;   // inputs to each DA block (X,t1..t4 / t0..t4)
  localparam int unsigned PS_ADDR_W  = TAPS;                // SRAM address = one bit per tap
  localparam int unsigned PS_DEPTH   = 1 << PS_ADDR_W;      // 32 partial sums
  localparam int unsigned PS_W       = COEF_W + 3;          // exact sum of 5 coefficients
  localparam int unsigned DA_STEPS   = T_W / 2;             // two bit planes per step
  localparam int unsigned FRAME_CYCLES = DA_STEPS + 1;      // clocks per sample
  localparam int unsigned STEP_W     = $clog2(DA_STEPS);

  // Which of a filter's two partial-sum SRAMs a configuration write targets.
  typedef enum logic {
    SRAM_FB = 1'b0,   // feedback block: partial sums of A1, -A2, -A3, -A4, -A5
    SRAM_FF = 1'b1    // feed-forward block: partial sums of B1 .. B5
  } sram_sel_e;

  // One write into the partial-sum SRAMs of the processor.
  typedef struct packed {
    logic                 we;      // write strobe
    logic                 filter;  // 0: band-pass filter 0, 1: band-pass filter 1
    sram_sel_e            sel;     // feedback or feed-forward SRAM
    logic [PS_ADDR_W-1:0] addr;    // partial-sum index (bit k-1 = tap k)
    logic [PS_W-1:0]      data;    // partial sum, two's complement, 12 fraction bits
  } cfg_wr_t;

endpackage
