// da_iir_bpf -- reconfigurable band-pass filter: a fourth-order IIR filter
// computed with distributed arithmetic (DA), without multipliers.
//
// The filter is a direct-form-II IIR section:
//   t0(n) = A1*X(n) - A2*t0(n-1) - A3*t0(n-2) - A4*t0(n-3) - A5*t0(n-4)
//   Y(n)  = B1*t0(n) + B2*t0(n-1) + B3*t0(n-2) + B4*t0(n-3) + B5*t0(n-4)
// Each of the two sums is a DA block: an SRAM holding the 32 partial sums of
// its five coefficients (the feedback SRAM holds those of A1, -A2 .. -A5, so
// the subtractions become additions), addressed by one bit of each of its
// five input words, and a shift-accumulator. Rewriting the SRAMs changes the
// centre frequency and the bandwidth of the filter.
//
// Schedule: a sample is processed in a frame of FRAME_CYCLES = 8 clocks. In
// cycles 0..6 the address generator presents the odd and even bit planes of
// step m = cycle+1 to the two ports of both SRAMs; in cycles 1..7 the
// partial sums are accumulated. At the end of cycle 7 the feedback result
// t0(n) enters the state registers, and the feed-forward block, which ran in
// parallel on the previous state, delivers Y(n-1). The output is therefore
// one sample behind the input: the frame of sample n emits Y(n-1) (zero for
// the first sample after reset). At a 16 MHz clock the filter takes one
// sample every 8 clocks, i.e. 2 MHz.
//
// Interface: in_valid / in_ready accept a 10-bit two's-complement sample;
// in_ready is high when the filter is idle and in the last cycle of a frame,
// so samples may follow back to back. y_valid pulses for one cycle, one clock
// after the frame ends, with the 15-bit output y (state LSB units, one more
// integer bit than the state). cfg writes one partial sum when cfg.we is set
// and cfg.filter equals FILTER_ID; the write takes SRAM port A at once, so
// tables should be rewritten between samples (a write during a frame
// corrupts that frame's result). State words wrap on overflow.
//
// The DA organisation, word lengths and SRAM contents follow the design; the
// frame schedule, the one-sample output delay, the handshake and the write
// priority are this implementation's.
module da_iir_bpf
  import bbp_pkg::*;
#(
  parameter logic FILTER_ID = 1'b0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic signed [X_W-1:0] x_in,
  output logic                  y_valid,
  output logic signed [Y_W-1:0] y,
  input  cfg_wr_t               cfg
);

  localparam int unsigned CYC_W = $clog2(FRAME_CYCLES);
  localparam logic [CYC_W-1:0] LAST_CYC = CYC_W'(FRAME_CYCLES - 1);
  localparam logic [CYC_W-1:0] LAST_STEP = CYC_W'(DA_STEPS - 1);

  // ---------------------------------------------------------------- control
  logic             busy_q;
  logic [CYC_W-1:0] cyc_q;
  logic             accept, reading;
  logic             rd_valid_q, rd_first_q, rd_last_q;

  assign in_ready = !busy_q || (cyc_q == LAST_CYC);
  assign accept   = in_valid && in_ready;
  assign reading  = busy_q && (cyc_q <= LAST_STEP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q     <= 1'b0;
      cyc_q      <= '0;
      rd_valid_q <= 1'b0;
      rd_first_q <= 1'b0;
      rd_last_q  <= 1'b0;
    end else begin
      if (accept) begin
        busy_q <= 1'b1;
        cyc_q  <= '0;
      end else if (busy_q) begin
        if (cyc_q == LAST_CYC) busy_q <= 1'b0;
        else                   cyc_q  <= cyc_q + 1'b1;
      end
      // SRAM data of the step addressed now arrives next cycle
      rd_valid_q <= reading;
      rd_first_q <= reading && (cyc_q == '0);
      rd_last_q  <= reading && (cyc_q == LAST_STEP);
    end
  end

  // -------------------------------------------------------------- addresses
  logic [TAPS-1:0]       a_odd_b, a_even_b, a_odd_f, a_even_f;
  logic signed [T_W-1:0] t0_new;
  logic                  fb_done_next;

  addr_gen u_addr (
    .clk        (clk),
    .rst_n      (rst_n),
    .load_x     (accept),
    .x_in       (x_in),
    .shift      (fb_done_next),
    .t0_new     (t0_new),
    .step       (STEP_W'(cyc_q)),
    .addr_odd_b (a_odd_b),
    .addr_even_b(a_even_b),
    .addr_odd_f (a_odd_f),
    .addr_even_f(a_even_f)
  );

  // ------------------------------------------------------------------ SRAMs
  logic                 wr_fb, wr_ff;
  logic [PS_W-1:0]      fb_odd, fb_even, ff_odd, ff_even;

  assign wr_fb = cfg.we && (cfg.filter == FILTER_ID) && (cfg.sel == SRAM_FB);
  assign wr_ff = cfg.we && (cfg.filter == FILTER_ID) && (cfg.sel == SRAM_FF);

  dp_sram #(.ADDR_W(PS_ADDR_W), .DATA_W(PS_W)) u_sram_fb (
    .clk    (clk),
    .a_addr (wr_fb ? cfg.addr : a_odd_b),
    .a_we   (wr_fb),
    .a_wdata(cfg.data),
    .a_rdata(fb_odd),
    .b_addr (a_even_b),
    .b_rdata(fb_even)
  );

  dp_sram #(.ADDR_W(PS_ADDR_W), .DATA_W(PS_W)) u_sram_ff (
    .clk    (clk),
    .a_addr (wr_ff ? cfg.addr : a_odd_f),
    .a_we   (wr_ff),
    .a_wdata(cfg.data),
    .a_rdata(ff_odd),
    .b_addr (a_even_f),
    .b_rdata(ff_even)
  );

  // ----------------------------------------------------------- accumulators
  logic signed [T_W-1:0] fb_result;
  logic                  fb_done;
  logic signed [Y_W-1:0] ff_result_next;
  logic                  ff_done_next;

  da_accumulator #(.PS_W(PS_W), .T_W(T_W), .OUT_W(T_W), .COEF_FRAC(COEF_FRAC)) u_acc_fb (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (rd_valid_q),
    .in_first   (rd_first_q),
    .in_last    (rd_last_q),
    .s_odd      (fb_odd),
    .s_even     (fb_even),
    .result_next(t0_new),
    .done_next  (fb_done_next),
    .result     (fb_result),
    .done       (fb_done)
  );

  da_accumulator #(.PS_W(PS_W), .T_W(T_W), .OUT_W(Y_W), .COEF_FRAC(COEF_FRAC)) u_acc_ff (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (rd_valid_q),
    .in_first   (rd_first_q),
    .in_last    (rd_last_q),
    .s_odd      (ff_odd),
    .s_even     (ff_even),
    .result_next(ff_result_next),
    .done_next  (ff_done_next),
    .result     (y),
    .done       (y_valid)
  );

  // the feedback and feed-forward blocks run in lock step
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    fb_done_next == ff_done_next)
    else $error("da_iir_bpf: DA blocks out of step");
  a_cfg_idle: assert property (@(posedge clk) disable iff (!rst_n)
    !(cfg.we && cfg.filter == FILTER_ID && reading))
    else $warning("da_iir_bpf: partial-sum SRAM rewritten during a frame");

endmodule
