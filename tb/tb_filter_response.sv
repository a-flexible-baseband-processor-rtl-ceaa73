// tb_filter_response -- frequency response of the band-pass filter for the
// four coefficient sets of the processor's evaluation.
//
// For each set (500 kHz / 40 kHz, 650 kHz / 40 kHz, 500 kHz / 100 kHz and
// 400 kHz / 240 kHz wide, at a 2 MHz sample rate) the partial-sum tables are
// loaded, and sine waves at pass-band and stop-band frequencies are streamed
// back to back. After 400 samples of settling the output amplitude is
// measured over 400 samples by correlation with a sine and a cosine at the
// test frequency (400 samples hold a whole number of periods of every
// frequency used). Checks: the measured gain agrees with the ideal response
// of the same coefficients, computed here in floating point, within 1.5 dB in
// the pass band and 3 dB in the stop band; pass-band gain is above -3 dB; the
// stop-band attenuation reaches the set's dynamic range (40, 40, 30, 25 dB)
// less 1 dB. Pass-band tones have amplitude 48 so that the resonant state
// stays inside 14 bits; stop-band tones use the full 10-bit range.
module tb_filter_response;
  import bbp_pkg::*;
  import tb_model_pkg::*;
  localparam real FS = 2.0e6;
  localparam real PI = 3.14159265358979;
  localparam int SETTLE = 400, MEAS = 400;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic signed [X_W-1:0] x_in = '0;
  logic y_valid;
  logic signed [Y_W-1:0] y;
  cfg_wr_t cfg = '0;
  int checks = 0, failures = 0;
  int n_y = 0;
  real sc, ss;
  real f_now;

  da_iir_bpf dut (.*);

  always #31.25 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // y of sample n arrives in the frame of sample n+1: output k is Y(k-1)
  always @(posedge clk) if (rst_n && y_valid) begin
    int n;
    n = n_y - 1;
    if (n >= SETTLE && n < SETTLE + MEAS) begin
      sc += real'(y) * $cos(2.0 * PI * f_now * n / FS);
      ss += real'(y) * $sin(2.0 * PI * f_now * n / FS);
    end
    n_y++;
  end

  function automatic real ideal_gain(int p, real f);
    real w, nr, ni, dr, di;
    nr = 0; ni = 0; dr = 0; di = 0;
    w = 2.0 * PI * f / FS;
    for (int k = 0; k < 5; k++) begin
      nr += B_TAB[p][k] * $cos(w * k);  ni -= B_TAB[p][k] * $sin(w * k);
      dr += A_TAB[p][k] * $cos(w * k);  di -= A_TAB[p][k] * $sin(w * k);
    end
    return $sqrt((nr * nr + ni * ni) / (dr * dr + di * di));
  endfunction

  task automatic load(int p);
    for (int s = 0; s < 2; s++)
      for (int a = 0; a < 32; a++) begin
        @(negedge clk);
        cfg.we = 1; cfg.filter = 1'b0; cfg.sel = sram_sel_e'(s); cfg.addr = 5'(a);
        cfg.data = PS_W'(psum(p, s[0], a));
      end
    @(negedge clk);
    cfg = '0;
  endtask

  // returns the measured gain
  task automatic tone(real f, real amp, output real gain);
    n_y = 0; sc = 0; ss = 0; f_now = f;
    for (int n = 0; n < SETTLE + MEAS + 1; n++) begin
      @(negedge clk);
      in_valid = 1;
      x_in = X_W'($rtoi(amp * $sin(2.0 * PI * f * n / FS) + 1000.5) - 1000);
      while (!in_ready) @(negedge clk);
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (12) @(negedge clk);
    gain = 2.0 * $sqrt(sc * sc + ss * ss) / MEAS / amp;
  endtask

  function automatic real db(real g);
    return 20.0 * $ln(g + 1.0e-12) / $ln(10.0);
  endfunction

  initial begin
    real pass_f [4][3] = '{'{490.0e3, 500.0e3, 510.0e3}, '{640.0e3, 650.0e3, 660.0e3},
                           '{470.0e3, 500.0e3, 530.0e3}, '{300.0e3, 400.0e3, 500.0e3}};
    real stop_f [4][2] = '{'{250.0e3, 750.0e3}, '{300.0e3, 850.0e3},
                           '{250.0e3, 800.0e3}, '{800.0e3, 880.0e3}};
    int dyn_range [4] = '{40, 40, 30, 25};
    real g, gi;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 4; p++) begin
      load(p);
      for (int i = 0; i < 3; i++) begin
        tone(pass_f[p][i], 48.0, g);
        gi = ideal_gain(p, pass_f[p][i]);
        $display("set %0d  %6.1f kHz  pass  measured %6.2f dB  ideal %6.2f dB", p + 1,
                 pass_f[p][i] / 1.0e3, db(g), db(gi));
        checks += 2;
        if (db(g) - db(gi) > 1.5 || db(gi) - db(g) > 1.5) begin
          failures++; $display("FAIL pass-band gain off the ideal response");
        end
        if (db(g) < -3.0) begin failures++; $display("FAIL pass-band gain below -3 dB"); end
      end
      for (int i = 0; i < 2; i++) begin
        tone(stop_f[p][i], 500.0, g);
        gi = ideal_gain(p, stop_f[p][i]);
        $display("set %0d  %6.1f kHz  stop  measured %6.2f dB  ideal %6.2f dB", p + 1,
                 stop_f[p][i] / 1.0e3, db(g), db(gi));
        checks += 2;
        if (db(g) - db(gi) > 3.0 || db(gi) - db(g) > 3.0) begin
          failures++; $display("FAIL stop-band gain off the ideal response");
        end
        if (db(g) > -real'(dyn_range[p]) + 1.0) begin
          failures++; $display("FAIL stop-band attenuation below %0d dB", dyn_range[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
