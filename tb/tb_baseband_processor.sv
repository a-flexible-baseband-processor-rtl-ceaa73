// tb_baseband_processor -- end-to-end testbench of the baseband processor at
// its default parameters (SYM_LEN = 100 samples per symbol).
//
// A continuous-phase binary FSK signal sampled at 2 MHz (10-bit ADC words,
// amplitude 32) is streamed into the processor. The partial-sum SRAMs are
// loaded with coefficient set 1 (pass band at 500 kHz, 40 kHz wide) in filter
// 0 and set 2 (650 kHz, 40 kHz) in filter 1, so a '1' is sent as 500 kHz and
// a '0' as 650 kHz. Every filter output pair is compared with the integer
// model of tb_model_pkg, and every demodulated bit with the bit sent.
// The run then retunes the processor twice without reset, by rewriting the
// SRAMs while it is idle: first the two filters swap tones (so the meaning of
// the bits swaps), then filter 0 is widened to set 3 (500 kHz, 100 kHz).
// The filters keep the state built up under the old coefficients, so the
// first symbol after a retune is a transient: its filter outputs are still
// checked exactly, its bit is not.
// The last phase inserts idle gaps between samples. Counted and required:
// back-to-back samples at 8 clocks, idle gaps, SRAM rewrites of both filters,
// decided '1' and '0' bits, and outputs checked.
module tb_baseband_processor;
  import bbp_pkg::*;
  import tb_model_pkg::*;
  localparam int SYM = 100;             // the processor's default symbol length
  localparam real FS = 2.0e6;
  logic clk = 0, rst_n = 0;
  logic adc_valid = 0, adc_ready;
  logic signed [X_W-1:0] adc_data = '0;
  cfg_wr_t cfg = '0;
  logic y_valid, bit_valid, bit_out;
  logic signed [Y_W-1:0] y_ch0, y_ch1;
  logic [$clog2(SYM+1)-1:0] bit_count;
  int checks = 0, failures = 0;
  longint cyc = 0, last_accept = -100;
  int pat[2][2];                        // [filter][0 fb / 1 ff]
  int r0[5], r1[5];
  int e0_q[$], e1_q[$];
  int tx_q[$];
  real phase = 0.0;
  int n_b2b = 0, n_gap = 0, n_cfg0 = 0, n_cfg1 = 0, n_ones = 0, n_zeros = 0, n_out = 0;
  int n_retune = 0, n_skip = 0;

  baseband_processor dut (.*);

  always #31.25 clk = ~clk;             // 16 MHz
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // filter outputs and demodulated bits
  always @(posedge clk) if (rst_n) begin
    if (y_valid) begin
      n_out++;
      checks += 2;
      if (e0_q.size() == 0) begin
        failures += 2; $display("FAIL unexpected filter output");
      end else begin
        int e0, e1;
        e0 = e0_q.pop_front(); e1 = e1_q.pop_front();
        if (int'(y_ch0) != e0) begin
          failures++; if (failures < 10) $display("FAIL y_ch0=%0d expected %0d", y_ch0, e0);
        end
        if (int'(y_ch1) != e1) begin
          failures++; if (failures < 10) $display("FAIL y_ch1=%0d expected %0d", y_ch1, e1);
        end
      end
    end
    if (bit_valid) begin
      int tx;
      checks++;
      tx = (tx_q.size() > 0) ? tx_q.pop_front() : -1;
      if (tx >= 2) begin
        n_skip++;                      // symbol right after a retune
      end else if (int'(bit_out) != tx) begin
        failures++; $display("FAIL bit %0b sent %0d (count %0d)", bit_out, tx, bit_count);
      end
      if (bit_out) n_ones++; else n_zeros++;
    end
  end

  task automatic write_filter(int f, int pfb, int pff);
    for (int s = 0; s < 2; s++)
      for (int a = 0; a < 32; a++) begin
        @(negedge clk);
        cfg.we = 1; cfg.filter = f[0]; cfg.sel = sram_sel_e'(s); cfg.addr = 5'(a);
        cfg.data = PS_W'(psum(s ? pff : pfb, s[0], a));
      end
    @(negedge clk);
    cfg = '0;
    pat[f][0] = pfb; pat[f][1] = pff;
    if (f == 0) n_cfg0++; else n_cfg1++;
  endtask

  task automatic send_sample(int x);
    @(negedge clk);
    adc_valid = 1; adc_data = X_W'(x);
    while (!adc_ready) @(negedge clk);
    @(posedge clk);
    #1;
    if (cyc - last_accept == 8) n_b2b++;
    checks++;
    if (cyc - last_accept < 8) begin
      failures++; $display("FAIL samples %0d clocks apart", cyc - last_accept);
    end
    last_accept = cyc;
    e0_q.push_back(filter_step(pat[0][0], pat[0][1], x, r0));
    e1_q.push_back(filter_step(pat[1][0], pat[1][1], x, r1));
  endtask

  // one FSK symbol: tone f_hz, continuous phase
  task automatic send_symbol(int bitv, real f_hz, bit gaps, bit unchecked);
    tx_q.push_back(unchecked ? bitv + 2 : bitv);
    for (int i = 0; i < SYM; i++) begin
      send_sample(int'($rtoi(32.0 * $sin(phase) + 32.5)) - 32);
      phase += 2.0 * 3.14159265358979 * f_hz / FS;
      if (gaps && ($urandom % 16 == 0)) begin
        @(negedge clk);
        adc_valid = 0;
        repeat (1 + $urandom % 6) @(negedge clk);
        n_gap++;
      end
    end
  endtask

  task automatic wait_idle();
    @(negedge clk);
    adc_valid = 0;
    repeat (12) @(negedge clk);
    checks++;
    if (!adc_ready) begin failures++; $display("FAIL processor not idle"); end
  endtask

  initial begin
    int b;
    for (int k = 0; k < 5; k++) begin r0[k] = 0; r1[k] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // '1' = 500 kHz (filter 0), '0' = 650 kHz (filter 1)
    write_filter(0, 0, 0);
    write_filter(1, 1, 1);
    for (int s = 0; s < 24; s++) begin
      b = (s < 2) ? s : int'($urandom % 2);
      send_symbol(b, b ? 500.0e3 : 650.0e3, 1'b0, 1'b0);
    end
    wait_idle();
    // retune: the filters swap tones, so '1' is now 650 kHz
    write_filter(0, 1, 1);
    write_filter(1, 0, 0);
    n_retune++;
    for (int s = 0; s < 12; s++) begin
      b = int'($urandom % 2);
      send_symbol(b, b ? 650.0e3 : 500.0e3, 1'b0, s == 0);
    end
    wait_idle();
    // retune: filter 0 back to 500 kHz with the 100 kHz wide set, idle gaps on
    write_filter(0, 2, 2);
    write_filter(1, 1, 1);
    n_retune++;
    for (int s = 0; s < 12; s++) begin
      b = int'($urandom % 2);
      send_symbol(b, b ? 500.0e3 : 650.0e3, 1'b1, s == 0);
    end
    wait_idle();
    checks++;
    if (e0_q.size() != 0 || tx_q.size() != 0) begin
      failures++; $display("FAIL %0d outputs, %0d bits pending", e0_q.size(), tx_q.size());
    end
    $display("outputs %0d, back-to-back %0d, gaps %0d, rewrites f0 %0d f1 %0d, retunes %0d, bits 1:%0d 0:%0d, unchecked %0d",
             n_out, n_b2b, n_gap, n_cfg0, n_cfg1, n_retune, n_ones, n_zeros, n_skip);
    checks++;
    if (n_b2b == 0 || n_gap == 0 || n_cfg0 < 3 || n_cfg1 < 3 || n_ones == 0 || n_zeros == 0 || n_out == 0) begin
      failures++; $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
