// tb_fsk_demod -- self-checking testbench of the counting FSK demodulator.
// Drives random sample pairs whose statistics are biased towards one filter
// or the other per symbol (sometimes nearly balanced, and with the most
// negative value now and then), with random gaps between samples. A model
// forms each filter's envelope, the larger of its last two magnitudes,
// counts the samples where filter 0's envelope is larger, and checks the count and the majority
// decision of every symbol, and that bit_valid comes one clock after the
// symbol's last sample.
module tb_fsk_demod;
  localparam int Y_W = 15, SYM = 20;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [Y_W-1:0] y0 = '0, y1 = '0;
  logic bit_valid, bit_out;
  logic [$clog2(SYM+1)-1:0] count_out;
  int checks = 0, failures = 0;
  int exp_count = 0, n_in_sym = 0;
  int exp_bit_q[$], exp_cnt_q[$];
  bit pending = 0;
  int ones = 0, zeros = 0;
  int pm0 = 0, pm1 = 0;

  fsk_demod #(.Y_W(Y_W), .SYM_LEN(SYM)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int absv(int v);
    return v < 0 ? -v : v;
  endfunction

  // bit_valid must appear exactly one clock after the last sample of a symbol
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (bit_valid != pending) begin
      failures++; $display("FAIL bit_valid=%0b expected %0b", bit_valid, pending);
    end
    if (bit_valid && exp_bit_q.size() > 0) begin
      int eb, ec;
      eb = exp_bit_q.pop_front(); ec = exp_cnt_q.pop_front();
      checks += 2;
      if (bit_out != eb) begin failures++; $display("FAIL bit %0b expected %0b", bit_out, eb); end
      if (int'(count_out) != ec) begin failures++; $display("FAIL count %0d expected %0d", count_out, ec); end
      if (eb) ones++; else zeros++;
    end
    pending = 0;
    if (in_valid) begin
      int m0, m1;
      m0 = absv(int'(y0)); m1 = absv(int'(y1));
      if ((m0 > pm0 ? m0 : pm0) > (m1 > pm1 ? m1 : pm1)) exp_count++;
      pm0 = m0; pm1 = m1;
      n_in_sym++;
      if (n_in_sym == SYM) begin
        exp_bit_q.push_back(2 * exp_count > SYM);
        exp_cnt_q.push_back(exp_count);
        exp_count = 0; n_in_sym = 0;
        pending = 1;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 200; s++) begin
      int bias;
      bias = $urandom % 100;   // percent of samples where y0 is made larger
      for (int i = 0; i < SYM; i++) begin
        int hi, lo;
        @(negedge clk);
        hi = int'($urandom % 16384);
        lo = int'($urandom % (hi + 1));
        if ($urandom % 50 == 0) hi = 16384;     // most negative value below
        if ($urandom % 100 < bias) begin
          y0 = (hi == 16384) ? Y_W'(-16384) : Y_W'(($urandom % 2) ? hi : -hi);
          y1 = Y_W'(($urandom % 2) ? lo : -lo);
        end else begin
          y1 = (hi == 16384) ? Y_W'(-16384) : Y_W'(($urandom % 2) ? hi : -hi);
          y0 = Y_W'(($urandom % 2) ? lo : -lo);
        end
        in_valid = 1;
        if ($urandom % 4 == 0) begin
          @(negedge clk);
          in_valid = 0;
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (ones < 20 || zeros < 20 || exp_bit_q.size() != 0) begin
      failures++; $display("FAIL coverage ones %0d zeros %0d left %0d", ones, zeros, exp_bit_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
