// tb_da_iir_bpf -- self-checking testbench of one DA band-pass filter.
// Loads the partial-sum tables of a coefficient set through the cfg port,
// feeds random samples (random amplitudes, random gaps, runs of back-to-back
// samples) and compares every output with the integer direct-form-II model
// of tb_model_pkg. Between bursts, while the filter is idle, it rewrites the
// tables with another of the four coefficient sets (also mixing feedback and
// feed-forward sets) and carries on without reset. Checks the timing too: the
// output comes 9 clocks after its frame's sample was accepted (8-clock frame
// plus the output register), and back-to-back samples are accepted every 8
// clocks.
module tb_da_iir_bpf;
  import bbp_pkg::*;
  import tb_model_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic signed [X_W-1:0] x_in = '0;
  logic y_valid;
  logic signed [Y_W-1:0] y;
  cfg_wr_t cfg = '0;
  int checks = 0, failures = 0;
  longint cyc = 0;
  int pat_fb = 0, pat_ff = 0;
  int r[5];
  int exp_q[$];
  longint acc_q[$];
  longint last_accept = -100;
  int n_b2b = 0, n_outputs = 0, n_reconf = 0;

  da_iir_bpf #(.FILTER_ID(1'b1)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor
  always @(posedge clk) if (rst_n && y_valid) begin
    int e;
    longint t;
    n_outputs++;
    checks += 2;
    if (exp_q.size() == 0) begin
      failures += 2; $display("FAIL unexpected output");
    end else begin
      e = exp_q.pop_front();
      t = acc_q.pop_front();
      if (int'(y) != e) begin
        failures++;
        if (failures < 10) $display("FAIL y=%0d expected %0d (pattern fb %0d ff %0d)", y, e, pat_fb, pat_ff);
      end
      // cyc still holds the count before this edge
      if (cyc + 1 - t != 9) begin
        failures++;
        $display("FAIL output latency %0d clocks, expected 9", cyc + 1 - t);
      end
    end
  end

  task automatic write_tables(int pfb, int pff, bit other_filter_too);
    for (int s = 0; s < 2; s++)
      for (int a = 0; a < 32; a++) begin
        @(negedge clk);
        cfg.we = 1; cfg.filter = 1'b1; cfg.sel = sram_sel_e'(s); cfg.addr = 5'(a);
        cfg.data = PS_W'(psum(s ? pff : pfb, s[0], a));
      end
    // writes addressed to the other filter must not land here
    if (other_filter_too)
      for (int a = 0; a < 32; a++) begin
        @(negedge clk);
        cfg.we = 1; cfg.filter = 1'b0; cfg.sel = sram_sel_e'(a % 2); cfg.addr = 5'(a);
        cfg.data = PS_W'($urandom);
      end
    @(negedge clk);
    cfg = '0;
    pat_fb = pfb; pat_ff = pff;
  endtask

  task automatic send(int x);
    @(negedge clk);
    in_valid = 1; x_in = X_W'(x);
    while (!in_ready) @(negedge clk);
    @(posedge clk);
    #1;   // cyc now counts the accepting edge
    if (cyc - last_accept == 8) n_b2b++;
    checks++;
    if (cyc - last_accept < 8) begin
      failures++; $display("FAIL samples accepted %0d clocks apart", cyc - last_accept);
    end
    last_accept = cyc;
    acc_q.push_back(cyc);
    exp_q.push_back(filter_step(pat_fb, pat_ff, x, r));
  endtask

  task automatic idle(int n);
    @(negedge clk);
    in_valid = 0;
    repeat (n) @(negedge clk);
  endtask

  initial begin
    for (int k = 0; k < 5; k++) r[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    write_tables(0, 0, 1'b1);
    for (int burst = 0; burst < 24; burst++) begin
      int amp;
      amp = (burst % 4 == 3) ? 512 : 1 << ($urandom % 8);
      for (int i = 0; i < 60; i++) begin
        send(int'($urandom % (2 * amp)) - amp);
        if ($urandom % 8 == 0) idle($urandom % 5);
      end
      idle(12);   // let the last frame finish
      checks++;
      if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_q.size()); end
      if (burst % 3 == 2) begin
        write_tables($urandom % 4, $urandom % 4, 1'b1);
        n_reconf++;
      end
    end
    checks++;
    if (n_b2b < 100 || n_reconf < 5) begin
      failures++; $display("FAIL coverage: back-to-back %0d reconfigurations %0d", n_b2b, n_reconf);
    end
    $display("outputs %0d, back-to-back accepts %0d, reconfigurations %0d", n_outputs, n_b2b, n_reconf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
