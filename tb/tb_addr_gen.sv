// tb_addr_gen -- self-checking testbench of the combined address generator.
// Loads random samples and pushes random t0 values through the delay line,
// keeping its own copy of X (sign-extended) and of the five state words, and
// checks all four addresses for every step m = 1..7: feedback odd/even planes
// of (X, t1..t4) and feed-forward planes of (t0..t4), tap k on address bit k-1.
module tb_addr_gen;
  import bbp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic load_x = 0, shift = 0;
  logic signed [X_W-1:0] x_in = '0;
  logic signed [T_W-1:0] t0_new = '0;
  logic [STEP_W-1:0] step = '0;
  logic [TAPS-1:0] addr_odd_b, addr_even_b, addr_odd_f, addr_even_f;
  int checks = 0, failures = 0;
  int xm;
  int rm[5];

  addr_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_addrs();
    for (int m = 1; m <= 7; m++) begin
      logic [4:0] eob, eeb, eof, eef;
      step = STEP_W'(m - 1);
      eob[0] = xm[2*m-2];  eeb[0] = xm[2*m-1];
      for (int k = 1; k < 5; k++) begin eob[k] = rm[k-1][2*m-2]; eeb[k] = rm[k-1][2*m-1]; end
      for (int k = 0; k < 5; k++) begin eof[k] = rm[k][2*m-2];   eef[k] = rm[k][2*m-1];   end
      #1;
      checks++;
      if (addr_odd_b !== eob || addr_even_b !== eeb || addr_odd_f !== eof || addr_even_f !== eef) begin
        failures++;
        if (failures < 10)
          $display("FAIL m=%0d: b %b/%b exp %b/%b  f %b/%b exp %b/%b", m,
                   addr_odd_b, addr_even_b, eob, eeb, addr_odd_f, addr_even_f, eof, eef);
      end
    end
  endtask

  initial begin
    xm = 0;
    for (int k = 0; k < 5; k++) rm[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_addrs();   // all zero after reset
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      load_x = ($urandom % 4 != 0);
      shift  = ($urandom % 4 != 0);
      x_in   = X_W'($urandom);
      t0_new = T_W'($urandom);
      @(posedge clk);
      if (load_x) xm = int'(x_in);               // sign extended by int'()
      if (shift) begin
        for (int k = 4; k > 0; k--) rm[k] = rm[k-1];
        rm[0] = int'(t0_new);
      end
      @(negedge clk);
      load_x = 0; shift = 0;
      check_addrs();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
