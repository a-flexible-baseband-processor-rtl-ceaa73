// tb_da_accumulator -- self-checking testbench of the DA shift-accumulator.
// Random coefficient sets C and random 14-bit words w are turned into the
// odd/even partial sums of each step (computed here from C and the bits of w)
// and fed back to back, 7 steps per word, to a 14-bit and a 15-bit result
// instance. Each result is compared with floor(sum C_k w_k / 2^12) wrapped to
// the output width, and done must come exactly on the 7th step.
module tb_da_accumulator;
  import tb_model_pkg::*;
  localparam int PS_W = 19, T_W = 14;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic signed [PS_W-1:0] s_odd = '0, s_even = '0;
  logic signed [13:0] r14n, r14;
  logic signed [14:0] r15n, r15;
  logic d14n, d14, d15n, d15;
  int checks = 0, failures = 0;

  da_accumulator #(.PS_W(PS_W), .T_W(T_W), .OUT_W(14), .COEF_FRAC(12)) dut14 (
    .clk, .rst_n, .in_valid, .in_first, .in_last, .s_odd, .s_even,
    .result_next(r14n), .done_next(d14n), .result(r14), .done(d14));
  da_accumulator #(.PS_W(PS_W), .T_W(T_W), .OUT_W(15), .COEF_FRAC(12)) dut15 (
    .clk, .rst_n, .in_valid, .in_first, .in_last, .s_odd, .s_even,
    .result_next(r15n), .done_next(d15n), .result(r15), .done(d15));

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ps(int c[5], int w[5], int bitn);
    int s = 0;
    for (int k = 0; k < 5; k++) if (w[k][bitn]) s += c[k];
    return s;
  endfunction

  initial begin
    int c[5], w[5];
    int e14, e15;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int word = 0; word < 600; word++) begin
      for (int k = 0; k < 5; k++) begin
        // extremes now and then, random otherwise
        case ($urandom % 8)
          0: c[k] = -32768;
          1: c[k] = 32767;
          default: c[k] = int'($urandom % 65536) - 32768;
        endcase
        case ($urandom % 8)
          0: w[k] = -8192;
          1: w[k] = 8191;
          default: w[k] = int'($urandom % 16384) - 8192;
        endcase
        if (word < 100) c[k] = c[k] / 16;   // small results that fit the field
      end
      e14 = dot_slice(c, w, 14);
      e15 = dot_slice(c, w, 15);
      for (int m = 0; m < 7; m++) begin
        @(negedge clk);
        in_valid = 1; in_first = (m == 0); in_last = (m == 6);
        s_odd  = PS_W'(ps(c, w, 2*m));
        s_even = PS_W'(ps(c, w, 2*m + 1));
        #1;
        checks++;
        if (d14n != (m == 6) || d15n != (m == 6)) begin
          failures++; $display("FAIL done_next at step %0d", m + 1);
        end
        if (m == 6) begin
          check("result_next 14", int'(r14n), e14);
          check("result_next 15", int'(r15n), e15);
        end
      end
      // a gap after some words, back to back otherwise
      if ($urandom % 3 == 0) begin
        @(negedge clk);
        in_valid = 0; in_first = 0; in_last = 0;
        #1;
        checks++;
        if (!d14 || !d15) begin failures++; $display("FAIL registered done missing"); end
        check("result 14", int'(r14), e14);
        check("result 15", int'(r15), e15);
      end
    end
    @(negedge clk);
    in_valid = 0; in_first = 0; in_last = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
