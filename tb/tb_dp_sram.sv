// tb_dp_sram -- self-checking testbench of the dual-port partial-sum SRAM.
// Fills the memory through port A, then reads random address pairs on both
// ports at once and compares with a shadow array; also checks the one-cycle
// read latency and the read-first behaviour of a simultaneous write.
module tb_dp_sram;
  localparam int AW = 5, DW = 19;
  logic clk = 0;
  logic [AW-1:0] a_addr, b_addr;
  logic a_we;
  logic [DW-1:0] a_wdata, a_rdata, b_rdata;
  logic [DW-1:0] shadow [1<<AW];
  int checks = 0, failures = 0;

  dp_sram #(.ADDR_W(AW), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [DW-1:0] got, logic [DW-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0;
    @(negedge clk);
    for (int i = 0; i < (1<<AW); i++) begin
      a_we = 1; a_addr = AW'(i); a_wdata = DW'($urandom); shadow[i] = a_wdata;
      @(negedge clk);
    end
    a_we = 0;
    // simultaneous reads on both ports, one-cycle latency
    for (int i = 0; i < 200; i++) begin
      logic [AW-1:0] pa, pb;
      pa = AW'($urandom); pb = AW'($urandom);
      a_addr = pa; b_addr = pb;
      @(posedge clk); #1;
      check("port A read", a_rdata, shadow[pa]);
      check("port B read", b_rdata, shadow[pb]);
      @(negedge clk);
    end
    // read-first: write and read the same word in one cycle
    for (int i = 0; i < 20; i++) begin
      logic [AW-1:0] pa;
      logic [DW-1:0] old;
      pa = AW'($urandom); old = shadow[pa];
      a_we = 1; a_addr = pa; b_addr = pa; a_wdata = DW'($urandom); shadow[pa] = a_wdata;
      @(posedge clk); #1;
      check("port A read-first", a_rdata, old);
      check("port B read-first", b_rdata, old);
      @(negedge clk);
      a_we = 0;
      @(posedge clk); #1;
      check("port A after write", a_rdata, shadow[pa]);
      check("port B after write", b_rdata, shadow[pa]);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
