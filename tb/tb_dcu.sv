// tb_dcu: self-checking test of one distance calculation unit.
// Streams random element pairs with the two-clock ph0/ph1 timing used by the
// array, for both halves, and compares the distance latches with the L1
// distance computed here. Also checks that an unused half neither
// accumulates nor overwrites its latch.
module tb_dcu;
  logic clk = 0, rst_n = 0;
  logic [4:0] a, b;
  logic half, clr, ph0, ph1, latch;
  logic [1:0] used;
  logic [12:0] dl [2];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dcu dut (.*);

  task automatic run_vec(input int n, input logic h, output int expect_d);
    logic [4:0] av [256];
    logic [4:0] bv [256];
    expect_d = 0;
    for (int i = 0; i < n; i++) begin
      av[i] = 5'($urandom); bv[i] = 5'($urandom);
      expect_d += (av[i] > bv[i]) ? av[i] - bv[i] : bv[i] - av[i];
    end
    half = h;
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    for (int i = 0; i < n; i++) begin
      a = av[i]; b = bv[i]; ph0 = 1;
      @(negedge clk); ph0 = 0; ph1 = 1; latch = (i == n - 1);
      a = 5'($urandom); b = 5'($urandom);     // inputs may change during ph1
      @(negedge clk); ph1 = 0; latch = 0;
    end
  endtask

  initial begin
    int e0, e1, dummy;
    logic [12:0] hold;
    a = 0; b = 0; half = 0; clr = 0; ph0 = 0; ph1 = 0; latch = 0; used = 2'b11;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 6; it++) begin
      int n = (it == 0) ? 256 : 1 + int'($urandom_range(0, 255));
      run_vec(n, 1'b0, e0);
      run_vec(n, 1'b1, e1);
      checks++; if (dl[0] !== 13'(e0)) begin failures++; $display("dl0 %0d exp %0d", dl[0], e0); end
      checks++; if (dl[1] !== 13'(e1)) begin failures++; $display("dl1 %0d exp %0d", dl[1], e1); end
    end
    // worst case: all 31 against 0 over 256 elements = 7936
    half = 0;
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    for (int i = 0; i < 256; i++) begin
      a = (i % 2) ? 5'd0 : 5'd31; b = (i % 2) ? 5'd31 : 5'd0; ph0 = 1;
      @(negedge clk); ph0 = 0; ph1 = 1; latch = (i == 255);
      @(negedge clk); ph1 = 0; latch = 0;
    end
    checks++; if (dl[0] !== 13'd7936) begin failures++; $display("max %0d", dl[0]); end
    // unused half 1: latch must hold
    hold = dl[1];
    used = 2'b01;
    run_vec(20, 1'b1, dummy);
    checks++; if (dl[1] !== hold) begin failures++; $display("unused half changed"); end
    used = 2'b11;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
