// tb_timer: clock counter. Checks one count per clock from reset, the
// carry into the high half, and that reading the low half captures the
// high half for the following read, with random low-then-high read
// pairs, some of them across a wrap of the low half.
module tb_timer;
  logic clk = 0, rst_n = 0, rd, sel;
  logic [31:0] count;
  logic [15:0] rdata;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  timer dut (.*);
  initial begin
    logic [31:0] c0;
    logic [15:0] lo;
    rd = 0; sel = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); c0 = count;
    repeat (100) @(negedge clk);
    checks++; if (count - c0 != 100) begin failures++; $display("counted %0d", count - c0); end
    while (count[15:0] != 16'hFFF0) @(negedge clk);
    sel = 0; rd = 1; lo = rdata;
    @(negedge clk); rd = 0; sel = 1;
    repeat (40) @(negedge clk);            // low half wraps meanwhile
    checks++; if (rdata !== 16'd0) begin failures++; $display("captured high half %h", rdata); end
    checks++; if (count[31:16] !== 16'd1) begin failures++; $display("no carry into high half"); end
    checks++; if (lo !== 16'hFFF0) begin failures++; $display("low half %h", lo); end
    // one count per clock, clock by clock
    for (int i = 0; i < 200; i++) begin
      c0 = count;
      @(negedge clk);
      checks++; if (count != c0 + 1) failures++;
    end
    // low-then-high read pairs at random spacing, some across a low wrap
    for (int i = 0; i < 60; i++) begin
      logic [31:0] seen, want, prev;
      if (i % 10 == 0) while (count[15:0] < 16'hFFF8) @(negedge clk);
      repeat ($urandom_range(1, 12)) @(negedge clk);
      want = count;
      sel = 0; rd = 1; #1 lo = rdata;
      @(negedge clk); rd = 0; sel = 1;
      repeat ($urandom_range(0, 20)) @(negedge clk);
      #1 seen = {rdata, lo};
      checks++;
      if (seen != want || (i > 0 && seen <= prev)) begin
        failures++; $display("pair read %h, counter was %h", seen, want);
      end
      prev = seen;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
