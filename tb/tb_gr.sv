// tb_gr: general purpose RAM. Random writes over all 256 words, then
// read-back with the one-clock read latency.
module tb_gr;
  logic clk = 0, we;
  logic [7:0] addr;
  logic [15:0] wdata, rdata;
  logic [15:0] m [256];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  gr dut (.*);
  initial begin
    we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 256; i++) begin
      m[i] = 16'($urandom);
      @(negedge clk); we = 1; addr = 8'(i); wdata = m[i];
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 256; i++) begin
      addr = 8'(255 - i); @(negedge clk);
      checks++; if (rdata !== m[255 - i]) begin failures++; $display("addr %0d", 255 - i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
