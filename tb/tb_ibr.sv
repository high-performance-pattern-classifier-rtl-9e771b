// tb_ibr: input buffer. Sends vectors in 32-bit and 64-bit words, in burst
// and normal mode, and checks: ibfull after exactly dim elements; the
// contents read back; normal mode taking a word only every fourth clock and
// burst mode every clock; the second bank filling while the first is held;
// wready low with both banks full; release flipping to the other bank.
module tb_ibr;
  localparam int DIM = 16;
  logic clk = 0, rst_n = 0;
  logic [4:0] dim;
  logic mode64, burst, wvalid, wready, ibfull, release_i;
  logic [63:0] wdata;
  logic [3:0] raddr;
  logic [4:0] rdata;
  logic [1:0] full;
  logic [4:0] vec [2][DIM];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ibr #(.DIM(DIM)) dut (.*);

  // send vector slot s; returns clocks from first offer to last word taken
  task automatic send(input int s, input int n, output int cyc);
    int per = mode64 ? 8 : 4;
    int i = 0;
    cyc = 0;
    for (int j = 0; j < n; j++) vec[s][j] = 5'($urandom);
    while (i < n) begin
      @(negedge clk);
      wvalid = 1;
      wdata = '0;
      for (int j = 0; j < per; j++) if (i + j < n) wdata[j*8 +: 8] = {3'b101, vec[s][i+j]};
      @(posedge clk); cyc++;
      while (!wready) begin @(posedge clk); cyc++; end
      i += per;
    end
    @(negedge clk); wvalid = 0;
  endtask

  task automatic check_vec(input int s, input int n);
    for (int j = 0; j < n; j++) begin
      @(negedge clk); raddr = 4'(j);
      @(negedge clk);
      checks++; if (rdata !== vec[s][j]) begin failures++; $display("elem %0d got %0d want %0d", j, rdata, vec[s][j]); end
    end
  endtask

  initial begin
    int c;
    dim = 16; mode64 = 0; burst = 1; wvalid = 0; wdata = 0; raddr = 0; release_i = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // burst, 32-bit: 4 words, one per clock
    send(0, 16, c);
    checks++; if (c != 4) begin failures++; $display("burst32 took %0d", c); end
    checks++; if (!ibfull) begin failures++; $display("no ibfull"); end
    // second vector into the other bank, normal mode, 64-bit, dim 13
    burst = 0; mode64 = 1; dim = 13;
    send(1, 13, c);
    checks++; if (c < 5 || c > 8) begin failures++; $display("normal64 took %0d", c); end
    checks++; if (full !== 2'b11) begin failures++; $display("both banks should be full"); end
    @(negedge clk);
    checks++; if (wready) begin failures++; $display("wready with both banks full"); end
    dim = 16;
    check_vec(0, 16);
    @(negedge clk); release_i = 1; @(negedge clk); release_i = 0;
    checks++; if (full !== 2'b10 || !ibfull) begin failures++; $display("release did not flip"); end
    check_vec(1, 13);
    @(negedge clk); release_i = 1; @(negedge clk); release_i = 0;
    checks++; if (ibfull) begin failures++; $display("ibfull after both released"); end
    // normal mode, 32-bit: 4 words at one per four clocks
    burst = 0; mode64 = 0;
    send(0, 16, c);
    checks++; if (c < 13 || c > 16) begin failures++; $display("normal32 took %0d", c); end
    check_vec(0, 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
