// tb_pgf: program storage. Loads a program through the load port in PGF
// mode, reads it back there, then fetches it with the two-clock fetch
// latency, and checks that loads outside PGF mode are ignored.
module tb_pgf;
  localparam int WORDS = 4096;
  logic clk = 0, load_en, l_we;
  logic [11:0] f_addr, l_addr;
  logic [15:0] f_data, l_wdata, l_rdata;
  logic [15:0] m [WORDS];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  pgf dut (.*);
  initial begin
    f_addr = 0; load_en = 1; l_we = 0; l_addr = 0; l_wdata = 0;
    for (int i = 0; i < WORDS; i++) begin
      m[i] = 16'($urandom);
      @(negedge clk); l_we = 1; l_addr = 12'(i); l_wdata = m[i];
    end
    @(negedge clk); l_we = 0;
    for (int i = 0; i < WORDS; i += 37) begin
      l_addr = 12'(i); @(negedge clk);
      checks++; if (l_rdata !== m[i]) begin failures++; $display("load read %0d", i); end
    end
    load_en = 0;
    @(negedge clk); l_we = 1; l_addr = 12'd5; l_wdata = ~m[5]; @(negedge clk); l_we = 0;
    for (int i = 0; i < WORDS; i += 13) begin
      f_addr = 12'(i); @(negedge clk); @(negedge clk);
      checks++; if (f_data !== m[i]) begin failures++; $display("fetch %0d", i); end
    end
    f_addr = 12'd5; @(negedge clk); @(negedge clk);
    checks++; if (f_data !== m[5]) begin failures++; $display("write outside PGF mode"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
