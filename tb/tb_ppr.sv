// tb_ppr: parameter RAMs. Writes random words into all three RAMs through
// the uC port, reads them back one by one, and checks that the math unit
// port returns all three as one 48-bit word one clock after the address.
module tb_ppr;
  import pc_pkg::*;
  localparam int NPT = 32;
  logic clk = 0;
  logic [4:0] mu_addr, uc_addr;
  pparam_t mu_rdata;
  logic uc_we;
  logic [1:0] uc_sel;
  logic [15:0] uc_wdata, uc_rdata;
  logic [15:0] m [3][NPT];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ppr #(.NPT(NPT)) dut (.*);

  initial begin
    mu_addr = 0; uc_addr = 0; uc_we = 0; uc_sel = 0; uc_wdata = 0;
    for (int s = 0; s < 3; s++)
      for (int a = 0; a < NPT; a++) begin
        m[s][a] = 16'($urandom);
        @(negedge clk); uc_we = 1; uc_sel = 2'(s); uc_addr = 5'(a); uc_wdata = m[s][a];
      end
    @(negedge clk); uc_we = 0;
    for (int s = 0; s < 3; s++)
      for (int a = 0; a < NPT; a++) begin
        uc_sel = 2'(s); uc_addr = 5'(a);
        @(negedge clk);
        checks++; if (uc_rdata !== m[s][a]) begin failures++; $display("uc s%0d a%0d", s, a); end
      end
    for (int a = 0; a < NPT; a++) begin
      mu_addr = 5'(a);
      @(negedge clk);
      checks++;
      if (48'(mu_rdata) !== {m[2][a], m[1][a], m[0][a]}) begin failures++; $display("mu a%0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
