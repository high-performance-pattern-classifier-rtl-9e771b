// tb_mur: result RAM. Checks the math unit's dual-port use (write one
// address while reading another), clear making a bank read zero while the
// other bank keeps its data, the fired list and count, the output buffer
// port, and uC access to both banks.
module tb_mur;
  logic clk = 0, rst_n = 0;
  logic mu_bank, clear, mu_pdf_we, mu_list_we, mu_cnt_we;
  logic [5:0] mu_raddr, mu_waddr, mu_list_addr, mu_list_data;
  logic [15:0] mu_rdata, mu_wdata;
  logic [6:0] mu_cnt, ob_cnt;
  logic ob_bank, ob_list;
  logic [5:0] ob_addr;
  logic [15:0] ob_rdata;
  logic uc_we, uc_bank, uc_list;
  logic [6:0] uc_idx;
  logic [15:0] uc_wdata, uc_rdata;
  logic [15:0] ref_p [2][64];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  mur dut (.*);

  task automatic chk(input logic [15:0] got, input logic [15:0] want, input string what);
    checks++;
    if (got !== want) begin failures++; $display("%s: got %h want %h", what, got, want); end
  endtask

  initial begin
    {mu_bank, clear, mu_pdf_we, mu_list_we, mu_cnt_we} = '0;
    mu_raddr = 0; mu_waddr = 0; mu_list_addr = 0; mu_list_data = 0; mu_wdata = 0; mu_cnt = 0;
    ob_bank = 0; ob_list = 0; ob_addr = 0; uc_we = 0; uc_bank = 0; uc_list = 0; uc_idx = 0; uc_wdata = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int b = 0; b < 2; b++) begin
      mu_bank = 1'(b);
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      for (int i = 0; i < 64; i++) begin
        ref_p[b][i] = 16'($urandom);
        mu_pdf_we = 1; mu_waddr = 6'(i); mu_wdata = ref_p[b][i];
        mu_raddr = 6'(63 - i);
        mu_list_we = 1; mu_list_addr = 6'(i); mu_list_data = 6'(i ^ b);
        @(negedge clk);
        if (i < 32) chk(mu_rdata, 16'd0, "unwritten reads zero");
      end
      mu_pdf_we = 0; mu_list_we = 0;
      mu_cnt_we = 1; mu_cnt = 7'(40 + b); @(negedge clk); mu_cnt_we = 0;
    end
    for (int b = 0; b < 2; b++) begin
      ob_bank = 1'(b);
      for (int i = 0; i < 64; i++) begin
        ob_list = 0; ob_addr = 6'(i); @(negedge clk); chk(ob_rdata, ref_p[b][i], "ob pdf");
        ob_list = 1; @(negedge clk); chk(ob_rdata, 16'(i ^ b), "ob list");
      end
      chk(16'(ob_cnt), 16'(40 + b), "ob count");
    end
    // clear bank 0 only
    mu_bank = 0; @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    ob_list = 0;
    for (int i = 0; i < 64; i += 7) begin
      ob_bank = 0; ob_addr = 6'(i); @(negedge clk); chk(ob_rdata, 16'd0, "cleared bank");
      ob_bank = 1; @(negedge clk); chk(ob_rdata, ref_p[1][i], "other bank kept");
    end
    ob_bank = 0; #1 chk(16'(ob_cnt), 16'd0, "count cleared");
    // uC access
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); uc_we = 1; uc_bank = 0; uc_list = 0; uc_idx = 7'(i); uc_wdata = 16'h1000 + 16'(i);
      @(negedge clk); uc_list = 1; uc_wdata = 16'h00A0 + 16'(i);
    end
    @(negedge clk); uc_we = 0;
    for (int i = 0; i < 8; i++) begin
      uc_bank = 0; uc_list = 0; uc_idx = 7'(i); @(negedge clk); chk(uc_rdata, 16'h1000 + 16'(i), "uc pdf");
      uc_list = 1; @(negedge clk); chk(uc_rdata, 16'h00A0 + 16'(i), "uc list");
      uc_bank = 1; uc_list = 0; @(negedge clk); chk(uc_rdata, ref_p[1][i], "uc bank1 pdf");
    end
    uc_bank = 1; uc_idx = 7'd64; @(negedge clk); chk(uc_rdata, 16'd41, "uc count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
