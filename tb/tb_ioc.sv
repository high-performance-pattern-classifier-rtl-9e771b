// tb_ioc: IO controller registers. Checks reset values, host and uC writes
// and reads, read-only status and chip id, uC priority on a simultaneous
// write, the decoded control fields, range limits of DIM/NCLASS/MODE, and
// uC writes being ignored in TEST mode.
module tb_ioc;
  import pc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] h_addr, u_addr;
  logic h_we, u_we;
  logic [31:0] h_wdata, h_rdata;
  logic [15:0] u_wdata, u_rdata;
  logic [31:0] status_hw [3];
  logic ibr_mode64, ibr_burst, obr_mode64, obr_burst, fpconv, out_list, out_pdf, monitor_sel;
  logic [8:0] dim;
  logic [6:0] nclass;
  mode_t mode;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ioc dut (.*);

  task automatic chk(input logic [31:0] got, input logic [31:0] want, input string what);
    checks++;
    if (got !== want) begin failures++; $display("%s: got %h want %h", what, got, want); end
  endtask
  task automatic hw(input int a, input logic [31:0] d);
    @(negedge clk); h_addr = 4'(a); h_wdata = d; h_we = 1; @(negedge clk); h_we = 0;
  endtask
  task automatic uw(input int a, input logic [15:0] d);
    @(negedge clk); u_addr = 4'(a); u_wdata = d; u_we = 1; @(negedge clk); u_we = 0;
  endtask

  initial begin
    h_addr = 0; u_addr = 0; h_we = 0; u_we = 0; h_wdata = 0; u_wdata = 0;
    status_hw[0] = 32'h11111111; status_hw[1] = 32'h22222222; status_hw[2] = 32'h33333333;
    repeat (2) @(negedge clk); rst_n = 1;
    chk(32'(dim), 256, "dim reset"); chk(32'(nclass), 64, "nclass reset");
    chk(32'(mode), 32'(MODE_NORMAL), "mode reset");
    chk(32'({out_list, out_pdf}), 3, "output reset");
    h_addr = 9; #1 chk(h_rdata, 32'(CHIP_ID), "chip id");
    hw(9, 0); h_addr = 9; #1 chk(h_rdata, 32'(CHIP_ID), "chip id read-only");
    h_addr = 3; #1 chk(h_rdata, 32'h22222222, "status1");
    hw(2, 32'hdeadbeef); h_addr = 2; #1 chk(h_rdata, 32'h11111111, "status0 read-only");
    u_addr = 4; #1 chk(32'(u_rdata), 32'h3333, "uc status2");
    hw(0, 32'h3); chk(32'({ibr_mode64, ibr_burst}), 3, "ctrl0 fields");
    hw(1, 32'h25); chk(32'({monitor_sel, out_pdf, out_list, fpconv, obr_burst, obr_mode64}), 32'b100101, "ctrl1 fields");
    uw(6, 16'd100); chk(32'(dim), 100, "uc writes dim");
    hw(6, 0); chk(32'(dim), 1, "dim lower limit");
    hw(6, 999); chk(32'(dim), 256, "dim upper limit");
    hw(7, 12); chk(32'(nclass), 12, "nclass");
    hw(8, 7); chk(32'(mode), 32'(MODE_NORMAL), "mode out of range");
    for (int a = 10; a < 16; a++) hw(a, 32'hA5000000 + 32'(a));
    for (int a = 10; a < 16; a++) begin h_addr = 4'(a); #1 chk(h_rdata, 32'hA5000000 + 32'(a), "data reg"); end
    uw(12, 16'h1234); h_addr = 12; #1 chk(h_rdata, 32'h1234, "uc data write");
    // same clock: uC wins
    @(negedge clk); h_addr = 13; h_wdata = 32'h1; h_we = 1; u_addr = 13; u_wdata = 16'h2; u_we = 1;
    @(negedge clk); h_we = 0; u_we = 0; h_addr = 13; #1 chk(h_rdata, 32'h2, "uC priority");
    hw(8, 32'(MODE_TEST)); chk(32'(mode), 32'(MODE_TEST), "test mode");
    uw(14, 16'h7777); h_addr = 14; #1 chk(h_rdata, 32'hA500000E, "uC ignored in test mode");
    hw(8, 32'(MODE_CLASSIFY)); chk(32'(mode), 32'(MODE_CLASSIFY), "classify mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
