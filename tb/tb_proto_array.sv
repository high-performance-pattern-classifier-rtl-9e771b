// tb_proto_array: programs random elements through the uC port, verifies
// them through the same port, and checks that the classify read returns
// the whole row two clocks after the address is presented.
module tb_proto_array;
  localparam int NPT = 16, DIM = 8, NDCU = NPT / 2;
  logic clk = 0;
  logic [3:0] raddr;
  logic [NDCU*5-1:0] rdata;
  logic uc_we;
  logic [3:0] uc_pt;
  logic [2:0] uc_dim;
  logic [4:0] uc_wdata, uc_rdata;
  logic [4:0] ref_m [NPT][DIM];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  proto_array #(.NPT(NPT), .DIM(DIM)) dut (.*);

  initial begin
    raddr = 0; uc_we = 0; uc_pt = 0; uc_dim = 0; uc_wdata = 0;
    for (int p = 0; p < NPT; p++)
      for (int j = 0; j < DIM; j++) begin
        ref_m[p][j] = 5'($urandom);
        @(negedge clk); uc_we = 1; uc_pt = 4'(p); uc_dim = 3'(j); uc_wdata = ref_m[p][j];
      end
    @(negedge clk); uc_we = 0;
    for (int p = 0; p < NPT; p++)
      for (int j = 0; j < DIM; j++) begin
        uc_pt = 4'(p); uc_dim = 3'(j);
        @(negedge clk);
        checks++; if (uc_rdata !== ref_m[p][j]) begin failures++; $display("verify p%0d j%0d", p, j); end
      end
    for (int h = 0; h < 2; h++)
      for (int j = 0; j < DIM; j++) begin
        raddr = {1'(h), 3'(j)};
        @(negedge clk);
        raddr = 4'($urandom);      // address changes; data of the old one follows
        @(negedge clk);
        for (int i = 0; i < NDCU; i++) begin
          checks++;
          if (rdata[i*5 +: 5] !== ref_m[h*NDCU + i][j]) begin failures++; $display("row h%0d j%0d i%0d", h, j, i); end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
