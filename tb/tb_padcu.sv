// tb_padcu: distance passes of the prototype array with its DCUs.
// A small array (16 prototypes, 8 dimensions) is programmed with random
// elements and used flags through the uC paths. The input buffer is
// modelled here as a one-clock-latency RAM. Each pass must take
// 2*dim + 2 clocks from start to done, and every used distance latch must
// hold the L1 distance computed here. Also checks two_halves, a latch of one
// half surviving a pass over the other, and the dimension set to less than
// the maximum.
module tb_padcu;
  localparam int NPT = 16, DIM = 8, NDCU = NPT / 2;
  logic clk = 0, rst_n = 0;
  logic start, half, busy, done;
  logic [3:0] dim;
  logic [2:0] ibr_raddr;
  logic [4:0] ibr_rdata;
  logic dl_half;
  logic [2:0] dl_idx;
  logic [12:0] dl_data;
  logic used_we, used_wdata, used_rdata, two_halves;
  logic [3:0] used_pt, pa_pt;
  logic pa_we;
  logic [2:0] pa_dim;
  logic [4:0] pa_wdata, pa_rdata;
  logic [4:0] pm [NPT][DIM];
  logic [4:0] vin [DIM];
  logic       usedm [NPT];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  padcu #(.NPT(NPT), .DIM(DIM)) dut (.*);
  always_ff @(posedge clk) ibr_rdata <= vin[ibr_raddr];

  function automatic int l1(int p, int n);
    int s = 0;
    for (int j = 0; j < n; j++) s += (pm[p][j] > vin[j]) ? pm[p][j] - vin[j] : vin[j] - pm[p][j];
    return s;
  endfunction

  task automatic pass(input logic h, input int n);
    int cyc = 0;
    @(negedge clk); start = 1; half = h; dim = 4'(n);
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 2 * n + 2) begin failures++; $display("pass took %0d, want %0d", cyc, 2 * n + 2); end
  endtask

  task automatic check_half(input logic h, input int n);
    for (int i = 0; i < NDCU; i++) if (usedm[h*NDCU + i]) begin
      dl_half = h; dl_idx = 3'(i); #1;
      checks++;
      if (int'(dl_data) != l1(h*NDCU + i, n)) begin
        failures++; $display("h%0d dcu%0d dl %0d want %0d", h, i, dl_data, l1(h*NDCU + i, n));
      end
    end
  endtask

  initial begin
    start = 0; half = 0; dim = 8; dl_half = 0; dl_idx = 0;
    used_we = 0; used_pt = 0; used_wdata = 0; pa_we = 0; pa_pt = 0; pa_dim = 0; pa_wdata = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int p = 0; p < NPT; p++) begin
      usedm[p] = (p < NDCU) ? 1'b1 : 1'($urandom);
      for (int j = 0; j < DIM; j++) begin
        pm[p][j] = 5'($urandom);
        @(negedge clk); pa_we = 1; pa_pt = 4'(p); pa_dim = 3'(j); pa_wdata = pm[p][j];
      end
      @(negedge clk); pa_we = 0;
      used_we = 1; used_pt = 4'(p); used_wdata = 1'b0;
    end
    @(negedge clk); used_we = 0;
    checks++; if (two_halves !== 1'b0) begin failures++; $display("two_halves set with upper half empty"); end
    for (int p = 0; p < NPT; p++) begin
      @(negedge clk); used_we = 1; used_pt = 4'(p); used_wdata = usedm[p];
    end
    usedm[NPT-1] = 1'b1;
    @(negedge clk); used_pt = 4'(NPT - 1); used_wdata = 1'b1;
    @(negedge clk); used_we = 0;
    for (int p = 0; p < NPT; p++) begin
      used_pt = 4'(p); #1; checks++;
      if (used_rdata !== usedm[p]) begin failures++; $display("used flag %0d", p); end
    end
    checks++; if (two_halves !== 1'b1) begin failures++; $display("two_halves not set"); end
    for (int v = 0; v < 4; v++) begin
      int n = (v == 3) ? 3 : DIM;
      for (int j = 0; j < DIM; j++) vin[j] = 5'($urandom);
      pass(1'b0, n);
      check_half(1'b0, n);
      pass(1'b1, n);
      check_half(1'b1, n);
      check_half(1'b0, n);   // half 0 latches kept during pass 1
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
