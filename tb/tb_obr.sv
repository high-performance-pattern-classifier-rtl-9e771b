// tb_obr: output buffer. A result bank is modelled here (random densities,
// fired list and count). For several settings (list and/or densities,
// 16-bit or IEEE items, 32-bit or 64-bit words, burst or normal mode, host
// back-pressure) the words sent are compared with the record built here;
// IEEE conversion is checked against the real value of each density.
// Also checked: olast on the final word only, one release per record, and
// at least four clocks between words in normal mode.
module tb_obr;
  import pc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic murdy, murdy_bank, release_o, out_list, out_pdf, fpconv, mode64, burst;
  logic [6:0] nclass;
  logic ob_bank, ob_list;
  logic [5:0] ob_addr;
  logic [15:0] ob_rdata;
  logic [6:0] ob_cnt;
  logic ovalid, oready, olast, busy;
  logic [63:0] odata;
  logic [15:0] pdf [2][64];
  logic [7:0]  list [2][64];
  logic [6:0]  cnt [2];
  int checks = 0, failures = 0, n_release = 0;
  logic [63:0] got [$];
  logic        got_last [$];
  int          last_xfer = -100, min_gap = 1000, cyc = 0;
  always #5 clk = ~clk;

  obr dut (.*);

  always_ff @(posedge clk) ob_rdata <= ob_list ? {8'd0, list[ob_bank][ob_addr]} : pdf[ob_bank][ob_addr];
  assign ob_cnt = cnt[ob_bank];
  always @(posedge clk) begin
    cyc++;
    if (release_o) n_release++;
    if (ovalid && oready) begin
      got.push_back(odata); got_last.push_back(olast);
      if (cyc - last_xfer < min_gap) min_gap = cyc - last_xfer;
      last_xfer = cyc;
    end
  end

  function automatic logic [31:0] ieee_ref(logic [15:0] v);
    fp16_t f = fp16_t'(v);
    real r;
    logic [63:0] d;
    if (f.e == 0) return 32'd0;
    r = (1.0 + real'(f.m) / 1024.0) * (2.0 ** (real'(f.e) - 32.0));
    d = $realtobits(r);
    return {d[63], 8'(int'(d[62:52]) - 1023 + 127), d[51:29]};
  endfunction

  task automatic record(input logic b, input logic l, input logic p, input logic fc,
                        input logic m64, input logic bu, input int nc, input int fired, input logic bp);
    logic [31:0] items [$];
    int per, w, k;
    cnt[b] = 7'(fired);
    for (int i = 0; i < 64; i++) begin
      pdf[b][i] = {6'($urandom_range(1, 63)), 10'($urandom)};
      list[b][i] = 8'($urandom_range(0, 63));
    end
    if (l) begin
      items.push_back(32'(fired));
      for (int i = 0; i < fired; i++) items.push_back(32'(list[b][i]));
    end
    if (p) for (int i = 0; i < nc; i++) items.push_back(fc ? ieee_ref(pdf[b][i]) : 32'(pdf[b][i]));
    out_list = l; out_pdf = p; fpconv = fc; mode64 = m64; burst = bu; nclass = 7'(nc);
    got.delete(); got_last.delete(); min_gap = 1000; n_release = 0;
    @(negedge clk); murdy = 1; murdy_bank = b; @(negedge clk); murdy = 0;
    for (int t = 0; t < 3000; t++) begin
      oready = bp ? 1'($urandom) : 1'b1;
      @(negedge clk);
      if (!busy && t > 4) break;
    end
    oready = 1;
    per = (m64 ? 64 : 32) / (fc ? 32 : 16);
    w = (items.size() + per - 1) / per;
    checks++;
    if (got.size() != w) begin failures++; $display("%0d words, want %0d", got.size(), w); end
    k = 0;
    foreach (got[j]) begin
      for (int s = 0; s < per; s++) begin
        logic [31:0 ] want = (k < items.size()) ? items[k] : 32'd0;
        logic [31:0 ] have = fc ? got[j][s*32 +: 32] : 32'(got[j][s*16 +: 16]);
        checks++;
        if (have !== want) begin failures++; $display("word %0d slot %0d: %h want %h", j, s, have, want); end
        k++;
      end
      checks++;
      if (got_last[j] != (j == got.size() - 1)) begin failures++; $display("olast wrong at word %0d", j); end
    end
    checks++; if (n_release != 1) begin failures++; $display("%0d releases", n_release); end
    if (!bu && got.size() > 1) begin
      checks++; if (min_gap < 4) begin failures++; $display("normal mode gap %0d", min_gap); end
    end
  endtask

  initial begin
    murdy = 0; murdy_bank = 0; oready = 1; out_list = 1; out_pdf = 1; fpconv = 0; mode64 = 0; burst = 1; nclass = 64;
    repeat (2) @(negedge clk); rst_n = 1;
    record(0, 1, 1, 0, 0, 1, 64, 5, 0);
    record(1, 1, 1, 1, 1, 1, 64, 64, 0);
    record(0, 0, 1, 1, 0, 0, 10, 3, 0);
    record(1, 1, 0, 0, 1, 1, 64, 0, 0);
    record(0, 1, 1, 0, 1, 1, 33, 7, 1);
    record(1, 1, 1, 1, 0, 1, 64, 17, 1);
    record(0, 1, 1, 0, 0, 0, 20, 2, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
