// tb_mu: math unit. The distance latches, parameter RAMs and result RAM
// are modelled here. Random prototypes (few classes, so that equal classes
// follow each other and the bypass is needed) are run as a two-half vector
// with back-to-back commands and as a one-half vector. Checks: the fired
// class list and count against the RCE rule evaluated here; each class
// density against the real sum of C*exp(-K*D) (within 1.5%); classes
// without prototypes read zero; done after NDCU+7 clocks for one half and
// 2*NDCU+8 for two (519 and 1032 at 512 prototypes per half); the bypass
// was used.
module tb_mu;
  import pc_pkg::*;
  localparam int NPT = 16, NDCU = NPT / 2;
  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_half, cmd_first, cmd_last, cmd_bank, cmd_ready;
  logic issue_done, issue_done_half, done;
  logic dl_half;
  logic [2:0] dl_idx;
  logic [12:0] dl_data;
  logic [3:0] ppr_addr;
  pparam_t ppr_data;
  logic mur_bank, mur_clear, mur_pdf_we, mur_list_we, mur_cnt_we;
  logic [5:0] mur_raddr, mur_waddr, mur_list_addr, mur_list_data;
  logic [15:0] mur_rdata, mur_wdata;
  logic [6:0] mur_cnt, fired_count;
  logic bypass;
  int checks = 0, failures = 0, n_bypass = 0;

  logic [12:0] dlm [2][NDCU];
  pparam_t     pm [NPT];
  logic [15:0] pdf [2][64];
  logic        pv  [2][64];
  logic [5:0]  list [2][64];
  logic [6:0]  cnt [2];
  always #5 clk = ~clk;

  mu #(.NPT(NPT)) dut (.*);

  assign dl_data = dlm[dl_half][dl_idx];
  always_ff @(posedge clk) begin
    ppr_data  <= pm[ppr_addr];
    mur_rdata <= pv[mur_bank][mur_raddr] ? pdf[mur_bank][mur_raddr] : 16'd0;
    if (mur_clear) begin
      for (int i = 0; i < 64; i++) pv[mur_bank][i] <= 1'b0;
      cnt[mur_bank] <= 0;
    end else begin
      if (mur_pdf_we) begin pdf[mur_bank][mur_waddr] <= mur_wdata; pv[mur_bank][mur_waddr] <= 1'b1; end
      if (mur_list_we) list[mur_bank][mur_list_addr] <= mur_list_data;
      if (mur_cnt_we) cnt[mur_bank] <= mur_cnt;
    end
    if (bypass) n_bypass++;
  end

  function automatic real fp_val(logic [15:0] b);
    fp16_t f = fp16_t'(b);
    return (f.e == 0) ? 0.0 : (1.0 + real'(f.m) / 1024.0) * (2.0 ** (real'(f.e) - 32.0));
  endfunction

  task automatic randomize_set(input int nclass);
    for (int i = 0; i < NPT; i++) begin
      pm[i] = '0;
      pm[i].used  = ($urandom_range(0, 7) != 0);
      pm[i].cls   = 6'($urandom_range(0, nclass - 1));
      pm[i].l     = 12'($urandom_range(0, 400));
      pm[i].k_man = 4'($urandom_range(1, 15));
      pm[i].k_exp = 4'($urandom_range(4, 9));
      pm[i].c     = 16'($urandom_range(0, 65535));
      dlm[i / NDCU][i % NDCU] = 13'($urandom_range(0, 400));
    end
  endtask

  task automatic check_bank(input int b, input int nh);
    logic fired [64];
    int   exp_list [$];
    real  want [64];
    for (int c = 0; c < 64; c++) begin fired[c] = 0; want[c] = 0.0; end
    for (int i = 0; i < nh * NDCU; i++) if (pm[i].used) begin
      int d = int'(dlm[i / NDCU][i % NDCU]);
      real k = real'(pm[i].k_man) * (2.0 ** (-5.0 - real'(pm[i].k_exp)));
      if (d < int'(pm[i].l) && !fired[pm[i].cls]) begin fired[pm[i].cls] = 1; exp_list.push_back(int'(pm[i].cls)); end
      want[pm[i].cls] += real'(pm[i].c) * $exp(-k * real'(d));
    end
    checks++;
    if (int'(cnt[b]) != exp_list.size()) begin failures++; $display("count %0d want %0d", cnt[b], exp_list.size()); end
    foreach (exp_list[j]) begin
      checks++;
      if (int'(list[b][j]) != exp_list[j]) begin failures++; $display("list[%0d] %0d want %0d", j, list[b][j], exp_list[j]); end
    end
    for (int c = 0; c < 64; c++) begin
      real g = pv[b][c] ? fp_val(pdf[b][c]) : 0.0;
      checks++;
      if (want[c] == 0.0 ? g != 0.0 : (g < want[c] * 0.985 || g > want[c] * 1.015)) begin
        failures++; $display("pdf[%0d] %g want %g", c, g, want[c]);
      end
    end
  endtask

  task automatic command(input logic h, input logic f, input logic l, input logic b);
    cmd_valid = 1; cmd_half = h; cmd_first = f; cmd_last = l; cmd_bank = b;
    @(posedge clk); while (!cmd_ready) @(posedge clk);
    @(negedge clk); cmd_valid = 0;
  endtask

  initial begin
    int t0, t1;
    cmd_valid = 0; cmd_half = 0; cmd_first = 0; cmd_last = 0; cmd_bank = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int v = 0; v < 6; v++) begin
      logic bk = 1'(v);
      randomize_set(v < 3 ? 3 : 64);
      @(negedge clk);
      if (v % 2 == 0) begin
        // two halves, second command waiting
        t0 = $time;
        command(1'b0, 1'b1, 1'b0, bk);
        command(1'b1, 1'b0, 1'b1, bk);
        while (!done) @(negedge clk);
        t1 = $time;
        checks++;
        if ((t1 - t0) / 10 != 2 * NDCU + 8) begin failures++; $display("two halves took %0d", (t1 - t0) / 10); end
        check_bank(bk, 2);
      end else begin
        t0 = $time;
        command(1'b0, 1'b1, 1'b1, bk);
        while (!done) @(negedge clk);
        t1 = $time;
        checks++;
        if ((t1 - t0) / 10 != NDCU + 7) begin failures++; $display("one half took %0d", (t1 - t0) / 10); end
        check_bank(bk, 1);
      end
    end
    checks++; if (n_bypass == 0) begin failures++; $display("bypass never used"); end
    $display("bypass used %0d times", n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
