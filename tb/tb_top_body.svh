// Shared body of the classifier end-to-end testbenches: signals, the uC and
// host bus tasks, the reference model and the mechanism counters. The
// including module defines NPT, DIM, NDCU, DWB (= log2 DIM), NCL, the
// range KEXP_LO..KEXP_HI of the decay exponent and WATCHDOG (clocks).
  logic clk = 0, rst_n = 0;
  logic [3:0]  h_addr;
  logic        h_we;
  logic [31:0] h_wdata, h_rdata;
  logic        in_valid, in_ready;
  logic [63:0] in_data;
  logic        out_valid, out_ready, out_last;
  logic [63:0] out_data;
  logic        pgf_we;
  logic [11:0] pgf_addr;
  logic [15:0] pgf_wdata, pgf_rdata;
  logic [19:0] uc_addr;
  logic        uc_we, uc_re;
  logic [15:0] uc_wdata, uc_rdata;
  logic [11:0] uc_faddr;
  logic [15:0] uc_fdata;
  mode_t       mode;
  logic        classify_busy;
  logic [31:0] monitor;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [4:0]  pm [NPT][DIM];
  logic        used_m [NPT];
  pparam_t     pp_m [NPT];
  logic [4:0]  vecs [$][DIM];
  logic [63:0] words [$];
  longint      cyc = 0;
  longint      murdy_t [$];
  int n_two = 0, n_one = 0, n_bothfull = 0, n_dlwait = 0, n_bypass = 0, n_ieee = 0;
  int n_norm_in = 0, n_norm_out = 0, n_drop = 0;
  int n_preset = 0;   // vectors already queued by the caller for the next batch

  always @(posedge clk) begin
    cyc++;
    if (out_valid && out_ready) words.push_back(out_data);
    if (dut.u_cmc.dcu_start && dut.u_cmc.dcu_half) n_two++;
    if (dut.u_cmc.dcu_start && !dut.u_cmc.dcu_half && !dut.two_halves) n_one++;
    if (dut.ibr_full == 2'b11 && dut.u_ibr.wvalid) n_bothfull++;
    if (dut.dl_wait) n_dlwait++;
    if (dut.mu_bypass) n_bypass++;
    if (dut.murdy) murdy_t.push_back(cyc);
    if (in_valid && in_ready && !dut.ibr_burst) n_norm_in++;
    if (out_valid && out_ready && !dut.obr_burst) n_norm_out++;
    if (out_valid && out_ready && dut.fpconv) n_ieee++;
  end

  task automatic init_signals();
    h_addr = 0; h_we = 0; h_wdata = 0; in_valid = 0; in_data = 0; out_ready = 1;
    pgf_we = 0; pgf_addr = 0; pgf_wdata = 0; uc_addr = 0; uc_we = 0; uc_re = 0; uc_wdata = 0; uc_faddr = 0;
  endtask

  task automatic uc_write(input logic [19:0] a, input logic [15:0] d);
    @(negedge clk); uc_addr = a; uc_wdata = d; uc_we = 1;
    @(negedge clk); uc_we = 0;
  endtask

  task automatic uc_read(input logic [19:0] a, output logic [15:0] d);
    @(negedge clk); uc_addr = a; uc_re = 1;
    @(negedge clk); uc_re = 0; d = uc_rdata;
  endtask

  task automatic set_reg(input int a, input logic [31:0] d);
    @(negedge clk); h_addr = 4'(a); h_wdata = d; h_we = 1;
    @(negedge clk); h_we = 0;
  endtask

  function automatic logic [19:0] pa_addr(int p, int j);
    return 20'hC0000 | 20'(p << DWB) | 20'(j);
  endfunction

  task automatic program_params();
    for (int p = 0; p < NPT; p++) begin
      logic [47:0] w;
      pp_m[p].used = used_m[p];
      w = pp_m[p];
      uc_write(20'h05000 + 20'(p), w[15:0]);
      uc_write(20'h05400 + 20'(p), w[31:16]);
      uc_write(20'h05800 + 20'(p), w[47:32]);
    end
  endtask

  // random prototypes; classes come in runs so that the bypass is needed
  task automatic program_all(input int seed_runs);
    int cl = 0;
    for (int p = 0; p < NPT; p++) begin
      used_m[p] = (p % 7 != 5);
      if ($urandom_range(0, 2) == 0) cl = int'($urandom_range(0, NCL - 1));
      pp_m[p] = '0;
      pp_m[p].cls   = 6'(cl);
      pp_m[p].l     = 12'($urandom_range(DIM * 6, DIM * 14));
      pp_m[p].k_man = 4'($urandom_range(1, 15));
      pp_m[p].k_exp = 4'($urandom_range(KEXP_LO, KEXP_HI));
      pp_m[p].c     = 16'($urandom_range(1, 65535));
      pp_m[p].conf  = 1'($urandom);
      for (int j = 0; j < DIM; j++) begin
        pm[p][j] = 5'($urandom);
        uc_write(pa_addr(p, j), {11'd0, pm[p][j]});
      end
      uc_write(20'h03000 + 20'(p), {15'd0, used_m[p]});
    end
    program_params();
  endtask

  task automatic readback();
    logic [15:0] d;
    for (int p = 0; p < NPT; p += 3) begin
      for (int j = 0; j < DIM; j += 3) begin
        uc_read(pa_addr(p, j), d);
        checks++; if (d !== {11'd0, pm[p][j]}) begin failures++; $display("PA readback p%0d j%0d", p, j); end
      end
      uc_read(20'h03000 + 20'(p), d);
      checks++; if (d[0] !== used_m[p]) begin failures++; $display("used readback %0d", p); end
      uc_read(20'h05400 + 20'(p), d);
      checks++; if (d !== pp_m[p].c) begin failures++; $display("PPR readback %0d", p); end
    end
  endtask

  function automatic int l1(int p, int v, int n);
    int s = 0;
    for (int j = 0; j < n; j++) s += (pm[p][j] > vecs[v][j]) ? pm[p][j] - vecs[v][j] : vecs[v][j] - pm[p][j];
    return s;
  endfunction

  function automatic real fp_val(logic [15:0] b);
    fp16_t f = fp16_t'(b);
    return (f.e == 0) ? 0.0 : (1.0 + real'(f.m) / 1024.0) * (2.0 ** (real'(f.e) - 32.0));
  endfunction

  function automatic real ieee_val(logic [31:0] b);
    if (b[30:23] == 0) return 0.0;
    return (1.0 + real'(b[22:0]) / 8388608.0) * (2.0 ** (real'(b[30:23]) - 127.0));
  endfunction

  // compare the record of vector v (items already unpacked)
  task automatic check_record(input int v, input int n, input logic [31:0] items [$], input logic ieee);
    logic fired [64];
    int   exp_list [$];
    real  want [64];
    int   k = 0;
    for (int c = 0; c < 64; c++) begin fired[c] = 0; want[c] = 0.0; end
    for (int p = 0; p < NPT; p++) if (used_m[p] && (p < NDCU || dut.two_halves)) begin
      int d = l1(p, v, n);
      real kk = real'(pp_m[p].k_man) * (2.0 ** (-5.0 - real'(pp_m[p].k_exp)));
      if (d < int'(pp_m[p].l) && !fired[pp_m[p].cls]) begin fired[pp_m[p].cls] = 1; exp_list.push_back(int'(pp_m[p].cls)); end
      want[pp_m[p].cls] += real'(pp_m[p].c) * $exp(-kk * real'(d));
    end
    checks++;
    if (items.size() < 1 + exp_list.size() + NCL) begin failures++; $display("vector %0d: short record", v); return; end
    checks++;
    if (int'(items[0]) != exp_list.size()) begin failures++; $display("vector %0d: count %0d want %0d", v, items[0], exp_list.size()); end
    k = 1;
    foreach (exp_list[j]) begin
      checks++;
      if (int'(items[k]) != exp_list[j]) begin failures++; $display("vector %0d: list[%0d] %0d want %0d", v, j, items[k], exp_list[j]); end
      k++;
    end
    for (int c = 0; c < NCL; c++) begin
      real g = ieee ? ieee_val(items[k]) : fp_val(items[k][15:0]);
      checks++;
      if (want[c] < 1e-9 ? g > 1e-9 : (g < want[c] * 0.985 || g > want[c] * 1.015)) begin
        failures++; $display("vector %0d: pdf[%0d] %g want %g", v, c, g, want[c]);
      end
      k++;
    end
  endtask

  // stream nv vectors of dimension n, collect and check their records
  task automatic run_batch(input int nv, input int n, input logic in32n, input logic ieee, input logic drop_test);
    int base = vecs.size() - n_preset;
    int per_in, per_out, w;
    logic [31:0] items [$];
    logic m64 = dut.obr_mode64;
    words.delete();
    murdy_t.delete();
    for (int v = n_preset; v < nv; v++) begin
      logic [4:0] e [DIM];
      for (int j = 0; j < DIM; j++) e[j] = 5'($urandom);
      vecs.push_back(e);
    end
    n_preset = 0;
    set_reg(8, 32'(MODE_CLASSIFY));
    per_in = dut.ibr_mode64 ? 8 : 4;
    fork
      begin
        for (int v = 0; v < nv; v++)
          for (int i = 0; i < n; i += per_in) begin
            @(negedge clk);
            in_valid = 1;
            in_data = '0;
            for (int j = 0; j < per_in; j++) if (i + j < n) in_data[j*8 +: 8] = {3'b000, vecs[base + v][i + j]};
            @(posedge clk); while (!in_ready) @(posedge clk);
            @(negedge clk); in_valid = 0;
          end
      end
      begin
        if (drop_test) begin
          // a uC write to the parameter RAM must be dropped in CLASSIFY mode
          repeat (5) @(negedge clk);
          uc_write(20'h05400, ~pp_m[0].c);
        end
      end
      begin
        if (in32n) begin
          while (murdy_t.size() < nv || classify_busy) begin
            @(negedge clk); out_ready = 1'($urandom);
          end
          out_ready = 1;
        end
      end
    join
    while (classify_busy || murdy_t.size() < nv) @(negedge clk);
    repeat (10) @(negedge clk);
    set_reg(8, 32'(MODE_NORMAL));
    if (drop_test) begin
      logic [15:0] d;
      uc_read(20'h05400, d);
      checks++;
      if (d !== pp_m[0].c) begin failures++; $display("uC write not dropped in CLASSIFY mode"); end
      else n_drop++;
    end
    // unpack items
    per_out = (m64 ? 64 : 32) / (ieee ? 32 : 16);
    w = 0;
    for (int v = 0; v < nv; v++) begin
      int need;
      items.delete();
      // first word holds the count; records end at a word boundary
      need = 0;
      while (w < words.size()) begin
        for (int s = 0; s < per_out; s++)
          items.push_back(ieee ? words[w][s*32 +: 32] : 32'(words[w][s*16 +: 16]));
        w++;
        need = 1 + int'(items[0]) + NCL;
        if (items.size() >= need) break;
      end
      check_record(base + v, n, items, ieee);
    end
    checks++;
    if (w != words.size()) begin failures++; $display("%0d extra output words", words.size() - w); end
  endtask

  task automatic other_modes();
    logic [15:0] d;
    set_reg(8, 32'(MODE_MONITOR));
    @(negedge clk); uc_addr = 20'h0ABCD; uc_wdata = 16'h5A5A; #1;
    checks++; if (monitor !== 32'hABCD5A5A) begin failures++; $display("monitor %h", monitor); end
    set_reg(8, 32'(MODE_TEST));
    #1;
    checks++;
    if (monitor !== {8'd0, dut.u_obr.busy, dut.u_obr.release_o, dut.u_cmc.murdy_bank, dut.u_cmc.murdy,
                     dut.u_cmc.busy, dut.u_cmc.dl_wait, dut.u_mu.bypass, dut.u_mu.done,
                     dut.u_mu.issue_done, dut.u_mu.cmd_ready, dut.u_cmc.mu_cmd_bank,
                     dut.u_cmc.mu_cmd_last, dut.u_cmc.mu_cmd_first, dut.u_cmc.mu_cmd_half,
                     dut.u_cmc.mu_cmd_valid, dut.u_cmc.two_halves, dut.u_cmc.dcu_done,
                     dut.u_cmc.dcu_busy, dut.u_cmc.dcu_half, dut.u_cmc.dcu_start,
                     dut.u_ibr.full, dut.u_cmc.ibr_release, dut.u_cmc.ibfull} ||
        monitor[12] !== 1'b1) begin  // math unit idle and ready
      failures++; $display("test bus %h", monitor);
    end
    set_reg(8, 32'(MODE_PGF));
    @(negedge clk); pgf_addr = 12'h123; pgf_wdata = 16'hBEEF; pgf_we = 1;
    @(negedge clk); pgf_we = 0;
    @(negedge clk);
    checks++; if (pgf_rdata !== 16'hBEEF) begin failures++; $display("pgf load %h", pgf_rdata); end
    set_reg(8, 32'(MODE_NORMAL));
    uc_faddr = 12'h123; repeat (3) @(negedge clk);
    checks++; if (uc_fdata !== 16'hBEEF) begin failures++; $display("pgf fetch %h", uc_fdata); end
    uc_write(20'h00042, 16'h7E57); uc_read(20'h00042, d);
    checks++; if (d !== 16'h7E57) begin failures++; $display("general RAM %h", d); end
    uc_read(20'h06800, d);   // density of class 0 in bank 0
    checks++; if (d !== dut.u_mur.pdf[0][0] && dut.u_mur.pv[0][0]) begin failures++; $display("result RAM read %h", d); end
  endtask

  task automatic finish_checks(input logic all_mech);
    $display("two-pass %0d, one-pass %0d, both banks full %0d, latch waits %0d, bypass %0d, ieee words %0d, normal in %0d, normal out %0d, dropped uC writes %0d",
             n_two, n_one, n_bothfull, n_dlwait, n_bypass, n_ieee, n_norm_in, n_norm_out, n_drop);
    if (all_mech) begin
    checks++; if (n_two == 0)      begin failures++; $display("no two-pass vector"); end
    checks++; if (n_one == 0)      begin failures++; $display("no one-pass vector"); end
    checks++; if (n_bothfull == 0) begin failures++; $display("input banks never both full"); end
    checks++; if (n_dlwait == 0)   begin failures++; $display("no latch wait"); end
    checks++; if (n_bypass == 0)   begin failures++; $display("bypass never used"); end
    checks++; if (n_ieee == 0)     begin failures++; $display("no IEEE output"); end
    checks++; if (n_norm_in == 0)  begin failures++; $display("no normal-mode input"); end
    checks++; if (n_norm_out == 0) begin failures++; $display("no normal-mode output"); end
    checks++; if (n_drop == 0)     begin failures++; $display("no dropped uC write"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
