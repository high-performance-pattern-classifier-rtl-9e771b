// tb_cmc: classification controller against cycle-level models of the
// input buffer, distance units, math unit and output buffer (timings as in
// a 16-prototype array: pass 18 clocks, math unit issue 9 clocks, 7 clocks
// pipeline; one batch with a math unit slower than a pass). Runs a stream of vectors with two halves and then with one,
// and checks: every vector goes through passes 0,1 (or 0) and math unit
// commands with the right half/first/last; no pass starts on latches the
// math unit still reads and no command is given for latches not yet
// written; the input buffer bank is released only after the last pass and,
// with two halves, after the math unit has read half 0; result banks
// alternate and are not reused before the output buffer releases them; all
// vectors are reported. It also counts latch waits, which must occur.
module tb_cmc;
  localparam int T_DCU = 18, T_LAT = 7, T_OBR = 30;
  int T_ISS = 9;   // math unit issue time; raised above T_DCU in the second batch
  logic clk = 0, rst_n = 0;
  logic enable, ibfull, two_halves, ibr_release;
  logic dcu_start, dcu_half, dcu_busy, dcu_done;
  logic mu_cmd_valid, mu_cmd_half, mu_cmd_first, mu_cmd_last, mu_cmd_bank, mu_cmd_ready;
  logic mu_issue_done, mu_issue_done_half, mu_done;
  logic murdy, murdy_bank, obr_release, busy, dl_wait;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cmc dut (.*);

  // environment state
  int ib_cnt = 0, dcu_t = 0, iss_t = 0, obr_t = 0, ndone = 0;
  int lat_q [$];
  logic cur_half = 0, cur_last = 0, mu_first_q = 0;
  logic dl_written [2] = '{0, 0};
  logic dl_inuse [2]   = '{0, 0};
  logic h0_read = 0;
  logic bank_busy [2]  = '{0, 0};
  logic exp_dcu_half = 0, exp_mu_half = 0, last_bank = 1, cur_bank = 0, obr_bank = 0;
  int n_rel = 0, n_murdy = 0, n_wait = 0, n_push = 0;

  task automatic fail(input string s);
    failures++; $display("%0t: %s", $time, s);
  endtask

  assign ibfull       = ib_cnt > 0;
  assign dcu_busy     = dcu_t > 0;
  assign mu_cmd_ready = iss_t == 0 && (!mu_cmd_first || lat_q.size() == 0);

  always @(posedge clk) if (rst_n) begin
    dcu_done      <= 1'b0;
    mu_issue_done <= 1'b0;
    mu_done       <= 1'b0;
    obr_release   <= 1'b0;
    if (dl_wait) n_wait++;
    // distance passes
    if (dcu_start) begin
      checks++;
      if (dcu_half != exp_dcu_half) fail("wrong pass order");
      if (dl_inuse[dcu_half] || dl_written[dcu_half]) fail("pass started on busy latches");
      dcu_t <= T_DCU;
    end
    if (dcu_t == 1) begin
      dcu_done <= 1'b1;
      dl_written[exp_dcu_half] = 1;
      exp_dcu_half = two_halves ? !exp_dcu_half : 1'b0;
    end
    if (dcu_t > 0) dcu_t <= dcu_t - 1;
    // math unit
    if (mu_cmd_valid && mu_cmd_ready) begin
      checks++;
      if (mu_cmd_half != exp_mu_half) fail("wrong math unit half");
      if (!dl_written[mu_cmd_half]) fail("command for latches not written");
      if (mu_cmd_first != !mu_cmd_half) fail("first flag");
      if (mu_cmd_last != (mu_cmd_half || !two_halves)) fail("last flag");
      if (mu_cmd_first) begin
        if (bank_busy[mu_cmd_bank]) fail("result bank still held by the output buffer");
        if (mu_cmd_bank == last_bank) fail($sformatf("result banks do not alternate %0d %0d", mu_cmd_bank, last_bank));
        cur_bank = mu_cmd_bank;
        last_bank = mu_cmd_bank;
      end else if (mu_cmd_bank != cur_bank) fail("bank changed within a vector");
      dl_written[mu_cmd_half] = 0;
      dl_inuse[mu_cmd_half] = 1;
      cur_half = mu_cmd_half; cur_last = mu_cmd_last;
      exp_mu_half = two_halves ? !mu_cmd_half : 1'b0;
      iss_t <= T_ISS;
    end
    if (iss_t == 1) begin
      mu_issue_done <= 1'b1; mu_issue_done_half <= cur_half;
      dl_inuse[cur_half] = 0;
      if (!cur_half) h0_read = 1;
      if (cur_last) lat_q.push_back(T_LAT);
    end
    if (iss_t > 0) iss_t <= iss_t - 1;
    foreach (lat_q[i]) lat_q[i]--;
    if (lat_q.size() > 0 && lat_q[0] == 0) begin
      void'(lat_q.pop_front());
      mu_done <= 1'b1;
      bank_busy[cur_bank] = 1;
    end
    // output buffer
    if (murdy) begin
      n_murdy++;
      checks++;
      if (murdy_bank != 1'(n_murdy - 1)) fail("murdy bank out of order");
      if (obr_t > 0) fail("murdy while the output buffer is busy");
      obr_bank = murdy_bank;
      obr_t <= T_OBR;
    end
    if (obr_t == 1) begin obr_release <= 1'b1; bank_busy[obr_bank] = 0; end
    if (obr_t > 0) obr_t <= obr_t - 1;
    // input buffer
    if (ibr_release) begin
      n_rel++;
      checks++;
      if (dcu_t != 0 || exp_dcu_half != 0) fail("released before the last pass");
      if (two_halves && !h0_read) fail("released before half 0 was read");
      h0_read = 0;
      ib_cnt <= ib_cnt - 1;
    end
  end

  task automatic push_vec();
    while (ib_cnt >= 2) @(negedge clk);
    ib_cnt = ib_cnt + 1;
    n_push++;
  endtask

  initial begin
    enable = 0; two_halves = 1;
    dcu_done = 0; mu_issue_done = 0; mu_issue_done_half = 0; mu_done = 0; obr_release = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); enable = 1;
    for (int v = 0; v < 8; v++) begin push_vec(); repeat (5) @(negedge clk); end
    while (busy || ib_cnt != 0) @(negedge clk);
    repeat (40) @(negedge clk);
    T_ISS = 25;      // slower than a pass: release must wait for the math unit
    for (int v = 0; v < 4; v++) push_vec();
    while (busy || ib_cnt != 0) @(negedge clk);
    repeat (40) @(negedge clk);
    T_ISS = 9;
    two_halves = 0;
    for (int v = 0; v < 6; v++) push_vec();
    while (busy || ib_cnt != 0) @(negedge clk);
    repeat (40) @(negedge clk);
    checks++; if (n_murdy != n_push) fail($sformatf("%0d results for %0d vectors", n_murdy, n_push));
    checks++; if (n_rel != n_push) fail("release count");
    checks++; if (n_wait == 0) fail("no latch wait seen");
    $display("vectors %0d, latch-wait clocks %0d", n_push, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
