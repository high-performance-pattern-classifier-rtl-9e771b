// tb_classifier_full: the classifier at its full size, 1024 prototypes of
// 256 dimensions and 64 classes, with the top's default parameters.
// Loads every prototype element, used flag and parameter word over the uC
// bus, streams four vectors back to back in CLASSIFY mode and checks every
// result record (fired class list exactly, densities within 1.5%) against
// the reference model. Checks the timing of the two-half pipeline: each
// distance pass takes 514 clocks, the math unit finishes a half 519 clocks
// after taking it, and in steady state a vector is classified at
// most every 1032 clocks. Prints the single-shot latency of the first
// vector from its first input word to its result.
module tb_classifier_full;
  import pc_pkg::*;
  localparam int NPT = 1024, DIM = 256, NDCU = NPT / 2, DWB = 8, NCL = 64, WATCHDOG = 2000000,
                 KEXP_LO = 9, KEXP_HI = 13;
`include "tb_top_body.svh"
  classifier_top dut (.*);

  longint t_pass0 = -1, t_mu0 = -1, first_in = -1;
  int n_pass_bad = 0, n_pass = 0, n_mu_bad = 0, n_mu = 0;
  always @(posedge clk) begin
    if (dut.dcu_start) t_pass0 = cyc;
    if (dut.dcu_done) begin
      n_pass++;
      if (cyc - t_pass0 != 514) begin n_pass_bad++; $display("pass took %0d clocks", cyc - t_pass0); end
    end
    if (dut.mu_cmd_valid && dut.mu_cmd_ready && dut.mu_cmd_last) t_mu0 = cyc;
    if (dut.mu_done) begin
      n_mu++;
      if (cyc - t_mu0 != 519) begin n_mu_bad++; $display("math unit took %0d clocks", cyc - t_mu0); end
    end
    if (first_in < 0 && in_valid && in_ready) first_in = cyc;
  end

  initial begin
    int per;
    init_signals();
    repeat (3) @(negedge clk); rst_n = 1;
    program_all(1);
    readback();
    set_reg(6, DIM); set_reg(7, NCL); set_reg(0, 32'h3); set_reg(1, 32'h1A);
    run_batch(4, DIM, 0, 0, 1);
    per = int'((murdy_t[3] - murdy_t[1]) / 2);
    $display("single-shot latency %0d clocks, steady state %0d clocks per vector", murdy_t[0] - first_in, per);
    checks++; if (per > 1032) begin failures++; $display("rate too low"); end
    checks++; if (n_pass == 0 || n_pass_bad != 0) begin failures++; $display("pass timing"); end
    checks++; if (n_mu == 0 || n_mu_bad != 0) begin failures++; $display("math unit timing"); end
    finish_checks(1'b0);
  end
endmodule
