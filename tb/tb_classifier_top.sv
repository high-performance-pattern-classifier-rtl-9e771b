// tb_classifier_top: end-to-end test of the classifier at a reduced size
// (16 prototypes of up to 8 dimensions, i.e. 8 distance units).
//
// Prototypes, used flags and parameters are loaded over the uC bus and
// checked by reading them back. Vectors are then streamed by the host in
// CLASSIFY mode and every result record is compared with a reference model
// here: the fired class list exactly (RCE rule D < L, classes in firing
// order) and each class density against the real sum of C*exp(-K*D)
// (within 1.5%). Three batches:
//   A  both halves used (2x time sharing), 64-bit burst input, 16-bit
//      items on a 32-bit burst output, vectors back to back;
//   B  same prototypes, dimension 5, 32-bit normal-mode input, IEEE items on
//      a 64-bit normal-mode output with host back-pressure;
//   C  upper half unused (one pass per vector), burst.
// Mechanisms counted, each must occur: two-pass vectors, one-pass vectors,
// both input banks full, a pass waiting for its latches, the math unit
// bypass, the IEEE conversion, normal-mode input and output, a uC write
// dropped in CLASSIFY mode. Also checks the steady-state rate of batch A,
// the MONITOR and TEST mode pins and a PGF mode program load.
module tb_classifier_top;
  import pc_pkg::*;
  localparam int NPT = 16, DIM = 8, NDCU = NPT / 2, DWB = 3, NCL = 8, WATCHDOG = 100000,
                 KEXP_LO = 3, KEXP_HI = 7;
`include "tb_top_body.svh"
  classifier_top #(.NPT(NPT), .DIM(DIM)) dut (.*);

  initial begin
    int per;
    init_signals();
    repeat (3) @(negedge clk); rst_n = 1;
    program_all(1);
    readback();
    // batch A
    set_reg(6, DIM); set_reg(7, NCL); set_reg(0, 32'h3); set_reg(1, 32'h1A);
    run_batch(5, DIM, 0, 0, 1);
    per = (murdy_t[4] - murdy_t[1]) / 3;
    checks++;
    if (per > 2 * (2 * DIM + 2) + 8) begin failures++; $display("rate: %0d clocks per vector", per); end
    $display("batch A: %0d clocks per vector in steady state", per);
    // batch B
    set_reg(6, 5); set_reg(0, 32'h0); set_reg(1, 32'h1D);
    run_batch(3, 5, 1, 1, 1);
    // batch C: upper half unused
    for (int p = NDCU; p < NPT; p++) begin used_m[p] = 0; uc_write(20'h03000 + 20'(p), 16'd0); end
    program_params();
    set_reg(6, DIM); set_reg(0, 32'h3); set_reg(1, 32'h1A);
    run_batch(4, DIM, 0, 0, 0);
    other_modes();
    finish_checks(1'b1);
  end
endmodule
