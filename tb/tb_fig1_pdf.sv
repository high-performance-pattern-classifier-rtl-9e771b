// tb_fig1_pdf: the two example class densities of the classifier's
// un-normalised PDF, run through the whole chip.
//
// Class 0 is a single two-dimensional prototype at (15,15) with C = 1 and
// K = 15/32. Class 1 has four prototypes: (15,15) with C = 10 and K = 1/4,
// and (17,17) C = 8, (20,20) C = 10, (23,23) C = 5, all with K = 15/32.
// The last of them sits in the upper half of the array, so every vector
// takes both passes. The dimension register is set to 2. The host sends
// the 32 points (x,x) of the diagonal and 32 random points of the 32 x 32
// plane. Each result record is compared with the reference model: the
// fired class list exactly, with thresholds L = 8 and 6, and both densities
// within 1.5% of the real sum of C*exp(-K*D). The densities along the
// diagonal are printed as a table.
//
// The array is 16 prototypes of 8 dimensions.
module tb_fig1_pdf;
  import pc_pkg::*;
  localparam int NPT = 16, DIM = 8, NDCU = NPT / 2, DWB = 3, NCL = 2, WATCHDOG = 200000,
                 KEXP_LO = 0, KEXP_HI = 0;
`include "tb_top_body.svh"
  classifier_top #(.NPT(NPT), .DIM(DIM)) dut (.*);

  // prototype p: centre, class, C, K mantissa (K = k_man/32)
  task automatic put(int p, int x, int cls, int c, int km, int l);
    pp_m[p] = '0;
    pp_m[p].cls = 6'(cls); pp_m[p].c = 16'(c); pp_m[p].k_man = 4'(km); pp_m[p].l = 12'(l);
    used_m[p] = 1;
    for (int j = 0; j < DIM; j++) pm[p][j] = (j < 2) ? 5'(x) : 5'd0;
  endtask

  initial begin
    init_signals();
    repeat (3) @(negedge clk); rst_n = 1;
    for (int p = 0; p < NPT; p++) begin
      used_m[p] = 0; pp_m[p] = '0;
      for (int j = 0; j < DIM; j++) pm[p][j] = '0;
    end
    put(0, 15, 0, 1, 15, 8);
    put(1, 15, 1, 10, 8, 6);
    put(2, 17, 1, 8, 15, 6);
    put(5, 20, 1, 10, 15, 6);
    put(NDCU + 3, 23, 1, 5, 15, 6);
    for (int p = 0; p < NPT; p++) begin
      for (int j = 0; j < DIM; j++) uc_write(pa_addr(p, j), {11'd0, pm[p][j]});
      uc_write(20'h03000 + 20'(p), {15'd0, used_m[p]});
    end
    program_params();
    readback();
    set_reg(6, 2); set_reg(7, NCL); set_reg(0, 32'h3); set_reg(1, 32'h1A);
    for (int v = 0; v < 64; v++) begin
      logic [4:0] e [DIM];
      for (int j = 0; j < DIM; j++) e[j] = '0;
      e[0] = (v < 32) ? 5'(v) : 5'($urandom);
      e[1] = (v < 32) ? 5'(v) : 5'($urandom);
      vecs.push_back(e);
    end
    n_preset = 64;
    run_batch(64, 2, 0, 0, 0);
    $display("  x   PDF class 0   PDF class 1   (reference, point (x,x))");
    for (int v = 0; v < 32; v += 2) begin
      real w0, w1;
      w0 = 0.0; w1 = 0.0;
      for (int p = 0; p < NPT; p++) if (used_m[p]) begin
        real r;
        r = real'(pp_m[p].c) * $exp(-real'(pp_m[p].k_man) / 32.0 * real'(l1(p, v, 2)));
        if (pp_m[p].cls == 0) w0 += r; else w1 += r;
      end
      $display(" %2d   %11.6f   %11.6f", v, w0, w1);
    end
    checks++; if (n_two != 64) begin failures++; $display("%0d two-pass vectors, want 64", n_two); end
    $display("two-pass vectors %0d, bypass %0d, latch waits %0d", n_two, n_bypass, n_dlwait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
