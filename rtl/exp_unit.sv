// exp_unit: exp(-K*D) for the math unit, returned as a 16-bit float.
//
// exp(-K*D) is rewritten as 2^-X with X = K*D*log2(e). X is split into its
// integer part S, its next five fraction bits X_M and a remainder eps below
// 2^-5, so that 2^-X = 2^-S * 2^-(X_M/32) * 2^-eps. As in the chip, the
// three factors come from a shifter (here: subtracting S from the float
// exponent), a 32 x 11 ROM of 2^-(X_M/32), and a shift-and-add multiplier
// forming 1 - eps*ln2 (the first two terms of the series of 2^-eps).
//
// Fixed-point choices of this design: log2(e) is 5909/4096; X is kept with
// 13 fraction bits (5 for the ROM index, 8 for eps); ln2 is approximated as
// 1/2 + 1/8 + 1/16 + 1/256 + 1/512; the ROM holds round(2^(-t/32) * 1024)
// for t = 0..31; products are truncated. The relative error stays below
// 0.25%. Results below 2^-31 become zero.
//
// K = k_man * 2^-(5+k_exp). Timing: two pipeline registers; in_valid with
// d/k_* on one clock gives out_valid with y two clocks later. One result per
// clock.
module exp_unit (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [pc_pkg::DIST_W-1:0] d,
  input  logic [3:0]                k_man,
  input  logic [3:0]                k_exp,
  output logic                      out_valid,
  output pc_pkg::fp16_t             y
);
  import pc_pkg::*;

  localparam logic [12:0] LOG2E_Q12 = 13'd5909;
  localparam logic [10:0] ROM [32] = '{
    11'd1024, 11'd1002, 11'd981, 11'd960, 11'd939, 11'd919, 11'd899, 11'd880,
    11'd861,  11'd843,  11'd825, 11'd807, 11'd790, 11'd773, 11'd756, 11'd740,
    11'd724,  11'd709,  11'd693, 11'd679, 11'd664, 11'd650, 11'd636, 11'd622,
    11'd609,  11'd596,  11'd583, 11'd571, 11'd558, 11'd546, 11'd535, 11'd523};

  logic [16:0] kd;
  logic [29:0] q;
  logic [25:0] x_q;      // X with 13 fraction bits
  logic        v1;

  // stage 1: X = D * K * log2(e)
  assign kd = 17'(d) * 17'(k_man);
  assign q  = 30'(kd) * 30'(LOG2E_Q12);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1  <= 1'b0;
      x_q <= '0;
    end else begin
      v1  <= in_valid;
      x_q <= 26'(q >> (5'd4 + 5'(k_exp)));
    end
  end

  // stage 2: 2^-S * ROM[X_M] * (1 - eps*ln2)
  logic [12:0] s;
  logic [4:0]  t;
  logic [10:0] e16;
  logic [16:0] prod, om;
  logic [27:0] mant;
  int          sh;
  logic [9:0]  man;
  int          ex;
  fp16_t       r;

  always_comb begin
    s    = x_q[25:13];
    t    = x_q[12:8];
    e16  = {x_q[7:0], 3'b000};
    prod = 17'(e16 >> 1) + 17'(e16 >> 3) + 17'(e16 >> 4) + 17'(e16 >> 8) + 17'(e16 >> 9);
    om   = 17'h10000 - prod;
    mant = 28'(ROM[t]) * 28'(om);
    // the product lies in [0.489, 1]: leading one at bit 26, 25 or 24
    if (mant[26])      begin man = mant[25:16]; sh = 0; end
    else if (mant[25]) begin man = mant[24:15]; sh = 1; end
    else               begin man = mant[23:14]; sh = 2; end
    ex   = 32 - sh - int'(s);
    r    = '0;
    if (ex >= 1) begin
      r.e = 6'(ex);
      r.m = man;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= v1;
      y         <= r;
    end
  end
endmodule
