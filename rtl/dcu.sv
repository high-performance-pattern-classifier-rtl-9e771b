// dcu: one distance calculation unit of the prototype array.
//
// Each DCU serves two prototypes (one in each half of the array, the "2x
// time sharing") and accumulates |A - B| over all dimensions, where A is the
// prototype element read from the array and B the input element. Following
// the chip, the difference is formed by adding A to the one's complement of
// B: without a carry the inverted sum is the difference, with a carry the
// sum plus one is. The 13-bit distance is held as a 5-bit accumulator whose
// carry steps an 8-bit counter.
//
// Timing: one element takes two clocks. On a cycle with ph0 the sum A + ~B
// and its carry are latched; on the next cycle, with ph1, the difference is
// added to the accumulator. clr empties the accumulator before a vector.
// latch (given together with the ph1 of the last element) copies the final
// sum into distance latch dl[half]. All controls are gated by used[half]:
// a DCU whose prototype is not used does not toggle and its latch holds.
module dcu (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [pc_pkg::ELEM_W-1:0] a,      // prototype element
  input  logic [pc_pkg::ELEM_W-1:0] b,      // input element
  input  logic                      half,   // which prototype of the pair
  input  logic [1:0]                used,   // used flags of the pair
  input  logic                      clr,
  input  logic                      ph0,
  input  logic                      ph1,
  input  logic                      latch,
  output logic [pc_pkg::DIST_W-1:0] dl [2]  // distance latches
);
  import pc_pkg::*;

  logic              en;
  logic [ELEM_W-1:0] sum_q;
  logic              cy_q;
  logic [ELEM_W-1:0] diff;
  logic [ELEM_W-1:0] acc_lo;
  logic [7:0]        acc_hi;
  logic [ELEM_W:0]   lo_next;
  logic [7:0]        hi_next;

  assign en = used[half];

  always_ff @(posedge clk) begin
    if (en && ph0) {cy_q, sum_q} <= {1'b0, a} + {1'b0, ~b};
  end

  assign diff    = cy_q ? sum_q + 1'b1 : ~sum_q;
  assign lo_next = {1'b0, acc_lo} + {1'b0, diff};
  assign hi_next = acc_hi + 8'(lo_next[ELEM_W]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_lo <= '0;
      acc_hi <= '0;
      dl[0]  <= '0;
      dl[1]  <= '0;
    end else if (en) begin
      if (clr) begin
        acc_lo <= '0;
        acc_hi <= '0;
      end else if (ph1) begin
        acc_lo <= lo_next[ELEM_W-1:0];
        acc_hi <= hi_next;
      end
      if (latch) dl[half] <= {hi_next, lo_next[ELEM_W-1:0]};
    end
  end
endmodule
