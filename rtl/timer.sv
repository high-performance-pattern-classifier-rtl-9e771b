// timer: 32-bit unconditional clock counter used by the uC as a time
// reference. It counts every clock from reset and wraps. The uC reads it
// in two 16-bit halves; reading the low half (sel = 0) captures the high
// half so that a low-then-high read sequence is consistent (the capture is
// this design's choice).
module timer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rd,
  input  logic        sel,
  output logic [31:0] count,
  output logic [15:0] rdata
);
  logic [15:0] hi_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      hi_q  <= '0;
    end else begin
      count <= count + 1'b1;
      if (rd && !sel) hi_q <= count[31:16];
    end
  end
  assign rdata = sel ? hi_q : count[15:0];
endmodule
