// ibr: input buffer RAM, two DIM x 5 banks used alternately ("flipping").
//
// The host writes an input vector as 32-bit or 64-bit words (mode64). Each
// byte of a word carries one element in its low five bits, so a word holds
// four or eight elements, element 0 in the lowest byte. In burst mode a word
// can be taken every clock; in normal mode the buffer takes at most one word
// every four clocks (the four-clock access). A word is taken when wvalid and
// wready are both high. When `dim` elements have arrived the bank is full:
// ibfull rises and writing moves on to the other bank, so the next vector
// can arrive while the first is being classified. wready is low while both
// banks are full.
//
// The distance units read the oldest full bank through raddr -> rdata (one
// clock latency). release frees that bank once the controller is done with
// it; ibfull then reflects the other bank.
module ibr #(
  parameter int unsigned DIM = pc_pkg::DIM_DEF,
  localparam int unsigned DW = $clog2(DIM)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW:0]   dim,
  input  logic          mode64,
  input  logic          burst,
  input  logic          wvalid,
  output logic          wready,
  input  logic [63:0]   wdata,
  output logic          ibfull,
  input  logic [DW-1:0] raddr,
  output logic [4:0]    rdata,
  input  logic          release_i,
  output logic [1:0]    full
);
  logic [4:0]  mem0 [DIM];
  logic [4:0]  mem1 [DIM];
  logic        wb, rb;        // write bank, read bank
  logic [DW:0] wptr;
  logic [1:0]  pace;
  logic        take;
  logic [3:0]  nel;

  assign nel    = mode64 ? 4'd8 : 4'd4;
  assign wready = !full[wb] && (burst || pace == 2'd0);
  assign take   = wvalid && wready;
  assign ibfull = full[rb];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb   <= 1'b0;
      rb   <= 1'b0;
      wptr <= '0;
      full <= '0;
      pace <= '0;
    end else begin
      if (!burst && (pace != 0 || take)) pace <= pace + 1'b1;
      if (take) begin
        if (wptr + (DW+1)'(nel) >= dim) begin
          wptr     <= '0;
          full[wb] <= 1'b1;
          wb       <= !wb;
        end else begin
          wptr <= wptr + (DW+1)'(nel);
        end
      end
      if (release_i && full[rb]) begin
        full[rb] <= 1'b0;
        rb       <= !rb;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int j = 0; j < 8; j++) begin
      if (take && j < int'(nel) && (int'(wptr) + j) < int'(dim)) begin
        if (wb) mem1[(DW)'(int'(wptr) + j)] <= wdata[j*8 +: 5];
        else    mem0[(DW)'(int'(wptr) + j)] <= wdata[j*8 +: 5];
      end
    end
    rdata <= rb ? mem1[raddr] : mem0[raddr];
  end

  // a bank must never be written while it is full
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) take |-> !full[wb]);
endmodule
