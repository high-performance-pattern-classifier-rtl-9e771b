// proto_array: the prototype array (PA), NPT prototypes of DIM five-bit
// elements.
//
// In the chip this is a Flash EPROM read by one sense amplifier per DCU bit;
// here it is a memory array. One row holds element `dim` of every prototype
// of one half of the array, NDCU*5 bits, so a single read feeds all DCUs at
// once. Row address = {half, dim}. Prototype p lives in half p / NDCU,
// column p % NDCU.
//
// Classify read: raddr is taken on one clock edge and the row appears on
// rdata one clock later (a two-clock read, the second register standing for
// the sense-amp latches). Keeping raddr for two cycles keeps rdata for two.
// The uC path programs (wr) and verifies (rd, one-cycle latency) a single
// element. Program = write; the Flash erase and high-voltage sequencing are
// not modelled.
module proto_array #(
  parameter int unsigned NPT = pc_pkg::NPT_DEF,
  parameter int unsigned DIM = pc_pkg::DIM_DEF,
  localparam int unsigned NDCU = NPT / 2,
  localparam int unsigned PW = $clog2(NPT),
  localparam int unsigned DW = $clog2(DIM)
) (
  input  logic                      clk,
  // classify read port
  input  logic [DW:0]               raddr,   // {half, dim}
  output logic [NDCU*5-1:0]         rdata,
  // uC program / verify port
  input  logic                      uc_we,
  input  logic [PW-1:0]             uc_pt,
  input  logic [DW-1:0]             uc_dim,
  input  logic [4:0]                uc_wdata,
  output logic [4:0]                uc_rdata
);
  logic [NDCU*5-1:0] mem [2*DIM];
  logic [DW:0]       raddr_q;
  logic [DW:0]       uc_row;
  logic [PW-2:0]     uc_col;

  assign uc_row = {uc_pt[PW-1], uc_dim};
  assign uc_col = uc_pt[PW-2:0];

  always_ff @(posedge clk) begin
    raddr_q <= raddr;
    rdata   <= mem[raddr_q];
    if (uc_we) mem[uc_row][uc_col*5 +: 5] <= uc_wdata;
    uc_rdata <= mem[uc_row][uc_col*5 +: 5];
  end
endmodule
