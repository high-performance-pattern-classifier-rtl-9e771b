// ioc: IO controller register file and operating mode.
//
// Sixteen 32-bit registers shared by the external host, the uC and the
// hardware. Map (this design's assignment):
//   0  CTRL0  input buffer:  [0] 64-bit words, [1] burst
//   1  CTRL1  output buffer: [0] 64-bit words, [1] burst, [2] IEEE float
//             conversion, [3] send fired class list, [4] send densities,
//             [5] monitor bus select
//   2-4 STATUS0..2  read-only, driven by the hardware (status_hw)
//   5  STATUS3      read/write, for uC-to-host status
//   6  DIM    vector dimension (1..DIM_MAX)
//   7  NCLASS number of classes reported (1..64)
//   8  MODE   pc_pkg::mode_t
//   9  CHIPID read-only
//   10-15     general data registers
// Writes take effect on the clock edge; reads are combinational. When host
// and uC write in the same clock the uC wins. In TEST mode the uC is
// disabled and its writes are ignored. The uC port is 16 bits wide and
// reaches the low half of each register.
module ioc (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [3:0]            h_addr,
  input  logic                  h_we,
  input  logic [31:0]           h_wdata,
  output logic [31:0]           h_rdata,
  input  logic [3:0]            u_addr,
  input  logic                  u_we,
  input  logic [15:0]           u_wdata,
  output logic [15:0]           u_rdata,
  input  logic [31:0]           status_hw [3],
  output logic                  ibr_mode64,
  output logic                  ibr_burst,
  output logic                  obr_mode64,
  output logic                  obr_burst,
  output logic                  fpconv,
  output logic                  out_list,
  output logic                  out_pdf,
  output logic                  monitor_sel,
  output logic [8:0]            dim,
  output logic [6:0]            nclass,
  output pc_pkg::mode_t         mode
);
  import pc_pkg::*;

  logic [31:0] regs [16];
  logic [31:0] view [16];
  logic        uw;

  assign uw = u_we && mode != MODE_TEST;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) regs[i] <= '0;
      regs[1] <= 32'h18;          // list and densities
      regs[6] <= 32'd256;
      regs[7] <= 32'd64;
      regs[8] <= 32'(MODE_NORMAL);
    end else begin
      if (h_we) regs[h_addr] <= h_wdata;
      if (uw)   regs[u_addr] <= {16'd0, u_wdata};
    end
  end

  always_comb begin
    for (int i = 0; i < 16; i++) view[i] = regs[i];
    view[2] = status_hw[0];
    view[3] = status_hw[1];
    view[4] = status_hw[2];
    view[9] = 32'(CHIP_ID);
  end

  assign h_rdata     = view[h_addr];
  assign u_rdata     = view[u_addr][15:0];
  assign ibr_mode64  = regs[0][0];
  assign ibr_burst   = regs[0][1];
  assign obr_mode64  = regs[1][0];
  assign obr_burst   = regs[1][1];
  assign fpconv      = regs[1][2];
  assign out_list    = regs[1][3];
  assign out_pdf     = regs[1][4];
  assign monitor_sel = regs[1][5];
  assign dim         = (regs[6][8:0] == 0) ? 9'd1 : (regs[6][8:0] > 9'd256 ? 9'd256 : regs[6][8:0]);
  assign nclass      = (regs[7][6:0] == 0) ? 7'd1 : (regs[7][6:0] > 7'd64 ? 7'd64 : regs[7][6:0]);
  assign mode        = (regs[8][2:0] > 3'd4) ? MODE_NORMAL : mode_t'(regs[8][2:0]);
endmodule
