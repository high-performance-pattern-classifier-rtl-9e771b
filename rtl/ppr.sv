// ppr: prototype parameter RAMs, three NPT x 16 RAMs.
//
// In classify mode the three RAMs are read together so that the math unit
// gets the full 48-bit parameter word of one prototype per clock (mu_addr ->
// mu_rdata, one clock latency; layout in pc_pkg::pparam_t). Outside classify
// mode the uC uses them as general-purpose RAM, one 16-bit word at a time:
// uc_sel picks RAM 0, 1 or 2 (3 reads as zero, writes nothing), read data
// one clock after the address.
module ppr #(
  parameter int unsigned NPT = pc_pkg::NPT_DEF,
  localparam int unsigned PW = $clog2(NPT)
) (
  input  logic            clk,
  input  logic [PW-1:0]   mu_addr,
  output pc_pkg::pparam_t mu_rdata,
  input  logic            uc_we,
  input  logic [1:0]      uc_sel,
  input  logic [PW-1:0]   uc_addr,
  input  logic [15:0]     uc_wdata,
  output logic [15:0]     uc_rdata
);
  logic [15:0] ram0 [NPT];
  logic [15:0] ram1 [NPT];
  logic [15:0] ram2 [NPT];

  always_ff @(posedge clk) begin
    if (uc_we && uc_sel == 2'd0) ram0[uc_addr] <= uc_wdata;
    if (uc_we && uc_sel == 2'd1) ram1[uc_addr] <= uc_wdata;
    if (uc_we && uc_sel == 2'd2) ram2[uc_addr] <= uc_wdata;
    mu_rdata <= {ram2[mu_addr], ram1[mu_addr], ram0[mu_addr]};
    case (uc_sel)
      2'd0:    uc_rdata <= ram0[uc_addr];
      2'd1:    uc_rdata <= ram1[uc_addr];
      2'd2:    uc_rdata <= ram2[uc_addr];
      default: uc_rdata <= '0;
    endcase
  end
endmodule
