// pgf: program storage of the uC, 4K words of 16 bits (a Flash EPROM in
// the chip, a memory array here; erase and programming pulses are not
// modelled, a program write simply stores the word).
// Fetch port: the uC presents f_addr and gets f_data two clocks later,
// matching the one-fetch-per-two-clocks rate of the uC. Load port: in PGF
// mode (load_en) the external host writes and reads words; read data one
// clock after the address. Fetches are ignored while load_en is set.
module pgf #(
  parameter int unsigned WORDS = 4096,
  localparam int unsigned AW = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic [AW-1:0] f_addr,
  output logic [15:0]   f_data,
  input  logic          load_en,
  input  logic          l_we,
  input  logic [AW-1:0] l_addr,
  input  logic [15:0]   l_wdata,
  output logic [15:0]   l_rdata
);
  logic [15:0]   mem [WORDS];
  logic [AW-1:0] fa_q;
  always_ff @(posedge clk) begin
    if (load_en && l_we) mem[l_addr] <= l_wdata;
    l_rdata <= mem[l_addr];
    fa_q    <= f_addr;
    if (!load_en) f_data <= mem[fa_q];
  end
endmodule
