// mur: math unit result RAM, two identical banks used alternately.
//
// Each bank holds 64 16-bit class densities (PDF), a 64-byte fired class
// list and the fired class count. While the math unit fills one bank the
// output buffer reads the other. The math unit side is dual ported: a PDF
// read (one clock latency) and a PDF write in the same clock, as the
// accumulate pipeline needs. `clear` empties the math unit's bank in one
// clock: each PDF word carries a valid bit, and a word that has not been
// written since the clear reads as zero. The uC reaches both banks as plain
// 16-bit and 8-bit RAM outside classify mode (uc_list picks the list,
// uc_idx 64 selects the count). The bank valid bits are this design's way
// of initialising 64 densities at the start of a vector.
module mur (
  input  logic        clk,
  input  logic        rst_n,
  // math unit side
  input  logic        mu_bank,
  input  logic        clear,
  input  logic [5:0]  mu_raddr,
  output logic [15:0] mu_rdata,
  input  logic        mu_pdf_we,
  input  logic [5:0]  mu_waddr,
  input  logic [15:0] mu_wdata,
  input  logic        mu_list_we,
  input  logic [5:0]  mu_list_addr,
  input  logic [5:0]  mu_list_data,
  input  logic        mu_cnt_we,
  input  logic [6:0]  mu_cnt,
  // output buffer side
  input  logic        ob_bank,
  input  logic        ob_list,
  input  logic [5:0]  ob_addr,
  output logic [15:0] ob_rdata,
  output logic [6:0]  ob_cnt,
  // uC side
  input  logic        uc_we,
  input  logic        uc_bank,
  input  logic        uc_list,
  input  logic [6:0]  uc_idx,
  input  logic [15:0] uc_wdata,
  output logic [15:0] uc_rdata
);
  logic [15:0] pdf  [2][64];
  logic [63:0] pv   [2];
  logic [7:0]  list [2][64];
  logic [6:0]  cnt  [2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pv[0]  <= '0;
      pv[1]  <= '0;
      cnt[0] <= '0;
      cnt[1] <= '0;
    end else begin
      if (clear) begin
        pv[mu_bank]  <= '0;
        cnt[mu_bank] <= '0;
      end else begin
        if (mu_pdf_we) pv[mu_bank][mu_waddr] <= 1'b1;
        if (mu_cnt_we) cnt[mu_bank] <= mu_cnt;
      end
      if (uc_we && !uc_list && !uc_idx[6]) pv[uc_bank][uc_idx[5:0]] <= 1'b1;
      if (uc_we && uc_idx[6]) cnt[uc_bank] <= uc_wdata[6:0];
    end
  end

  always_ff @(posedge clk) begin
    if (mu_pdf_we && !clear) pdf[mu_bank][mu_waddr] <= mu_wdata;
    if (mu_list_we && !clear) list[mu_bank][mu_list_addr] <= {2'b00, mu_list_data};
    if (uc_we && !uc_idx[6]) begin
      if (uc_list) list[uc_bank][uc_idx[5:0]] <= uc_wdata[7:0];
      else         pdf[uc_bank][uc_idx[5:0]]  <= uc_wdata;
    end
    mu_rdata <= pv[mu_bank][mu_raddr] ? pdf[mu_bank][mu_raddr] : 16'd0;
    ob_rdata <= ob_list ? {8'd0, list[ob_bank][ob_addr]}
                        : (pv[ob_bank][ob_addr] ? pdf[ob_bank][ob_addr] : 16'd0);
    if (uc_idx[6])    uc_rdata <= {9'd0, cnt[uc_bank]};
    else if (uc_list) uc_rdata <= {8'd0, list[uc_bank][uc_idx[5:0]]};
    else              uc_rdata <= pv[uc_bank][uc_idx[5:0]] ? pdf[uc_bank][uc_idx[5:0]] : 16'd0;
  end
  assign ob_cnt = cnt[ob_bank];
endmodule
