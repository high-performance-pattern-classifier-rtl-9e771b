// classifier_top: the pattern classifier chip, less its micro-controller.
//
// Classify path: the host streams input vectors into the input buffer
// (ibr); the controller (cmc) runs the prototype array and its distance
// units (padcu) over one or two halves of the prototypes; the math unit (mu)
// turns the distances and the prototype parameters (ppr) into a fired class
// list and class densities in the result RAM (mur); the output buffer (obr)
// sends them to the host. Input buffer, distance latches and result RAM are
// all double so that consecutive vectors overlap: with 1024 prototypes of
// 256 dimensions a new vector is classified every 1032 clocks.
// The IO controller (ioc) holds the mode and the control registers.
//
// The micro-controller core itself is outside this RTL; its bus is brought
// out as ports (uc_*), together with its general RAM (gr), its clock
// counter (timer) and its program storage (pgf), which the core would
// fetch from through uc_f*. uC bus map (this design's, 20-bit word address,
// 16-bit data, read data one clock after the address):
//   0x00000-0x000FF general RAM          0x01000-0x0100F IO registers
//   0x02000/1 timer low/high             0x03000+p used flag of prototype p
//   0x04000+p distance latch of p        0x05000+s*0x400+p parameter word s of p
//   0x06800+c density of class c, bank 0; +0x100 bank 1; +0x80 fired list,
//             +0x40 fired count
//   0xC0000 + p*2^log2(DIM) + j element j of prototype p in the array
// The prototype arrays (array, used flags, latches, parameters, results)
// are reachable only outside CLASSIFY mode; there reads return 0 and writes
// are dropped. In PGF mode the host loads the program storage through pgf_*.
// In MONITOR mode the monitor port (the chip's upper data pins) shows the
// uC data bus and address, or the fetch address and instruction
// (CTRL1 bit 5). In TEST mode it shows the control signals between the
// classify blocks (input buffer full/release, pass start/done, math unit
// commands, bypass, MURDY, output buffer), bit 0 = IBFULL; the selection and
// order of the signals are this design's.
module classifier_top #(
  parameter int unsigned NPT = pc_pkg::NPT_DEF,
  parameter int unsigned DIM = pc_pkg::DIM_DEF,
  localparam int unsigned PW = $clog2(NPT),
  localparam int unsigned DW = $clog2(DIM)
) (
  input  logic        clk,
  input  logic        rst_n,
  // host: registers
  input  logic [3:0]  h_addr,
  input  logic        h_we,
  input  logic [31:0] h_wdata,
  output logic [31:0] h_rdata,
  // host: input vectors
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [63:0] in_data,
  // host: results
  output logic        out_valid,
  input  logic        out_ready,
  output logic [63:0] out_data,
  output logic        out_last,
  // host: program load (PGF mode)
  input  logic        pgf_we,
  input  logic [11:0] pgf_addr,
  input  logic [15:0] pgf_wdata,
  output logic [15:0] pgf_rdata,
  // micro-controller bus
  input  logic [19:0] uc_addr,
  input  logic        uc_we,
  input  logic        uc_re,
  input  logic [15:0] uc_wdata,
  output logic [15:0] uc_rdata,
  input  logic [11:0] uc_faddr,
  output logic [15:0] uc_fdata,
  // status
  output pc_pkg::mode_t mode,
  output logic        classify_busy,
  output logic [31:0] monitor
);
  import pc_pkg::*;

  // ---------------------------------------------------------------- IOC
  logic        ibr_mode64, ibr_burst, obr_mode64, obr_burst, fpconv;
  logic        out_list, out_pdf, monitor_sel;
  logic [8:0]  dim_reg;
  logic [6:0]  nclass;
  logic [31:0] status_hw [3];
  logic [15:0] ioc_urdata;
  logic        classify;
  logic [DW:0] dim;

  // ---------------------------------------------------------------- uC bus decode
  typedef enum logic [3:0] {
    RG_NONE, RG_GR, RG_IOC, RG_TIMER, RG_USED, RG_DL, RG_PPR, RG_MUR, RG_PA
  } region_t;
  region_t     rg, rg_q;
  logic        arr_ok;
  logic [15:0] gr_rdata, tim_rdata, ppr_urdata, mur_urdata;
  logic [15:0] ioc_q, tim_q, used_q, dl_q;
  logic [4:0]  pa_urdata;
  logic [31:0] tcount;

  assign classify = mode == MODE_CLASSIFY;
  assign arr_ok   = !classify;

  always_comb begin
    rg = RG_NONE;
    if (uc_addr[19:18] == 2'b11) rg = RG_PA;
    else if (uc_addr[19:16] == 4'h0) begin
      case (uc_addr[15:12])
        4'h0: rg = RG_GR;
        4'h1: rg = RG_IOC;
        4'h2: rg = RG_TIMER;
        4'h3: rg = RG_USED;
        4'h4: rg = RG_DL;
        4'h5: rg = RG_PPR;
        4'h6: if (uc_addr[11:9] == 3'b100) rg = RG_MUR;
        default: rg = RG_NONE;
      endcase
    end
  end

  ioc u_ioc (
    .clk        (clk),
    .rst_n      (rst_n),
    .h_addr     (h_addr),
    .h_we       (h_we),
    .h_wdata    (h_wdata),
    .h_rdata    (h_rdata),
    .u_addr     (uc_addr[3:0]),
    .u_we       (uc_we && rg == RG_IOC),
    .u_wdata    (uc_wdata),
    .u_rdata    (ioc_urdata),
    .status_hw  (status_hw),
    .ibr_mode64 (ibr_mode64),
    .ibr_burst  (ibr_burst),
    .obr_mode64 (obr_mode64),
    .obr_burst  (obr_burst),
    .fpconv     (fpconv),
    .out_list   (out_list),
    .out_pdf    (out_pdf),
    .monitor_sel(monitor_sel),
    .dim        (dim_reg),
    .nclass     (nclass),
    .mode       (mode)
  );

  assign dim = (int'(dim_reg) > int'(DIM)) ? (DW+1)'(DIM) : (DW+1)'(dim_reg);

  // ---------------------------------------------------------------- classify path
  logic              ibfull, ibr_release;
  logic [1:0]        ibr_full;
  logic [DW-1:0]     ibr_raddr;
  logic [4:0]        ibr_rdata;
  logic              dcu_start, dcu_half, dcu_busy, dcu_done, two_halves;
  logic              dl_half, mu_dl_half;
  logic [PW-2:0]     dl_idx, mu_dl_idx;
  logic [DIST_W-1:0] dl_data;
  logic              used_rdata;
  logic              mu_cmd_valid, mu_cmd_half, mu_cmd_first, mu_cmd_last, mu_cmd_bank;
  logic              mu_cmd_ready, mu_issue_done, mu_issue_done_half, mu_done;
  logic [PW-1:0]     mu_ppr_addr;
  pparam_t           mu_ppr_data;
  logic              mur_bank, mur_clear, mur_pdf_we, mur_list_we, mur_cnt_we;
  logic [5:0]        mur_raddr, mur_waddr, mur_list_addr, mur_list_data;
  logic [15:0]       mur_rdata, mur_wdata;
  logic [6:0]        mur_cnt, fired_count;
  logic              mu_bypass;
  logic              murdy, murdy_bank, obr_release, obr_busy, cmc_busy, dl_wait;
  logic              ob_bank, ob_list;
  logic [5:0]        ob_addr;
  logic [15:0]       ob_rdata;
  logic [6:0]        ob_cnt;
  logic [31:0]       n_results, n_words;

  ibr #(.DIM(DIM)) u_ibr (
    .clk      (clk),
    .rst_n    (rst_n),
    .dim      (dim),
    .mode64   (ibr_mode64),
    .burst    (ibr_burst),
    .wvalid   (in_valid && classify),
    .wready   (in_ready),
    .wdata    (in_data),
    .ibfull   (ibfull),
    .raddr    (ibr_raddr),
    .rdata    (ibr_rdata),
    .release_i(ibr_release),
    .full     (ibr_full)
  );

  cmc u_cmc (
    .clk               (clk),
    .rst_n             (rst_n),
    .enable            (classify),
    .ibfull            (ibfull),
    .two_halves        (two_halves),
    .ibr_release       (ibr_release),
    .dcu_start         (dcu_start),
    .dcu_half          (dcu_half),
    .dcu_busy          (dcu_busy),
    .dcu_done          (dcu_done),
    .mu_cmd_valid      (mu_cmd_valid),
    .mu_cmd_half       (mu_cmd_half),
    .mu_cmd_first      (mu_cmd_first),
    .mu_cmd_last       (mu_cmd_last),
    .mu_cmd_bank       (mu_cmd_bank),
    .mu_cmd_ready      (mu_cmd_ready),
    .mu_issue_done     (mu_issue_done),
    .mu_issue_done_half(mu_issue_done_half),
    .mu_done           (mu_done),
    .murdy             (murdy),
    .murdy_bank        (murdy_bank),
    .obr_release       (obr_release),
    .busy              (cmc_busy),
    .dl_wait           (dl_wait)
  );

  assign dl_half = classify ? mu_dl_half : uc_addr[PW-1];
  assign dl_idx  = classify ? mu_dl_idx  : uc_addr[PW-2:0];

  padcu #(.NPT(NPT), .DIM(DIM)) u_padcu (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (dcu_start),
    .half      (dcu_half),
    .dim       (dim),
    .busy      (dcu_busy),
    .done      (dcu_done),
    .ibr_raddr (ibr_raddr),
    .ibr_rdata (ibr_rdata),
    .dl_half   (dl_half),
    .dl_idx    (dl_idx),
    .dl_data   (dl_data),
    .used_we   (uc_we && rg == RG_USED && arr_ok),
    .used_pt   (uc_addr[PW-1:0]),
    .used_wdata(uc_wdata[0]),
    .used_rdata(used_rdata),
    .two_halves(two_halves),
    .pa_we     (uc_we && rg == RG_PA && arr_ok),
    .pa_pt     (uc_addr[DW +: PW]),
    .pa_dim    (uc_addr[DW-1:0]),
    .pa_wdata  (uc_wdata[4:0]),
    .pa_rdata  (pa_urdata)
  );

  ppr #(.NPT(NPT)) u_ppr (
    .clk     (clk),
    .mu_addr (mu_ppr_addr),
    .mu_rdata(mu_ppr_data),
    .uc_we   (uc_we && rg == RG_PPR && arr_ok),
    .uc_sel  (uc_addr[11:10]),
    .uc_addr (uc_addr[PW-1:0]),
    .uc_wdata(uc_wdata),
    .uc_rdata(ppr_urdata)
  );

  mu #(.NPT(NPT)) u_mu (
    .clk            (clk),
    .rst_n          (rst_n),
    .cmd_valid      (mu_cmd_valid),
    .cmd_half       (mu_cmd_half),
    .cmd_first      (mu_cmd_first),
    .cmd_last       (mu_cmd_last),
    .cmd_bank       (mu_cmd_bank),
    .cmd_ready      (mu_cmd_ready),
    .issue_done     (mu_issue_done),
    .issue_done_half(mu_issue_done_half),
    .done           (mu_done),
    .dl_half        (mu_dl_half),
    .dl_idx         (mu_dl_idx),
    .dl_data        (dl_data),
    .ppr_addr       (mu_ppr_addr),
    .ppr_data       (mu_ppr_data),
    .mur_bank       (mur_bank),
    .mur_clear      (mur_clear),
    .mur_raddr      (mur_raddr),
    .mur_rdata      (mur_rdata),
    .mur_pdf_we     (mur_pdf_we),
    .mur_waddr      (mur_waddr),
    .mur_wdata      (mur_wdata),
    .mur_list_we    (mur_list_we),
    .mur_list_addr  (mur_list_addr),
    .mur_list_data  (mur_list_data),
    .mur_cnt_we     (mur_cnt_we),
    .mur_cnt        (mur_cnt),
    .bypass         (mu_bypass),
    .fired_count    (fired_count)
  );

  mur u_mur (
    .clk         (clk),
    .rst_n       (rst_n),
    .mu_bank     (mur_bank),
    .clear       (mur_clear),
    .mu_raddr    (mur_raddr),
    .mu_rdata    (mur_rdata),
    .mu_pdf_we   (mur_pdf_we),
    .mu_waddr    (mur_waddr),
    .mu_wdata    (mur_wdata),
    .mu_list_we  (mur_list_we),
    .mu_list_addr(mur_list_addr),
    .mu_list_data(mur_list_data),
    .mu_cnt_we   (mur_cnt_we),
    .mu_cnt      (mur_cnt),
    .ob_bank     (ob_bank),
    .ob_list     (ob_list),
    .ob_addr     (ob_addr),
    .ob_rdata    (ob_rdata),
    .ob_cnt      (ob_cnt),
    .uc_we       (uc_we && rg == RG_MUR && arr_ok),
    .uc_bank     (uc_addr[8]),
    .uc_list     (uc_addr[7]),
    .uc_idx      (uc_addr[6:0]),
    .uc_wdata    (uc_wdata),
    .uc_rdata    (mur_urdata)
  );

  obr u_obr (
    .clk       (clk),
    .rst_n     (rst_n),
    .murdy     (murdy),
    .murdy_bank(murdy_bank),
    .release_o (obr_release),
    .out_list  (out_list),
    .out_pdf   (out_pdf),
    .fpconv    (fpconv),
    .mode64    (obr_mode64),
    .burst     (obr_burst),
    .nclass    (nclass),
    .ob_bank   (ob_bank),
    .ob_list   (ob_list),
    .ob_addr   (ob_addr),
    .ob_rdata  (ob_rdata),
    .ob_cnt    (ob_cnt),
    .ovalid    (out_valid),
    .oready    (out_ready),
    .odata     (out_data),
    .olast     (out_last),
    .busy      (obr_busy)
  );

  assign classify_busy = cmc_busy || obr_busy || ibr_full != 2'b00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_results <= '0;
      n_words   <= '0;
    end else begin
      if (murdy) n_results <= n_results + 1'b1;
      if (out_valid && out_ready) n_words <= n_words + 1'b1;
    end
  end

  assign status_hw[0] = {16'd0, fired_count, 3'd0, ibr_full, dcu_busy, cmc_busy, obr_busy, classify_busy};
  assign status_hw[1] = n_results;
  assign status_hw[2] = n_words;

  // ---------------------------------------------------------------- uC side
  gr u_gr (
    .clk  (clk),
    .we   (uc_we && rg == RG_GR),
    .addr (uc_addr[7:0]),
    .wdata(uc_wdata),
    .rdata(gr_rdata)
  );

  timer u_timer (
    .clk  (clk),
    .rst_n(rst_n),
    .rd   (uc_re && rg == RG_TIMER),
    .sel  (uc_addr[0]),
    .count(tcount),
    .rdata(tim_rdata)
  );

  pgf u_pgf (
    .clk    (clk),
    .f_addr (uc_faddr),
    .f_data (uc_fdata),
    .load_en(mode == MODE_PGF),
    .l_we   (pgf_we),
    .l_addr (pgf_addr),
    .l_wdata(pgf_wdata),
    .l_rdata(pgf_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rg_q   <= RG_NONE;
      ioc_q  <= '0;
      tim_q  <= '0;
      used_q <= '0;
      dl_q   <= '0;
    end else begin
      rg_q   <= (arr_ok || rg inside {RG_GR, RG_IOC, RG_TIMER}) ? rg : RG_NONE;
      ioc_q  <= ioc_urdata;
      tim_q  <= tim_rdata;
      used_q <= {15'd0, used_rdata};
      dl_q   <= 16'(dl_data);
    end
  end

  always_comb begin
    case (rg_q)
      RG_GR:    uc_rdata = gr_rdata;
      RG_IOC:   uc_rdata = ioc_q;
      RG_TIMER: uc_rdata = tim_q;
      RG_USED:  uc_rdata = used_q;
      RG_DL:    uc_rdata = dl_q;
      RG_PPR:   uc_rdata = ppr_urdata;
      RG_MUR:   uc_rdata = mur_urdata;
      RG_PA:    uc_rdata = {11'd0, pa_urdata};
      default:  uc_rdata = '0;
    endcase
  end

  // TEST mode: the classify path's control signals on the monitor pins
  logic [31:0] test_bus;
  assign test_bus = {8'd0, obr_busy, obr_release, murdy_bank, murdy, cmc_busy, dl_wait,
                     mu_bypass, mu_done, mu_issue_done, mu_cmd_ready, mu_cmd_bank,
                     mu_cmd_last, mu_cmd_first, mu_cmd_half, mu_cmd_valid, two_halves,
                     dcu_done, dcu_busy, dcu_half, dcu_start, ibr_full, ibr_release, ibfull};

  always_comb begin
    unique case (mode)
      MODE_MONITOR: monitor = monitor_sel ? {4'd0, uc_faddr, uc_fdata} : {uc_addr[15:0], uc_wdata};
      MODE_TEST:    monitor = test_bus;
      default:      monitor = '0;
    endcase
  end
endmodule
