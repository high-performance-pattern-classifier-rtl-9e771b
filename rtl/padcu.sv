// padcu: prototype array plus the array of distance calculation units.
//
// NDCU = NPT/2 DCUs work in parallel; each serves one prototype in each
// half of the array, so with more than NDCU prototypes committed a vector
// takes two passes (half 0, then half 1). A pass streams the `dim` input
// elements from the input buffer and the matching array rows to all DCUs,
// one element every two clocks: the array read takes two clocks and so does
// the difference-and-accumulate, so a pass takes 2*dim + 2 clocks, 514 for
// 256 dimensions, counted from the start cycle to the cycle done is high.
// At the end every used DCU has its distance in distance latch dl[half].
//
// Interface: start/half begin a pass (accepted when !busy). ibr_raddr /
// ibr_rdata read the input buffer with one-cycle latency. The math unit (or
// the uC) reads a distance latch through dl_half/dl_idx -> dl_data, a
// combinational select standing for the chip's pre-charged local bus; a
// latch may be read while the other half is being computed. Two used flags
// per DCU are written and read by the uC through used_*; two_halves tells
// whether any prototype in the upper half is used. The uC programs and
// verifies the array through pa_*.
module padcu #(
  parameter int unsigned NPT = pc_pkg::NPT_DEF,
  parameter int unsigned DIM = pc_pkg::DIM_DEF,
  localparam int unsigned NDCU = NPT / 2,
  localparam int unsigned PW = $clog2(NPT),
  localparam int unsigned DW = $clog2(DIM)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic                      half,
  input  logic [DW:0]               dim,
  output logic                      busy,
  output logic                      done,
  output logic [DW-1:0]             ibr_raddr,
  input  logic [4:0]                ibr_rdata,
  input  logic                      dl_half,
  input  logic [PW-2:0]             dl_idx,
  output logic [pc_pkg::DIST_W-1:0] dl_data,
  input  logic                      used_we,
  input  logic [PW-1:0]             used_pt,
  input  logic                      used_wdata,
  output logic                      used_rdata,
  output logic                      two_halves,
  input  logic                      pa_we,
  input  logic [PW-1:0]             pa_pt,
  input  logic [DW-1:0]             pa_dim,
  input  logic [4:0]                pa_wdata,
  output logic [4:0]                pa_rdata
);
  import pc_pkg::*;

  logic [DW+2:0]        t;       // step within the pass
  logic                 half_q;
  logic                 hsel;
  logic [DW:0]          k;       // element being read
  logic [NDCU*5-1:0]    row;
  logic [4:0]           b_q;
  logic                 clr, ph0, ph1, latch;
  logic [DW+2:0]        last_t;
  logic [NDCU-1:0]      used_lo, used_hi;
  logic [DIST_W-1:0]    dl [NDCU][2];

  assign last_t = (DW+3)'({dim, 1'b1});   // 2*dim + 1
  assign hsel   = busy ? half_q : half;
  assign k      = t[DW+1:1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      t      <= '0;
      half_q <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy   <= 1'b1;
          t      <= 1;
          half_q <= half;
        end
      end else if (t == last_t) begin
        busy <= 1'b0;
        done <= 1'b1;
        t    <= '0;
      end else begin
        t <= t + 1'b1;
      end
    end
  end

  assign clr   = !busy && start;
  assign ph0   = busy && !t[0] && t >= 2;
  assign ph1   = busy && t[0] && t >= 3;
  assign latch = busy && t == last_t;

  // element k of the input and of the array rows, two-clock read
  assign ibr_raddr = (k < dim) ? k[DW-1:0] : '0;
  always_ff @(posedge clk) b_q <= ibr_rdata;

  proto_array #(.NPT(NPT), .DIM(DIM)) u_pa (
    .clk     (clk),
    .raddr   ({hsel, ibr_raddr}),
    .rdata   (row),
    .uc_we   (pa_we),
    .uc_pt   (pa_pt),
    .uc_dim  (pa_dim),
    .uc_wdata(pa_wdata),
    .uc_rdata(pa_rdata)
  );

  // used flags, two per DCU
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      used_lo <= '0;
      used_hi <= '0;
    end else if (used_we) begin
      if (used_pt[PW-1]) used_hi[used_pt[PW-2:0]] <= used_wdata;
      else               used_lo[used_pt[PW-2:0]] <= used_wdata;
    end
  end
  assign used_rdata = used_pt[PW-1] ? used_hi[used_pt[PW-2:0]] : used_lo[used_pt[PW-2:0]];
  assign two_halves = |used_hi;

  for (genvar i = 0; i < NDCU; i++) begin : g_dcu
    dcu u_dcu (
      .clk  (clk),
      .rst_n(rst_n),
      .a    (row[i*5 +: 5]),
      .b    (b_q),
      .half (hsel),
      .used ({used_hi[i], used_lo[i]}),
      .clr  (clr),
      .ph0  (ph0),
      .ph1  (ph1),
      .latch(latch),
      .dl   (dl[i])
    );
  end

  assign dl_data = dl[dl_idx][dl_half];
endmodule
