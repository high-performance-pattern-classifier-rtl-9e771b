// mu: math unit, the RCE and PNN pipeline behind the distance latches.
//
// For every prototype of one half of the array the unit reads the distance
// D from the distance latches and the 48-bit parameters from the parameter
// RAMs, then, one prototype per clock:
//   RCE: the prototype fires when it is used and D < L. The first time a
//        class fires in a vector its fired flag is set, its id is appended
//        to the fired class list in the result RAM and the fired class
//        counter is incremented.
//   PNN: C * exp(-K*D) is formed in 16-bit float and added to PDF(N) of the
//        prototype's class, read from and written back to the result RAM.
//
// Stages (issue clock = cycle 0): 0 latch/parameter read; 1 D-L compare and
// K*D (first exp stage); 2 fired flag read/update, list store, count,
// exponential; 3 C*exp and read PDF(N); 4 float sum; 5 store PDF(N). When
// one of the two prototypes just ahead in the pipeline has the same class,
// its fresh sum is forwarded to stage 4 in place of the stale value read
// from RAM (the bypass; the stage split and the bypass are this design's).
//
// Commands: cmd_valid with cmd_half/first/last asks for one half. A command
// is taken when cmd_ready; the take clock also clears the fired flags and
// the result bank when cmd_first. Issue runs for NDCU clocks after the take
// clock; issue_done then pulses (the distance latches of that half are free
// again). A command with cmd_first is only taken when the pipeline is empty;
// other commands may follow issue back to back. After the last prototype of
// a cmd_last command is stored, done pulses: 519 clocks after the take clock
// for one half of 512 prototypes, 1032 for two halves back to back.
module mu #(
  parameter int unsigned NPT = pc_pkg::NPT_DEF,
  localparam int unsigned NDCU = NPT / 2,
  localparam int unsigned PW = $clog2(NPT)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      cmd_valid,
  input  logic                      cmd_half,
  input  logic                      cmd_first,
  input  logic                      cmd_last,
  input  logic                      cmd_bank,
  output logic                      cmd_ready,
  output logic                      issue_done,
  output logic                      issue_done_half,
  output logic                      done,
  // distance latches
  output logic                      dl_half,
  output logic [PW-2:0]             dl_idx,
  input  logic [pc_pkg::DIST_W-1:0] dl_data,
  // parameter RAMs
  output logic [PW-1:0]             ppr_addr,
  input  pc_pkg::pparam_t           ppr_data,
  // result RAM
  output logic                      mur_bank,
  output logic                      mur_clear,
  output logic [5:0]                mur_raddr,
  input  logic [15:0]               mur_rdata,
  output logic                      mur_pdf_we,
  output logic [5:0]                mur_waddr,
  output logic [15:0]               mur_wdata,
  output logic                      mur_list_we,
  output logic [5:0]                mur_list_addr,
  output logic [5:0]                mur_list_data,
  output logic                      mur_cnt_we,
  output logic [6:0]                mur_cnt,
  // observation
  output logic                      bypass,
  output logic [6:0]                fired_count
);
  import pc_pkg::*;

  logic          issuing, half_q, last_q, bank_q;
  logic [PW-2:0] idx;
  logic          take;

  // stage registers
  logic          v1, t1;
  logic [DIST_W-1:0] d1;
  logic          v2, t2, f2, u2;
  logic [5:0]    n2;
  logic [15:0]   c2;
  logic          v3, t3, u3;
  logic [5:0]    n3;
  logic [15:0]   c3;
  logic          v4, t4, u4;
  logic [5:0]    n4;
  fp16_t         p4;
  logic          v5, t5, u5;
  logic [5:0]    n5;
  fp16_t         s5;
  logic          wv;
  logic [5:0]    wn;
  fp16_t         ws;
  logic          done_q;
  logic [63:0]   fired;
  logic          pipe_empty;
  logic          exp_v;
  fp16_t         exp_y;
  fp16_t         opnd, sum4;
  pparam_t       pp;

  assign pipe_empty = !issuing && !v1 && !v2 && !v3 && !v4 && !v5 && !done_q;
  assign cmd_ready  = !issuing && (!cmd_first || pipe_empty);
  assign take       = cmd_valid && cmd_ready;

  // issue
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing         <= 1'b0;
      half_q          <= 1'b0;
      last_q          <= 1'b0;
      bank_q          <= 1'b0;
      idx             <= '0;
      issue_done      <= 1'b0;
      issue_done_half <= 1'b0;
    end else begin
      issue_done <= 1'b0;
      if (take) begin
        issuing <= 1'b1;
        half_q  <= cmd_half;
        last_q  <= cmd_last;
        idx     <= '0;
        if (cmd_first) bank_q <= cmd_bank;
      end else if (issuing) begin
        idx <= idx + 1'b1;
        if (idx == (PW-1)'(NDCU - 1)) begin
          issuing         <= 1'b0;
          issue_done      <= 1'b1;
          issue_done_half <= half_q;
        end
      end
    end
  end

  assign dl_half   = half_q;
  assign dl_idx    = idx;
  assign ppr_addr  = {half_q, idx};
  assign mur_bank  = (take && cmd_first) ? cmd_bank : bank_q;
  assign mur_clear = take && cmd_first;
  assign pp        = ppr_data;

  // stage 1: D - L, K*D
  exp_unit u_exp (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (v1),
    .d        (d1),
    .k_man    (pp.k_man),
    .k_exp    (pp.k_exp),
    .out_valid(exp_v),
    .y        (exp_y)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; t1 <= 1'b0; d1 <= '0;
      v2 <= 1'b0; t2 <= 1'b0; f2 <= 1'b0; u2 <= 1'b0; n2 <= '0; c2 <= '0;
      v3 <= 1'b0; t3 <= 1'b0; u3 <= 1'b0; n3 <= '0; c3 <= '0;
      v4 <= 1'b0; t4 <= 1'b0; u4 <= 1'b0; n4 <= '0; p4 <= '0;
      v5 <= 1'b0; t5 <= 1'b0; u5 <= 1'b0; n5 <= '0; s5 <= '0;
      wv <= 1'b0; wn <= '0; ws <= '0;
      done_q <= 1'b0;
      done   <= 1'b0;
    end else begin
      // stage 0 -> 1
      v1 <= issuing;
      t1 <= issuing && last_q && idx == (PW-1)'(NDCU - 1);
      d1 <= dl_data;
      // stage 1 -> 2
      v2 <= v1;
      t2 <= t1;
      u2 <= pp.used;
      f2 <= pp.used && (d1 < DIST_W'(pp.l));
      n2 <= pp.cls;
      c2 <= pp.c;
      // stage 2 -> 3
      v3 <= v2; t3 <= t2; u3 <= u2; n3 <= n2; c3 <= c2;
      // stage 3 -> 4
      v4 <= v3; t4 <= t3; u4 <= u3; n4 <= n3;
      p4 <= fp16_mul(exp_y, fp16_from_u16(c3));
      // stage 4 -> 5
      v5 <= v4; t5 <= t4; u5 <= u4 && v4; n5 <= n4;
      s5 <= sum4;
      // stage 5: written last clock
      if (mur_clear) wv <= 1'b0;
      else begin
        wv <= v5 && u5;
        wn <= n5;
        ws <= s5;
      end
      done_q <= v5 && t5;
      done   <= done_q;
    end
  end

  // stage 2: fired class list
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fired       <= '0;
      fired_count <= '0;
    end else if (mur_clear) begin
      fired       <= '0;
      fired_count <= '0;
    end else if (v2 && f2 && !fired[n2]) begin
      fired[n2]   <= 1'b1;
      fired_count <= fired_count + 1'b1;
    end
  end
  assign mur_list_we   = v2 && f2 && !fired[n2];
  assign mur_list_addr = fired_count[5:0];
  assign mur_list_data = n2;
  assign mur_cnt_we    = mur_list_we;
  assign mur_cnt       = fired_count + 1'b1;

  // stage 3: PDF read; stage 4: sum with bypass
  assign mur_raddr = n3;
  always_comb begin
    bypass = 1'b0;
    opnd   = fp16_t'(mur_rdata);
    if (v5 && u5 && n5 == n4) begin
      opnd   = s5;
      bypass = v4 && u4;
    end else if (wv && wn == n4) begin
      opnd   = ws;
      bypass = v4 && u4;
    end
    sum4 = fp16_add(p4, opnd);
  end

  // stage 5: store
  assign mur_pdf_we = v5 && u5;
  assign mur_waddr  = n5;
  assign mur_wdata  = s5;

  a_first_when_empty: assert property (@(posedge clk) disable iff (!rst_n)
    (take && cmd_first) |-> pipe_empty);
  a_exp_aligned: assert property (@(posedge clk) disable iff (!rst_n) exp_v == v3);
endmodule
