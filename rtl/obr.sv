// obr: output buffer.
//
// When the controller signals murdy, the buffer reads one result record
// from the given result bank, stores its items in a 64-word buffer and
// sends them to the host packed into 32-bit or 64-bit words (mode64), in
// burst mode (a word every clock the host takes it) or normal mode (at most
// one word every four clocks). The record (layout chosen by this design):
//   out_list: the fired class count, then the fired class ids in firing order;
//   out_pdf : the densities of classes 0 .. nclass-1.
// Each item is 16 bits. With fpconv set, densities are converted by the
// floating point formatter from the internal 16-bit float to IEEE single
// precision and every item then takes 32 bits (class ids and count are
// zero-extended). Items fill a word from the low end; the last word of a
// record is padded with zeros and marked by olast. A word is taken when
// ovalid and oready are both high. release pulses once the record has been
// read from the result bank, handing the bank back to the controller.
module obr (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        murdy,
  input  logic        murdy_bank,
  output logic        release_o,
  input  logic        out_list,
  input  logic        out_pdf,
  input  logic        fpconv,
  input  logic        mode64,
  input  logic        burst,
  input  logic [6:0]  nclass,
  // result RAM read port
  output logic        ob_bank,
  output logic        ob_list,
  output logic [5:0]  ob_addr,
  input  logic [15:0] ob_rdata,
  input  logic [6:0]  ob_cnt,
  // host
  output logic        ovalid,
  input  logic        oready,
  output logic [63:0] odata,
  output logic        olast,
  output logic        busy
);
  import pc_pkg::*;

  typedef enum logic [1:0] {R_IDLE, R_CNT, R_LIST, R_PDF} rd_st_t;
  typedef struct packed {
    logic        last;
    logic        pdf;
    logic [15:0] data;
  } item_t;

  rd_st_t      st;
  logic [6:0]  n, cnt_q;
  logic        room;
  logic        req, req_last, req_pdf, req_cnt;
  logic        q_v, q_last, q_pdf, q_cnt;
  item_t       fifo [64];
  logic [5:0]  wp, rp;
  logic [6:0]  level;
  logic        push, pop;
  item_t       push_item, head;

  assign room = level < 7'd62;

  // reader
  always_comb begin
    req      = 1'b0;
    req_last = 1'b0;
    req_pdf  = 1'b0;
    req_cnt  = 1'b0;
    ob_list  = 1'b0;
    ob_addr  = n[5:0];
    if (room) begin
      case (st)
        R_CNT:  begin req = 1'b1; req_cnt = 1'b1; req_last = !out_pdf && ob_cnt == 0; end
        R_LIST: begin req = 1'b1; ob_list = 1'b1; req_last = !out_pdf && n == cnt_q - 1'b1; end
        R_PDF:  begin req = 1'b1; req_pdf = 1'b1; req_last = n == nclass - 1'b1; end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= R_IDLE;
      n         <= '0;
      cnt_q     <= '0;
      ob_bank   <= 1'b0;
      q_v       <= 1'b0;
      q_last    <= 1'b0;
      q_pdf     <= 1'b0;
      q_cnt     <= 1'b0;
      release_o <= 1'b0;
    end else begin
      release_o <= 1'b0;
      q_v    <= req;
      q_last <= req_last;
      q_pdf  <= req_pdf;
      q_cnt  <= req_cnt;
      case (st)
        R_IDLE: if (murdy) begin
          ob_bank <= murdy_bank;
          cnt_q   <= ob_cnt;   // ob_cnt follows ob_bank one clock later
          n       <= '0;
          if (out_list)     st <= R_CNT;
          else if (out_pdf) st <= R_PDF;
          else release_o <= 1'b1;
        end
        R_CNT: if (room) begin
          cnt_q <= ob_cnt;
          if (ob_cnt != 0) st <= R_LIST;
          else if (out_pdf) st <= R_PDF;
          else begin st <= R_IDLE; release_o <= 1'b1; end
        end
        R_LIST: if (room) begin
          if (n == cnt_q - 1'b1) begin
            n <= '0;
            if (out_pdf) st <= R_PDF;
            else begin st <= R_IDLE; release_o <= 1'b1; end
          end else n <= n + 1'b1;
        end
        R_PDF: if (room) begin
          if (n == nclass - 1'b1) begin
            n <= '0;
            st <= R_IDLE;
            release_o <= 1'b1;
          end else n <= n + 1'b1;
        end
        default: st <= R_IDLE;
      endcase
    end
  end

  // 64-word buffer
  assign push      = q_v;
  assign push_item = '{last: q_last, pdf: q_pdf, data: q_cnt ? {9'd0, cnt_q} : ob_rdata};
  assign head      = fifo[rp];

  always_ff @(posedge clk) if (push) fifo[wp] <= push_item;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      level <= '0;
    end else begin
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
      level <= level + 7'(push) - 7'(pop);
    end
  end

  // packer and floating point formatter
  logic [63:0] word;
  logic [1:0]  slot, slots_m1;
  logic        full;
  logic        wlast;
  logic [1:0]  pace;
  logic [31:0] item32;

  assign slots_m1 = mode64 ? (fpconv ? 2'd1 : 2'd3) : (fpconv ? 2'd0 : 2'd1);
  assign pop      = level != 0 && (!full || (ovalid && oready));
  assign item32   = (fpconv && head.pdf) ? fp16_to_ieee(fp16_t'(head.data)) : {16'd0, head.data};
  assign ovalid   = full && (burst || pace == 2'd0);
  assign odata    = word;
  assign olast    = wlast;
  assign busy     = st != R_IDLE || q_v || level != 0 || full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word  <= '0;
      slot  <= '0;
      full  <= 1'b0;
      wlast <= 1'b0;
      pace  <= '0;
    end else begin
      if (!burst && (pace != 0 || (ovalid && oready))) pace <= pace + 1'b1;
      if (ovalid && oready) begin
        full  <= 1'b0;
        word  <= '0;
        wlast <= 1'b0;
      end
      if (pop) begin
        if (fpconv) word[slot[0]*32 +: 32] <= item32;
        else        word[slot*16 +: 16]    <= item32[15:0];
        if (head.last || slot == slots_m1) begin
          full  <= 1'b1;
          wlast <= head.last;
          slot  <= '0;
        end else slot <= slot + 1'b1;
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) push |-> level < 7'd64);
endmodule
