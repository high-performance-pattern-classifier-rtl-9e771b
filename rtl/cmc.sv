// cmc: classification controller.
//
// Sequences the classify pipeline for a stream of input vectors:
//  * starts a distance pass of half h when the input buffer holds a full
//    vector (ibfull) and distance latch set h is free; with prototypes in
//    the upper half (two_halves, sampled at the start of a vector) a vector
//    takes pass 0 then pass 1, otherwise pass 0 only;
//  * hands each finished half to the math unit (first = half 0, last = the
//    final half of the vector); a latch set is free again when the math
//    unit has finished reading it (mu_issue_done);
//  * releases the input buffer bank when the last pass is done and, for two
//    halves, the math unit has also finished reading half 0 (the document's
//    rule), so the next vector's pass 0 can start at once;
//  * gives the math unit the two result banks in turn, waiting until the
//    next one is free; the next vector's first command may be taken in the
//    clock of mu_done, on the other bank (a 1032-clock vector period at
//    full size, as in the original pipeline); when the math unit is done,
//    the bank is handed to the output buffer with a murdy pulse, one bank at
//    a time and in order; the bank is free again on obr_release.
// Everything is idle while enable (classify mode) is low; a vector in
// progress is finished. Outputs are decoded from state, plus mu_done for
// the math unit command; handshakes are single-clock pulses.
module cmc (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  input  logic ibfull,
  input  logic two_halves,
  output logic ibr_release,
  // distance units
  output logic dcu_start,
  output logic dcu_half,
  input  logic dcu_busy,
  input  logic dcu_done,
  // math unit
  output logic mu_cmd_valid,
  output logic mu_cmd_half,
  output logic mu_cmd_first,
  output logic mu_cmd_last,
  output logic mu_cmd_bank,
  input  logic mu_cmd_ready,
  input  logic mu_issue_done,
  input  logic mu_issue_done_half,
  input  logic mu_done,
  // output buffer
  output logic murdy,
  output logic murdy_bank,
  input  logic obr_release,
  // status
  output logic busy,
  output logic dl_wait      // a pass is ready but its latches are still busy
);
  typedef enum logic [1:0] {DL_FREE, DL_VALID, DL_READ} dl_st_t;

  dl_st_t     dl_st   [2];
  logic [1:0] dl_last;       // the half in that latch set ends its vector
  logic       vec_two;       // current vector uses two halves
  logic       dcu_next;      // next pass of the current vector
  logic       dcu_hold;      // all passes of the current vector done
  logic       mu_h0_done;    // math unit finished reading half 0
  logic       mu_next;       // half the math unit takes next
  typedef enum logic [1:0] {BK_FREE, BK_DONE, BK_OBR} bank_st_t;
  bank_st_t   bank_st [2];   // result banks: free, waiting for the OBR, being read
  logic       mu_bank;       // bank of the vector in (or next into) the math unit
  logic       ob_next;       // bank the OBR gets next
  logic       give;
  logic       mu_active;     // a vector is in the math unit
  logic       dcu_run;
  logic       mu_take;
  logic       rel;

  assign dcu_half     = dcu_next;
  assign dcu_start    = enable && ibfull && !dcu_busy && !dcu_run && !dcu_hold &&
                        dl_st[dcu_next] == DL_FREE;
  assign dl_wait      = enable && ibfull && !dcu_busy && !dcu_run && !dcu_hold &&
                        dl_st[dcu_next] != DL_FREE;
  assign mu_cmd_half  = mu_next;
  assign mu_cmd_first = !mu_next;
  assign mu_cmd_last  = dl_last[mu_next];
  // a vector's first command may be taken in the clock the previous one is done
  assign mu_cmd_bank  = mu_done ? !mu_bank : mu_bank;
  assign mu_cmd_valid = dl_st[mu_next] == DL_VALID &&
                        (mu_next || ((!mu_active || mu_done) && bank_st[mu_cmd_bank] == BK_FREE));
  assign give         = bank_st[ob_next] == BK_DONE && bank_st[!ob_next] != BK_OBR;
  assign mu_take      = mu_cmd_valid && mu_cmd_ready;
  assign rel          = dcu_hold && (!vec_two || mu_h0_done);
  assign ibr_release  = rel;
  assign busy         = dcu_run || dcu_hold || mu_active || give ||
                        dl_st[0] != DL_FREE || dl_st[1] != DL_FREE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dl_st[0]   <= DL_FREE;
      dl_st[1]   <= DL_FREE;
      dl_last    <= '0;
      vec_two    <= 1'b0;
      dcu_next   <= 1'b0;
      dcu_hold   <= 1'b0;
      dcu_run    <= 1'b0;
      mu_h0_done <= 1'b0;
      mu_next    <= 1'b0;
      bank_st[0] <= BK_FREE;
      bank_st[1] <= BK_FREE;
      mu_bank    <= 1'b0;
      ob_next    <= 1'b0;
      mu_active  <= 1'b0;
      murdy      <= 1'b0;
      murdy_bank <= 1'b0;
    end else begin
      murdy <= 1'b0;
      // distance passes
      if (dcu_start) begin
        dcu_run <= 1'b1;
        if (!dcu_next) vec_two <= two_halves;
      end
      if (dcu_done && dcu_run) begin
        dcu_run <= 1'b0;
        dl_st[dcu_next]   <= DL_VALID;
        dl_last[dcu_next] <= dcu_next || !vec_two;
        if (!dcu_next && vec_two) dcu_next <= 1'b1;
        else begin
          dcu_next <= 1'b0;
          dcu_hold <= 1'b1;
        end
      end
      // math unit
      if (mu_done) begin
        mu_active        <= 1'b0;
        bank_st[mu_bank] <= BK_DONE;
        mu_bank          <= !mu_bank;
      end
      if (mu_take) begin
        dl_st[mu_next] <= DL_READ;
        mu_next        <= !dl_last[mu_next];
        if (!mu_next) mu_active <= 1'b1;
      end
      if (mu_issue_done) begin
        dl_st[mu_issue_done_half] <= DL_FREE;
        if (!mu_issue_done_half) mu_h0_done <= 1'b1;
      end
      // one bank at a time to the output buffer, in order
      if (give) begin
        bank_st[ob_next] <= BK_OBR;
        murdy            <= 1'b1;
        murdy_bank       <= ob_next;
        ob_next          <= !ob_next;
      end
      if (obr_release) bank_st[murdy_bank] <= BK_FREE;
      // input buffer release
      if (rel) begin
        dcu_hold   <= 1'b0;
        mu_h0_done <= 1'b0;
      end
    end
  end

  a_one_pass: assert property (@(posedge clk) disable iff (!rst_n) dcu_start |-> !dcu_run);
endmodule
