// seg_ctrl: control unit of the segment-table MMU.
//
// A six-phase sequencer. Every output, and the phase, is a register: the
// values below appear one clock after the phase (and inputs) that select
// them. After reset the phase is 0 and all outputs are low.
//   phase 0: wait for req_in; go to 1. Meanwhile the data path adds the
//            shifted segment id to the table pointer (muxC = 0).
//   phase 1: supervisor, write to the table pointer address (w & match):
//              load the table pointer (tbl_c), go to 5.
//            supervisor, anything else: done + ack, back to 0; xlat stays low
//              so the request goes to memory untranslated.
//            user: hold the latch (l_c), fetch descriptor word 0 (r_req),
//              capture it (tmp_c), put the adder on "latch + 1" (muxC = 2),
//              drive the latch onto the address bus (xlat), go to 2.
//   phase 2: wait for fdone; then fetch descriptor word 1 (latch released so
//            it takes latch + 1), put the adder on "offset + fetched word"
//            (muxC = 1), go to 3.
//   phase 3: wait for fdone; if the security unit passed (sec_ok), go to 4
//            with xlat high; else done without ack, back to 0.
//   phase 4: hold the latch (the real address), done + ack + xlat, back to 0.
//   phase 5: done + ack, back to 0.
// While waiting in phases 2 and 3 all outputs keep their values except
// r_req, which is low, so each fetch request lasts exactly one cycle.
// done is high for one cycle at the end of every request. This table is the
// original design's; the encoding of the phases as a 3-bit enum is this
// design's choice.
module seg_ctrl
  import mmu_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   req_in,   // request line from the system bus
  input  logic   sup,      // supervisor line
  input  rwe_t   rwe,      // request type
  input  logic   match,    // bus address equals the table pointer address
  input  logic   sec_ok,   // security unit passed the request
  input  logic   fdone,    // memory fetch complete
  output muxc_e  mux_c,    // adder input multiplexer select
  output logic   tmp_c,    // load the descriptor (temporary) register
  output logic   tbl_c,    // load the table pointer register
  output logic   l_c,      // hold the adder output latch
  output logic   r_req,    // memory fetch request
  output logic   xlat,     // drive the translated address onto rAddr
  output logic   done,     // request finished (one cycle)
  output logic   ack,      // request granted
  output phase_e phase
);

  typedef struct packed {
    muxc_e  mux_c;
    logic   tmp_c;
    logic   tbl_c;
    logic   l_c;
    logic   r_req;
    logic   xlat;
    logic   done;
    logic   ack;
    phase_e phase;
  } ctrl_t;

  ctrl_t cur, nxt;

  assign mux_c = cur.mux_c;
  assign tmp_c = cur.tmp_c;
  assign tbl_c = cur.tbl_c;
  assign l_c   = cur.l_c;
  assign r_req = cur.r_req;
  assign xlat  = cur.xlat;
  assign done  = cur.done;
  assign ack   = cur.ack;
  assign phase = cur.phase;

  //                   muxC           tmp   tbl   lC    req   xlat  done  ack   phase
  localparam ctrl_t IDLE   = '{MUXC_ID_TBL,   1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, PH_IDLE};
  localparam ctrl_t START  = '{MUXC_ID_TBL,   1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, PH_MODE};
  localparam ctrl_t TPWR   = '{MUXC_ID_TBL,   1'b0, 1'b1, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, PH_TPW};
  localparam ctrl_t PASS   = '{MUXC_ID_TBL,   1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b1, PH_IDLE};
  localparam ctrl_t FETCH0 = '{MUXC_ONE_LAT,  1'b1, 1'b0, 1'b1, 1'b1, 1'b1, 1'b0, 1'b0, PH_DESC0};
  localparam ctrl_t FETCH1 = '{MUXC_OFS_DATA, 1'b0, 1'b0, 1'b0, 1'b1, 1'b1, 1'b0, 1'b0, PH_DESC1};
  localparam ctrl_t XLATE  = '{MUXC_ID_TBL,   1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 1'b0, PH_XLAT};
  localparam ctrl_t FAIL   = '{MUXC_ID_TBL,   1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0, PH_IDLE};
  localparam ctrl_t GRANT  = '{MUXC_ID_TBL,   1'b0, 1'b0, 1'b1, 1'b0, 1'b1, 1'b1, 1'b1, PH_IDLE};

  always_comb begin
    unique case (cur.phase)
      PH_IDLE:  nxt = req_in ? START : IDLE;
      PH_MODE:  nxt = sup ? ((rwe.w && match) ? TPWR : PASS) : FETCH0;
      PH_DESC0: begin
        nxt = cur;
        nxt.r_req = 1'b0;
        if (fdone) nxt = FETCH1;
      end
      PH_DESC1: begin
        nxt = cur;
        nxt.r_req = 1'b0;
        if (fdone) nxt = sec_ok ? XLATE : FAIL;
      end
      PH_XLAT:  nxt = GRANT;
      PH_TPW:   nxt = PASS;
      default:  nxt = IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cur <= IDLE;
    else        cur <= nxt;
  end

  // The phase only ever takes the six defined values.
  a_phase_legal: assert property (@(posedge clk) disable iff (!rst_n)
    cur.phase inside {PH_IDLE, PH_MODE, PH_DESC0, PH_DESC1, PH_XLAT, PH_TPW});
  // Phase 0 never directly follows phase 2.
  a_no_2_to_0: assert property (@(posedge clk) disable iff (!rst_n)
    cur.phase == PH_DESC0 |=> cur.phase != PH_IDLE);
  // In phase 0 the table pointer is not loaded and the adder forms the
  // descriptor address.
  a_idle_quiet: assert property (@(posedge clk) disable iff (!rst_n)
    cur.phase == PH_IDLE |-> !tbl_c && mux_c == MUXC_ID_TBL);
  // ack is only ever given together with done.
  a_ack_done: assert property (@(posedge clk) disable iff (!rst_n)
    ack |-> done);

endmodule
