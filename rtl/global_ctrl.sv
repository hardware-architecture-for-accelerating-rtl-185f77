// global_ctrl: global controller of the beamformer.
//
// States: HALT -> SETUP -> RUN. SETUP latches the number of angles
// (angle + 1) and waits for start; it then enables the TFFT process. In RUN
// every process has a start register (enable) and a running flag. All enabled
// processes are started together at a synchronisation point, which is the
// first cycle in which some process is enabled and none is running, i.e. the
// completion of the longest process of the previous step. At the same point
// each ping-pong pair whose writer completed in the previous step swaps its
// two memories (sel = 0: memory 1 written, memory 2 read).
//
// Completion rules:
//   TFFT done  -> enable XFFT; enable TFFT again if start is still 1
//   XFFT done  -> enable Remap/Compound (compound mode for angle > 0)
//   RC done    -> count the angle; after the last angle enable IXFFT
//   IXFFT done -> enable ITFFT
// When nothing is running and nothing is enabled the controller returns to
// HALT and from there to SETUP.
//
// The LUT channel is shared: while the TFFT process requests phase words the
// PLUT is selected (lut1_sel = 1), otherwise RLUT1. The ready of the channel
// follows the selected consumer, and each consumer sees tvalid only while
// its source is selected.
module global_ctrl (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [3:0] angle,
  output logic [1:0] state,
  // process control
  output logic       go_t,  go_x,  go_rc,  go_ix,  go_it,
  input  logic       done_t, done_x, done_rc, done_ix, done_it,
  output logic       rc_compound,
  // ping-pong selects
  output logic       sel_t, sel_x, sel_rc, sel_ix,
  // LUT channel arbitration
  input  logic       plut_req,
  input  logic       plut_ready,
  input  logic       rlut_ready,
  input  logic       lut_tvalid,
  input  logic       lut_tlast,
  output logic       lut1_sel,
  output logic       lut_tready,
  output logic       plut_valid,
  output logic       plut_last,
  output logic       rlut_valid
);
  typedef enum logic [1:0] {S_HALT = 2'd0, S_SETUP = 2'd1, S_RUN = 2'd2} state_t;
  state_t st;
  assign state = st;

  logic [4:0] nang;
  logic [4:0] ang_cnt;
  logic en_t, en_x, en_rc, en_ix, en_it;        // start registers
  logic run_t, run_x, run_rc, run_ix, run_it;   // running flags
  logic cmp_t, cmp_x, cmp_rc, cmp_ix;           // writer completed this step
  logic sync;

  assign sync = (st == S_RUN) && (en_t || en_x || en_rc || en_ix || en_it) &&
                !(run_t || run_x || run_rc || run_ix || run_it);

  assign go_t  = sync && en_t;
  assign go_x  = sync && en_x;
  assign go_rc = sync && en_rc;
  assign go_ix = sync && en_ix;
  assign go_it = sync && en_it;
  assign rc_compound = (ang_cnt != 5'd0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= S_HALT;
      nang <= 5'd1; ang_cnt <= '0;
      {en_t, en_x, en_rc, en_ix, en_it} <= '0;
      {run_t, run_x, run_rc, run_ix, run_it} <= '0;
      {cmp_t, cmp_x, cmp_rc, cmp_ix} <= '0;
      {sel_t, sel_x, sel_rc, sel_ix} <= '0;
    end else begin
      case (st)
        S_HALT: st <= S_SETUP;
        S_SETUP: begin
          nang    <= {1'b0, angle} + 5'd1;
          ang_cnt <= '0;
          if (start) begin
            en_t <= 1'b1;
            st   <= S_RUN;
          end
        end
        S_RUN: begin
          if (sync) begin
            {run_t, run_x, run_rc, run_ix, run_it} <= {en_t, en_x, en_rc, en_ix, en_it};
            {en_t, en_x, en_rc, en_ix, en_it} <= '0;
            sel_t  <= sel_t  ^ cmp_t;
            sel_x  <= sel_x  ^ cmp_x;
            sel_rc <= sel_rc ^ cmp_rc;
            sel_ix <= sel_ix ^ cmp_ix;
            {cmp_t, cmp_x, cmp_rc, cmp_ix} <= '0;
          end else begin
            if (done_t) begin
              run_t <= 1'b0; cmp_t <= 1'b1;
              en_x  <= 1'b1;
              en_t  <= start;
            end
            if (done_x) begin
              run_x <= 1'b0; cmp_x <= 1'b1;
              en_rc <= 1'b1;
            end
            if (done_rc) begin
              run_rc <= 1'b0; cmp_rc <= 1'b1;
              if (ang_cnt + 5'd1 == nang) begin
                en_ix   <= 1'b1;
                ang_cnt <= '0;
              end else begin
                ang_cnt <= ang_cnt + 5'd1;
              end
            end
            if (done_ix) begin
              run_ix <= 1'b0; cmp_ix <= 1'b1;
              en_it  <= 1'b1;
            end
            if (done_it) run_it <= 1'b0;
            if (!(en_t || en_x || en_rc || en_ix || en_it) &&
                !(run_t || run_x || run_rc || run_ix || run_it))
              st <= S_HALT;
          end
        end
        default: st <= S_HALT;
      endcase
    end
  end

  assign lut1_sel   = plut_req;
  assign lut_tready = lut1_sel ? plut_ready : rlut_ready;
  assign plut_valid = lut_tvalid && lut1_sel;
  assign plut_last  = lut_tlast && lut1_sel;
  assign rlut_valid = lut_tvalid && !lut1_sel;

  a_done_running: assert property (@(posedge clk) disable iff (!rst_n)
    (done_t -> run_t) && (done_x -> run_x) && (done_rc -> run_rc) && (done_ix -> run_ix) && (done_it -> run_it));
endmodule
