// tb_global_ctrl: global controller driven by five process models that
// finish after random times. Three runs (1, 3 and 2 angles). Checked:
// processes start only when none is running; each completion enables its
// successor at the next synchronisation point (TFFT -> XFFT -> Remap ->
// after the last angle IXFFT -> ITFFT, TFFT again while start is high);
// compound mode for every angle after the first; each ping-pong select flips
// exactly when its writer completed in the previous step; the number of
// starts of every process; return to HALT and SETUP; LUT channel routing.
module tb_global_ctrl;
  logic clk = 0, rst_n = 0, start = 0;
  logic [3:0] angle = '0;
  logic [1:0] state;
  logic go[5], done[5];
  logic rc_compound;
  logic sel_t, sel_x, sel_rc, sel_ix;
  logic plut_req = 0, plut_ready = 0, rlut_ready = 0, lut_tvalid = 0, lut_tlast = 0;
  logic lut1_sel, lut_tready, plut_valid, plut_last, rlut_valid;
  int checks = 0, failures = 0;

  global_ctrl dut (.clk, .rst_n, .start, .angle, .state,
    .go_t(go[0]), .go_x(go[1]), .go_rc(go[2]), .go_ix(go[3]), .go_it(go[4]),
    .done_t(done[0]), .done_x(done[1]), .done_rc(done[2]), .done_ix(done[3]), .done_it(done[4]),
    .rc_compound, .sel_t, .sel_x, .sel_rc, .sel_ix,
    .plut_req, .plut_ready, .rlut_ready, .lut_tvalid, .lut_tlast,
    .lut1_sel, .lut_tready, .plut_valid, .plut_last, .rlut_valid);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    $display("ERROR: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic err(string s);
    failures++;
    if (failures < 15) $display("ERROR: %s at %0t", s, $time);
  endtask

  // process models
  int remain[5];
  bit running[5];
  initial foreach (remain[i]) begin remain[i] = 0; running[i] = 0; end
  always_comb foreach (done[i]) done[i] = running[i] && remain[i] == 0;
  always @(posedge clk) if (rst_n) begin
    foreach (go[i]) begin
      if (go[i]) begin
        running[i] <= 1; remain[i] <= 20 + int'($urandom % 200);
      end else if (running[i]) begin
        if (remain[i] == 0) running[i] <= 0;
        else remain[i] <= remain[i] - 1;
      end
    end
  end

  // observers
  int nang = 1, ngo[5], ang_seen = 0, n_sync = 0;
  bit pend[5];                 // completed since the last synchronisation
  bit want_t;                  // start was high at the last TFFT completion
  int rc_done_cnt = 0;
  logic [3:0] sel_q, sel_exp;
  initial begin foreach (ngo[i]) ngo[i] = 0; foreach (pend[i]) pend[i] = 0; end

  always @(posedge clk) if (rst_n) begin
    bit any_go, any_run;
    any_go = 0; any_run = 0;
    foreach (go[i]) any_go |= go[i];
    foreach (running[i]) any_run |= running[i];
    if (any_go) begin
      n_sync++;
      checks++; if (any_run) err("start while a process runs");
      checks += 5;
      if (pend[0] && go[1] !== 1'b1) err("XFFT not started after TFFT");
      if (pend[1] && go[2] !== 1'b1) err("Remap not started after XFFT");
      if (pend[3] && go[4] !== 1'b1) err("ITFFT not started after IXFFT");
      if (pend[0] && (go[0] !== want_t)) err("TFFT restart does not follow start");
      if (pend[2] && (go[3] !== (rc_done_cnt % nang == 0))) err("IXFFT start does not follow the angle count");
      sel_exp = {sel_t ^ pend[0], sel_x ^ pend[1], sel_rc ^ pend[2], sel_ix ^ pend[3]};
      if (go[2]) begin
        checks++;
        if (rc_compound != (rc_done_cnt % nang != 0)) err("compound mode");
      end
      foreach (go[i]) if (go[i]) ngo[i]++;
      foreach (pend[i]) pend[i] = 0;
    end
    foreach (done[i]) if (done[i]) begin
      pend[i] = 1;
      if (i == 0) want_t = start;
      if (i == 2) rc_done_cnt++;
    end
    // selects: flip only at a synchronisation point, as expected
    checks++;
    if ({sel_t, sel_x, sel_rc, sel_ix} != sel_q) err("ping-pong selects");
    sel_q = any_go ? sel_exp : {sel_t, sel_x, sel_rc, sel_ix};
    // LUT routing
    checks += 4;
    if (lut1_sel != plut_req) err("lut1_sel");
    if (lut_tready != (plut_req ? plut_ready : rlut_ready)) err("lut_tready");
    if (plut_valid != (lut_tvalid && plut_req) || rlut_valid != (lut_tvalid && !plut_req)) err("lut valid routing");
    if (plut_last != (lut_tlast && plut_req)) err("plut_last");
  end

  always @(negedge clk) begin
    plut_req = 1'($urandom); plut_ready = 1'($urandom); rlut_ready = 1'($urandom);
    lut_tvalid = 1'($urandom); lut_tlast = 1'($urandom);
  end

  initial begin
    int angs[3] = '{0, 2, 1};
    int imgs[3] = '{3, 2, 2};
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    sel_q = {sel_t, sel_x, sel_rc, sel_ix};
    foreach (angs[r]) begin
      int nf;
      nang = angs[r] + 1;
      nf = nang * imgs[r];
      foreach (ngo[i]) ngo[i] = 0;
      rc_done_cnt = 0;
      wait (state == 2'd1);
      @(negedge clk);
      angle = 4'(angs[r]);
      repeat (5) @(negedge clk);
      checks++; if (state != 2'd1) err("not waiting in SETUP");
      start = 1;
      wait (ngo[0] == nf);
      @(negedge clk);
      start = 0;
      wait (state == 2'd0);
      checks += 5;
      if (ngo[0] != nf || ngo[1] != nf || ngo[2] != nf) err("TFFT/XFFT/Remap start counts");
      if (ngo[3] != imgs[r] || ngo[4] != imgs[r]) err("IXFFT/ITFFT start counts");
      foreach (running[i]) if (running[i]) err("process still running at HALT");
      $display("run %0d: %0d angle(s), %0d images, starts %0d %0d %0d %0d %0d", r, nang, imgs[r],
               ngo[0], ngo[1], ngo[2], ngo[3], ngo[4]);
      @(posedge clk); #1;
      checks++; if (state != 2'd1) err("HALT did not go to SETUP");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
