// Testbench for major_line_delay, the rotation-level bookkeeping of the major line between
// the transfer gates, the detector and the generators. Records are started at random (a
// transfer-out whenever the read enable allows it, a generation whenever the write enable
// allows it) for several record lengths, and every output is compared with a reference kept
// as lists of the rotations at which each event happened: detection of a record starts
// DL-RL+1 rotations after its transfer-out and ends DL rotations after it; the next
// transfer-out is allowed RL rotations after the previous one; generation ends RL rotations
// after its start; the written record reaches the buffer loop GL rotations after the last
// generated word and is transferred in at the next slot boundary; and a record on its way is
// reported as a shadow on the buffer slots it will pass under one or two buffer rotations
// later. The lengths GL, BL and RL follow the document; the detector distance DL and the
// tick-level timing are this design's own choices. Ends with a TB_RESULT line; a watchdog
// stops a hung run.
module tb_major_line_delay;
  import grace_mm_pkg::*;
  localparam int DL = 300;
  localparam int RC = 4;          // clocks per rotation in this test
  logic clk = 1'b0, rst_n = 1'b0;
  logic rot_tick, slot_tick;
  logic [8:0] rl;
  logic out_issue, re, ds, de, gs, we_ok, ge, ti, sj;
  int checks = 0, failures = 0;
  int cyc = 0, nt = 0;            // clocks in the rotation, rotations completed
  bit out_at [int];               // rotation tick at which a transfer-out entered the line
  bit ge_at [int];                // rotation tick of the last generated word
  int g0 = -1000;                 // first generation tick of the current record
  bit pend = 1'b0;
  int n_ds = 0, n_de = 0, n_ti = 0, n_sj = 0, n_hold = 0;

  major_line_delay #(.GL_P(GL), .DL(DL)) dut (.*);

  always #5 clk = ~clk;
  assign rot_tick  = (cyc == RC - 1);
  assign slot_tick = rot_tick && nt[0];

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @rot %0d: %s", nt, msg); end
  endtask

  function automatic bit at(ref bit a [int], input int k);
    return a.exists(k) ? a[k] : 1'b0;
  endfunction

  // reference model, evaluated between clock edges; k = index of the next tick
  always @(negedge clk) if (rst_n) begin
    int k, r, lo;
    bit e_re, e_sj;
    k = nt; r = int'(rl);
    e_re = !pend;
    for (int j = k - r + 1; j < k; j++) if (at(out_at, j)) e_re = 1'b0;
    check(re == e_re, $sformatf("re %0b want %0b", re, e_re));
    if (!e_re && !pend) n_hold++;
    check(we_ok == (k >= g0 + r), "we_ok wrong");
    e_sj = 1'b0;
    if (r <= BL && BL - r < GL)         e_sj |= at(ge_at, k - 1 - (BL - r));
    if (r <= 2 * BL && 2 * BL - r < GL) e_sj |= at(ge_at, k - 1 - (2 * BL - r));
    check(sj == e_sj, $sformatf("sj %0b want %0b", sj, e_sj));
    if (sj) n_sj++;
    if (rot_tick) begin
      check(ds == at(out_at, k - 1 - (DL - r)), "detection start wrong");
      check(de == at(out_at, k - DL), "detection end wrong");
      check(ge == (k == g0 + r - 1), "generation end wrong");
      if (ds) n_ds++;
      if (de) n_de++;
    end
  end

  // ti is registered at a tick and valid through the following rotation
  always @(negedge clk) if (rst_n && cyc == 1) begin
    bit e_ti;
    e_ti = nt[0] ? 1'b0 : at(ge_at, nt - 1 - GL);   // tick nt-1 was a slot tick when nt is even
    check(ti == e_ti, $sformatf("ti %0b want %0b", ti, e_ti));
    if (ti) n_ti++;
  end

  always @(posedge clk) begin
    if (!rst_n) cyc <= 0;
    else begin
      cyc <= (cyc == RC - 1) ? 0 : cyc + 1;
      if (rot_tick) begin
        if (pend) out_at[nt] = 1'b1;
        if (nt == g0 + int'(rl) - 1) ge_at[nt] = 1'b1;
        pend = 1'b0;
        nt <= nt + 1;
      end
      if (out_issue) pend = 1'b1;
    end
  end

  task automatic run_len(int r, int rotations);
    rst_n = 1'b0; out_issue = 1'b0; gs = 1'b0; rl = 9'(r);
    out_at.delete(); ge_at.delete(); g0 = -1000; pend = 1'b0;
    repeat (2) @(negedge clk);
    nt = 0;
    rst_n = 1'b1;
    while (nt < rotations) begin
      @(negedge clk);
      out_issue = 1'b0; gs = 1'b0;
      if (cyc == 1 && re && $urandom_range(3) == 0 && nt < rotations - DL - 10) out_issue = 1'b1;
      if (cyc == 2 && we_ok && $urandom_range(2) == 0) begin gs = 1'b1; g0 = nt; end
    end
    @(negedge clk);
    out_issue = 1'b0; gs = 1'b0;
  endtask

  initial begin
    out_issue = 1'b0; gs = 1'b0; rl = 9'd2;
    run_len(2, 900);
    run_len(6, 900);
    run_len(100, 1500);
    run_len(128, 1500);
    run_len(220, 2000);
    run_len(280, 2000);
    check(n_ds > 0 && n_de > 0 && n_ti > 0 && n_sj > 0 && n_hold > 0, "an event never happened");
    $display("ds=%0d de=%0d ti=%0d sj=%0d hold=%0d", n_ds, n_de, n_ti, n_sj, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
