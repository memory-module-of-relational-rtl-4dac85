// Testbench for rdm_control, which keeps the two record descriptor memories (one entry per record
// slot of the buffer loop and of the main loop) and steps their address registers with the
// rotation. The testbench plays the gate control: for every slot it answers the gate request
// after a random delay with random transfer-gate and swap-gate results, and it keeps its own
// copy of both maps and of the address pointers (transfer gate position starting BL0/2 slots
// behind the write position, swap position, look-ahead positions loaded with offsets). It
// checks the entries handed to the gate control and to the generator control against that
// copy in every slot, checks that the results are written back, and runs a full clear and a
// clear of the done marks only, one of them requested in the middle of a slot. The pointer
// arrangement follows the document's address registers; the per-slot read/write sequence is
// this design's own. The main map is reduced to 256 entries and the main loop to 250 slots
// (like the real 2046, not a multiple of the buffer loop) to keep the run short. Ends with a
// TB_RESULT line; a watchdog stops a hung run.
module tb_rdm_control;
  import grace_mm_pkg::*;
  localparam int NB = 64;
  localparam int NM = 256;
  localparam int ML = 250;
  localparam int SC = 32;             // clocks per slot in this test
  logic clk = 1'b0, rst_n = 1'b0;
  logic slot_tick, sh_load, clr_start, clr_done_only, clr_busy;
  logic [7:0] sh_off0, sh_off1, sh_off2;
  logic gate_req, gate_done, brt_we, swap, shadow_valid;
  rdm_entry_t tb_e, wb_e, wm_e, brt_new, new_wb, new_wm, sb_e, sm0_e, sm1_e, sm2_e;
  logic [5:0] tb_addr;
  logic [7:0] wm_addr, sm0_addr;
  rdm_entry_t rbuf [NB];
  rdm_entry_t rmain [NM];
  int tbp, wp, wbp, sbp, s0, s1, s2;
  int cyc = 0;
  int checks = 0, failures = 0;
  int n_seq = 0, n_shadow = 0, n_swap = 0, n_brt = 0;

  rdm_control #(.NB(NB), .NM(NM), .ML(ML)) dut (.*);

  always #5 clk = ~clk;
  assign slot_tick = (cyc == SC - 1);
  always @(posedge clk) cyc <= (cyc == SC - 1) ? 0 : cyc + 1;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic rdm_entry_t rnd_entry();
    rdm_entry_t e;
    e.valid = 1'($urandom); e.done = 1'($urandom); e.tag = 2'($urandom); e.key = KEYW'($urandom);
    return e;
  endfunction

  // pointers of the reference
  always @(posedge clk) if (rst_n) begin
    if (slot_tick) begin
      tbp <= (tbp + 1) % NB;
      wp  <= (wp + 1) % ML;
      wbp <= (wbp + 1) % NB;
    end
    if (sh_load) begin
      s0  <= (wp + (slot_tick ? 1 : 0) + int'(sh_off0)) % ML;
      sbp <= (wbp + (slot_tick ? 1 : 0) + int'(sh_off0)) % NB;
      s1  <= (wp + (slot_tick ? 1 : 0) + int'(sh_off1)) % ML;
      s2  <= (wp + (slot_tick ? 1 : 0) + int'(sh_off2)) % ML;
    end else if (slot_tick) begin
      s0 <= (s0 + 1) % ML; s1 <= (s1 + 1) % ML; s2 <= (s2 + 1) % ML; sbp <= (sbp + 1) % NB;
    end
  end

  // gate control played by the testbench
  initial begin
    gate_done = 1'b0; brt_we = 1'b0; swap = 1'b0;
    brt_new = RDM_EMPTY; new_wb = RDM_EMPTY; new_wm = RDM_EMPTY;
    forever begin
      @(posedge clk);
      if (rst_n && gate_req) begin
        int d;
        n_seq++;
        check(tb_addr == 6'(tbp) && wm_addr == 8'(wp), "address registers out of step");
        check(tb_e == rbuf[tbp], $sformatf("TB entry %h want %h", tb_e, rbuf[tbp]));
        check(wb_e == rbuf[wbp], $sformatf("WB entry %h want %h", wb_e, rbuf[wbp]));
        check(wm_e == rmain[wp], $sformatf("WM entry %h want %h", wm_e, rmain[wp]));
        d = int'($urandom_range(0, 8));
        repeat (d) @(posedge clk);
        #1;
        brt_we = 1'($urandom); swap = 1'($urandom);
        brt_new = rnd_entry(); new_wb = rnd_entry(); new_wm = rnd_entry();
        gate_done = 1'b1;
        if (brt_we) begin rbuf[tbp] = brt_new; n_brt++; end
        if (swap) begin rbuf[wbp] = new_wb; rmain[wp] = new_wm; n_swap++; end
        @(posedge clk);
        #1;
        gate_done = 1'b0;
      end
    end
  end

  always @(posedge clk) if (rst_n && shadow_valid) begin
    n_shadow++;
    check(sm0_addr == 8'(s0), "look-ahead register out of step");
    check(sb_e == rbuf[sbp] && sm0_e == rmain[s0] && sm1_e == rmain[s1] && sm2_e == rmain[s2],
          $sformatf("look-ahead entries wrong at %0d", s0));
  end

  task automatic do_clear(bit done_only, int wait_clocks);
    @(negedge clk);
    repeat (wait_clocks) @(negedge clk);
    clr_start = 1'b1; clr_done_only = done_only;
    @(negedge clk);
    clr_start = 1'b0;
    check(clr_busy, "clear not reported busy");
    while (clr_busy) @(negedge clk);
    for (int i = 0; i < NB; i++) rbuf[i] = done_only ? '{valid: rbuf[i].valid, done: 1'b0, tag: rbuf[i].tag, key: rbuf[i].key} : RDM_EMPTY;
    for (int i = 0; i < NM; i++) rmain[i] = done_only ? '{valid: rmain[i].valid, done: 1'b0, tag: rmain[i].tag, key: rmain[i].key} : RDM_EMPTY;
  endtask

  task automatic load_shadow();
    @(negedge clk);
    sh_off0 = 8'($urandom_range(2, 140)); sh_off1 = 8'((int'(sh_off0) - 64 + ML) % ML); sh_off2 = 8'((int'(sh_off0) - 128 + 2 * ML) % ML);
    sh_load = 1'b1;
    @(negedge clk);
    sh_load = 1'b0;
  endtask

  initial begin
    sh_load = 1'b0; clr_start = 1'b0; clr_done_only = 1'b0;
    sh_off0 = '0; sh_off1 = '0; sh_off2 = '0;
    tbp = NB - BL0 / 2; wp = 0; wbp = 0; sbp = 0; s0 = 0; s1 = 0; s2 = 0;
    for (int i = 0; i < NB; i++) rbuf[i] = RDM_EMPTY;
    for (int i = 0; i < NM; i++) rmain[i] = RDM_EMPTY;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    do_clear(1'b0, 0);
    load_shadow();
    repeat (200 * SC) @(negedge clk);
    do_clear(1'b1, 5);                 // requested during a slot sequence
    load_shadow();
    repeat (300 * SC) @(negedge clk);
    do_clear(1'b0, 20);
    repeat (100 * SC) @(negedge clk);
    // after a full clear every entry seen must be empty
    check(n_seq > 500 && n_shadow > 500 && n_swap > 100 && n_brt > 100, "too few slot sequences");
    $display("sequences=%0d shadows=%0d swaps=%0d brt=%0d", n_seq, n_shadow, n_swap, n_brt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
