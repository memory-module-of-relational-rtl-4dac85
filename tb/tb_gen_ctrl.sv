// Testbench for gen_ctrl, which decides in each slot whether the generators start writing a
// record. Random map entries, record lengths and enables are applied and the start pulse is
// compared one clock later with the reference rule: a record may start when the buffer slot
// that will receive it is free and no record in flight on the major line is already headed
// for it, or when the main-loop slot it would reach by swapping (one, two or three buffer
// rotations away, the last two only for long records) is free; and only while the generators
// are idle and a record is waiting. The condition follows the document's expression for
// record generation; the one-clock registered start is this design's own. Ends with a
// TB_RESULT line; a watchdog stops a hung run.
module tb_gen_ctrl;
  import grace_mm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en, rec_ready, we_ok, shadow_valid, sj, cond6, gs;
  logic [8:0] rl;
  rdm_entry_t sb, sm0, sm1, sm2;
  int checks = 0, failures = 0;
  int n_gs = 0, n_sm1 = 0, n_sm2 = 0, n_blocked = 0;

  gen_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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
    e = RDM_EMPTY;
    e.valid = 1'($urandom_range(4) != 0);
    e.key = KEYW'($urandom);
    return e;
  endfunction

  initial begin
    wr_en = 1'b0; rec_ready = 1'b0; we_ok = 1'b0; shadow_valid = 1'b0; sj = 1'b0; rl = 9'd2;
    sb = RDM_EMPTY; sm0 = RDM_EMPTY; sm1 = RDM_EMPTY; sm2 = RDM_EMPTY;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 8000; n++) begin
      bit exp_c, exp_gs, via_sm1, via_sm2;
      wr_en = 1'($urandom_range(7) != 0);
      rec_ready = 1'($urandom_range(7) != 0);
      we_ok = 1'($urandom_range(7) != 0);
      shadow_valid = 1'($urandom_range(3) != 0);
      sj = 1'($urandom_range(3) == 0);
      rl = 9'(2 * $urandom_range(1, 140));
      sb = rnd_entry(); sm0 = rnd_entry(); sm1 = rnd_entry(); sm2 = rnd_entry();
      via_sm1 = !sm1.valid && rl >= 9'(BL);
      via_sm2 = !sm2.valid && rl >= 9'(2 * BL);
      exp_c = (!sb.valid && !sj) || !sm0.valid || via_sm1 || via_sm2;
      exp_gs = shadow_valid && wr_en && rec_ready && we_ok && exp_c;
      #1;
      check(cond6 == exp_c, "generation condition wrong");
      @(negedge clk);
      check(gs == exp_gs, $sformatf("start %0b want %0b", gs, exp_gs));
      if (exp_gs) n_gs++;
      if (exp_gs && sb.valid && sm0.valid && via_sm1) n_sm1++;
      if (exp_gs && sb.valid && sm0.valid && !via_sm1 && via_sm2) n_sm2++;
      if (shadow_valid && wr_en && rec_ready && we_ok && !exp_c) n_blocked++;
    end
    check(n_gs > 0 && n_sm1 > 0 && n_sm2 > 0 && n_blocked > 0, "not every case was exercised");
    $display("start=%0d via_sm1=%0d via_sm2=%0d blocked=%0d", n_gs, n_sm1, n_sm2, n_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
