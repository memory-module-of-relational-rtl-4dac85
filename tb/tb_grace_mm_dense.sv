// tb_grace_mm_dense: end-to-end test of the memory module controller close to full capacity.
//
// Same host tasks and checks as the full-size end-to-end test, but with the main loop
// shortened to 126 slots (128-word map) so that 170 one-loop records fill most of the
// 190 slots of the buffer and main loops. Generation then often has to wait because the
// buffer slot and all main-loop slots it could swap into are occupied, which the full-size
// test never reaches. The records are read back in four buckets and every byte is checked.
//
// It runs against bubble_unit_model with a defect map programmed. The records are written
// in batches of 50 so the host descriptor queue never overflows. Checks:
//   - every byte read must belong to a record written with the requested key, buckets must
//     come out in the requested order, and each record exactly once;
//   - each record must reach the buffer loop GL+RL rotations after its generation starts
//     (all 170 are timed);
//   - no generated record may land on an occupied buffer slot (shadow control);
//   - write-mode and look-ahead swaps, generation into an occupied buffer shadow, waiting
//     generation and bucket changes must each happen at least once.
// The capacity figure and the check list are this test's own; the conditions it checks are
// those of the original description.
module tb_grace_mm_dense;
  import grace_mm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid = 0; cmd_e cmd = CMD_NOP; logic [31:0] arg = 0;
  logic busy; mode_e mode;
  logic h_wr_valid = 0; logic [7:0] h_wr_data = 0; logic h_wr_full;
  logic h_desc_valid = 0; logic [13:0] h_desc = 0; logic h_desc_full;
  logic h_rd_pop; logic h_rd_valid; logic [7:0] h_rd_data; logic rd_overflow;
  logic rom_we = 0; logic [10:0] rom_waddr = 0; logic [7:0] rom_wdata = 0;
  logic field_tick, slot_tick, sw_pulse, brt_pulse, gen_en;
  brt_op_e brt_op; logic [31:0] gen_word, det;

  grace_mm_top #(.NM(128), .ML(126)) dut (.*);

  bubble_unit_model #(.NM(126)) u_bub (
    .clk, .field_tick, .slot_tick, .sw_pulse, .brt_pulse, .brt_op(brt_op),
    .gen_word, .gen_en, .det);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- host side ----------------
  task automatic send(input cmd_e c, input logic [31:0] a);
    @(negedge clk); cmd_valid = 1; cmd = c; arg = a;
    @(negedge clk); cmd_valid = 0; cmd = CMD_NOP;
  endtask
  task automatic wait_idle();
    @(negedge clk);
    while (busy) @(negedge clk);
  endtask

  // records written, by bucket; bytes stored flat
  localparam int MAXREC = 200;
  byte unsigned rec_data [MAXREC][];
  logic [11:0]  rec_key [MAXREC];
  bit           rec_live [MAXREC];
  int           nrec = 0;

  // read collector
  byte unsigned rd_q[$];
  assign h_rd_pop = h_rd_valid;
  always @(posedge clk) if (h_rd_valid) rd_q.push_back(h_rd_data);

  // defect map: loop 2 of subchip 5 and loop 3 of subchip 20 are defective
  function automatic bit is_good(input int loop, input int sub);
    return !((loop == 2 && sub == 5) || (loop == 3 && sub == 20));
  endfunction
  function automatic int good_bits(input int loops);
    int n = 0;
    for (int l = 1; l <= loops; l++) for (int s = 0; s < 32; s++) if (is_good(l, s)) n += 2;
    return n;
  endfunction

  task automatic program_rom();
    for (int l = 1; l <= LOOPS_MAX; l++)
      for (int r = 0; r < 2; r++)
        for (int b = 0; b < 4; b++) begin
          logic [7:0] v;
          for (int k = 0; k < 8; k++) v[7-k] = is_good(l, 8*b + k);
          @(negedge clk); rom_we = 1; rom_waddr = 11'(8*l - 4*r - b); rom_wdata = v;
        end
    @(negedge clk); rom_we = 0;
  endtask

  task automatic write_records(input int loops, input int nbytes, input logic [11:0] keys[$]);
    int first = nrec;
    send(CMD_GEOMETRY, {8'd0, 16'(nbytes), 8'(loops)});
    foreach (keys[i]) begin
      rec_data[nrec] = new[nbytes];
      rec_key[nrec] = keys[i];
      rec_live[nrec] = 1;
      for (int b = 0; b < nbytes; b++) begin
        rec_data[nrec][b] = 8'($urandom);
        @(negedge clk); h_wr_valid = 1; h_wr_data = rec_data[nrec][b];
      end
      @(negedge clk); h_wr_valid = 0; h_desc_valid = 1; h_desc = {2'b00, keys[i]};
      @(negedge clk); h_desc_valid = 0;
      nrec++;
    end
    $display("[%0t] write %0d records of %0d loops", $time, keys.size(), loops);
    send(CMD_WRITE, 32'(keys.size()));
    wait_idle();
    check(nrec - first == keys.size(), "records written");
  endtask

  // read buckets in order; check data against written records
  task automatic read_buckets(input int nbytes, input logic [11:0] keys[$], input bit repl);
    int cnt [$];
    foreach (keys[i]) begin
      int c = 0;
      for (int r = 0; r < nrec; r++) if (rec_live[r] && rec_key[r] == keys[i] && rec_data[r].size() == nbytes) c++;
      cnt.push_back(c);
      send(CMD_OPERAND, {16'(c), keys[i], 4'(i)});
    end
    rd_q.delete();
    $display("[%0t] read %0d buckets, replicate=%0d", $time, keys.size(), repl);
    if ($test$plusargs("dbg"))
      for (int b = 0; b < NB_SLOTS; b++)
        if (dut.u_acu.u_rdm.u_rdm_buf.mem[b][15]) $display("  buf[%0d] = %04h", b, dut.u_acu.u_rdm.u_rdm_buf.mem[b]);
    send(CMD_READ, {26'd0, repl, 5'(keys.size())});
    wait_idle();
    repeat (2000) @(negedge clk);
    begin
      int pos = 0;
      foreach (keys[i]) begin
        for (int k = 0; k < cnt[i]; k++) begin
          int hit = -1;
          for (int r = 0; r < nrec && hit < 0; r++) begin
            if (rec_live[r] && rec_key[r] == keys[i] && rec_data[r].size() == nbytes && pos + nbytes <= rd_q.size()) begin
              bit same = 1;
              for (int b = 0; b < nbytes; b++) if (rd_q[pos + b] != rec_data[r][b]) same = 0;
              if (same) hit = r;
            end
          end
          if (hit < 0 && $test$plusargs("dbg")) begin
            for (int b = 0; b < 8; b++) $write("%02h ", rd_q[pos+b]);
            $write(" | ");
            for (int r = 0; r < nrec; r++) if (rec_key[r] == keys[i]) begin
              for (int b = 0; b < 8; b++) $write("%02h ", rec_data[r][b]);
              $write(" | ");
            end
            $display("");
          end
          check(hit >= 0, $sformatf("record %0d of bucket %03h (byte %0d of %0d read)", k, keys[i], pos, rd_q.size()));
          if (hit >= 0 && !repl) rec_live[hit] = 0;
          pos += nbytes;
        end
      end
      check(pos == rd_q.size(), $sformatf("read byte count %0d expected %0d", rd_q.size(), pos));
    end
  endtask

  // ---------------- mechanism counters and timing checks ----------------
  int n_swap_wr = 0, n_swap_rd = 0, n_sj = 0, n_gen_sb_occ = 0, n_gen_wait = 0;
  int n_gapless = 0, n_multi_on_line = 0, n_defect_drop = 0, n_bucket_adv = 0, n_repl = 0;
  int n_re_hold = 0, n_sm1 = 0, n_ti_checked = 0;
  int unsigned rot = 0, last_to_rot = 0;
  int unsigned gs_rot [$];
  bit gs_pending = 0;

  always @(posedge clk) if (rst_n) begin
    if (field_tick) rot++;
    if (dut.u_acu.gate_done && dut.u_acu.swap) begin
      if (mode == MODE_WRITE) n_swap_wr++;
      if (mode == MODE_READ)  n_swap_rd++;
    end
    if (dut.u_acu.shadow_valid && dut.u_acu.sj && mode == MODE_WRITE) n_sj++;
    if (dut.u_acu.gs && dut.u_acu.sb_e.valid) n_gen_sb_occ++;
    if (dut.u_acu.gs && dut.u_acu.sb_e.valid && dut.u_acu.sm0_e.valid) n_sm1++;
    if (dut.u_acu.shadow_valid && dut.u_acu.u_gen.wr_en && dut.u_acu.rec_ready &&
        dut.u_acu.we_ok && !dut.u_acu.cond6) n_gen_wait++;
    if (dut.u_acu.gate_done && dut.rd_en && dut.mode == MODE_READ && !dut.u_acu.re &&
        dut.u_acu.tb_e.valid && !dut.u_acu.tb_e.done && dut.u_acu.tb_e.key == dut.u_acu.u_brt.comparand)
      n_re_hold++;
    if (dut.u_acu.rec_out) begin
      if (last_to_rot != 0 && rot + 1 - last_to_rot <= 32'(dut.rl) + 1) n_gapless++;
      last_to_rot = rot + 1;
      if (dut.u_acu.u_brt.op == BRT_REPL) n_repl++;
    end
    if (field_tick && $countones(dut.u_acu.u_mld.dl_r) > 1) n_multi_on_line++;
    if (dut.u_dcu.u_rc.shifting && dut.u_dcu.u_rc.mask_valid &&
        !dut.u_dcu.u_rc.mask[5'(6'd32 - dut.u_dcu.u_rc.nbit)]) n_defect_drop++;
    if (mode == MODE_READ && dut.u_ccu.cmp_we) n_bucket_adv++;
    // generation start -> transfer-in latency, in rotations
    if (dut.u_acu.gs) gs_pending = 1;
    if ($test$plusargs("dbg") && dut.u_acu.gs)
      $display("gs rot=%0d sb_addr=%0d sb=%04h sm0=%04h tb=%0d", rot, dut.u_acu.u_rdm.ar2[5:0], dut.u_acu.sb_e, dut.u_acu.sm0_e, dut.u_acu.tb_addr);
    if ($test$plusargs("dbg") && dut.u_acu.rec_in)
      $display("in  rot=%0d tb=%0d", rot, dut.u_acu.tb_addr);
    if ($test$plusargs("dbg") && (dut.u_acu.gs || dut.u_acu.ge || dut.u_acu.rec_in || dut.u_acu.rec_out || dut.u_acu.ds || (field_tick && dut.u_acu.ti)))
      $display("%0d rot=%0d gs=%0d ge=%0d ti=%0d in=%0d out=%0d ds=%0d tb=%0d", $time, rot, dut.u_acu.gs, dut.u_acu.ge, dut.u_acu.ti, dut.u_acu.rec_in, dut.u_acu.rec_out, dut.u_acu.ds, dut.u_acu.tb_addr);
    if (field_tick && gs_pending) begin gs_rot.push_back(rot); gs_pending = 0; end
  end
  // transfer-in: decided in the slot after rotation `rot`, carried out at the next tick
  always @(posedge clk) if (rst_n) begin
    if (dut.u_acu.rec_in) begin
      int unsigned t0;
      t0 = gs_rot.pop_front();
      n_ti_checked++;
      check(rot + 1 - t0 == 32'(GL) + 32'(dut.rl),
            $sformatf("transfer-in %0d rotations after generation start, expected GL+RL=%0d",
                      rot + 1 - t0, GL + 32'(dut.rl)));
    end
  end

  initial begin
    int unsigned lim;
    lim = 200_000_000;
    void'($value$plusargs("wd=%d", lim));
    repeat (lim) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] ks[$];
    repeat (5) @(negedge clk);
    rst_n = 1;
    program_rom();
    send(CMD_CLEAR, 0); wait_idle();

    // 170 one-loop records of four buckets
    // in batches that fit the host descriptor queue
    for (int n = 0; n < 170; n += 50) begin
      ks.delete();
      for (int i = n; i < n + 50 && i < 170; i++) ks.push_back(12'(12'h100 + (i * 7) % 4));
      write_records(1, good_bits(1) / 8, ks);
    end
    read_buckets(good_bits(1) / 8, '{12'h102, 12'h100, 12'h103, 12'h101}, 0);

    check(u_bub.collisions == 0, $sformatf("%0d records landed on occupied slots", u_bub.collisions));
    check(!rd_overflow, "read FIFO overflow");
    $display("mechanisms: swap_wr=%0d swap_rd=%0d sj=%0d gen_sb_occ=%0d gen_sb_sm0_occ=%0d gen_wait=%0d gapless=%0d re_hold=%0d multi=%0d defect_drop=%0d bucket_adv=%0d repl=%0d ti_checked=%0d",
             n_swap_wr, n_swap_rd, n_sj, n_gen_sb_occ, n_sm1, n_gen_wait, n_gapless, n_re_hold, n_multi_on_line,
             n_defect_drop, n_bucket_adv, n_repl, n_ti_checked);
    check(n_swap_wr > 0, "write-mode swap never happened");
    check(n_swap_rd > 0, "read-mode (look-ahead) swap never happened");
    check(n_gen_sb_occ > 0, "generation into an occupied buffer shadow never happened");
    check(n_gen_wait > 0, "generation never had to wait for a free shadow");
    check(n_bucket_adv > 0, "bucket never advanced");
    check(n_ti_checked == 170, $sformatf("%0d transfers-in timed, want 170", n_ti_checked));
    $display("rotations simulated: %0d", rot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
