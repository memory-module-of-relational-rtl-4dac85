// Testbench for access_control_unit, the part of the module that decides, slot by slot, what
// the swap gates and the transfer gates do, and keeps the record descriptor memories that record
// which key sits in which record slot. The testbench takes the central control unit's role:
// it clears the maps, writes twenty records of three keys, reads them back bucket by bucket
// in an order different from the write order, and then writes and copies out a bucket in
// replicate mode, clears the done marks and copies it out again. It checks that every
// record enters the buffer loop GL+RL rotations after its generation started (within one
// slot), that the transfer gate sends out only records of the current bucket and each
// exactly once, that transfers out are at least RL rotations apart, that every transferred
// record is later reported at the detector, that a replicated bucket is not sent twice, and
// that gate pulses carry the right operation. The main loop is shortened to 254 slots
// to keep the run short. The mechanisms follow the document; the order of checks is this
// testbench's own. Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_access_control_unit;
  import grace_mm_pkg::*;
  localparam int NB = 64, NM = 256, ML = 254, DL = 300, RC = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rot_tick, slot_tick;
  mode_e mode;
  logic rd_en, wr_en, replicate;
  logic [8:0] rl;
  logic sh_load, clr_start, clr_done_only, clr_busy, op_we, cmp_we;
  logic [7:0] sh_off0, sh_off1, sh_off2;
  logic [3:0] op_idx;
  logic [KEYW-1:0] op_key, cmp_key;
  logic [4:0] n_ops;
  logic [7:0] pulse_phase, pulse_width;
  logic rec_ready, desc_pop, gs, ge, rec_in, rec_out, ds, de, sw_pulse, brt_pulse;
  logic [KEYW+1:0] desc_in;
  brt_op_e brt_op;
  int cyc = 0, nrot = 0, half = 0;
  int checks = 0, failures = 0;
  logic [KEYW-1:0] wq [$];
  int gs_rot [$];
  int n_gs = 0, n_in = 0, n_out = 0, n_ds = 0, n_de = 0, last_out = -100000;
  int n_pulse_out = 0, n_pulse_in = 0, n_pulse_repl = 0, n_sw = 0;
  logic brt_pulse_q = 1'b0, sw_pulse_q = 1'b0;
  logic [KEYW-1:0] cur_cmp;

  access_control_unit #(.NB(NB), .NM(NM), .ML(ML), .DL(DL)) dut (.*);

  always #5 clk = ~clk;
  assign rot_tick  = (cyc == RC - 1);
  assign slot_tick = rot_tick && half[0];
  assign desc_in   = {2'b00, (wq.size() > 0) ? wq[0] : KEYW'(0)};
  always @(posedge clk) begin
    cyc <= (cyc == RC - 1) ? 0 : cyc + 1;
    if (rot_tick) begin nrot <= nrot + 1; half <= half + 1; end
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @rot %0d: %s", nrot, msg); end
  endtask

  // event monitors
  always @(posedge clk) if (rst_n) begin
    brt_pulse_q <= brt_pulse;
    sw_pulse_q  <= sw_pulse;
    if (brt_pulse && !brt_pulse_q) begin
      if (brt_op == BRT_OUT) n_pulse_out++;
      if (brt_op == BRT_IN) n_pulse_in++;
      if (brt_op == BRT_REPL) n_pulse_repl++;
    end
    if (sw_pulse && !sw_pulse_q) n_sw++;
    if (gs) begin
      n_gs++;
      gs_rot.push_back(nrot);
      void'(wq.pop_front());
    end
    if (rec_in) begin
      int g, lat;
      n_in++;
      g = gs_rot.pop_front();
      // generation starts at the first rotation tick after gs
      lat = nrot + 1 - (g + 1);
      check(lat >= GL + int'(rl) && lat <= GL + int'(rl) + 2,
            $sformatf("transfer-in %0d rotations after generation start", lat));
    end
    if (rec_out) begin
      n_out++;
      check(dut.tb_e.key == cur_cmp, $sformatf("sent key %0d while reading bucket %0d", dut.tb_e.key, cur_cmp));
      check(nrot - last_out >= int'(rl) - 1, $sformatf("transfers out %0d rotations apart", nrot - last_out));
      last_out = nrot;
    end
    if (ds) n_ds++;
    if (de) n_de++;
  end

  task automatic clear(bit done_only);
    @(negedge clk);
    mode = MODE_CLEAR; clr_start = 1'b1; clr_done_only = done_only;
    @(negedge clk);
    clr_start = 1'b0;
    while (clr_busy) @(negedge clk);
    mode = MODE_IDLE;
  endtask

  task automatic write_recs(logic [KEYW-1:0] keys [$]);
    int n0, want, t;
    n0 = n_in;
    want = keys.size();
    foreach (keys[i]) wq.push_back(keys[i]);
    @(negedge clk);
    mode = MODE_WRITE; wr_en = 1'b1; rec_ready = 1'b1;
    t = 0;
    while (n_in < n0 + want && t < 4000000) begin
      @(negedge clk);
      t++;
      if (wq.size() == 0) begin wr_en = 1'b0; rec_ready = 1'b0; end
    end
    check(n_in == n0 + want, "not every record entered the buffer loop");
    mode = MODE_IDLE; wr_en = 1'b0; rec_ready = 1'b0;
  endtask

  task automatic set_ops(logic [KEYW-1:0] keys [$]);
    foreach (keys[i]) begin
      @(negedge clk);
      op_we = 1'b1; op_idx = 4'(i); op_key = keys[i];
    end
    @(negedge clk);
    op_we = 1'b0; n_ops = 5'(keys.size());
  endtask

  task automatic set_cmp(logic [KEYW-1:0] k);
    @(negedge clk);
    cmp_we = 1'b1; cmp_key = k; cur_cmp = k;
    @(negedge clk);
    cmp_we = 1'b0;
  endtask

  // read buckets in the given order; returns when all expected records were detected
  task automatic read_buckets(logic [KEYW-1:0] keys [$], int counts [$], bit repl, int max_rot);
    int o0, d0, total, r0;
    o0 = n_out; d0 = n_de;
    total = 0;
    foreach (counts[i]) total += counts[i];
    set_ops(keys);
    replicate = repl;
    r0 = nrot;
    for (int b = 0; b < keys.size(); b++) begin
      int target;
      set_cmp(keys[b]);
      mode = MODE_READ; rd_en = 1'b1;
      target = n_out + counts[b];
      while (n_out < target && nrot - r0 < max_rot) @(negedge clk);
      rd_en = 1'b0;
    end
    while (n_de < d0 + total && nrot - r0 < max_rot + 2 * DL) @(negedge clk);
    check(n_out == o0 + total, $sformatf("%0d records sent, want %0d", n_out - o0, total));
    check(n_de == d0 + total, $sformatf("%0d records detected, want %0d", n_de - d0, total));
    mode = MODE_IDLE;
  endtask

  initial begin
    logic [KEYW-1:0] keys [$];
    int o0;
    mode = MODE_IDLE; rd_en = 0; wr_en = 0; replicate = 0; rl = 9'd6;
    sh_load = 0; sh_off0 = 0; sh_off1 = 0; sh_off2 = 0; clr_start = 0; clr_done_only = 0;
    op_we = 0; op_idx = 0; op_key = 0; n_ops = 0; cmp_we = 0; cmp_key = 0; cur_cmp = 0;
    pulse_phase = 8'd4; pulse_width = 8'd8; rec_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    clear(1'b0);
    // geometry: 3 loops per subchip, record length 6 rotations
    @(negedge clk);
    sh_off0 = 8'd3; sh_off1 = 8'(3 - NB + ML); sh_off2 = 8'(3 - 2 * NB + ML); sh_load = 1'b1;
    @(negedge clk);
    sh_load = 1'b0;
    for (int i = 0; i < 20; i++) keys.push_back(KEYW'(100 + i % 3));
    write_recs(keys);
    read_buckets('{12'd102, 12'd100, 12'd101}, '{6, 7, 7}, 1'b0, 40000);
    check(n_pulse_in == 20 && n_pulse_out == 20, $sformatf("gate pulses in=%0d out=%0d", n_pulse_in, n_pulse_out));
    // replicate: copies stay, a second copy-out finds nothing, clearing the marks re-arms them
    keys.delete();
    for (int i = 0; i < 5; i++) keys.push_back(KEYW'(200));
    write_recs(keys);
    read_buckets('{12'd200}, '{5}, 1'b1, 20000);
    o0 = n_out;
    set_cmp(12'd200);
    mode = MODE_READ; rd_en = 1'b1;
    repeat (4 * NM * 2 * RC) @(negedge clk);
    rd_en = 1'b0; mode = MODE_IDLE;
    check(n_out == o0, "a replicated record was sent twice");
    clear(1'b1);
    read_buckets('{12'd200}, '{5}, 1'b1, 20000);
    check(n_pulse_repl == 10, $sformatf("%0d copy pulses, want 10", n_pulse_repl));
    check(n_sw > 0, "swap gate never used");
    check(n_ds == n_de, "detection starts and ends differ");
    $display("gs=%0d in=%0d out=%0d swaps=%0d", n_gs, n_in, n_out, n_sw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
