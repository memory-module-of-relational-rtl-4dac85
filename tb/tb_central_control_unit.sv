// Testbench for central_control_unit, which decodes host commands, keeps the record geometry
// and the search operands, produces the rotation and slot timing, and runs the read, write
// and clear operations. The testbench issues every command and plays the rest of the module:
// it checks the rotation and slot period, the geometry outputs and look-ahead offsets, that a
// read presents the first bucket's key, moves to the next key after that bucket's count of
// transferred records and ends when all records have been detected, that a write stops
// starting records after the requested number and ends when all have entered the buffer
// loop, that a clear waits for the clearing to finish, and that abort returns to idle. The
// sequence of buckets and the operation control follow the document; the command set and
// encodings are this design's own. The rotation is shortened to 8 clocks. Ends with a
// TB_RESULT line; a watchdog stops a hung run.
module tb_central_control_unit;
  import grace_mm_pkg::*;
  localparam int RC = 8;
  localparam int NB = 64, NM = 2048, ML = 2046;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cmd_valid, busy, rot_tick, slot_tick;
  cmd_e cmd;
  logic [31:0] arg;
  mode_e mode;
  logic [7:0] loops, pulse_phase, pulse_width;
  logic [8:0] rl;
  logic [15:0] rec_bytes;
  logic replicate, sh_load, clr_start, clr_done_only, clr_busy, op_we, cmp_we;
  logic [10:0] sh_off0, sh_off1, sh_off2;
  logic [3:0] op_idx;
  logic [KEYW-1:0] op_key, cmp_key, cur_cmp;
  logic [4:0] n_ops;
  logic rd_en, wr_en, rec_out, de, gs, rec_in;
  int checks = 0, failures = 0;
  int n_cmp = 0;

  central_control_unit #(.ROT_CYCLES(RC), .NB(NB), .NM(NM), .ML(ML)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (cmp_we) begin cur_cmp <= cmp_key; n_cmp++; end

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

  task automatic send(cmd_e c, logic [31:0] a);
    @(negedge clk);
    cmd_valid = 1'b1; cmd = c; arg = a;
    @(negedge clk);
    cmd_valid = 1'b0;
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1'b1; @(negedge clk); s = 1'b0;
  endtask

  initial begin
    int t_prev, per, nslot, nrot;
    cmd_valid = 0; cmd = CMD_NOP; arg = 0; clr_busy = 0; rec_out = 0; de = 0; gs = 0; rec_in = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(mode == MODE_IDLE && !busy, "not idle after reset");
    check(pulse_phase == 8'd4 && pulse_width == 8'd8, "pulse defaults");
    // timing
    nrot = 0; nslot = 0;
    repeat (RC * 20) begin
      @(negedge clk);
      if (rot_tick) nrot++;
      if (slot_tick) begin nslot++; check(rot_tick, "slot tick off a rotation tick"); end
    end
    check(nrot == 20 && nslot == 10, $sformatf("%0d rotations, %0d slots in 20 rotations", nrot, nslot));
    // geometry
    @(negedge clk); cmd_valid = 1'b1; cmd = CMD_GEOMETRY; arg = {8'd0, 16'd300, 8'd70};
    @(negedge clk); cmd_valid = 1'b0;
    check(sh_load, "look-ahead registers not loaded");
    check(loops == 8'd70 && rl == 9'd140 && rec_bytes == 16'd300, "geometry outputs");
    check(sh_off0 == 11'd70 && sh_off1 == 11'(70 - NB) && sh_off2 == 11'(70 - 2 * NB + ML), "look-ahead offsets");
    // pulse timing
    send(CMD_PULSE, {16'd0, 8'd3, 8'd2});
    check(pulse_phase == 8'd2 && pulse_width == 8'd3, "pulse command");
    // operands: bucket keys 11, 22, 33 with counts 2, 3, 1
    send(CMD_OPERAND, {16'd2, 12'd11, 4'd0});
    check(op_we && op_idx == 4'd0 && op_key == 12'd11, "operand write 0");
    send(CMD_OPERAND, {16'd3, 12'd22, 4'd1});
    send(CMD_OPERAND, {16'd1, 12'd33, 4'd2});
    // read of the three buckets
    send(CMD_READ, 32'd3);
    check(mode == MODE_READ && busy && rd_en && !replicate && n_ops == 5'd3, "read not started");
    @(negedge clk);
    check(cur_cmp == 12'd11, "first comparand");
    pulse(rec_out); @(negedge clk);
    check(cur_cmp == 12'd11, "bucket changed too early");
    pulse(rec_out); @(negedge clk);
    check(cur_cmp == 12'd22, "second comparand");
    repeat (3) pulse(rec_out);
    @(negedge clk);
    check(cur_cmp == 12'd33 && rd_en, "third comparand");
    pulse(rec_out); @(negedge clk);
    check(!rd_en, "read enable still on after the last record");
    repeat (5) pulse(de);
    check(mode == MODE_READ, "read ended before all records were detected");
    pulse(de); @(negedge clk);
    check(mode == MODE_IDLE, "read did not end");
    // replicate flag
    send(CMD_READ, 32'h21);
    check(replicate && n_ops == 5'd1, "replicate read");
    send(CMD_ABORT, 0);
    check(mode == MODE_IDLE && !rd_en, "abort");
    // write of three records
    send(CMD_WRITE, 32'd3);
    check(mode == MODE_WRITE && wr_en, "write not started");
    send(CMD_READ, 32'd1);
    check(mode == MODE_WRITE, "command accepted while busy");
    repeat (2) pulse(gs);
    check(wr_en, "write enable dropped early");
    pulse(gs); @(negedge clk);
    check(!wr_en, "write enable still on");
    repeat (2) pulse(rec_in);
    check(mode == MODE_WRITE, "write ended early");
    pulse(rec_in); @(negedge clk);
    check(mode == MODE_IDLE, "write did not end");
    // clear
    @(negedge clk); cmd_valid = 1'b1; cmd = CMD_CLEAR; arg = 32'd1;
    @(negedge clk); cmd_valid = 1'b0;
    check(clr_start && clr_done_only, "clear request");
    clr_busy = 1'b1;
    repeat (10) @(negedge clk);
    check(mode == MODE_CLEAR, "clear ended while busy");
    clr_busy = 1'b0;
    repeat (2) @(negedge clk);
    check(mode == MODE_IDLE, "clear did not end");
    // empty read ends at once
    send(CMD_READ, 32'd0);
    repeat (2) @(negedge clk);
    check(mode == MODE_IDLE, "empty read did not end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
