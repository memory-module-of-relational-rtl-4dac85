// Testbench for swap_ctrl, the part of the gate control that decides, once per slot, whether
// the swap gate exchanges the record in the buffer loop with the one in the main loop. It
// loads a random list of search operands, then presents random entry pairs in read, write
// and idle mode and compares the decision and the exchanged entries with a reference:
// in read mode the main-loop record moves up when its key comes earlier in the operand list
// than the buffer record's key (a record with no match has the lowest priority); in write
// mode a buffer record moves down when the main slot under the gate is empty. It also checks
// that the decision takes NOPS+1 clocks, one per operand register. The priority rule follows
// the document's look-ahead scheme; the serial comparison and its latency are this design's
// own. Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_swap_ctrl;
  import grace_mm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  mode_e mode;
  logic op_we;
  logic [3:0] op_idx;
  logic [KEYW-1:0] op_key;
  logic [4:0] n_ops;
  logic start, done, swap;
  rdm_entry_t wb, wm, new_wb, new_wm;
  logic [KEYW-1:0] ops [NOPS];
  int checks = 0, failures = 0;

  swap_ctrl #(.NOPS_P(NOPS)) dut (.*);

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

  function automatic int prio(rdm_entry_t e, int n);
    if (!e.valid || e.done) return NOPS;
    for (int i = 0; i < n; i++) if (ops[i] == e.key) return i;
    return NOPS;
  endfunction

  function automatic rdm_entry_t rnd_entry();
    rdm_entry_t e;
    e.valid = 1'($urandom_range(3) != 0);
    e.done  = 1'($urandom_range(5) == 0);
    e.tag   = 2'($urandom);
    // keys mostly from the operand list so that matches are common
    e.key   = ($urandom_range(3) != 0) ? ops[$urandom_range(NOPS - 1)] : KEYW'($urandom);
    return e;
  endfunction

  initial begin
    op_we = 1'b0; op_idx = '0; op_key = '0; n_ops = '0; start = 1'b0;
    mode = MODE_IDLE; wb = RDM_EMPTY; wm = RDM_EMPTY;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 20; round++) begin
      int n;
      // new operand list with distinct keys
      for (int i = 0; i < NOPS; i++) begin
        ops[i] = KEYW'(i * 97 + round * 13 + 5);
        @(negedge clk);
        op_we = 1'b1; op_idx = 4'(i); op_key = ops[i];
      end
      @(negedge clk);
      op_we = 1'b0;
      n = int'($urandom_range(1, NOPS));
      n_ops = 5'(n);
      for (int k = 0; k < 60; k++) begin
        int t, pb, pm;
        bit exp_swap;
        int msel;
        msel = int'($urandom_range(2));
        case (msel)
          0: mode = MODE_READ;
          1: mode = MODE_WRITE;
          default: mode = MODE_IDLE;
        endcase
        wb = rnd_entry();
        wm = rnd_entry();
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        t = 0;
        while (!done && t < 100) begin @(negedge clk); t++; end
        check(t == NOPS + 1, $sformatf("decision took %0d clocks", t));
        pb = prio(wb, n);
        pm = prio(wm, n);
        exp_swap = (mode == MODE_READ)  ? (pm < pb) :
                   (mode == MODE_WRITE) ? (wb.valid && !wm.valid) : 1'b0;
        check(swap == exp_swap, $sformatf("mode %s wb %h wm %h: swap %0b want %0b",
                                          mode.name(), wb, wm, swap, exp_swap));
        check(new_wb == (exp_swap ? wm : wb) && new_wm == (exp_swap ? wb : wm), "exchanged entries wrong");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
