// Testbench for brt_ctrl, the part of the gate control that decides what the transfer gate
// between the buffer loop and the major line does in a slot. Random entries, comparands and
// enables are applied and the operation, the write enable and the new entry are compared
// with a reference: a pending transfer-in of a generated record takes precedence and stores
// its key; otherwise a valid, not yet transferred record whose key equals the comparand is
// transferred out (entry cleared) or, in replicate mode, copied out (entry marked done), but
// only while the read enable says the major line is free. The rules follow the document's
// description of the transfer gate control; the entry encoding is this design's own. Ends
// with a TB_RESULT line; a watchdog stops a hung run.
module tb_brt_ctrl;
  import grace_mm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cmp_we, rd_en, replicate, re, ti, we;
  logic [KEYW-1:0] cmp_key, in_key;
  logic [1:0] in_tag;
  rdm_entry_t tb, new_tb;
  brt_op_e op;
  logic [KEYW-1:0] comparand;
  int checks = 0, failures = 0;
  int n_out = 0, n_repl = 0, n_in = 0;

  brt_ctrl dut (.*);

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

  initial begin
    cmp_we = 1'b0; cmp_key = '0; rd_en = 1'b0; replicate = 1'b0; re = 1'b0; ti = 1'b0;
    in_key = '0; in_tag = '0; tb = RDM_EMPTY;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      brt_op_e eop;
      rdm_entry_t enew;
      bit ewe;
      if (n % 50 == 0) begin
        comparand = KEYW'($urandom_range(7));
        cmp_key = comparand; cmp_we = 1'b1;
        @(negedge clk);
        cmp_we = 1'b0;
      end
      rd_en = 1'($urandom_range(3) != 0);
      replicate = 1'($urandom);
      re = 1'($urandom_range(3) != 0);
      ti = 1'($urandom_range(5) == 0);
      in_key = KEYW'($urandom); in_tag = 2'($urandom);
      tb.valid = 1'($urandom); tb.done = 1'($urandom_range(3) == 0);
      tb.tag = 2'($urandom); tb.key = KEYW'($urandom_range(7));
      #1;
      eop = BRT_NONE; ewe = 1'b0; enew = tb;
      if (ti) begin
        eop = BRT_IN; ewe = 1'b1;
        enew.valid = 1'b1; enew.done = 1'b0; enew.tag = in_tag; enew.key = in_key;
      end else if (rd_en && re && tb.valid && !tb.done && tb.key == comparand) begin
        ewe = 1'b1;
        if (replicate) begin eop = BRT_REPL; enew.done = 1'b1; end
        else begin eop = BRT_OUT; enew = RDM_EMPTY; end
      end
      check(op == eop && we == ewe && (!ewe || new_tb == enew),
            $sformatf("tb %h cmp %h ti %0b re %0b: op %s want %s", tb, comparand, ti, re, op.name(), eop.name()));
      if (eop == BRT_OUT) n_out++;
      if (eop == BRT_REPL) n_repl++;
      if (eop == BRT_IN) n_in++;
      @(negedge clk);
    end
    check(n_out > 0 && n_repl > 0 && n_in > 0, "not every gate operation was exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
