// Testbench for write_conv, which turns a record of bytes into one 32-bit generator word per
// field rotation, skipping defective minor loops. The testbench offers random records through
// a first-word-fall-through byte queue, serves defect rows on request with a few clocks of
// latency, starts generation at random moments once the block reports a record ready, and
// captures the generator word at every rotation while generation is on. It checks that the
// words hold the record bits at the good positions (least significant bit of each byte
// first), zeros at defect positions and after the record, that exactly 2*loops words are
// generated, that generation stays on for consecutive rotations and that the end flag comes
// with the last word. The conversion follows the document's write circuit; the two-word
// look-ahead and the interfaces are this design's own. Ends with a TB_RESULT line; a watchdog
// stops a hung run.
module tb_write_conv;
  localparam int RC = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  logic enable, rot_tick, gs, rec_avail, fifo_re, mask_fetch, mask_first, mask_valid;
  logic ready, gen_en, ge;
  logic [7:0] loops, fifo_data;
  logic [15:0] rec_bytes;
  logic [31:0] mask, gen_word;
  logic [31:0] tab [280];
  byte unsigned q [$];
  logic [31:0] words [$];
  int row = 0, mcnt = 0, cyc = 0, n_ge = 0;
  int checks = 0, failures = 0;

  write_conv dut (.*);

  always #5 clk = ~clk;
  assign rot_tick  = (cyc == RC - 1);
  assign fifo_data = (q.size() > 0) ? q[0] : 8'h00;
  assign rec_avail = q.size() >= int'(rec_bytes);
  always @(posedge clk) cyc <= (cyc == RC - 1) ? 0 : cyc + 1;

  always @(posedge clk) begin
    if (mask_fetch) begin
      row = mask_first ? 0 : row + 1;
      mask_valid <= 1'b0;
      mcnt = 4;
    end else if (mcnt > 0) begin
      mcnt--;
      if (mcnt == 0) begin mask <= tab[row]; mask_valid <= 1'b1; end
    end
    if (fifo_re) void'(q.pop_front());
    if (rot_tick && gen_en) words.push_back(gen_word);
    if (ge) n_ge++;
  end

  initial begin
    repeat (10000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic one_record(int l, int nbytes_sub);
    int rows, good, nbytes, k, t, ge0;
    byte unsigned rec [];
    bit ok_data;
    rows = 2 * l;
    good = 0;
    for (int r = 0; r < rows; r++) begin
      tab[r] = '1;
      for (int d = 0; d < 3; d++) if ($urandom_range(3) == 0) tab[r][$urandom_range(31)] = 1'b0;
      good += $countones(tab[r]);
    end
    nbytes = good / 8 - nbytes_sub;
    if (nbytes < 1) nbytes = 1;
    rec = new[nbytes];
    foreach (rec[i]) rec[i] = 8'($urandom);
    @(negedge clk);
    loops = 8'(l); rec_bytes = 16'(nbytes);
    foreach (rec[i]) q.push_back(rec[i]);
    words.delete();
    ge0 = n_ge;
    // wait until ready, then a random number of clocks more
    t = 0;
    while (!ready && t < 100000) begin @(negedge clk); t++; end
    check(ready, "record never became ready");
    repeat ($urandom_range(0, 300)) @(negedge clk);
    gs = 1'b1;
    @(negedge clk);
    gs = 1'b0;
    t = 0;
    while (gen_en && t < 300 * RC) begin @(negedge clk); t++; end
    repeat (2) @(negedge clk);
    check(words.size() == rows, $sformatf("L=%0d: %0d words, want %0d", l, words.size(), rows));
    check(n_ge == ge0 + 1, "end flag missing or repeated");
    check(t <= rows * RC && t > (rows - 1) * RC, $sformatf("generation lasted %0d clocks", t));
    check(q.size() == 0, "record bytes left in the queue");
    k = 0;
    ok_data = 1'b1;
    for (int r = 0; r < rows && r < words.size(); r++)
      for (int j = 0; j < 32; j++) begin
        logic want;
        if (tab[r][j]) begin
          want = (k < 8 * nbytes) ? rec[k / 8][k % 8] : 1'b0;
          k++;
        end else want = 1'b0;
        if (words[r][j] != want) ok_data = 1'b0;
      end
    check(ok_data, $sformatf("L=%0d: generated bits differ from the record", l));
  endtask

  initial begin
    enable = 1'b0; gs = 1'b0; loops = 8'd1; rec_bytes = 16'd1; mask = '0; mask_valid = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    enable = 1'b1;
    one_record(1, 0);
    one_record(2, 3);
    one_record(3, 0);
    one_record(8, 5);
    one_record(50, 0);
    one_record(70, 17);
    one_record(140, 0);
    for (int n = 0; n < 10; n++) one_record(int'($urandom_range(1, 20)), int'($urandom_range(0, 4)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
