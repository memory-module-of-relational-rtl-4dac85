// Testbench for read_conv, which rebuilds a record from the 32 detector bits of each field
// rotation. The testbench makes a random defect map (one 32-bit row per major-line position,
// some loops marked bad), writes random records into detector words the way the generators
// would have stored them (good positions carry the record bits, least significant bit of
// each byte first, bad positions carry random bits), and serves the defect rows on request
// with a few clocks of latency. It checks that exactly the record's bytes come out, in
// order, with the end-of-record flag on the last one, for several record lengths and byte
// counts, including records that fill every good bit. The serial conversion with defect-loop
// skipping follows the document; the bit order and the mask interface are this design's own.
// Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_read_conv;
  localparam int RC = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rot_tick, ds, mask_fetch, mask_first, mask_valid, byte_valid, rec_done;
  logic [31:0] det, mask;
  logic [7:0] loops, byte_data;
  logic [15:0] rec_bytes;
  logic [31:0] tab [280];
  int row = 0, mcnt = 0, cyc = 0;
  byte unsigned got [$];
  int n_done = 0;
  int checks = 0, failures = 0;

  read_conv dut (.*);

  always #5 clk = ~clk;
  assign rot_tick = (cyc == RC - 1);
  always @(posedge clk) cyc <= (cyc == RC - 1) ? 0 : cyc + 1;

  // defect rows served with a latency of four clocks
  always @(posedge clk) begin
    if (mask_fetch) begin
      row = mask_first ? 0 : row + 1;
      mask_valid <= 1'b0;
      mcnt = 4;
    end else if (mcnt > 0) begin
      mcnt--;
      if (mcnt == 0) begin mask <= tab[row]; mask_valid <= 1'b1; end
    end
    if (byte_valid) got.push_back(byte_data);
    if (rec_done) n_done++;
  end

  initial begin
    repeat (5000000) @(posedge clk);
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
    int rows, good, nbytes, k, done0;
    byte unsigned rec [];
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
    loops = 8'(l); rec_bytes = 16'(nbytes);
    got.delete();
    done0 = n_done;
    k = 0;
    while (!rot_tick) @(negedge clk);
    for (int r = 0; r < rows; r++) begin
      for (int j = 0; j < 32; j++) begin
        if (tab[r][j]) begin
          det[j] = (k < 8 * nbytes) ? rec[k / 8][k % 8] : 1'($urandom);
          k++;
        end else det[j] = 1'($urandom);
      end
      ds = (r == 0);
      @(negedge clk);
      ds = 1'b0;
      while (!rot_tick) @(negedge clk);
    end
    det = 32'($urandom);
    repeat (2 * RC) @(negedge clk);
    check(got.size() == nbytes, $sformatf("L=%0d: %0d bytes out, want %0d", l, got.size(), nbytes));
    for (int i = 0; i < nbytes && i < got.size(); i++)
      check(got[i] == rec[i], $sformatf("L=%0d byte %0d: %h want %h", l, i, got[i], rec[i]));
    check(n_done == done0 + 1, "end-of-record flag missing or repeated");
  endtask

  initial begin
    ds = 1'b0; det = '0; loops = 8'd1; rec_bytes = 16'd1; mask = '0; mask_valid = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
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
