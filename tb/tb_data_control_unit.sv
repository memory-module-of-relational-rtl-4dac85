// Testbench for data_control_unit, the data path between the byte buffers and the bubble
// chips: the defect table, the defect row fetch, the write conversion to generator words and
// the read conversion from detector words. The testbench programs a defect table with some
// bad loops, writes random records through the write path and keeps the generator words it
// produces, then plays those words back as detector words through the read path. It checks
// that no record bit is written to a bad loop, that every bad-loop position of the generator
// words is zero, and that the bytes read back equal the bytes written, for several record
// lengths. The conversions follow the document; the table layout (row r of loop N at
// addresses 8N-4r down to 8N-4r-3, first byte for subchips 0-7) is this design's own
// choice. Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_data_control_unit;
  import grace_mm_pkg::*;
  localparam int RC = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rot_tick;
  mode_e mode;
  logic [7:0] loops, wr_data, rd_data, rom_wdata;
  logic [15:0] rec_bytes;
  logic ds, gs, wr_ready, rec_avail, wr_re, rd_valid, rd_rec_done, gen_en, rom_we;
  logic [31:0] det, gen_word;
  logic [10:0] rom_waddr;
  logic [7:0] rom [2048];
  byte unsigned q [$], got [$];
  logic [31:0] words [$];
  int cyc = 0;
  int checks = 0, failures = 0;

  data_control_unit dut (.*);

  always #5 clk = ~clk;
  assign rot_tick  = (cyc == RC - 1);
  assign wr_data   = (q.size() > 0) ? q[0] : 8'h00;
  assign rec_avail = q.size() >= int'(rec_bytes);
  always @(posedge clk) begin
    cyc <= (cyc == RC - 1) ? 0 : cyc + 1;
    if (wr_re) void'(q.pop_front());
    if (rot_tick && gen_en) words.push_back(gen_word);
    if (rd_valid) got.push_back(rd_data);
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
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [31:0] row_mask(int l, int r);
    logic [31:0] m;
    for (int b = 0; b < 4; b++)
      for (int j = 0; j < 8; j++) m[8 * b + j] = rom[8 * l - 4 * r - b][7 - j];
    return m;
  endfunction

  task automatic one_record(int l);
    int rows, good, nbytes, t;
    byte unsigned rec [];
    bit clean;
    rows = 2 * l;
    good = 0;
    for (int r = 0; r < rows; r++) good += $countones(row_mask(l, r));
    nbytes = good / 8;
    rec = new[nbytes];
    foreach (rec[i]) rec[i] = 8'($urandom);
    @(negedge clk);
    loops = 8'(l); rec_bytes = 16'(nbytes); mode = MODE_WRITE;
    foreach (rec[i]) q.push_back(rec[i]);
    words.delete(); got.delete();
    t = 0;
    while (!wr_ready && t < 100000) begin @(negedge clk); t++; end
    gs = 1'b1;
    @(negedge clk);
    gs = 1'b0;
    t = 0;
    while (gen_en && t < 300 * RC) begin @(negedge clk); t++; end
    repeat (2) @(negedge clk);
    mode = MODE_IDLE;
    check(words.size() == rows, $sformatf("L=%0d: %0d words, want %0d", l, words.size(), rows));
    clean = 1'b1;
    foreach (words[r]) if ((words[r] & ~row_mask(l, r)) != 0) clean = 1'b0;
    check(clean, $sformatf("L=%0d: data written to a bad loop", l));
    // play the stored words back to the detectors
    @(negedge clk);
    mode = MODE_READ;
    while (!rot_tick) @(negedge clk);
    for (int r = 0; r < rows; r++) begin
      det = words[r] | ~row_mask(l, r) & 32'($urandom);   // bad loops read as noise
      ds = (r == 0);
      @(negedge clk);
      ds = 1'b0;
      while (!rot_tick) @(negedge clk);
    end
    repeat (2 * RC) @(negedge clk);
    mode = MODE_IDLE;
    check(got.size() == nbytes, $sformatf("L=%0d: read %0d bytes, want %0d", l, got.size(), nbytes));
    for (int i = 0; i < nbytes && i < got.size(); i++)
      check(got[i] == rec[i], $sformatf("L=%0d byte %0d: %h want %h", l, i, got[i], rec[i]));
  endtask

  initial begin
    mode = MODE_IDLE; loops = 8'd1; rec_bytes = 16'd1; ds = 0; gs = 0; det = 0;
    rom_we = 0; rom_waddr = 0; rom_wdata = 0;
    for (int a = 0; a < 2048; a++) rom[a] = 8'hFF;
    for (int n = 0; n < 60; n++) rom[$urandom_range(8, 1127)][$urandom_range(7)] = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 2048; a++) begin
      rom_we = 1'b1; rom_waddr = 11'(a); rom_wdata = rom[a];
      @(negedge clk);
    end
    rom_we = 1'b0;
    one_record(1);
    one_record(3);
    one_record(17);
    one_record(70);
    one_record(140);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
