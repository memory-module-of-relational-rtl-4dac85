// Testbench for defect_mgmt, which reads the defect table and turns one row of it into a
// 32-bit mask with one bit per subchip. The testbench holds its own table (synchronous read,
// as the real one), fetches the first row of a record and then the following rows, and
// compares every mask with one built independently: row r of loop N is the four bytes at
// 8N-4r down to 8N-4r-3, each read most significant bit first. It also checks that the mask
// is ready within six clocks of the request. The table layout follows the document's
// example; the bit order inside a byte and the latency are this design's own choices. Ends
// with a TB_RESULT line; a watchdog stops a hung run.
module tb_defect_mgmt;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] loops;
  logic fetch, first, mask_valid;
  logic [31:0] mask;
  logic [10:0] rom_addr;
  logic [7:0] rom_data;
  logic [7:0] rom [2048];
  int checks = 0, failures = 0;

  defect_mgmt #(.AW(11)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) rom_data <= rom[rom_addr];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [31:0] expect_mask(int base);
    logic [31:0] m;
    for (int b = 0; b < 4; b++)
      for (int j = 0; j < 8; j++)
        m[8*b + j] = rom[base - b][7 - j];
    return m;
  endfunction

  task automatic get(bit f, int base);
    int t;
    @(negedge clk);
    fetch = 1'b1; first = f;
    @(negedge clk);
    fetch = 1'b0; first = 1'b0;
    t = 1;
    while (!mask_valid && t < 20) begin @(negedge clk); t++; end
    check(t <= 6, $sformatf("mask took %0d clocks", t));
    check(mask == expect_mask(base), $sformatf("row at %0d: got %h want %h", base, mask, expect_mask(base)));
  endtask

  initial begin
    fetch = 1'b0; first = 1'b0; loops = '0;
    for (int a = 0; a < 2048; a++) rom[a] = 8'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 30; n++) begin
      int l, rows;
      l = int'($urandom_range(2, 140));
      loops = 8'(l);
      rows = 2 * l;
      if (rows > 8) rows = 8;
      get(1'b1, 8 * l);
      for (int r = 1; r < rows; r++) get(1'b0, 8 * l - 4 * r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
