// Testbench for defect_rom, the table that marks the defective minor loops of each subchip.
// The table starts all ones (every loop good); the testbench programs random bytes at random
// addresses, then reads every address and compares with its own copy, checking the one-clock
// read latency. The 2048-byte size follows the document's ROM; the programming port and the
// all-good initial contents are this design's own choices. Ends with a TB_RESULT line; a
// watchdog stops a hung run.
module tb_defect_rom;
  localparam int DEPTH = 2048;
  logic clk = 1'b0;
  logic [10:0] addr, prog_addr;
  logic [7:0] rdata, prog_data;
  logic prog_we;
  logic [7:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  defect_rom #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

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

  initial begin
    prog_we = 1'b0; prog_addr = '0; prog_data = '0; addr = '0;
    for (int a = 0; a < DEPTH; a++) ref_mem[a] = 8'hFF;
    @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      prog_addr = 11'($urandom_range(DEPTH - 1)); prog_data = 8'($urandom); prog_we = 1'b1;
      ref_mem[prog_addr] = prog_data;
      @(negedge clk);
    end
    prog_we = 1'b0;
    for (int a = 0; a < DEPTH; a++) begin
      addr = a[10:0];
      @(negedge clk);
      check(rdata == ref_mem[a], $sformatf("addr %0d got %h want %h", a, rdata, ref_mem[a]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
