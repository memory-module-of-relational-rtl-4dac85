// Testbench for rdm_ram, the memory that holds one record descriptor memory (RDM).
// The RAM is written with random entries at random addresses and read back; every read is
// compared with a reference array kept in the testbench. It checks the one-clock read
// latency and that a read in the same clock as a write returns the old word, which is the
// read-modify-write order the RDM controller relies on. Sizes are the document's (2048
// entries of the main map); the 16-bit entry width and the random pattern are this
// testbench's own choices. Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_rdm_ram;
  localparam int DEPTH = 2048;
  localparam int WIDTH = 16;
  logic clk = 1'b0;
  logic [$clog2(DEPTH)-1:0] addr;
  logic we;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  rdm_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

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
    we = 1'b0; addr = '0; wdata = '0;
    // fill every entry
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      addr = a[$clog2(DEPTH)-1:0]; we = 1'b1; wdata = WIDTH'($urandom);
      ref_mem[a] = wdata;
    end
    @(negedge clk); we = 1'b0;
    // read every entry back: data appears one clock after the address
    for (int a = 0; a < DEPTH; a++) begin
      addr = a[$clog2(DEPTH)-1:0];
      @(negedge clk);
      check(rdata == ref_mem[a], $sformatf("read %0d got %h want %h", a, rdata, ref_mem[a]));
    end
    // random mix; a write returns the old word in the same clock
    for (int n = 0; n < 5000; n++) begin
      int a;
      a = int'($urandom_range(DEPTH - 1));
      addr = a[$clog2(DEPTH)-1:0]; we = 1'($urandom); wdata = WIDTH'($urandom);
      @(negedge clk);
      check(rdata == ref_mem[a], $sformatf("mixed access %0d got %h want %h", a, rdata, ref_mem[a]));
      if (we) ref_mem[a] = wdata;
    end
    we = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
