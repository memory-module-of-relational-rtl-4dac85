// Testbench for interface_unit, the buffers between the host and the memory module: a byte
// queue and a descriptor queue for records to be written, and a byte queue for records read
// out. The testbench pushes random bytes and descriptors, checks that a record is reported
// available only when a whole record of bytes and its descriptor are queued, drains both
// queues on the module side and compares the data in order; on the read side it pushes
// bytes, pops them from the host side and checks order, the valid flag, and the overflow
// flag when the queue is full. Queues are made 16 deep to reach the full case quickly. The
// document names the interface unit and its buffers; queue depths and the handshake are this
// design's own. Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_interface_unit;
  import grace_mm_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] rec_bytes;
  logic h_wr_valid, h_wr_full, h_desc_valid, h_desc_full, h_rd_pop, h_rd_valid;
  logic [7:0] h_wr_data, h_rd_data, wr_data, rd_data;
  logic [KEYW+1:0] h_desc, desc;
  logic rec_avail, wr_re, desc_valid, desc_pop, rd_valid, rd_overflow;
  byte unsigned wq [$], rq [$];
  logic [KEYW+1:0] dq [$];
  int checks = 0, failures = 0;

  interface_unit #(.DEPTH(DEPTH), .DDEPTH(4)) dut (.*);

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
    h_wr_valid = 0; h_wr_data = 0; h_desc_valid = 0; h_desc = 0; h_rd_pop = 0;
    wr_re = 0; desc_pop = 0; rd_valid = 0; rd_data = 0; rec_bytes = 16'd5;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // write side: bytes then descriptor
    for (int round = 0; round < 50; round++) begin
      int nb;
      nb = int'($urandom_range(1, 12));
      rec_bytes = 16'(nb);
      check(!rec_avail, "record available with empty queues");
      for (int i = 0; i < nb; i++) begin
        h_wr_valid = 1'b1; h_wr_data = 8'($urandom); wq.push_back(h_wr_data);
        @(negedge clk);
        h_wr_valid = 1'b0;
        if (i < nb - 1) check(!rec_avail, "record available before all bytes");
      end
      check(!rec_avail, "record available without a descriptor");
      h_desc_valid = 1'b1; h_desc = (KEYW+2)'($urandom); dq.push_back(h_desc);
      @(negedge clk);
      h_desc_valid = 1'b0;
      check(rec_avail && desc_valid, "record not available");
      check(desc == dq[0], "descriptor wrong");
      // module side drains
      for (int i = 0; i < nb; i++) begin
        check(wr_data == wq[0], $sformatf("write byte %0d: %h want %h", i, wr_data, wq[0]));
        void'(wq.pop_front());
        wr_re = 1'b1;
        @(negedge clk);
        wr_re = 1'b0;
      end
      desc_pop = 1'b1; void'(dq.pop_front());
      @(negedge clk);
      desc_pop = 1'b0;
      check(!desc_valid, "descriptor left");
    end
    // full flag on the write side
    for (int i = 0; i < DEPTH; i++) begin
      h_wr_valid = 1'b1; h_wr_data = 8'(i);
      @(negedge clk);
    end
    h_wr_valid = 1'b0;
    check(h_wr_full, "write queue not full");
    // read side
    check(!h_rd_valid, "read data valid with an empty queue");
    for (int i = 0; i < 200; i++) begin
      rd_valid = 1'($urandom); rd_data = 8'($urandom);
      h_rd_pop = h_rd_valid && ($urandom_range(2) == 0);
      if (h_rd_pop) begin
        check(h_rd_data == rq[0], $sformatf("read byte %h want %h", h_rd_data, rq[0]));
        void'(rq.pop_front());
      end
      if (rd_valid && rq.size() < DEPTH + (h_rd_pop ? 1 : 0)) rq.push_back(rd_data);
      @(negedge clk);
      if (rq.size() >= DEPTH) break;
    end
    rd_valid = 1'b0; h_rd_pop = 1'b0;
    check(!rd_overflow, "overflow flagged too early");
    // fill to the top and one more
    while (rq.size() < DEPTH) begin
      rd_valid = 1'b1; rd_data = 8'($urandom); rq.push_back(rd_data);
      @(negedge clk);
    end
    check(!rd_overflow, "overflow flagged at exactly full");
    rd_valid = 1'b1; rd_data = 8'hEE;
    @(negedge clk);
    rd_valid = 1'b0;
    check(rd_overflow, "overflow not flagged");
    while (h_rd_valid) begin
      check(h_rd_data == rq[0], "read byte order after overflow");
      void'(rq.pop_front());
      h_rd_pop = 1'b1;
      @(negedge clk);
      h_rd_pop = 1'b0;
    end
    check(rq.size() == 0, "read bytes lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
