// Testbench for gate_pulse_gen, which turns a one-clock request into the current pulse for a
// swap gate or a transfer gate. For many phase and width settings it triggers the generator
// and counts the clocks until the pulse starts and how long it lasts, against the programmed
// values; it also checks that the operation code given with the request is held during the
// pulse and that a width of zero gives no pulse. The document gives only that pulses have a
// programmable timing; the phase/width encoding checked here is this design's own. Ends with
// a TB_RESULT line; a watchdog stops a hung run.
module tb_gate_pulse_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  logic trig;
  logic [1:0] op_in, op;
  logic [7:0] phase, width;
  logic pulse;
  int checks = 0, failures = 0;

  gate_pulse_gen #(.W(8), .OW(2)) dut (.*);

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

  task automatic one(int ph, int wd, logic [1:0] o);
    int t_on, t_len;
    @(negedge clk);
    phase = 8'(ph); width = 8'(wd); op_in = o; trig = 1'b1;
    @(negedge clk);
    trig = 1'b0; op_in = ~o;
    t_on = 0;
    while (!pulse && t_on < 600) begin @(negedge clk); t_on++; end
    if (wd == 0) begin
      check(!pulse, "width 0 must give no pulse");
      return;
    end
    check(t_on == ph, $sformatf("phase %0d: pulse started after %0d clocks", ph, t_on));
    check(op == o, "operation code not held");
    t_len = 0;
    while (pulse && t_len < 600) begin @(negedge clk); t_len++; end
    check(t_len == wd, $sformatf("width %0d: pulse lasted %0d clocks", wd, t_len));
  endtask

  initial begin
    trig = 1'b0; op_in = '0; phase = '0; width = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(!pulse, "pulse after reset");
    one(4, 8, 2'd1);
    one(0, 1, 2'd2);
    one(0, 5, 2'd3);
    one(1, 1, 2'd1);
    one(4, 0, 2'd1);
    for (int n = 0; n < 40; n++) one(int'($urandom_range(60)), int'($urandom_range(1, 60)), 2'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
