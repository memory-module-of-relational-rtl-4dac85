// gate_pulse_gen: gate pulse generator of the major line delay control block.
//
// A one-clock `trig` from a gate control part starts a pulse on `pulse` that begins `phase`
// clocks later and lasts `width` clocks; the side information `op_in` presented with the
// trigger is held on `op` for that time. Phase and width are run-time registers because the
// bubble gates need pulses tuned to the drive field. A trigger that arrives while a pulse is
// pending is ignored (the controller never issues two gate actions within one rotation).
// A width of 0 produces no pulse. Counting in system clocks is this design's choice.
module gate_pulse_gen #(
  parameter int W  = 8,  // width of the phase and width counters
  parameter int OW = 2   // width of the held side information
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          trig,
  input  logic [OW-1:0] op_in,
  input  logic [W-1:0]  phase,
  input  logic [W-1:0]  width,
  output logic          pulse,
  output logic [OW-1:0] op
);
  typedef enum logic [1:0] {P_IDLE, P_DELAY, P_ON} pstate_e;
  pstate_e     st;
  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st  <= P_IDLE;
      cnt <= '0;
      op  <= '0;
    end else begin
      unique case (st)
        P_IDLE: if (trig && width != 0) begin
          op <= op_in;
          if (phase == 0) begin st <= P_ON;    cnt <= width - 1'b1; end
          else            begin st <= P_DELAY; cnt <= phase - 1'b1; end
        end
        P_DELAY: if (cnt == 0) begin st <= P_ON; cnt <= width - 1'b1; end
                 else cnt <= cnt - 1'b1;
        P_ON:    if (cnt == 0) st <= P_IDLE;
                 else cnt <= cnt - 1'b1;
        default: st <= P_IDLE;
      endcase
    end
  end

  assign pulse = (st == P_ON);
endmodule
