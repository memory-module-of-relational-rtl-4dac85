// bubble_unit_model: behavioural model of the bubble memory unit (sixteen two-level bubble
// chips), for simulation only; not synthesizable logic.
//
// The model works at record-slot level. Each buffer-loop slot (NB of them) and main-loop
// slot (NM) holds the 2*LOOPS 32-bit major-line words of one record (bit i = subchip i).
// The major line is an array of 32-bit positions: position 0 is the generator, GL the
// leftmost loop, GL+DL the detector. At every field_tick, in this order:
//   1. a swap gate pulse seen since the last tick exchanges the buffer slot at the swap
//      gate with the main-loop slot there;
//   2. a BR/T pulse acts on the buffer slot under the gate: transfer-out / replicate ORs
//      its words onto the major line over the loops (out also empties the slot),
//      transfer-in moves the words over the loops into the slot; a transfer-in onto an
//      occupied slot is counted in `collisions`;
//   3. the major line shifts one position towards the detector and the generator word
//      (if gen_en) enters at position 0.
// `det` always shows the word at the detector. Slot indices advance at slot_tick; at reset
// the slot at the swap gate is slot 0 of both loops and the BR/T gate is BL0/2 slots behind.
module bubble_unit_model #(
  parameter int NB    = 64,
  parameter int NM    = 2046,   // slots on a main loop (4092 bits)
  parameter int LOOPS = 140,
  parameter int GL    = 40,
  parameter int BL0   = 40,
  parameter int DL    = 300
) (
  input  logic        clk,
  input  logic        field_tick,
  input  logic        slot_tick,
  input  logic        sw_pulse,
  input  logic        brt_pulse,
  input  logic [1:0]  brt_op,
  input  logic [31:0] gen_word,
  input  logic        gen_en,
  output logic [31:0] det
);
  localparam int W   = 2 * LOOPS;
  localparam int MLN = GL + DL + 1;

  logic [31:0] bufm [NB][W];
  logic [31:0] mainm [NM][W];
  logic [31:0] ml [MLN];
  logic [31:0] tmp [MLN];
  int unsigned s = 0;
  bit sw_seen = 0, brt_seen = 0;
  logic [1:0] op_seen = 0;
  int collisions = 0;
  int swaps = 0, outs = 0, ins = 0;
  int unsigned ticks = 0;

  initial begin
    for (int i = 0; i < NB; i++) for (int j = 0; j < W; j++) bufm[i][j] = '0;
    for (int i = 0; i < NM; i++) for (int j = 0; j < W; j++) mainm[i][j] = '0;
    for (int p = 0; p < MLN; p++) ml[p] = '0;
  end

  assign det = ml[GL + DL];

  function automatic bit slot_empty(input int b);
    for (int j = 0; j < W; j++) if (bufm[b][j] != 0) return 0;
    return 1;
  endfunction

  always @(posedge clk) begin
    if (sw_pulse)  sw_seen = 1;
    if (brt_pulse) begin brt_seen = 1; op_seen = brt_op; end
    if (field_tick) begin
      automatic int wb = int'(s % NB);
      automatic int wm = int'(s % NM);
      automatic int tb = int'((s + NB - BL0/2) % NB);
      automatic logic [31:0] t;
      ticks++;
      for (int p = 0; p < MLN; p++) tmp[p] = ml[p];
      if (sw_seen) begin
        swaps++;
        for (int j = 0; j < W; j++) begin
          t = bufm[wb][j]; bufm[wb][j] = mainm[wm][j]; mainm[wm][j] = t;
        end
      end
      if (brt_seen) begin
        case (op_seen)
          2'd1, 2'd2: begin
            outs++;
            for (int j = 0; j < W; j++) tmp[GL + j] |= bufm[tb][j];
            if (op_seen == 2'd1) for (int j = 0; j < W; j++) bufm[tb][j] = '0;
          end
          2'd3: begin
            ins++;
            if (!slot_empty(tb)) collisions++;
            for (int j = 0; j < W; j++) begin bufm[tb][j] = tmp[GL + j]; tmp[GL + j] = '0; end
          end
          default: ;
        endcase
      end
      sw_seen = 0; brt_seen = 0;
      for (int p = MLN - 1; p > 0; p--) tmp[p] = tmp[p-1];
      tmp[0] = gen_en ? gen_word : '0;
      ml <= tmp;
      if (slot_tick) s++;
    end
  end
endmodule
