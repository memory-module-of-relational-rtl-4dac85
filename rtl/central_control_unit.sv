// central_control_unit: central control unit of the bubble memory module.
//
// Takes host commands, generates the common timing and sequences the other units.
//
// Timing: one field rotation lasts ROT_CYCLES clocks; `rot_tick` pulses on its last clock
// and `slot_tick` on every second rot_tick (a record slot = two rows = two rotations).
//
// Commands (`cmd_valid` with `cmd` and `arg`; taken only when not `busy`, except ABORT):
//   GEOMETRY  loops per record L and bytes per record; sets RL = 2L and loads the shadow
//             address registers of the access control unit with SM0 = WM + L, SM1 = SM0 - NB,
//             SM2 = SM0 - 2NB, taken modulo the ML main-loop slots. The offsets come from an
//             8-bit loop count, so the top bits of sh_off0 are always zero.
//   OPERAND   search operand i: descriptor key and the number of records of that bucket.
//   READ      output the buckets of operands 0..n-1 in order (transfer or replicate). The
//             comparand register of the BR/T gate part is loaded with the current bucket's
//             key; after its count of records has been sent out the next key follows, while
//             the swap gate part already gathers the later buckets. Ends when every
//             record has passed the detector.
//   WRITE     write n records supplied through the interface unit; ends when the last has
//             been taken into a buffer loop.
//   CLEAR     sweep the RDMs (all entries, or only the done flags); PULSE gate pulse phase
//             and width; ABORT back to idle.
// The command set, its encoding and the timing numbers are this design's own.
module central_control_unit
  import grace_mm_pkg::*;
#(
  parameter int ROT_CYCLES = 64,
  parameter int NB = NB_SLOTS,
  parameter int NM = NM_SLOTS,
  parameter int ML = ML_SLOTS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // host
  input  logic                  cmd_valid,
  input  cmd_e                  cmd,
  input  logic [31:0]           arg,
  output logic                  busy,
  output mode_e                 mode,
  // timing
  output logic                  rot_tick,
  output logic                  slot_tick,
  // configuration
  output logic [7:0]            loops,
  output logic [8:0]            rl,
  output logic [15:0]           rec_bytes,
  output logic                  replicate,
  output logic [7:0]            pulse_phase,
  output logic [7:0]            pulse_width,
  output logic                  sh_load,
  output logic [$clog2(NM)-1:0] sh_off0,
  output logic [$clog2(NM)-1:0] sh_off1,
  output logic [$clog2(NM)-1:0] sh_off2,
  output logic                  clr_start,
  output logic                  clr_done_only,
  input  logic                  clr_busy,
  output logic                  op_we,
  output logic [3:0]            op_idx,
  output logic [KEYW-1:0]       op_key,
  output logic [4:0]            n_ops,
  output logic                  cmp_we,
  output logic [KEYW-1:0]       cmp_key,
  // operation control
  output logic                  rd_en,
  output logic                  wr_en,
  input  logic                  rec_out,
  input  logic                  de,
  input  logic                  gs,
  input  logic                  rec_in
);
  localparam int MA = $clog2(NM);

  logic [$clog2(ROT_CYCLES)-1:0] rcnt;
  logic                          half;
  logic [KEYW-1:0] keys [NOPS];
  logic [15:0]     counts [NOPS];
  logic [4:0]      head;
  logic [15:0]     remaining;     // records of the current bucket still to send
  logic [19:0]     total, detected;
  logic [15:0]     n_wr, n_gen, n_in;
  logic            clr_wait;

  // field rotation and slot timing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rcnt <= '0; half <= 1'b0;
    end else if (rcnt == $clog2(ROT_CYCLES)'(ROT_CYCLES - 1)) begin
      rcnt <= '0; half <= ~half;
    end else begin
      rcnt <= rcnt + 1'b1;
    end
  end
  assign rot_tick  = (rcnt == $clog2(ROT_CYCLES)'(ROT_CYCLES - 1));
  assign slot_tick = rot_tick && half;

  assign busy = (mode != MODE_IDLE);
  assign rl   = {loops, 1'b0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode <= MODE_IDLE;
      loops <= 8'd1; rec_bytes <= 16'd0; replicate <= 1'b0;
      pulse_phase <= 8'd4; pulse_width <= 8'd8;
      sh_load <= 1'b0; sh_off0 <= '0; sh_off1 <= '0; sh_off2 <= '0;
      clr_start <= 1'b0; clr_done_only <= 1'b0; clr_wait <= 1'b0;
      op_we <= 1'b0; op_idx <= '0; op_key <= '0; n_ops <= '0;
      cmp_we <= 1'b0; cmp_key <= '0;
      head <= '0; remaining <= '0; total <= '0; detected <= '0;
      rd_en <= 1'b0; wr_en <= 1'b0; n_wr <= '0; n_gen <= '0; n_in <= '0;
      for (int i = 0; i < NOPS; i++) begin keys[i] <= '0; counts[i] <= '0; end
    end else begin
      sh_load <= 1'b0; clr_start <= 1'b0; op_we <= 1'b0; cmp_we <= 1'b0;

      if (cmd_valid && cmd == CMD_ABORT) begin
        mode <= MODE_IDLE; rd_en <= 1'b0; wr_en <= 1'b0;
      end else if (cmd_valid && mode == MODE_IDLE) begin
        unique case (cmd)
          CMD_GEOMETRY: begin
            loops     <= arg[7:0];
            rec_bytes <= arg[23:8];
            sh_load   <= 1'b1;
            sh_off0   <= MA'(arg[7:0]);
            // SM1 = SM0 - NB and SM2 = SM0 - 2*NB, modulo the main-loop length
            sh_off1   <= (32'(arg[7:0]) >= NB)     ? MA'(32'(arg[7:0]) - NB)
                                                   : MA'(32'(arg[7:0]) + ML - NB);
            sh_off2   <= (32'(arg[7:0]) >= 2 * NB) ? MA'(32'(arg[7:0]) - 2 * NB)
                                                   : MA'(32'(arg[7:0]) + ML - 2 * NB);
          end
          CMD_OPERAND: begin
            keys[arg[3:0]]   <= arg[15:4];
            counts[arg[3:0]] <= arg[31:16];
            op_we  <= 1'b1; op_idx <= arg[3:0]; op_key <= arg[15:4];
          end
          CMD_READ: begin
            mode      <= MODE_READ;
            n_ops     <= arg[4:0];
            replicate <= arg[5];
            head      <= '0;
            cmp_we    <= 1'b1;
            cmp_key   <= keys[0];
            remaining <= counts[0];
            rd_en     <= (arg[4:0] != 0);
            detected  <= '0;
            total     <= read_total(arg[4:0]);
          end
          CMD_WRITE: begin
            mode  <= MODE_WRITE;
            n_wr  <= arg[15:0];
            n_gen <= '0;
            n_in  <= '0;
            wr_en <= (arg[15:0] != 0);
          end
          CMD_CLEAR: begin
            mode          <= MODE_CLEAR;
            clr_start     <= 1'b1;
            clr_done_only <= arg[0];
            clr_wait      <= 1'b1;
          end
          CMD_PULSE: begin
            pulse_phase <= arg[7:0];
            pulse_width <= arg[15:8];
          end
          default: ;
        endcase
      end else begin
        unique case (mode)
          MODE_READ: begin
            if (rec_out && rd_en) begin
              if (remaining <= 16'd1) begin
                if (head + 5'd1 < n_ops) begin
                  head      <= head + 5'd1;
                  cmp_we    <= 1'b1;
                  cmp_key   <= keys[head[3:0] + 4'd1];
                  remaining <= counts[head[3:0] + 4'd1];
                end else begin
                  rd_en <= 1'b0;
                end
              end else begin
                remaining <= remaining - 1'b1;
              end
            end
            if (de) begin
              detected <= detected + 1'b1;
              if (detected + 20'd1 >= total) mode <= MODE_IDLE;
            end
            if (total == 0) mode <= MODE_IDLE;
          end
          MODE_WRITE: begin
            if (gs) begin
              n_gen <= n_gen + 1'b1;
              if (n_gen + 16'd1 >= n_wr) wr_en <= 1'b0;
            end
            if (rec_in) begin
              n_in <= n_in + 1'b1;
              if (n_in + 16'd1 >= n_wr) mode <= MODE_IDLE;
            end
          end
          MODE_CLEAR: begin
            clr_wait <= 1'b0;
            if (!clr_wait && !clr_busy) mode <= MODE_IDLE;
          end
          default: ;
        endcase
      end
    end
  end

  // number of records of the first n buckets
  function automatic logic [19:0] read_total(input logic [4:0] n);
    logic [19:0] s = '0;
    for (int i = 0; i < NOPS; i++)
      if (5'(i) < n) s += 20'(counts[i]);
    return s;
  endfunction
endmodule
