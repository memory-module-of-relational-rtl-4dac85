// swap_ctrl: swap gate control part of the gate/generator control block.
//
// Decides, once per record slot, whether the swap gate exchanges the record at the swap
// point of the buffer loop (RDM entry `wb`) with the one at the swap point of the main loop
// (`wm`), and returns the two entries as they must be written back (exchanged when the gate
// fires, so the descriptors follow the records).
//
// Read: the output priority of a record is the index of the first of the `n_ops` search
// operands equal to its descriptor key; an empty, already-output or non-matching record
// has the lowest priority. The gate fires only when the main-loop record has strictly
// higher priority, so records of the current bucket and then of the following buckets
// (look-ahead buffering) gather in the buffer loop. Write: the gate fires when the buffer
// slot is occupied and the main slot empty, making room for incoming records.
//
// The sixteen operands are held here and compared one per clock for both records, so a
// decision takes NOPS+1 clocks after `start`; `done` is a one-clock pulse with the result.
// Operand registers and the priority rule follow the document; the priority encoding of
// empty records and the timing are this design's choices.
module swap_ctrl
  import grace_mm_pkg::*;
#(
  parameter int NOPS_P = NOPS
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  mode_e                     mode,
  // search operand registers, loaded by the central control unit
  input  logic                      op_we,
  input  logic [$clog2(NOPS_P)-1:0] op_idx,
  input  logic [KEYW-1:0]           op_key,
  input  logic [$clog2(NOPS_P):0]   n_ops,
  // decision
  input  logic                      start,
  input  rdm_entry_t                wb,
  input  rdm_entry_t                wm,
  output logic                      done,
  output logic                      swap,
  output rdm_entry_t                new_wb,
  output rdm_entry_t                new_wm
);
  localparam int IW = $clog2(NOPS_P);
  logic [KEYW-1:0] ops [NOPS_P];
  logic            busy;
  logic [IW:0]     i;
  logic [IW:0]     pb, pm;     // priorities found so far (NOPS_P = none)

  wire cand_b = wb.valid && !wb.done;
  wire cand_m = wm.valid && !wm.done;
  wire [IW:0] lowest = (IW+1)'(NOPS_P);

  always_ff @(posedge clk) if (op_we) ops[op_idx] <= op_key;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; i <= '0; pb <= '0; pm <= '0;
      done <= 1'b0; swap <= 1'b0; new_wb <= RDM_EMPTY; new_wm <= RDM_EMPTY;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        i    <= '0;
        pb   <= lowest;
        pm   <= lowest;
      end else if (busy) begin
        if (i < lowest) begin
          if (i < n_ops) begin
            if (cand_b && pb == lowest && wb.key == ops[i[IW-1:0]]) pb <= i;
            if (cand_m && pm == lowest && wm.key == ops[i[IW-1:0]]) pm <= i;
          end
          i <= i + 1'b1;
        end else begin
          busy <= 1'b0;
          done <= 1'b1;
          unique case (mode)
            MODE_READ:  swap <= (pm < pb);
            MODE_WRITE: swap <= wb.valid && !wm.valid;
            default:    swap <= 1'b0;
          endcase
          if ((mode == MODE_READ && pm < pb) || (mode == MODE_WRITE && wb.valid && !wm.valid)) begin
            new_wb <= wm;
            new_wm <= wb;
          end else begin
            new_wb <= wb;
            new_wm <= wm;
          end
        end
      end
    end
  end
endmodule
