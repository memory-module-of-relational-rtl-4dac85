// gen_ctrl: generator control part of the gate/generator control block.
//
// Decides whether a new record may start to be generated in this record slot. A generated
// record reaches the buffer loop GL+RL rotations later, into the slot that is now the
// shadow SB. It may start when that slot will be empty on arrival, which the document
// reduces to expression {6}:
//
//   ~SB & ~SJ  |  ~SM0  |  ~SM1 & (RL >= BL)  |  ~SM2 & (RL >= 2BL)
//
// SB, SM0..SM2 are the occupied flags of the RDM entries at the shadows on the buffer and
// main loops (an occupied SB is swapped out into an empty main-loop shadow on the way), and
// SJ is the shadow on the major line: an earlier record that will land in the same slot.
// Besides {6}, generation needs a write operation with a record ready and the generator
// free (`we_ok`). `shadow_valid` is the strobe with which the RDM control block presents
// the shadow entries; `gs` (generation start) is a one-clock pulse one clock later.
module gen_ctrl
  import grace_mm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,        // a write operation wants records
  input  logic        rec_ready,    // data and descriptor of a record are waiting
  input  logic        we_ok,        // write enable: generator free
  input  logic [8:0]  rl,           // record length, rotations
  input  logic        shadow_valid,
  input  rdm_entry_t  sb,
  input  rdm_entry_t  sm0,
  input  rdm_entry_t  sm1,
  input  rdm_entry_t  sm2,
  input  logic        sj,
  output logic        cond6,        // expression {6}, for observation
  output logic        gs
);
  always_comb begin
    cond6 = (!sb.valid && !sj)
          || !sm0.valid
          || (!sm1.valid && rl >= 9'(BL))
          || (!sm2.valid && rl >= 9'(2*BL));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) gs <= 1'b0;
    else        gs <= shadow_valid && wr_en && rec_ready && we_ok && cond6;
  end
endmodule
