// brt_ctrl: block replication / transfer (BR/T) gate control part.
//
// Decides the action of the gate between the major line and the buffer loops for the
// record slot at the transfer point (RDM entry `tb`), combinationally, and gives the entry
// to write back.
//
// Read: the record is sent out when it is present, not yet output, its key equals the
// comparand register (the descriptor requested by the central control unit), reading is
// allowed (`rd_en`) and the major line is free (`re`, from the record length counter).
// In transfer mode the record leaves the loop and its entry is cleared; in replicate mode
// the record stays and its entry is marked done. Write: when the delay line reports that a
// generated record lies over the used loops (`ti`), it is taken in unconditionally and the
// entry becomes valid with the descriptor that travelled with it (`in_key`, `in_tag`).
// The conditions follow the document; the entry encoding is this design's.
module brt_ctrl
  import grace_mm_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cmp_we,      // load the comparand register
  input  logic [KEYW-1:0] cmp_key,
  input  logic            rd_en,       // a read operation wants records
  input  logic            replicate,
  input  logic            re,          // read enable: major line free
  input  logic            ti,          // transfer-in due in this slot
  input  logic [KEYW-1:0] in_key,
  input  logic [1:0]      in_tag,
  input  rdm_entry_t      tb,
  output brt_op_e         op,
  output logic            we,
  output rdm_entry_t      new_tb
);
  logic [KEYW-1:0] comparand;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      comparand <= '0;
    else if (cmp_we) comparand <= cmp_key;
  end

  always_comb begin
    op     = BRT_NONE;
    we     = 1'b0;
    new_tb = tb;
    if (ti) begin
      op     = BRT_IN;
      we     = 1'b1;
      new_tb = '{valid: 1'b1, done: 1'b0, tag: in_tag, key: in_key};
    end else if (rd_en && re && tb.valid && !tb.done && tb.key == comparand) begin
      we = 1'b1;
      if (replicate) begin
        op          = BRT_REPL;
        new_tb.done = 1'b1;
      end else begin
        op     = BRT_OUT;
        new_tb = RDM_EMPTY;
      end
    end
  end
endmodule
