// major_line_delay: major line delay control block of the access control unit.
//
// Tracks records while they travel along the major line, in units of field rotations
// (`rot_tick`). Record slots are two rotations long and begin at `slot_tick`; the gate
// decisions of a slot are made just after its slot_tick and carried out at the next
// rot_tick.
//
// Read side. A transfer-out decided in a slot (`out_issue`) leaves the buffer loop at the
// next rotation. The record length counter is then loaded with RL; read enable `re`, which
// the BR/T gate control part needs for the next transfer, returns when the record has
// cleared the used loops, so the next record follows it without a gap. The read delay line
// (one bit per rotation, DL long) marks the head of every record on the line; a record
// whose first bit reaches the detector DL-RL+1 rotations after transfer gives detection
// start `ds` on that rot_tick and detection end `de` on its last, RL-1 rotations later.
// Several records may be on the line at once.
//
// Write side. Generation start `gs` begins RL rotations of generation; write enable `we_ok`
// is low until the last one, when generation end `ge` marks the write delay line (GL long).
// GL rotations later the record lies over the used loops: `ti` asks the BR/T gate to take it
// in during that slot (GL+RL rotations after generation start). `sj`, the shadow on the
// major line, is set when a record in the write delay line will be taken into the buffer
// slot that is the shadow SB of a record started now, i.e. its mark is iBL-RL rotations
// old for i = 1 or 2.
//
// DL, the detector distance, is not given by the document; 300 rotations is assumed.
// Shift registers stand in for the document's RAM-and-counter delay line.
module major_line_delay
  import grace_mm_pkg::*;
#(
  parameter int GL_P = GL,
  parameter int DL   = 300
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rot_tick,
  input  logic       slot_tick,
  input  logic [8:0] rl,
  // read
  input  logic       out_issue,
  output logic       re,
  output logic       ds,
  output logic       de,
  // write
  input  logic       gs,
  output logic       we_ok,
  output logic       ge,
  output logic       ti,
  output logic       sj
);
  logic [DL-1:0]   dl_r;
  logic [GL_P-1:0] dl_w;
  logic [8:0]      rd_cnt, wr_cnt;
  logic            out_pend;

  // detection taps (indices into the line before the shift at a rot_tick)
  wire [9:0] ds_idx = 10'(DL) - 10'(rl);
  assign ds = rot_tick && dl_r[ds_idx[$clog2(DL)-1:0]];
  assign de = rot_tick && dl_r[DL-1];
  assign re = (rd_cnt <= 9'd1) && !out_pend;
  assign we_ok = (wr_cnt == 9'd0) && !gs;
  assign ge = rot_tick && (wr_cnt == 9'd1);

  // shadow on the major line
  wire [9:0] sj1 = 10'(BL)   - 10'(rl);
  wire [9:0] sj2 = 10'(2*BL) - 10'(rl);
  always_comb begin
    sj = 1'b0;
    if (10'(rl) <= 10'(BL)   && sj1 < 10'(GL_P)) sj |= dl_w[sj1[$clog2(GL_P)-1:0]];
    if (10'(rl) <= 10'(2*BL) && sj2 < 10'(GL_P)) sj |= dl_w[sj2[$clog2(GL_P)-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dl_r <= '0; dl_w <= '0; rd_cnt <= '0; wr_cnt <= '0; out_pend <= 1'b0; ti <= 1'b0;
    end else begin
      if (out_issue) out_pend <= 1'b1;
      if (gs) wr_cnt <= rl;
      if (rot_tick) begin
        dl_r     <= {dl_r[DL-2:0], out_pend};
        out_pend <= 1'b0;
        if (out_pend) rd_cnt <= rl;
        else if (rd_cnt != 0) rd_cnt <= rd_cnt - 1'b1;
        dl_w <= {dl_w[GL_P-2:0], ge};
        if (wr_cnt != 0) wr_cnt <= wr_cnt - 1'b1;
        ti <= slot_tick && dl_w[GL_P-1];
      end
    end
  end
endmodule
