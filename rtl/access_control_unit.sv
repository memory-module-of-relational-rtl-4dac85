// access_control_unit: access control unit of the bubble memory module.
//
// Finds records by their descriptors rather than by address. It joins the RDM control
// block (descriptor memories and the address registers that follow the rotation), the
// gate/generator control block (swap gate, BR/T gate and generator control parts) and the
// major line delay control block (record length counters, delay lines, gate pulse
// generators).
//
// Every record slot (`slot_tick`, two field rotations) the RDM entries at the transfer and
// swap points are read; the swap and BR/T parts decide; the decision is committed when the
// swap part finishes (`gate_done`), the RDM is updated, and the gate pulse generators fire
// the gates with the programmed phase and width, before the next rotation. The generator
// part then checks the shadows and may start a record (`gs`).
//
// A generated record's descriptor is taken from the interface unit at `gs` and queued
// until the record is transferred into the buffer loop; only then is it written into the
// RDM. With records as short as one loop a record can start every slot, so up to
// (GL+2)/2 + 1 records are on their way at once; the queue is sized for that
// (IFD entries) and generation also waits while it is full.
// `rec_out` and `rec_in` pulse once per record sent to the major line / taken into
// the buffer loop, for the central control unit's counting. `ds`/`de` and `gs`/`ge` go to
// the data control unit.
module access_control_unit
  import grace_mm_pkg::*;
#(
  parameter int NB = NB_SLOTS,
  parameter int NM = NM_SLOTS,
  parameter int ML = ML_SLOTS,
  parameter int DL = 300
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  rot_tick,
  input  logic                  slot_tick,
  input  mode_e                 mode,
  input  logic                  rd_en,
  input  logic                  wr_en,
  input  logic                  replicate,
  input  logic [8:0]            rl,
  // set-up by the central control unit
  input  logic                  sh_load,
  input  logic [$clog2(NM)-1:0] sh_off0,
  input  logic [$clog2(NM)-1:0] sh_off1,
  input  logic [$clog2(NM)-1:0] sh_off2,
  input  logic                  clr_start,
  input  logic                  clr_done_only,
  output logic                  clr_busy,
  input  logic                  op_we,
  input  logic [3:0]            op_idx,
  input  logic [KEYW-1:0]       op_key,
  input  logic [4:0]            n_ops,
  input  logic                  cmp_we,
  input  logic [KEYW-1:0]       cmp_key,
  input  logic [7:0]            pulse_phase,
  input  logic [7:0]            pulse_width,
  // write records
  input  logic                  rec_ready,   // data prepared and descriptor waiting
  input  logic [KEYW+1:0]       desc_in,     // {tag, key} of the next record to write
  output logic                  desc_pop,
  output logic                  gs,
  output logic                  ge,
  output logic                  rec_in,
  // read records
  output logic                  rec_out,
  output logic                  ds,
  output logic                  de,
  // bubble memory unit gates
  output logic                  sw_pulse,
  output logic                  brt_pulse,
  output brt_op_e               brt_op
);
  rdm_entry_t tb_e, wb_e, wm_e, sb_e, sm0_e, sm1_e, sm2_e, brt_new, new_wb, new_wm;
  logic gate_req, gate_done, swap, brt_we, shadow_valid, re, we_ok, ti, sj, cond6;
  brt_op_e brt_dec;
  logic [KEYW+1:0] inflight_head;
  logic inflight_empty, inflight_full;
  localparam int IFD = 1 << $clog2(GL / 2 + 3);   // in-flight descriptor queue depth
  logic [$clog2(IFD):0] inflight_cnt;
  logic [$clog2(NB)-1:0] tb_addr;
  logic [$clog2(NM)-1:0] wm_addr, sm0_addr;

  rdm_control #(.NB(NB), .NM(NM), .ML(ML)) u_rdm (
    .clk, .rst_n, .slot_tick,
    .sh_load, .sh_off0, .sh_off1, .sh_off2,
    .clr_start, .clr_done_only, .clr_busy,
    .gate_req, .tb_e, .wb_e, .wm_e, .gate_done,
    .brt_we, .brt_new, .swap, .new_wb, .new_wm,
    .shadow_valid, .sb_e, .sm0_e, .sm1_e, .sm2_e,
    .tb_addr, .wm_addr, .sm0_addr
  );

  swap_ctrl u_swap (
    .clk, .rst_n, .mode,
    .op_we, .op_idx, .op_key, .n_ops,
    .start(gate_req), .wb(wb_e), .wm(wm_e),
    .done(gate_done), .swap, .new_wb, .new_wm
  );

  brt_ctrl u_brt (
    .clk, .rst_n, .cmp_we, .cmp_key,
    .rd_en(rd_en && mode == MODE_READ), .replicate, .re,
    .ti, .in_key(inflight_head[KEYW-1:0]), .in_tag(inflight_head[KEYW+1:KEYW]),
    .tb(tb_e), .op(brt_dec), .we(brt_we), .new_tb(brt_new)
  );

  gen_ctrl u_gen (
    .clk, .rst_n, .wr_en(wr_en && mode == MODE_WRITE), .rec_ready(rec_ready && !inflight_full), .we_ok, .rl,
    .shadow_valid, .sb(sb_e), .sm0(sm0_e), .sm1(sm1_e), .sm2(sm2_e), .sj,
    .cond6, .gs
  );

  wire commit_out = gate_done && (brt_dec == BRT_OUT || brt_dec == BRT_REPL);
  wire commit_in  = gate_done && brt_dec == BRT_IN;

  major_line_delay #(.GL_P(GL), .DL(DL)) u_mld (
    .clk, .rst_n, .rot_tick, .slot_tick, .rl,
    .out_issue(commit_out), .re, .ds, .de,
    .gs, .we_ok, .ge, .ti, .sj
  );

  // descriptors of records on their way from the generator to the buffer loop
  sync_fifo #(.DEPTH(IFD), .WIDTH(KEYW+2)) u_inflight (
    .clk, .rst_n, .clr(1'b0),
    .we(gs), .wdata(desc_in), .re(commit_in), .rdata(inflight_head),
    .empty(inflight_empty), .full(inflight_full), .count(inflight_cnt)
  );
  assign desc_pop = gs;
  assign rec_in   = commit_in;
  assign rec_out  = commit_out;

  gate_pulse_gen #(.W(8), .OW(1)) u_sw_pg (
    .clk, .rst_n, .trig(gate_done && swap), .op_in(1'b0),
    .phase(pulse_phase), .width(pulse_width), .pulse(sw_pulse), .op()
  );
  logic [1:0] brt_op_raw;
  gate_pulse_gen #(.W(8), .OW(2)) u_brt_pg (
    .clk, .rst_n, .trig(gate_done && brt_dec != BRT_NONE), .op_in(brt_dec),
    .phase(pulse_phase), .width(pulse_width), .pulse(brt_pulse), .op(brt_op_raw)
  );
  assign brt_op = brt_op_e'(brt_op_raw);

  // A record may only be taken in when its descriptor is queued.
  a_inflight: assert property (@(posedge clk) disable iff (!rst_n) commit_in |-> !inflight_empty);
endmodule
