// grace_mm_top: controller of a GRACE memory module built on two-level bubble chips.
//
// Joins the four logic units of the module: the interface unit (host buffers), the
// central control unit (commands, timing, bucket scheduling), the access control unit
// (descriptor memories, gate and generator control, major line delays) and the data control
// unit (defect-loop aware bit distribution). The bubble memory unit itself (sixteen chips
// with their sense amplifiers and field drivers) is outside: its signals are ports.
//
// Bubble side, all synchronous to `clk`:
//   field_tick   one pulse per rotating-field cycle (every ROT_CYCLES clocks); every
//                second one (`slot_tick`) starts a record slot of two rows
//   sw_pulse     swap gate pulse (all chips in parallel)
//   brt_pulse    BR/T gate pulse, with `brt_op` telling transfer-out, replicate-out or
//                transfer-in
//   gen_word     one bit per subchip for the generators, taken at each field_tick while
//                `gen_en` is high
//   det          one bit per subchip from the detectors, sampled at field_tick
// Subchip bit i: i = 0..15 right subchip of chip i, 16..31 left subchip of chip i-16.
module grace_mm_top
  import grace_mm_pkg::*;
#(
  parameter int ROT_CYCLES = 64,
  parameter int NB         = NB_SLOTS,
  parameter int NM         = NM_SLOTS,
  parameter int ML         = ML_SLOTS,
  parameter int DL         = 300,
  parameter int FIFO_DEPTH = 2048
) (
  input  logic            clk,
  input  logic            rst_n,
  // host commands and status
  input  logic            cmd_valid,
  input  cmd_e            cmd,
  input  logic [31:0]     arg,
  output logic            busy,
  output mode_e           mode,
  // host data
  input  logic            h_wr_valid,
  input  logic [7:0]      h_wr_data,
  output logic            h_wr_full,
  input  logic            h_desc_valid,
  input  logic [KEYW+1:0] h_desc,
  output logic            h_desc_full,
  input  logic            h_rd_pop,
  output logic            h_rd_valid,
  output logic [7:0]      h_rd_data,
  output logic            rd_overflow,
  // defect ROM programming
  input  logic            rom_we,
  input  logic [10:0]     rom_waddr,
  input  logic [7:0]      rom_wdata,
  // bubble memory unit
  output logic            field_tick,
  output logic            slot_tick,
  output logic            sw_pulse,
  output logic            brt_pulse,
  output brt_op_e         brt_op,
  output logic [31:0]     gen_word,
  output logic            gen_en,
  input  logic [31:0]     det
);
  localparam int MA = $clog2(NM);

  logic [7:0] loops, pulse_phase, pulse_width;
  logic [8:0] rl;
  logic [15:0] rec_bytes;
  logic replicate, sh_load, clr_start, clr_done_only, clr_busy;
  logic [MA-1:0] sh_off0, sh_off1, sh_off2;
  logic op_we, cmp_we, rd_en, wr_en;
  logic [3:0] op_idx;
  logic [KEYW-1:0] op_key, cmp_key;
  logic [4:0] n_ops;
  logic rec_out, rec_in, ds, de, gs, ge;
  logic rec_avail, wr_re, desc_valid, desc_pop, wr_ready, rd_valid, rd_rec_done;
  logic [7:0] wr_data, rd_data;
  logic [KEYW+1:0] desc;

  central_control_unit #(.ROT_CYCLES(ROT_CYCLES), .NB(NB), .NM(NM), .ML(ML)) u_ccu (
    .clk, .rst_n, .cmd_valid, .cmd, .arg, .busy, .mode,
    .rot_tick(field_tick), .slot_tick,
    .loops, .rl, .rec_bytes, .replicate, .pulse_phase, .pulse_width,
    .sh_load, .sh_off0, .sh_off1, .sh_off2, .clr_start, .clr_done_only, .clr_busy,
    .op_we, .op_idx, .op_key, .n_ops, .cmp_we, .cmp_key,
    .rd_en, .wr_en, .rec_out, .de, .gs, .rec_in
  );

  interface_unit #(.DEPTH(FIFO_DEPTH)) u_ifu (
    .clk, .rst_n, .rec_bytes,
    .h_wr_valid, .h_wr_data, .h_wr_full, .h_desc_valid, .h_desc, .h_desc_full,
    .h_rd_pop, .h_rd_valid, .h_rd_data,
    .rec_avail, .wr_data, .wr_re, .desc_valid, .desc, .desc_pop,
    .rd_valid, .rd_data, .rd_overflow
  );

  access_control_unit #(.NB(NB), .NM(NM), .ML(ML), .DL(DL)) u_acu (
    .clk, .rst_n, .rot_tick(field_tick), .slot_tick, .mode, .rd_en, .wr_en, .replicate, .rl,
    .sh_load, .sh_off0, .sh_off1, .sh_off2, .clr_start, .clr_done_only, .clr_busy,
    .op_we, .op_idx, .op_key, .n_ops, .cmp_we, .cmp_key, .pulse_phase, .pulse_width,
    .rec_ready(wr_ready && desc_valid), .desc_in(desc), .desc_pop, .gs, .ge, .rec_in,
    .rec_out, .ds, .de, .sw_pulse, .brt_pulse, .brt_op
  );

  data_control_unit u_dcu (
    .clk, .rst_n, .rot_tick(field_tick), .mode, .loops, .rec_bytes,
    .ds, .gs, .wr_ready,
    .rec_avail, .wr_data, .wr_re,
    .rd_valid, .rd_data, .rd_rec_done,
    .det, .gen_word, .gen_en,
    .rom_we, .rom_waddr, .rom_wdata
  );
endmodule
