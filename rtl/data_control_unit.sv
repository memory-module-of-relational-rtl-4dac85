// data_control_unit: data control unit of the bubble memory module.
//
// Converts between the byte stream of the host and the 32 bit-serial streams of the
// bubble chips (16 chips, two subchips each), skipping defect loops. It holds the defect
// loop ROM, the defect loop management block that walks it, the write data conversion
// block (bytes -> generator words, zeros at defect loops) and the read data conversion
// block (detector words -> bytes, defect-loop bits discarded). The two conversion blocks
// share the defect management block; the controller never reads and writes at once, so
// its mask requests are simply merged.
//
// The access control unit starts it: detection start `ds` (on a rot_tick) begins the
// sampling of one record, generation start `gs` the generation of one. `wr_ready` tells
// the generator control part that the first generator word of the next record is ready.
module data_control_unit
  import grace_mm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rot_tick,
  input  mode_e       mode,
  input  logic [7:0]  loops,
  input  logic [15:0] rec_bytes,
  // from the access control unit
  input  logic        ds,
  input  logic        gs,
  output logic        wr_ready,
  // write data from the interface unit
  input  logic        rec_avail,
  input  logic [7:0]  wr_data,
  output logic        wr_re,
  // read data to the interface unit
  output logic        rd_valid,
  output logic [7:0]  rd_data,
  output logic        rd_rec_done,
  // bubble memory unit
  input  logic [31:0] det,
  output logic [31:0] gen_word,
  output logic        gen_en,
  // defect ROM programming
  input  logic        rom_we,
  input  logic [10:0] rom_waddr,
  input  logic [7:0]  rom_wdata
);
  logic [10:0] rom_addr;
  logic [7:0]  rom_data;
  logic        r_fetch, r_first, w_fetch, w_first, mask_valid, wc_ge;
  logic [31:0] mask;

  defect_rom #(.DEPTH(2048)) u_rom (
    .clk, .addr(rom_addr), .rdata(rom_data),
    .prog_we(rom_we), .prog_addr(rom_waddr), .prog_data(rom_wdata)
  );

  defect_mgmt #(.AW(11)) u_dm (
    .clk, .rst_n, .loops,
    .fetch(r_fetch || w_fetch), .first(r_fetch ? r_first : w_first),
    .mask, .mask_valid, .rom_addr, .rom_data
  );

  read_conv u_rc (
    .clk, .rst_n, .rot_tick, .ds, .det, .loops, .rec_bytes,
    .mask_fetch(r_fetch), .mask_first(r_first), .mask, .mask_valid,
    .byte_valid(rd_valid), .byte_data(rd_data), .rec_done(rd_rec_done)
  );

  write_conv u_wc (
    .clk, .rst_n, .enable(mode == MODE_WRITE), .rot_tick, .gs, .loops, .rec_bytes,
    .rec_avail, .fifo_data(wr_data), .fifo_re(wr_re),
    .mask_fetch(w_fetch), .mask_first(w_first), .mask, .mask_valid,
    .ready(wr_ready), .gen_word, .gen_en, .ge(wc_ge)
  );

  a_one_side: assert property (@(posedge clk) disable iff (!rst_n) !(r_fetch && w_fetch));
endmodule
