// interface_unit: host interface of the bubble memory module.
//
// Buffers records between the host and the module. The host pushes the bytes of records
// to be written into the write data FIFO and, per record, its 14-bit descriptor
// ({tag, key}) into the descriptor FIFO; records read from the bubbles arrive byte by byte
// in the read data FIFO, which the host pops. `rec_avail` tells the data control unit that
// a whole record (`rec_bytes` bytes) is waiting, so generation never runs dry mid-record.
// All FIFOs are first-word fall-through. The document only says this unit controls the
// transfers with the host and buffers records; FIFOs and their depths are this design's.
module interface_unit
  import grace_mm_pkg::*;
#(
  parameter int DEPTH  = 2048,  // bytes in each data FIFO
  parameter int DDEPTH = 64     // descriptors
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [15:0]     rec_bytes,
  // host side
  input  logic            h_wr_valid,
  input  logic [7:0]      h_wr_data,
  output logic            h_wr_full,
  input  logic            h_desc_valid,
  input  logic [KEYW+1:0] h_desc,
  output logic            h_desc_full,
  input  logic            h_rd_pop,
  output logic            h_rd_valid,
  output logic [7:0]      h_rd_data,
  // module side
  output logic            rec_avail,
  output logic [7:0]      wr_data,
  input  logic            wr_re,
  output logic            desc_valid,
  output logic [KEYW+1:0] desc,
  input  logic            desc_pop,
  input  logic            rd_valid,
  input  logic [7:0]      rd_data,
  output logic            rd_overflow
);
  localparam int CW = $clog2(DEPTH) + 1;
  logic [CW-1:0] wcnt, rcnt;
  logic [$clog2(DDEPTH):0] dcnt;
  logic wempty, dempty, rempty, rfull, dfull;

  sync_fifo #(.DEPTH(DEPTH), .WIDTH(8)) u_wfifo (
    .clk, .rst_n, .clr(1'b0), .we(h_wr_valid), .wdata(h_wr_data), .re(wr_re),
    .rdata(wr_data), .empty(wempty), .full(h_wr_full), .count(wcnt));

  sync_fifo #(.DEPTH(DDEPTH), .WIDTH(KEYW+2)) u_dfifo (
    .clk, .rst_n, .clr(1'b0), .we(h_desc_valid), .wdata(h_desc), .re(desc_pop),
    .rdata(desc), .empty(dempty), .full(dfull), .count(dcnt));

  sync_fifo #(.DEPTH(DEPTH), .WIDTH(8)) u_rfifo (
    .clk, .rst_n, .clr(1'b0), .we(rd_valid), .wdata(rd_data), .re(h_rd_pop),
    .rdata(h_rd_data), .empty(rempty), .full(rfull), .count(rcnt));

  assign h_desc_full = dfull;
  assign desc_valid  = !dempty;
  assign rec_avail   = (32'(wcnt) >= 32'(rec_bytes)) && !dempty;
  assign h_rd_valid  = !rempty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  rd_overflow <= 1'b0;
    else if (rd_valid && rfull)  rd_overflow <= 1'b1;
  end
endmodule
