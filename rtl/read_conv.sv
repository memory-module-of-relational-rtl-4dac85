// read_conv: read data conversion block of the data control unit.
//
// Rebuilds a record from the raw bits of the 32 detectors (16 chips, two subchips each).
// At each field rotation of a detection window (`rot_tick`, window opened by `ds` and
// lasting 2*loops rotations) the 32 detector bits are loaded in parallel into a shift
// register and the defect mask of that major-line position is fetched. The register is then
// shifted out one bit per clock; a bit from a good loop goes into a one-byte shift register,
// a bit from a defect loop is dropped. Every eighth kept bit the byte is latched and
// offered on `byte_data`/`byte_valid` (one clock). The first `rec_bytes` bytes of a record
// are output; the pad bits after them are dropped.
//
// Serial order within a position is detector bit 0 first: right subchips of chips 0..15,
// then left subchips of chips 0..15. The first kept bit of a byte becomes its bit 0.
// The load / shift / byte-latch structure follows the document's read circuit; the
// bit order within a byte and the drop of pad bits are this design's choices.
// A row takes about 40 clocks, so a rotation must last at least that long.
module read_conv (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rot_tick,
  input  logic        ds,          // detection start, valid with rot_tick
  input  logic [31:0] det,         // detector bits
  input  logic [7:0]  loops,
  input  logic [15:0] rec_bytes,
  // defect loop management
  output logic        mask_fetch,
  output logic        mask_first,
  input  logic [31:0] mask,
  input  logic        mask_valid,
  // output port
  output logic        byte_valid,
  output logic [7:0]  byte_data,
  output logic        rec_done     // last byte of a record delivered
);
  logic [31:0] sr;
  logic [8:0]  rows_left;
  logic [5:0]  nbit;        // bits left to shift in this row
  logic        shifting, wait_mask;
  logic [7:0]  bsr;
  logic [2:0]  bcnt;
  logic [15:0] bytes_out;

  wire sample = rot_tick && (ds || rows_left != 0);
  wire keep   = shifting && mask_valid && mask[5'(6'd32 - nbit)];
  wire [7:0] nxt_byte = {sr[0], bsr[7:1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr <= '0; rows_left <= '0; nbit <= '0; shifting <= 1'b0; wait_mask <= 1'b0;
      bsr <= '0; bcnt <= '0; bytes_out <= '0;
      mask_fetch <= 1'b0; mask_first <= 1'b0;
      byte_valid <= 1'b0; byte_data <= '0; rec_done <= 1'b0;
    end else begin
      mask_fetch <= 1'b0;
      byte_valid <= 1'b0;
      rec_done   <= 1'b0;
      if (sample) begin
        sr         <= det;
        rows_left  <= ds ? {loops, 1'b0} - 9'd1 : rows_left - 9'd1;
        mask_fetch <= 1'b1;
        mask_first <= ds;
        wait_mask  <= 1'b1;
        shifting   <= 1'b0;
        if (ds) begin
          bcnt      <= '0;
          bytes_out <= '0;
        end
      end else if (wait_mask) begin
        // mask_valid drops the clock after the fetch; start once it is back
        if (mask_valid && !mask_fetch) begin
          wait_mask <= 1'b0;
          shifting  <= 1'b1;
          nbit      <= 6'd32;
        end
      end else if (shifting) begin
        sr   <= sr >> 1;
        nbit <= nbit - 1'b1;
        if (nbit == 6'd1) shifting <= 1'b0;
        if (keep) begin
          bsr  <= nxt_byte;
          bcnt <= bcnt + 1'b1;
          if (bcnt == 3'd7 && bytes_out < rec_bytes) begin
            byte_valid <= 1'b1;
            byte_data  <= nxt_byte;
            bytes_out  <= bytes_out + 1'b1;
            if (bytes_out + 16'd1 == rec_bytes) rec_done <= 1'b1;
          end
        end
      end
    end
  end
endmodule
