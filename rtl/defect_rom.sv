// defect_rom: defect loop map of the sixteen bubble chips.
//
// 8-bit words; loop N (1-based) of all 32 subchips is described at addresses 8N down to
// 8N-7: 8N..8N-3 for the first row of the loop and 8N-4..8N-7 for the second row, each
// group of four bytes covering the 32 subchips MSB first (bit 7 of address 8N is the right
// subchip of chip 0). A 1 marks a good loop. Because both rows of a loop share the loop,
// the two groups hold the same bits. Address 0 is unused.
//
// The pilot module uses a programmed ROM. Here the array powers up all-good (the
// defect-free map) and has a programming port (`prog_we`) so a chip set's map can be
// loaded; this and the 2048-word size are this design's choices. Read is synchronous:
// `rdata` is valid the clock after `addr`.
module defect_rom #(
  parameter int DEPTH = 2048
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [7:0]               rdata,
  input  logic                     prog_we,
  input  logic [$clog2(DEPTH)-1:0] prog_addr,
  input  logic [7:0]               prog_data
);
  logic [7:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = 8'hFF;
  end

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr] <= prog_data;
    rdata <= mem[addr];
  end
endmodule
