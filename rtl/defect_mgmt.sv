// defect_mgmt: defect loop management block of the data control unit.
//
// A record of L loops per subchip passes the detector (or leaves the generator) as 2L
// major-line positions, farthest loop first, each position carrying one bit of each of the
// 32 subchips. For every position the conversion blocks need the 32 good-loop flags. This
// block walks the defect ROM downward from address 8L: a `fetch` with `first` set restarts
// at 8L, a `fetch` without it continues below the previous row. It reads four bytes
// (about six clocks) and presents them as `mask`, bit i for serial subchip i, with
// `mask_valid` held until the next fetch. The walk from 8L downward follows the
// document; gathering a whole row into one 32-bit word is this design's choice.
module defect_mgmt #(
  parameter int AW = 11
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [7:0]    loops,      // loops per subchip used by a record
  input  logic          fetch,
  input  logic          first,
  output logic [31:0]   mask,
  output logic          mask_valid,
  // defect ROM read port
  output logic [AW-1:0] rom_addr,
  input  logic [7:0]    rom_data
);
  logic [AW-1:0] next_addr;   // first address of the next row
  logic [2:0]    step;        // clocks since the fetch
  logic          busy;

  // The ROM answers one clock after the address is registered here, so the byte for the
  // address set at step s is captured at step s+2.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      next_addr  <= '0;
      rom_addr   <= '0;
      step       <= '0;
      busy       <= 1'b0;
      mask       <= '0;
      mask_valid <= 1'b0;
    end else begin
      if (fetch) begin
        busy       <= 1'b1;
        mask_valid <= 1'b0;
        step       <= 3'd1;
        rom_addr   <= first ? AW'({loops, 3'b000}) : next_addr;
        next_addr  <= (first ? AW'({loops, 3'b000}) : next_addr) - AW'(4);
      end else if (busy) begin
        step <= step + 1'b1;
        if (step < 3'd4) rom_addr <= rom_addr - 1'b1;
        if (step >= 3'd2) mask[8*(step-3'd2) +: 8] <= {<<{rom_data}};
        if (step == 3'd5) begin
          busy       <= 1'b0;
          mask_valid <= 1'b1;
        end
      end
    end
  end
endmodule
