// rdm_ram: record descriptor memory (RDM) array.
//
// One word per record slot of a bubble loop. The pilot module uses a 2048-word RAM for the
// main loop and a 64-word RAM for the buffer loop, both 16 bits wide; this module is
// instantiated once for each. It is a plain single-port synchronous RAM: the word at `addr`
// appears on `rdata` one clock later, and a write with `we` takes effect at the clock edge
// (read-before-write: `rdata` then shows the old word). The controller accesses the RAM
// serially, several times per field rotation, so one port is enough. The RAM has no reset;
// the controller clears it with a sweep. Single-port organisation is this design's choice.
module rdm_ram #(
  parameter int DEPTH = 2048,
  parameter int WIDTH = 16
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic                     we,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end
endmodule
