// sync_fifo: single-clock first-in first-out buffer used by the interface unit and the
// access control unit. First-word fall-through: `rdata` shows the oldest word whenever
// `empty` is low, and `re` removes it. `count` gives the number of stored words. Writes to a
// full FIFO and reads from an empty one are ignored.
module sync_fifo #(
  parameter int DEPTH = 16,
  parameter int WIDTH = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clr,
  input  logic                   we,
  input  logic [WIDTH-1:0]       wdata,
  input  logic                   re,
  output logic [WIDTH-1:0]       rdata,
  output logic                   empty,
  output logic                   full,
  output logic [$clog2(DEPTH):0] count
);
  localparam int AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;

  wire do_w = we && !full;
  wire do_r = re && !empty;

  always_ff @(posedge clk) if (do_w) mem[wp] <= wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else if (clr) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_w) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_r) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_w) - (AW+1)'(do_r);
    end
  end

  assign rdata = mem[rp];
  assign empty = (count == 0);
  assign full  = (count == (AW+1)'(DEPTH));
endmodule
