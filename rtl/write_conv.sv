// write_conv: write data conversion block of the data control unit.
//
// Spreads the bytes of a record over the 32 bubble generators (16 chips, two subchips
// each), one 32-bit word per field rotation, 2*loops words per record. For each word the
// defect mask of its major-line position is fetched; the word is then built serially, one
// subchip per clock: a good loop takes the next record bit (bit 0 of each byte first), a
// defect loop gets a 0, and after `rec_bytes` bytes the rest of the record is padded with 0.
// This mirrors the read circuit, as the document suggests for the write side.
//
// The first two words are prepared as soon as `enable` is set and a whole record is
// waiting (`rec_avail`); `ready` then tells the generator control part that a record can
// start. Afterwards a small queue keeps up to two prepared words.
// `gs` (generation start) puts that word on `gen_word` and raises `gen_en`. The bubble side
// takes `gen_word` at every following `rot_tick`; each tick the next word, prepared during
// the previous rotation, replaces it. `ge` marks the tick that takes the last word.
// Preparing one word takes about 40 clocks, so a rotation must be longer than that.
module write_conv (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        rot_tick,
  input  logic        gs,
  input  logic [7:0]  loops,
  input  logic [15:0] rec_bytes,
  // record data from the interface unit (first-word fall-through)
  input  logic        rec_avail,
  input  logic [7:0]  fifo_data,
  output logic        fifo_re,
  // defect loop management
  output logic        mask_fetch,
  output logic        mask_first,
  input  logic [31:0] mask,
  input  logic        mask_valid,
  // generators
  output logic        ready,
  output logic [31:0] gen_word,
  output logic        gen_en,
  output logic        ge
);
  typedef enum logic [1:0] {W_IDLE, W_MASK, W_SHIFT} wstate_e;
  wstate_e     pst;
  logic        fetched;      // fetch seen by the mask source
  logic [31:0] w;            // word under construction
  logic [5:0]  nbit;
  logic [31:0] q0, q1;       // prepared words, q0 oldest
  logic [1:0]  qn;
  logic [7:0]  bsr;
  logic [3:0]  bleft;
  logic [15:0] bytes_used;
  logic [8:0]  prep_left, words_left;
  logic        first_pending;

  wire good = mask[5'(6'd32 - nbit)];
  assign fifo_re = (pst == W_SHIFT) && good && bleft == 0 && bytes_used < rec_bytes;
  wire dbit = !good ? 1'b0 :
              (bleft != 0) ? bsr[0] :
              (bytes_used < rec_bytes) ? fifo_data[0] : 1'b0;

  // a new record is armed when nothing of the previous one is left
  wire arm = enable && !gen_en && prep_left == 0 && qn == 0 && pst == W_IDLE && rec_avail;
  // generation may start once two words are prepared (the second must be ready at the
  // first rot_tick, which can be less than a word preparation time after gs)
  assign ready = enable && !gen_en && qn == 2'd2;

  wire take = (gs && ready) || (rot_tick && gen_en && words_left != 9'd1);
  wire done_word = (pst == W_SHIFT) && nbit == 6'd1;
  wire [31:0] done_val = {dbit, w[31:1]};
  wire start_prep = pst == W_IDLE && prep_left != 0 && !arm &&
                    (32'(qn) - 32'(take) < 2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pst <= W_IDLE; fetched <= 1'b0; w <= '0; nbit <= '0; q0 <= '0; q1 <= '0; qn <= '0;
      bsr <= '0; bleft <= '0; bytes_used <= '0; prep_left <= '0; words_left <= '0;
      first_pending <= 1'b0;
      mask_fetch <= 1'b0; mask_first <= 1'b0;
      gen_word <= '0; gen_en <= 1'b0; ge <= 1'b0;
    end else begin
      mask_fetch <= 1'b0;
      ge <= 1'b0;

      if (arm) begin
        prep_left     <= {loops, 1'b0};
        first_pending <= 1'b1;
        bleft         <= '0;
        bytes_used    <= '0;
      end

      // record sequencing towards the generators
      if (gs && ready) begin
        gen_en     <= 1'b1;
        words_left <= {loops, 1'b0};
      end else if (rot_tick && gen_en && words_left == 9'd1) begin
        gen_en   <= 1'b0;
        ge       <= 1'b1;
      end else if (rot_tick && gen_en) begin
        words_left <= words_left - 1'b1;
      end
      if (rot_tick && gen_en && words_left == 9'd1) gen_word <= '0;

      // prepared-word queue: take the oldest and/or append a finished one
      unique case ({take, done_word})
        2'b10: begin gen_word <= q0; q0 <= q1; qn <= qn - 1'b1; end
        2'b01: begin
          if (qn == 0) q0 <= done_val; else q1 <= done_val;
          qn <= qn + 1'b1;
        end
        2'b11: begin
          gen_word <= q0;
          if (qn == 2'd1) q0 <= done_val; else begin q0 <= q1; q1 <= done_val; end
        end
        default: ;
      endcase

      // word preparation
      if (start_prep) begin
        pst           <= W_MASK;
        fetched       <= 1'b0;
        mask_fetch    <= 1'b1;
        mask_first    <= first_pending;
        first_pending <= 1'b0;
        prep_left     <= prep_left - 1'b1;
      end else begin
        unique case (pst)
          W_MASK: begin
            fetched <= 1'b1;
            if (fetched && mask_valid) begin
              pst  <= W_SHIFT;
              nbit <= 6'd32;
            end
          end
          W_SHIFT: begin
            w    <= done_val;
            nbit <= nbit - 1'b1;
            if (good) begin
              if (bleft != 0) begin
                bsr   <= bsr >> 1;
                bleft <= bleft - 1'b1;
              end else if (bytes_used < rec_bytes) begin
                bsr        <= fifo_data >> 1;
                bleft      <= 4'd7;
                bytes_used <= bytes_used + 1'b1;
              end
            end
            if (nbit == 6'd1) pst <= W_IDLE;
          end
          default: ;
        endcase
      end
    end
  end
endmodule
