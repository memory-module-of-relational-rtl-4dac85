// rdm_control: RDM control block of the access control unit.
//
// Owns the record descriptor memories of the buffer loop (NB words) and the main loop
// (NM words, of which the ML slots of a main loop are used) and the address registers that
// follow the bubbles as they rotate. All registers advance by one at every `slot_tick`
// (one record slot = two field rotations), buffer addresses modulo NB and main-loop
// addresses modulo ML:
//
//   AR0  TB       buffer slot under the BR/T gate
//   AR1  WB, WM   slot at the swap gate, buffer and main-loop address
//   AR2  SB, SM0  shadow on the buffer loop and first main-loop shadow
//   AR3  SM1      = SM0 - NB      AR4  SM2 = SM0 - 2*NB
//
// The document shares one register between the buffer and main address of a pair; since a
// main loop of 2046 slots is not a multiple of the 64-slot buffer loop, the buffer half of
// AR1 and AR2 is kept here as its own modulo-NB counter.
// AR0 starts BL0/2 slots behind AR1 (a slot needs BL0 rotations from swap gate to major
// line). AR2..AR4 depend on the record length and are reloaded by `sh_load` with the
// offsets (already reduced modulo ML) the central control unit computes (SM0 = WM + RL/2).
//
// After each slot_tick a fixed serial sequence runs on the single-port RAMs:
//   read TB, WM, WB -> `gate_req` to the gate control parts -> wait for `gate_done`
//   -> write the BR/T result to TB, the swap result to WB and WM
//   -> read SB, SM0, SM1, SM2 -> `shadow_valid` to the generator control part.
// Reading the shadows after the writes lets the generator see this slot's gate actions.
// The sequence needs about 12 clocks plus the gate decision, well inside a slot.
// `clr_start` sweeps both RAMs (all entries, or only the done flags), two clocks per word.
// The register set and the sharing follow the document; the sequence is this design's.
module rdm_control
  import grace_mm_pkg::*;
#(
  parameter int NB = NB_SLOTS,
  parameter int NM = NM_SLOTS,
  parameter int ML = ML_SLOTS     // main-loop slots, at most NM
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  slot_tick,
  // shadow register loading
  input  logic                  sh_load,
  input  logic [$clog2(NM)-1:0] sh_off0,
  input  logic [$clog2(NM)-1:0] sh_off1,
  input  logic [$clog2(NM)-1:0] sh_off2,
  // clearing
  input  logic                  clr_start,
  input  logic                  clr_done_only,
  output logic                  clr_busy,
  // gate control parts
  output logic                  gate_req,
  output rdm_entry_t            tb_e,
  output rdm_entry_t            wb_e,
  output rdm_entry_t            wm_e,
  input  logic                  gate_done,
  input  logic                  brt_we,
  input  rdm_entry_t            brt_new,
  input  logic                  swap,
  input  rdm_entry_t            new_wb,
  input  rdm_entry_t            new_wm,
  // generator control part
  output logic                  shadow_valid,
  output rdm_entry_t            sb_e,
  output rdm_entry_t            sm0_e,
  output rdm_entry_t            sm1_e,
  output rdm_entry_t            sm2_e,
  // observation
  output logic [$clog2(NB)-1:0] tb_addr,
  output logic [$clog2(NM)-1:0] wm_addr,
  output logic [$clog2(NM)-1:0] sm0_addr
);
  localparam int BA = $clog2(NB);
  localparam int MA = $clog2(NM);

  typedef enum logic [3:0] {
    S_IDLE, S_R0, S_R1, S_R2, S_GW, S_W0, S_W1, S_S0, S_S1, S_S2, S_S3, S_CRD, S_CWR
  } seq_e;
  seq_e st;

  logic [BA-1:0] ar0;
  logic [MA-1:0] ar1, ar2, ar3, ar4;
  logic [BA-1:0] wb, sb;      // buffer halves of AR1 and AR2
  logic [MA-1:0] ci;          // clear index
  logic          cdone_only;
  logic          clr_pend;    // clear requested, waits for the end of a slot sequence
  logic          brt_we_q, swap_q;
  rdm_entry_t    brt_new_q, new_wb_q, new_wm_q;

  // RAM ports
  logic [BA-1:0] b_addr;  logic b_we;  rdm_entry_t b_wd, b_rd;
  logic [MA-1:0] m_addr;  logic m_we;  rdm_entry_t m_wd, m_rd;

  rdm_ram #(.DEPTH(NB), .WIDTH(16)) u_rdm_buf (.clk, .addr(b_addr), .we(b_we), .wdata(b_wd), .rdata(b_rd));
  rdm_ram #(.DEPTH(NM), .WIDTH(16)) u_rdm_main(.clk, .addr(m_addr), .we(m_we), .wdata(m_wd), .rdata(m_rd));

  assign tb_addr  = ar0;
  assign wm_addr  = ar1;
  assign sm0_addr = ar2;
  assign clr_busy = clr_pend || (st == S_CRD) || (st == S_CWR);

  // address registers follow the rotation
  function automatic logic [MA-1:0] inc_m(input logic [MA-1:0] a);
    return (a == MA'(ML - 1)) ? '0 : a + 1'b1;
  endfunction
  function automatic logic [MA-1:0] add_m(input logic [MA-1:0] a, input logic [MA-1:0] b);
    logic [MA:0] t;
    t = {1'b0, a} + {1'b0, b};
    return (t >= (MA+1)'(ML)) ? MA'(t - (MA+1)'(ML)) : t[MA-1:0];
  endfunction
  wire [MA-1:0] ar1_next = slot_tick ? inc_m(ar1) : ar1;
  wire [BA-1:0] wb_next  = slot_tick ? wb + 1'b1 : wb;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ar0 <= BA'(NB - BL0/2);
      ar1 <= '0;
      wb  <= '0;
      ar2 <= '0;
      sb  <= '0;
      ar3 <= '0;
      ar4 <= '0;
    end else begin
      if (slot_tick) begin
        ar0 <= ar0 + 1'b1;
        ar1 <= inc_m(ar1);
        wb  <= wb + 1'b1;
      end
      if (sh_load) begin
        ar2 <= add_m(ar1_next, sh_off0);
        sb  <= wb_next + sh_off0[BA-1:0];
        ar3 <= add_m(ar1_next, sh_off1);
        ar4 <= add_m(ar1_next, sh_off2);
      end else if (slot_tick) begin
        ar2 <= inc_m(ar2);
        sb  <= sb + 1'b1;
        ar3 <= inc_m(ar3);
        ar4 <= inc_m(ar4);
      end
    end
  end

  // RAM port control
  always_comb begin
    b_addr = ar0; b_we = 1'b0; b_wd = brt_new_q;
    m_addr = ar1; m_we = 1'b0; m_wd = new_wm_q;
    unique case (st)
      S_R0:  begin b_addr = ar0; m_addr = ar1; end
      S_R1:  begin b_addr = wb; end
      S_W0:  begin b_addr = ar0; b_we = brt_we_q; b_wd = brt_new_q; end
      S_W1:  begin b_addr = wb; b_we = swap_q; b_wd = new_wb_q;
                   m_addr = ar1; m_we = swap_q; m_wd = new_wm_q; end
      S_S0:  begin b_addr = sb; m_addr = ar2; end
      S_S1:  begin m_addr = ar3; end
      S_S2:  begin m_addr = ar4; end
      S_CRD: begin b_addr = ci[BA-1:0]; m_addr = ci; end
      S_CWR: begin
        b_addr = ci[BA-1:0]; m_addr = ci;
        b_we = (ci < MA'(NB));
        m_we = 1'b1;
        b_wd = cdone_only ? '{valid: b_rd.valid, done: 1'b0, tag: b_rd.tag, key: b_rd.key} : RDM_EMPTY;
        m_wd = cdone_only ? '{valid: m_rd.valid, done: 1'b0, tag: m_rd.tag, key: m_rd.key} : RDM_EMPTY;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; ci <= '0; cdone_only <= 1'b0; clr_pend <= 1'b0;
      gate_req <= 1'b0; shadow_valid <= 1'b0;
      tb_e <= RDM_EMPTY; wb_e <= RDM_EMPTY; wm_e <= RDM_EMPTY;
      sb_e <= RDM_EMPTY; sm0_e <= RDM_EMPTY; sm1_e <= RDM_EMPTY; sm2_e <= RDM_EMPTY;
      brt_we_q <= 1'b0; swap_q <= 1'b0;
      brt_new_q <= RDM_EMPTY; new_wb_q <= RDM_EMPTY; new_wm_q <= RDM_EMPTY;
    end else begin
      gate_req     <= 1'b0;
      shadow_valid <= 1'b0;
      if (clr_start) begin
        clr_pend   <= 1'b1;
        cdone_only <= clr_done_only;
      end
      unique case (st)
        S_IDLE: begin
          if (clr_pend) begin
            st <= S_CRD; ci <= '0; clr_pend <= 1'b0;
          end else if (slot_tick) begin
            st <= S_R0;
          end
        end
        S_R0: st <= S_R1;
        S_R1: begin tb_e <= b_rd; wm_e <= m_rd; st <= S_R2; end
        S_R2: begin wb_e <= b_rd; gate_req <= 1'b1; st <= S_GW; end
        S_GW: if (gate_done) begin
          brt_we_q  <= brt_we;  brt_new_q <= brt_new;
          swap_q    <= swap;    new_wb_q  <= new_wb;  new_wm_q <= new_wm;
          st <= S_W0;
        end
        S_W0: st <= S_W1;
        S_W1: st <= S_S0;
        S_S0: st <= S_S1;
        S_S1: begin sb_e <= b_rd; sm0_e <= m_rd; st <= S_S2; end
        S_S2: begin sm1_e <= m_rd; st <= S_S3; end
        S_S3: begin sm2_e <= m_rd; shadow_valid <= 1'b1; st <= S_IDLE; end
        S_CRD: st <= S_CWR;
        S_CWR: begin
          if (ci == MA'(NM - 1)) st <= S_IDLE;
          else begin ci <= ci + 1'b1; st <= S_CRD; end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
