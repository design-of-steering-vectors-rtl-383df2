// steering_top: a dynamically reconfigurable resource of N slots fed from K
// steering vectors through N independent K x 1 busses.
//
// The steering vectors (steering_vectors) hold configuration bits; each
// element of a vector is one slot's worth of a functional-unit partition.
// Slot i is fed by its own bus (steering_network), which takes element i of
// whichever vector the slot's select names, so the slots can be filled with
// any mixture of the vectors' elements taken position by position. Each
// slot (reconfig_slot) loads its SLOT_BITS configuration bits W bits per bus
// cycle, independently of the others: some slots can reconfigure while the
// rest keep their configuration and compute.
//
// Interface:
//   cfg_we/cfg_part/cfg_word/cfg_wdata  host write of one memory word
//   start[i], sel[i]                    start loading slot i from vector
//                                       sel[i]+1 (N*log2(K) select lines)
//   busy[i], ready[i], done[i]          slot i loading / configured / load
//                                       just finished (one-cycle pulse)
//   slot_cfg[i]                         configuration bits held by slot i,
//                                       for the slot's reconfigurable logic
// Timing: a load of slot i takes SLOT_BITS/W cycles after the start cycle;
// see reconfig_slot.
// Defaults are the case study (N = 5, K = 2, eq. steering vectors in
// steer_pkg). W = 64 and SLOT_BITS = 1024 are this design's choices. The
// reconfigurable logic itself and the control that chooses the selects are
// outside this design.
module steering_top
  import steer_pkg::*;
#(
  parameter int unsigned N         = DEF_N,
  parameter int unsigned K         = DEF_K,
  parameter int unsigned W         = DEF_W,
  parameter int unsigned SLOT_BITS = DEF_SLOT_BITS,
  parameter int unsigned N_PARTS   = DEF_N_PARTS,
  parameter int unsigned PW        = (N_PARTS > 1) ? $clog2(N_PARTS) : 1,
  parameter int unsigned SELW      = (K > 1) ? $clog2(K) : 1,
  parameter int unsigned WORDS     = SLOT_BITS / W,
  parameter int unsigned AW        = (WORDS > 1) ? $clog2(WORDS) : 1,
  parameter logic [K-1:0][N-1:0][PW-1:0] SV_MAP = DEF_SV_MAP
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // host write port of the steering vector memory
  input  logic                           cfg_we,
  input  logic [PW-1:0]                  cfg_part,
  input  logic [AW-1:0]                  cfg_word,
  input  logic [W-1:0]                   cfg_wdata,
  // per-slot reconfiguration requests
  input  logic [N-1:0]                   start,
  input  logic [N-1:0][SELW-1:0]         sel,
  output logic [N-1:0]                   busy,
  output logic [N-1:0]                   ready,
  output logic [N-1:0]                   done,
  output logic [N-1:0][SLOT_BITS-1:0]    slot_cfg
);

  logic [N-1:0][AW-1:0]       word_addr;
  logic [N-1:0][SELW-1:0]     sel_held;
  logic [N-1:0][K-1:0][W-1:0] sv_word;
  logic [N-1:0][W-1:0]        bus;

  steering_vectors #(
    .N(N), .K(K), .W(W), .SLOT_BITS(SLOT_BITS), .N_PARTS(N_PARTS),
    .PW(PW), .WORDS(WORDS), .AW(AW), .SV_MAP(SV_MAP)
  ) u_sv (
    .clk   (clk),
    .we    (cfg_we),
    .wpart (cfg_part),
    .wword (cfg_word),
    .wdata (cfg_wdata),
    .raddr (word_addr),
    .rdata (sv_word)
  );

  steering_network #(.N(N), .K(K), .W(W), .SELW(SELW)) u_net (
    .sv_word (sv_word),
    .sel     (sel_held),
    .bus     (bus)
  );

  for (genvar i = 0; i < N; i++) begin : g_slot
    reconfig_slot #(
      .K(K), .W(W), .SLOT_BITS(SLOT_BITS), .SELW(SELW), .WORDS(WORDS), .AW(AW)
    ) u_slot (
      .clk       (clk),
      .rst_n     (rst_n),
      .start     (start[i]),
      .sel_in    (sel[i]),
      .sel       (sel_held[i]),
      .word_addr (word_addr[i]),
      .bus       (bus[i]),
      .busy      (busy[i]),
      .ready     (ready[i]),
      .done      (done[i]),
      .cfg       (slot_cfg[i])
    );
  end

endmodule
