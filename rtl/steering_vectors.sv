// steering_vectors: memory that holds the configuration bits of the K
// steering vectors.
//
// Each steering vector has N elements, one per slot, and each element is one
// slot's worth (SLOT_BITS) of configuration bits for a partition of a
// functional unit. A partition that appears in several elements (IAL_1 is in
// three of them in the case study) is stored only once and fanned out: the
// static map SV_MAP[k][i] says which of the N_PARTS stored partitions feeds
// element i of vector k+1. The map is fixed when the steering vectors are
// designed; the contents are written by a host.
//
// Storage is an array of N_PARTS*WORDS words of W bits, WORDS = SLOT_BITS/W.
// Write port: one word per clock (we, wpart, wword, wdata). Read: slot i is
// loading word raddr[i]; for every slot and every vector the word
// rdata[i][k] is presented combinationally, so a word can cross its bus in
// the same cycle. A write and a read of the same word in one cycle return
// the old word.
module steering_vectors
  import steer_pkg::*;
#(
  parameter int unsigned N         = DEF_N,
  parameter int unsigned K         = DEF_K,
  parameter int unsigned W         = DEF_W,
  parameter int unsigned SLOT_BITS = DEF_SLOT_BITS,
  parameter int unsigned N_PARTS   = DEF_N_PARTS,
  parameter int unsigned PW        = (N_PARTS > 1) ? $clog2(N_PARTS) : 1,
  parameter int unsigned WORDS     = SLOT_BITS / W,
  parameter int unsigned AW        = (WORDS > 1) ? $clog2(WORDS) : 1,
  parameter logic [K-1:0][N-1:0][PW-1:0] SV_MAP = DEF_SV_MAP
) (
  input  logic                       clk,
  input  logic                       we,
  input  logic [PW-1:0]              wpart,
  input  logic [AW-1:0]              wword,
  input  logic [W-1:0]               wdata,
  input  logic [N-1:0][AW-1:0]       raddr,
  output logic [N-1:0][K-1:0][W-1:0] rdata
);

  logic [W-1:0] mem [N_PARTS][WORDS];

  always_ff @(posedge clk)
    if (we) mem[wpart][wword] <= wdata;

  // Fan-out: element i of vector k reads partition SV_MAP[k][i].
  always_comb
    for (int unsigned i = 0; i < N; i++)
      for (int unsigned k = 0; k < K; k++)
        rdata[i][k] = mem[SV_MAP[k][i]][raddr[i]];

  initial begin
    assert (SLOT_BITS % W == 0) else $fatal(1, "SLOT_BITS must be a multiple of W");
    for (int unsigned k = 0; k < K; k++)
      for (int unsigned i = 0; i < N; i++)
        assert (32'(SV_MAP[k][i]) < N_PARTS) else $fatal(1, "SV_MAP names a missing partition");
  end

  // Writes must address a stored word.
  always_ff @(posedge clk)
    if (we) assert (32'(wpart) < N_PARTS && 32'(wword) < WORDS)
      else $error("steering_vectors: write outside memory");

endmodule
