// bus_mux: one independently controlled K x 1 configuration bus.
//
// Slot i of the reconfigurable resources is fed by one bus that picks element
// i of one of the K steering vectors. The pick is a binary select of
// clog2(K) lines, so the N busses together use N*log2(K) select lines as the
// framework describes. The bus is purely combinational and W bits wide: one
// W-bit word of configuration bits passes per bus cycle.
//
// Interface: din[k] is element i of steering vector k+1, sel picks k, dout is
// the bus to the slot. A select of K or more can only occur when K is not a
// power of two; it drives zero and trips an assertion (this design's choice).
module bus_mux #(
  parameter int unsigned K    = 2,
  parameter int unsigned W    = 64,
  parameter int unsigned SELW = (K > 1) ? $clog2(K) : 1
) (
  input  logic [K-1:0][W-1:0] din,
  input  logic [SELW-1:0]     sel,
  output logic [W-1:0]        dout
);

  always_comb begin
    dout = '0;
    for (int unsigned k = 0; k < K; k++)
      if (sel == SELW'(k)) dout = din[k];
  end

  // The select must name one of the K vectors.
  always_comb
    if (K > 1) assert (32'(sel) < K) else $error("bus_mux: select %0d out of range", sel);

endmodule
