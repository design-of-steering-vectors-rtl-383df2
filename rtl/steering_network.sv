// steering_network: the interconnection network between the steering vectors
// and the N reconfigurable slots.
//
// It is N independently controlled K x 1 busses (bus_mux), one per slot. Bus
// i carries element i of the steering vector chosen by sel[i], so the words
// reaching the slots form l = sum_k c_k o s_k, where the control vector c_k
// has a one exactly in the slots whose select is k. Encoding the control
// vectors as one binary index per slot makes them valid by construction:
// each entry is 0 or 1 and, per slot, exactly one vector is chosen.
//
// Interface: sv_word[i][k] is the current W-bit word of element i of vector
// k+1; sel[i] is slot i's select; bus[i] is slot i's bus. Combinational.
module steering_network #(
  parameter int unsigned N    = 5,
  parameter int unsigned K    = 2,
  parameter int unsigned W    = 64,
  parameter int unsigned SELW = (K > 1) ? $clog2(K) : 1
) (
  input  logic [N-1:0][K-1:0][W-1:0] sv_word,
  input  logic [N-1:0][SELW-1:0]     sel,
  output logic [N-1:0][W-1:0]        bus
);

  for (genvar i = 0; i < N; i++) begin : g_bus
    bus_mux #(.K(K), .W(W), .SELW(SELW)) u_mux (
      .din  (sv_word[i]),
      .sel  (sel[i]),
      .dout (bus[i])
    );
  end

endmodule
