// steer_pkg: types and default constants shared by the steering-vector
// framework.
//
// The framework loads the configuration bits of N reconfigurable slots from
// K steering vectors through N independent K x 1 busses. Every element of a
// steering vector names one partition of a functional unit (for example the
// second slot's worth of a floating-point ALU, FAL_2). Each distinct partition
// is stored once and fanned out to every element that names it.
//
// The defaults follow the case study: N = 5 slots, K = 2 vectors, and the
// four unit types IAL (1 slot), IMD (2), FAL (2) and FMD (3), giving eight
// partitions. The steering vectors are
//   s1 = (FAL_1, FAL_2, IMD_1, IMD_2, IAL_1)
//   s2 = (FMD_1, FMD_2, FMD_3, IAL_1, IAL_1).
// The bus width W and the number of configuration bits per slot are this
// design's own choices (the framework leaves them open).
package steer_pkg;

  localparam int unsigned DEF_N         = 5;
  localparam int unsigned DEF_K         = 2;
  localparam int unsigned DEF_W         = 64;
  localparam int unsigned DEF_SLOT_BITS = 1024;
  localparam int unsigned DEF_N_PARTS   = 8;
  localparam int unsigned DEF_PW        = 3;   // $clog2(DEF_N_PARTS)

  // Partitions of the case-study functional units; numbering is arbitrary.
  typedef enum logic [DEF_PW-1:0] {
    P_IAL1 = 3'd0,
    P_IMD1 = 3'd1,
    P_IMD2 = 3'd2,
    P_FAL1 = 3'd3,
    P_FAL2 = 3'd4,
    P_FMD1 = 3'd5,
    P_FMD2 = 3'd6,
    P_FMD3 = 3'd7
  } part_e;

  // Steering-vector map: DEF_SV_MAP[k][i] is the partition stored in element
  // i (slot i, counted from 0) of steering vector k+1.
  typedef logic [DEF_K-1:0][DEF_N-1:0][DEF_PW-1:0] def_map_t;

  localparam def_map_t DEF_SV_MAP = '{
    // s2 (k = 1): slot 4 .. slot 0
    '{P_IAL1, P_IAL1, P_FMD3, P_FMD2, P_FMD1},
    // s1 (k = 0): slot 4 .. slot 0
    '{P_IAL1, P_IMD2, P_IMD1, P_FAL2, P_FAL1}
  };

endpackage
