// tb_example1_matrix: rebuilds the reachability matrix M of a small
// steering-vector design problem by running the RTL.
//
// Problem: unit types A, B, C of 1, 2 and 3 slots, N = 4 slots, K = 2
// steering vectors. The complete configurations fall into four equivalence
// classes (same unit counts): V1 = AAAA, V2 = two A and one B, V3 = two B,
// V4 = one A and one C. Their seven members form the universe
//   u1 AAAA, u2 AABB, u3 ABBA, u4 BBAA, u5 BBBB, u6 ACCC, u7 CCCA,
// giving 21 pairs of steering vectors, taken in the order (u1,u2), (u1,u3),
// ..., (u6,u7).
//
// One steering_top instance is built per pair (W = 8, 16 configuration bits
// per slot) and all 21 are driven in parallel through the 16 settings of
// the select lines. After each load the testbench decodes the slots; when
// every slot belongs to a complete unit, the configuration is recorded.
// m[r][j] is the number of distinct configurations of class j reached by
// pair r, and must equal the expected matrix below. Rows 4 and 8 (AAAA with
// BBBB, AABB with BBAA) reach four configurations, the most of any pair;
// pair 21 (ACCC with CCCA) reaches only the two members of V4. Rows 9 and 13
// (AABB or ABBA with BBBB) reach a single V2 member: mixing them slot by slot
// splits a B unit, so no second member of V2 appears.
module tb_example1_matrix;
  localparam int unsigned N = 4, K = 2, W = 8, SLOT_BITS = 16, WORDS = 2;
  localparam int unsigned NP = 6, PW = 3, R = 21;
  // partitions: A1 0, B1 1, B2 2, C1 3, C2 4, C3 5 (slot 0 first)
  localparam int U [7][N] = '{
    '{0, 0, 0, 0}, '{0, 0, 1, 2}, '{0, 1, 2, 0}, '{1, 2, 0, 0},
    '{1, 2, 1, 2}, '{0, 3, 4, 5}, '{3, 4, 5, 0}};
  localparam int M_EXP [R][4] = '{
    '{1,1,0,0}, '{1,1,0,0}, '{1,1,0,0}, '{1,2,1,0}, '{1,0,0,1}, '{1,0,0,1},
    '{0,2,0,0}, '{1,2,1,0}, '{0,1,1,0}, '{0,1,0,1}, '{0,1,0,1}, '{0,2,0,0},
    '{0,1,1,0}, '{0,1,0,1}, '{0,1,0,1}, '{0,1,1,0}, '{0,1,0,1}, '{0,1,0,1},
    '{0,0,1,1}, '{0,0,1,1}, '{0,0,0,2}};

  typedef logic [K-1:0][N-1:0][PW-1:0] map_t;

  // r-th pair (a, b), a < b, in lexicographic order.
  function automatic map_t pair_map(int r);
    map_t m;
    int n = 0;
    m = '0;
    for (int a = 0; a < 7; a++)
      for (int b = a + 1; b < 7; b++) begin
        if (n == r)
          for (int i = 0; i < int'(N); i++) begin
            m[0][i] = PW'(U[a][i]);
            m[1][i] = PW'(U[b][i]);
          end
        n++;
      end
    return m;
  endfunction

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [PW-1:0] cfg_part = '0;
  logic [0:0] cfg_word = '0;
  logic [W-1:0] cfg_wdata = '0;
  logic [N-1:0] start = '0;
  logic [N-1:0][0:0] sel = '0;
  logic [N-1:0] busy [R], ready [R], done [R];
  logic [N-1:0][SLOT_BITS-1:0] slot_cfg [R];

  int checks = 0, failures = 0;

  for (genvar r = 0; r < R; r++) begin : g_pair
    steering_top #(.N(N), .K(K), .W(W), .SLOT_BITS(SLOT_BITS), .N_PARTS(NP),
                   .SV_MAP(pair_map(r))) u_top (
      .clk, .rst_n, .cfg_we, .cfg_part, .cfg_word, .cfg_wdata, .start, .sel,
      .busy(busy[r]), .ready(ready[r]), .done(done[r]), .slot_cfg(slot_cfg[r]));
  end

  always #5 clk = ~clk;

  function automatic int which(int r, int i);
    for (int p = 0; p < int'(NP); p++) if (slot_cfg[r][i] == {2{8'(p + 8'h30)}}) return p;
    return -1;
  endfunction

  // Class of the configuration in instance r (0..3), or -1 if some slot is
  // not part of a complete unit.
  function automatic int class_of(int r);
    int h [N+2];
    int a = 0, b = 0, c = 0, i = 0;
    for (int j = 0; j < int'(N) + 2; j++) h[j] = (j < int'(N)) ? which(r, j) : -1;
    while (i < int'(N)) begin
      if (h[i] == 0) begin a++; i += 1; end
      else if (h[i] == 1 && h[i+1] == 2) begin b++; i += 2; end
      else if (h[i] == 3 && h[i+1] == 4 && h[i+2] == 5) begin c++; i += 3; end
      else return -1;
    end
    if (a == 4) return 0;
    if (a == 2 && b == 1) return 1;
    if (b == 2) return 2;
    if (a == 1 && c == 1) return 3;
    return -1;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    automatic int m [R][4];
    automatic bit seen [R][4096];
    foreach (m[r, j]) m[r][j] = 0;
    foreach (seen[r, k]) seen[r][k] = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < int'(NP); p++)
      for (int w = 0; w < int'(WORDS); w++) begin
        cfg_we = 1; cfg_part = PW'(p); cfg_word = 1'(w); cfg_wdata = 8'(p + 8'h30);
        @(negedge clk);
      end
    cfg_we = 0;

    for (int c = 0; c < 16; c++) begin
      start = '1;
      for (int i = 0; i < int'(N); i++) sel[i] = 1'(c >> i);
      @(negedge clk);
      start = '0;
      while (!(ready[0] == '1 && busy[0] == '0)) @(negedge clk);
      for (int r = 0; r < R; r++) begin
        int cls, key;
        cls = class_of(r);
        key = 0;
        for (int i = 0; i < int'(N); i++) key = key * 8 + which(r, i);
        if (cls >= 0 && !seen[r][key]) begin
          seen[r][key] = 1'b1;
          m[r][cls]++;
        end
      end
    end

    for (int r = 0; r < R; r++) begin
      checks++;
      if (m[r] != M_EXP[r]) begin
        failures++;
        $display("row %0d: got %0d %0d %0d %0d", r + 1, m[r][0], m[r][1], m[r][2], m[r][3]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
