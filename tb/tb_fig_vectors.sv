// tb_fig_vectors: reachability of two hand-made steering-vector pairs with
// N = 5 slots and K = 2 vectors over units E (1 slot), F (2) and G (2).
//   pair 1: s1 = (E1,F1,F2,G1,G2), s2 = (G1,G2,E1,E1,E1)
//   pair 2: s1 = (F1,F2,E1,G1,G2), s2 = (G1,G2,F1,F2,E1)
// Both are driven through all 32 settings of the five select lines (small
// W = 8 and 16 bits per slot). Checks: each vector itself is reachable;
// pair 1 reaches the mixture (G1,G2,E1,G1,G2); pair 1 never holds two F
// units and one E unit, while pair 2 does, e.g. with c1 = (1,1,0,0,0),
// c2 = (0,0,1,1,1) giving exactly (F1,F2,F1,F2,E1); and the selects are
// N*log2(K) = 5 lines.
module tb_fig_vectors;
  localparam int unsigned N = 5, K = 2, W = 8, SLOT_BITS = 16, NP = 5, PW = 3;
  // partitions: E1 0, F1 1, F2 2, G1 3, G2 4 (slot 0 first)
  localparam int E1 = 0, F1 = 1, F2 = 2, G1 = 3, G2 = 4;
  typedef logic [K-1:0][N-1:0][PW-1:0] map_t;

  function automatic map_t mk(int a [N], int b [N]);
    map_t m;
    for (int i = 0; i < int'(N); i++) begin
      m[0][i] = PW'(a[i]);
      m[1][i] = PW'(b[i]);
    end
    return m;
  endfunction

  localparam map_t MAP1 = mk('{E1, F1, F2, G1, G2}, '{G1, G2, E1, E1, E1});
  localparam map_t MAP2 = mk('{F1, F2, E1, G1, G2}, '{G1, G2, F1, F2, E1});

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [PW-1:0] cfg_part = '0;
  logic [0:0] cfg_word = '0;
  logic [W-1:0] cfg_wdata = '0;
  logic [N-1:0] start = '0;
  logic [N-1:0][0:0] sel = '0;
  logic [N-1:0] busy [2], ready [2], done [2];
  logic [N-1:0][SLOT_BITS-1:0] slot_cfg [2];

  int checks = 0, failures = 0;

  steering_top #(.N(N), .K(K), .W(W), .SLOT_BITS(SLOT_BITS), .N_PARTS(NP), .SV_MAP(MAP1)) u_fig1 (
    .clk, .rst_n, .cfg_we, .cfg_part, .cfg_word, .cfg_wdata, .start, .sel,
    .busy(busy[0]), .ready(ready[0]), .done(done[0]), .slot_cfg(slot_cfg[0]));
  steering_top #(.N(N), .K(K), .W(W), .SLOT_BITS(SLOT_BITS), .N_PARTS(NP), .SV_MAP(MAP2)) u_fig2 (
    .clk, .rst_n, .cfg_we, .cfg_part, .cfg_word, .cfg_wdata, .start, .sel,
    .busy(busy[1]), .ready(ready[1]), .done(done[1]), .slot_cfg(slot_cfg[1]));

  always #5 clk = ~clk;

  function automatic int which(int d, int i);
    for (int p = 0; p < int'(NP); p++) if (slot_cfg[d][i] == {2{8'(p + 8'h50)}}) return p;
    return -1;
  endfunction

  // {E, F, G} unit counts of instance d packed as E*100 + F*10 + G.
  function automatic int units(int d);
    int h [N+1];
    int e = 0, f = 0, g = 0, i = 0;
    for (int j = 0; j <= int'(N); j++) h[j] = (j < int'(N)) ? which(d, j) : -1;
    while (i < int'(N)) begin
      if (h[i] == E1) begin e++; i += 1; end
      else if (h[i] == F1 && h[i+1] == F2) begin f++; i += 2; end
      else if (h[i] == G1 && h[i+1] == G2) begin g++; i += 2; end
      else i += 1;
    end
    return e * 100 + f * 10 + g;
  endfunction

  function automatic bit holds(int d, int v [N]);
    for (int i = 0; i < int'(N); i++) if (which(d, i) != v[i]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    automatic bit f1_s1 = 0, f1_s2 = 0, f1_mix = 0, f1_2fe = 0, f2_2fe = 0, f2_eq = 0;
    chk($bits(sel) == 5, "five select lines");
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < int'(NP); p++)
      for (int w = 0; w < 2; w++) begin
        cfg_we = 1; cfg_part = PW'(p); cfg_word = 1'(w); cfg_wdata = 8'(p + 8'h50);
        @(negedge clk);
      end
    cfg_we = 0;
    for (int c = 0; c < 32; c++) begin
      start = '1;
      for (int i = 0; i < int'(N); i++) sel[i] = 1'(c >> i);
      @(negedge clk);
      start = '0;
      while (!(ready[0] == '1 && ready[1] == '1 && busy[0] == '0 && busy[1] == '0)) @(negedge clk);
      if (holds(0, '{E1, F1, F2, G1, G2})) f1_s1 = 1;
      if (holds(0, '{G1, G2, E1, E1, E1})) f1_s2 = 1;
      if (holds(0, '{G1, G2, E1, G1, G2})) f1_mix = 1;
      if (units(0) / 100 >= 1 && (units(0) / 10) % 10 >= 2) f1_2fe = 1;
      if (units(1) / 100 >= 1 && (units(1) / 10) % 10 >= 2) f2_2fe = 1;
      if (c == 28) begin  // slots 0-1 from s1, slots 2-4 from s2
        f2_eq = holds(1, '{F1, F2, F1, F2, E1});
        chk(f2_eq, "pair 2 with c1 = (1,1,0,0,0) gives (F1,F2,F1,F2,E1)");
      end
    end
    chk(f1_s1 && f1_s2, "pair 1 reaches both of its vectors");
    chk(f1_mix, "pair 1 reaches (G1,G2,E1,G1,G2)");
    chk(!f1_2fe, "pair 1 never reaches two F and one E");
    chk(f2_2fe, "pair 2 reaches two F and one E");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
