// tb_steering_top: end-to-end test of the steering-vector framework at its
// default size (N = 5 slots, K = 2 vectors, W = 64, 1024 bits per slot,
// case-study steering vectors s1 = (FAL1,FAL2,IMD1,IMD2,IAL1) and
// s2 = (FMD1,FMD2,FMD3,IAL1,IAL1)).
//
// A host writes every partition with a pattern computed from its number.
// Three configurations are then loaded and each slot's bits compared with
// the partition it must hold; the tb also decodes the slots into complete
// functional units and checks the unit counts (FMD, FAL, IMD, IAL):
//   1. all slots from s1                       -> (0,1,1,1)
//   2. all slots from s2                       -> (1,0,0,2)
//   3. slots 0-2 from s1, slots 3-4 kept       -> (0,1,0,2)
// The third load reconfigures three slots while two others stay configured,
// mixes the two vectors and gangs the two slots of the FAL unit; a start
// on a busy slot is also issued and must be ignored. Each load must take
// SLOT_BITS/W cycles. Every mechanism is counted and must occur.
module tb_steering_top;
  localparam int unsigned N = 5, W = 64, SLOT_BITS = 1024, WORDS = SLOT_BITS / W;
  // partitions: IAL1 0, IMD1 1, IMD2 2, FAL1 3, FAL2 4, FMD1 5, FMD2 6, FMD3 7
  localparam int S [2][N] = '{'{3, 4, 1, 2, 0}, '{5, 6, 7, 0, 0}};

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [2:0] cfg_part = '0;
  logic [3:0] cfg_word = '0;
  logic [W-1:0] cfg_wdata = '0;
  logic [N-1:0] start = '0;
  logic [N-1:0][0:0] sel = '0;
  logic [N-1:0] busy, ready, done;
  logic [N-1:0][SLOT_BITS-1:0] slot_cfg;

  int checks = 0, failures = 0;
  int n_host_words = 0, n_loads = 0, n_mixed = 0, n_concurrent = 0,
      n_ganged = 0, n_shared = 0, n_ignored = 0;

  steering_top dut (.clk, .rst_n, .cfg_we, .cfg_part, .cfg_word, .cfg_wdata,
                    .start, .sel, .busy, .ready, .done, .slot_cfg);

  always #5 clk = ~clk;

  function automatic logic [W-1:0] pat(int p, int w);
    return {32'(p * 32'h9E37_79B9 + w * 7), 32'(w * 32'h85EB_CA6B ^ (p << 4))};
  endfunction

  function automatic logic [SLOT_BITS-1:0] part_bits(int p);
    logic [SLOT_BITS-1:0] v;
    for (int w = 0; w < WORDS; w++) v[w*W +: W] = pat(p, w);
    return v;
  endfunction

  // Which partition a slot holds, -1 if none.
  function automatic int which(int i);
    for (int p = 0; p < 8; p++) if (slot_cfg[i] == part_bits(p)) return p;
    return -1;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Decode complete units from the slots; returns {FMD, FAL, IMD, IAL}.
  function automatic int unsigned units();
    int fmd = 0, fal = 0, imd = 0, ial = 0, i = 0;
    int h [N+2];
    for (int j = 0; j < N + 2; j++) h[j] = (j < N) ? which(j) : -1;
    while (i < N) begin
      if (h[i] == 0) begin ial++; i += 1; end
      else if (h[i] == 1 && h[i+1] == 2) begin imd++; i += 2; end
      else if (h[i] == 3 && h[i+1] == 4) begin fal++; i += 2; end
      else if (h[i] == 5 && h[i+1] == 6 && h[i+2] == 7) begin fmd++; i += 3; end
      else i += 1;
    end
    return (fmd << 24) | (fal << 16) | (imd << 8) | ial;
  endfunction

  // Start slots in mask with the given selects and wait for all to finish;
  // checks the latency and counts what happened.
  task automatic reconfigure(logic [N-1:0] mask, logic [N-1:0] sels, bit poke);
    int cyc = 0;
    logic [N-1:0] seen = '0;
    @(negedge clk);
    start = mask;
    for (int i = 0; i < N; i++) sel[i] = sels[i];
    n_loads++;
    if ((mask & sels) != 0 && (mask & ~sels) != 0) n_mixed++;
    for (int i = 0; i + 1 < N; i++) if (mask[i] && mask[i+1]) begin n_ganged++; break; end
    @(negedge clk);
    start = '0;
    sel = ~sel;                         // selects may change once latched
    cyc = 1;
    while (seen != mask && cyc < 100) begin
      if (poke && cyc == 3) begin
        start = mask & busy;            // restart attempt on busy slots
        if (start != 0) n_ignored++;
      end
      chk((busy & ~mask) == 0, "only requested slots load");
      if ((ready & ~mask) != 0 && (busy & mask) != 0) n_concurrent++;
      @(negedge clk);
      start = '0;
      for (int i = 0; i < N; i++) if (done[i]) begin
        seen[i] = 1'b1;
        chk(cyc + 1 == int'(WORDS) + 1, $sformatf("slot %0d latency %0d", i, cyc + 1));
      end
      cyc++;
    end
    chk(seen == mask, "all requested slots finished");
    @(negedge clk);
    chk(busy == '0, "no slot restarted by a start while busy");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned u;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Host fills the steering vector memory.
    for (int p = 0; p < 8; p++)
      for (int w = 0; w < int'(WORDS); w++) begin
        cfg_we = 1; cfg_part = 3'(p); cfg_word = 4'(w); cfg_wdata = pat(p, w);
        @(negedge clk);
        n_host_words++;
      end
    cfg_we = 0;
    chk(ready == '0 && slot_cfg == '0, "slots empty after reset");

    // 1. whole vector s1
    reconfigure('1, '0, 0);
    for (int i = 0; i < N; i++) chk(which(i) == S[0][i], $sformatf("cfg1 slot %0d", i));
    u = units();
    chk(u == 32'h00_01_01_01, $sformatf("cfg1 units %h", u));

    // 2. whole vector s2: IAL1 fanned out to two slots
    reconfigure('1, '1, 0);
    for (int i = 0; i < N; i++) chk(which(i) == S[1][i], $sformatf("cfg2 slot %0d", i));
    if (which(3) == 0 && which(4) == 0) n_shared++;
    u = units();
    chk(u == 32'h01_00_00_02, $sformatf("cfg2 units %h", u));

    // 3. slots 0-2 from s1 while slots 3-4 keep IAL1 from s2
    reconfigure(5'b00111, 5'b00000, 1);
    for (int i = 0; i < 3; i++) chk(which(i) == S[0][i], $sformatf("cfg3 slot %0d", i));
    for (int i = 3; i < N; i++) chk(which(i) == S[1][i], $sformatf("cfg3 kept slot %0d", i));
    u = units();
    chk(u == 32'h00_01_00_02, $sformatf("cfg3 units %h", u));
    chk(ready == '1, "all slots configured");

    // 4. mixed start: slots 0-2 from s2 and slots 3-4 from s1 in one go
    reconfigure('1, 5'b00111, 0);
    for (int i = 0; i < N; i++) chk(which(i) == S[i < 3 ? 1 : 0][i], $sformatf("cfg4 slot %0d", i));
    u = units();
    chk(u == 32'h01_00_00_01, $sformatf("cfg4 units %h", u));   // IMD2 alone is no unit

    $display("loads=%0d host_words=%0d mixed=%0d concurrent=%0d ganged=%0d shared=%0d ignored=%0d",
             n_loads, n_host_words, n_mixed, n_concurrent, n_ganged, n_shared, n_ignored);
    chk(n_host_words > 0, "host write happened");
    chk(n_mixed > 0,      "mixed selection happened");
    chk(n_concurrent > 0, "reconfiguration beside computing slots happened");
    chk(n_ganged > 0,     "ganged load happened");
    chk(n_shared > 0,     "shared partition fan-out happened");
    chk(n_ignored > 0,    "start while busy happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
