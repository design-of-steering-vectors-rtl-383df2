// tb_susan_configs: which functional-unit configurations of the Susan
// (MiBench) profile the default design can reach.
//
// The design at its default parameters (N = 5 slots, K = 2 vectors,
// s1 = (FAL1,FAL2,IMD1,IMD2,IAL1), s2 = (FMD1,FMD2,FMD3,IAL1,IAL1)) is
// driven through all 2^5 settings of the select lines. After each load the
// testbench decodes the slots into complete units and records the unit
// counts (FMD, FAL, IMD, IAL). A profiled configuration is served when some
// reached configuration holds at least as many units of every type. The
// 41 profiled configurations and their cycle counts are listed below; the
// expected set of served configurations (1-7, 9, 10, 13, 21, 27) and the
// served share of the profiled cycles (42,389,731 of 44,663,007) were worked
// out by hand from the two vectors.
module tb_susan_configs;
  localparam int unsigned N = 5, W = 64, SLOT_BITS = 1024, WORDS = SLOT_BITS / W;
  localparam int NCFG = 41;
  // {FMD, FAL, IMD, IAL, cycles}
  localparam longint PROFILE [NCFG][5] = '{
    '{0,1,0,0,14687394}, '{0,0,1,0,8073949}, '{0,0,0,1,5305970}, '{0,1,0,1,4831781},
    '{0,1,1,0,3927892},  '{0,0,1,1,2197350}, '{0,1,1,1,1761679}, '{0,2,0,0,1345299},
    '{0,1,0,2,999982},   '{0,0,0,2,392283},  '{0,1,1,2,317736},  '{0,0,0,3,314990},
    '{1,0,0,0,202321},   '{0,2,0,1,88724},   '{0,2,0,2,81216},   '{0,2,0,3,43320},
    '{0,0,2,0,21387},    '{0,0,0,4,16528},   '{0,0,2,1,14273},   '{2,0,0,0,8378},
    '{1,0,0,1,7426},     '{1,1,0,0,5219},    '{1,1,0,1,3577},    '{0,3,0,1,2952},
    '{1,2,0,0,1908},     '{1,1,0,2,1890},    '{1,0,0,2,1704},    '{0,3,0,0,1476},
    '{1,0,1,0,840},      '{2,0,0,1,830},     '{1,2,0,1,636},     '{0,0,1,2,635},
    '{0,0,1,3,395},      '{1,0,0,3,388},     '{0,1,0,3,323},     '{0,0,2,2,287},
    '{3,0,0,0,31},       '{0,0,0,5,19},      '{0,0,0,6,15},      '{0,0,1,4,3},
    '{0,1,0,4,1}};
  localparam logic [NCFG-1:0] EXPECT_SERVED = 41'h410137f;
  localparam longint EXPECT_CYCLES = 42389731, TOTAL_CYCLES = 44663007;

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

  steering_top dut (.clk, .rst_n, .cfg_we, .cfg_part, .cfg_word, .cfg_wdata,
                    .start, .sel, .busy, .ready, .done, .slot_cfg);

  always #5 clk = ~clk;

  // Each partition is filled with its own number in every word.
  function automatic int which(int i);
    for (int p = 0; p < 8; p++) if (slot_cfg[i] == {(SLOT_BITS/8){8'(p + 8'hA0)}}) return p;
    return -1;
  endfunction

  // partitions: IAL1 0, IMD1 1, IMD2 2, FAL1 3, FAL2 4, FMD1 5, FMD2 6, FMD3 7
  function automatic void units(output int u [4]);
    int h [N+2];
    int i = 0;
    u = '{0, 0, 0, 0};
    for (int j = 0; j < N + 2; j++) h[j] = (j < N) ? which(j) : -1;
    while (i < N) begin
      if (h[i] == 0) begin u[3]++; i += 1; end
      else if (h[i] == 1 && h[i+1] == 2) begin u[2]++; i += 2; end
      else if (h[i] == 3 && h[i+1] == 4) begin u[1]++; i += 2; end
      else if (h[i] == 5 && h[i+1] == 6 && h[i+2] == 7) begin u[0]++; i += 3; end
      else i += 1;
    end
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int reached [32][4];
    int u [4];
    logic [NCFG-1:0] served = '0;
    longint cycles = 0, total = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 8; p++)
      for (int w = 0; w < int'(WORDS); w++) begin
        cfg_we = 1; cfg_part = 3'(p); cfg_word = 4'(w); cfg_wdata = {8{8'(p + 8'hA0)}};
        @(negedge clk);
      end
    cfg_we = 0;

    for (int c = 0; c < 32; c++) begin
      start = '1;
      for (int i = 0; i < N; i++) sel[i] = 1'(c >> i);
      @(negedge clk);
      start = '0;
      while (!(ready == '1 && busy == '0)) @(negedge clk);
      checks++;
      for (int i = 0; i < N; i++)
        if (which(i) != ((((c >> i) & 1) != 0) ? int'(steer_pkg::DEF_SV_MAP[1][i]) : int'(steer_pkg::DEF_SV_MAP[0][i]))) begin
          failures++; $display("select %b: slot %0d holds partition %0d", 5'(c), i, which(i));
        end
      units(u);
      reached[c] = u;
    end

    for (int n = 0; n < NCFG; n++) begin
      for (int c = 0; c < 32; c++)
        if (reached[c][0] >= PROFILE[n][0] && reached[c][1] >= PROFILE[n][1] &&
            reached[c][2] >= PROFILE[n][2] && reached[c][3] >= PROFILE[n][3])
          served[n] = 1'b1;
      total += PROFILE[n][4];
      if (served[n]) cycles += PROFILE[n][4];
      checks++;
      if (served[n] != EXPECT_SERVED[n]) begin
        failures++; $display("configuration %0d: served=%0b, expected %0b", n + 1, served[n], EXPECT_SERVED[n]);
      end
    end
    $display("served configurations %0d of %0d, cycles %0d of %0d", $countones(served), NCFG, cycles, total);
    checks++;
    if (cycles != EXPECT_CYCLES || total != TOTAL_CYCLES) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
