// tb_reconfig_slot: self-checking test of one slot's load sequencer and
// configuration store, at a reduced size (W = 16, SLOT_BITS = 64, so a load
// is 4 bus cycles). The bus is driven from a model of two steering-vector
// elements addressed by the slot's held select and word address.
// Checks: reset state; load latency of SLOT_BITS/W cycles with busy high and
// ready low throughout; loaded bits; select held during the load even when
// the input select changes; a start while busy is ignored; reload from the
// other vector.
module tb_reconfig_slot;
  localparam int unsigned K = 2, W = 16, SLOT_BITS = 64, WORDS = SLOT_BITS / W;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [0:0] sel_in = '0, sel;
  logic [1:0] word_addr;
  logic [W-1:0] bus;
  logic busy, ready, done;
  logic [SLOT_BITS-1:0] cfg;

  logic [W-1:0] elem [K][WORDS];

  int checks = 0, failures = 0;

  reconfig_slot #(.K(K), .W(W), .SLOT_BITS(SLOT_BITS)) dut (
    .clk, .rst_n, .start, .sel_in, .sel, .word_addr, .bus, .busy, .ready, .done, .cfg);

  always #5 clk = ~clk;
  assign bus = elem[sel][word_addr];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [SLOT_BITS-1:0] expect_cfg(int k);
    logic [SLOT_BITS-1:0] v;
    for (int w = 0; w < WORDS; w++) v[w*W +: W] = elem[k][w];
    return v;
  endfunction

  // Start a load and follow it cycle by cycle; returns the cycles from the
  // start edge to the cycle in which done is seen.
  task automatic load(int k, bit poke_while_busy, output int lat);
    @(negedge clk);
    start = 1; sel_in = 1'(k);
    @(negedge clk);
    start = 0; sel_in = 1'(1 - k);
    lat = 1;
    while (!done) begin
      chk(busy && !ready, "busy high and ready low during load");
      chk(int'(sel) == k, "select held");
      if (poke_while_busy && lat == 2) start = 1;
      @(negedge clk);
      start = 0;
      lat++;
      if (lat > 50) break;
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    for (int k = 0; k < K; k++)
      for (int w = 0; w < WORDS; w++) elem[k][w] = 16'($urandom);
    repeat (3) @(negedge clk);
    chk(!busy && !ready && !done && cfg == '0, "reset state");
    rst_n = 1;

    load(1, 0, lat);
    chk(lat == WORDS + 1, $sformatf("latency %0d, want %0d", lat, WORDS + 1));
    chk(ready && !busy, "ready after load");
    chk(cfg == expect_cfg(1), "cfg from vector 2");

    // A start while busy must not restart the load.
    load(0, 1, lat);
    chk(lat == WORDS + 1, $sformatf("latency with poke %0d", lat));
    chk(cfg == expect_cfg(0), "cfg from vector 1");
    @(negedge clk);
    chk(!busy && ready, "start while busy ignored");

    // Configuration holds while idle.
    repeat (5) @(negedge clk);
    chk(cfg == expect_cfg(0) && ready, "configuration held");

    // Reset clears the slot.
    rst_n = 0;
    @(negedge clk);
    chk(cfg == '0 && !ready, "reset clears");
    rst_n = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
