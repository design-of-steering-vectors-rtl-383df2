// tb_steering_vectors: self-checking test of the steering vector memory at
// its default size (case study: 8 partitions of 1024 bits, W = 64).
// Writes every word of every partition with a value computed from the
// partition and word numbers, then reads through all N x K elements at
// random offsets and checks each against the case-study vectors
//   s1 = (FAL1, FAL2, IMD1, IMD2, IAL1), s2 = (FMD1, FMD2, FMD3, IAL1, IAL1),
// written out here independently of the package. Also checks that a word
// rewritten in one partition shows in every element that shares it.
module tb_steering_vectors;
  localparam int unsigned N = 5, K = 2, W = 64, WORDS = 16;
  // partition numbers: IAL1 0, IMD1 1, IMD2 2, FAL1 3, FAL2 4, FMD1 5, FMD2 6, FMD3 7
  localparam int S1 [N] = '{3, 4, 1, 2, 0};
  localparam int S2 [N] = '{5, 6, 7, 0, 0};

  logic clk = 0;
  logic we;
  logic [2:0] wpart;
  logic [3:0] wword;
  logic [W-1:0] wdata;
  logic [N-1:0][3:0] raddr;
  logic [N-1:0][K-1:0][W-1:0] rdata;

  int checks = 0, failures = 0;

  steering_vectors dut (.clk, .we, .wpart, .wword, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  function automatic logic [W-1:0] pat(int p, int w);
    return {32'(p * 32'h9E37_79B9 + w), 32'(w * 32'h85EB_CA6B ^ p)};
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all(int p_over, int w_over, logic [W-1:0] v_over);
    for (int i = 0; i < N; i++) begin
      for (int k = 0; k < K; k++) begin
        int p;
        logic [W-1:0] exp;
        p = (k == 0) ? S1[i] : S2[i];
        exp = (p == p_over && int'(raddr[i]) == w_over) ? v_over : pat(p, int'(raddr[i]));
        checks++;
        if (rdata[i][k] !== exp) begin
          failures++;
          $display("slot %0d vector %0d word %0d: got %h want %h", i, k + 1, raddr[i], rdata[i][k], exp);
        end
      end
    end
  endtask

  initial begin
    we = 0; wpart = 0; wword = 0; wdata = 0; raddr = '0;
    @(negedge clk);
    for (int p = 0; p < 8; p++)
      for (int w = 0; w < WORDS; w++) begin
        we = 1; wpart = 3'(p); wword = 4'(w); wdata = pat(p, w);
        @(negedge clk);
      end
    we = 0;
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < N; i++) raddr[i] = 4'($urandom);
      #1 check_all(-1, -1, '0);
      @(negedge clk);
    end
    // IAL1 (partition 0) feeds s1[4], s2[3] and s2[4]: rewrite one word.
    we = 1; wpart = 3'd0; wword = 4'd9; wdata = 64'hDEAD_BEEF_0BAD_F00D;
    @(negedge clk);
    we = 0;
    for (int i = 0; i < N; i++) raddr[i] = 4'd9;
    #1 check_all(0, 9, 64'hDEAD_BEEF_0BAD_F00D);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
