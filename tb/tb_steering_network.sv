// tb_steering_network: self-checking test of the N busses.
// First loads the symbolic example of two case-study style vectors
// s1 = (F1,F2,E1,G1,G2), s2 = (G1,G2,F1,F2,E1) with control vectors
// c1 = (1,1,0,0,0), c2 = (0,0,1,1,1) and checks l = (F1,F2,F1,F2,E1). Then
// drives random words and random selects and checks every bus.
module tb_steering_network;
  localparam int unsigned N = 5, K = 2, W = 64;

  logic [N-1:0][K-1:0][W-1:0] sv_word;
  logic [N-1:0][0:0]          sel;
  logic [N-1:0][W-1:0]        bus;

  int checks = 0, failures = 0;

  steering_network #(.N(N), .K(K), .W(W)) dut (.sv_word(sv_word), .sel(sel), .bus(bus));

  // Symbolic unit partitions as distinct words.
  localparam logic [W-1:0] E1 = 64'hE1E1_0000_0000_00E1, F1 = 64'hF1F1_0000_0000_00F1,
                           F2 = 64'hF2F2_0000_0000_00F2, G1 = 64'h6161_0000_0000_0061,
                           G2 = 64'h6262_0000_0000_0062;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] s1 [N], s2 [N], l [N];
    s1 = '{F1, F2, E1, G1, G2};
    s2 = '{G1, G2, F1, F2, E1};
    l  = '{F1, F2, F1, F2, E1};
    for (int i = 0; i < N; i++) begin
      sv_word[i][0] = s1[i];
      sv_word[i][1] = s2[i];
    end
    sel = {1'b1, 1'b1, 1'b1, 1'b0, 1'b0};   // slot 4 .. slot 0
    #1;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (bus[i] !== l[i]) begin failures++; $display("example slot %0d wrong", i); end
    end

    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < N; i++)
        for (int k = 0; k < K; k++) sv_word[i][k] = {$urandom, $urandom};
      for (int i = 0; i < N; i++) sel[i] = 1'($urandom);
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (bus[i] !== sv_word[i][sel[i]]) begin
          failures++; $display("t=%0d slot %0d wrong", t, i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
