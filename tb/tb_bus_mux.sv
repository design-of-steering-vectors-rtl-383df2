// tb_bus_mux: self-checking test of the K x 1 configuration bus.
// Drives random steering-vector words and selects into a K = 2 bus (the
// case-study size) and a K = 4 bus, and checks that the bus carries exactly
// the selected word.
module tb_bus_mux;
  localparam int unsigned W = 64;

  logic [1:0][W-1:0] din2;
  logic [0:0]        sel2;
  logic [W-1:0]      dout2;
  logic [3:0][15:0]  din4;
  logic [1:0]        sel4;
  logic [15:0]       dout4;

  int checks = 0, failures = 0;

  bus_mux #(.K(2), .W(W))  u2 (.din(din2), .sel(sel2), .dout(dout2));
  bus_mux #(.K(4), .W(16)) u4 (.din(din4), .sel(sel4), .dout(dout4));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      din2 = {{$urandom, $urandom}, {$urandom, $urandom}};
      sel2 = 1'($urandom);
      for (int k = 0; k < 4; k++) din4[k] = 16'($urandom);
      sel4 = 2'($urandom);
      #1;
      checks++;
      if (dout2 !== (sel2 ? din2[1] : din2[0])) begin
        failures++; $display("K=2 mismatch sel=%0d", sel2);
      end
      checks++;
      case (sel4)
        2'd0: if (dout4 !== din4[0]) failures++;
        2'd1: if (dout4 !== din4[1]) failures++;
        2'd2: if (dout4 !== din4[2]) failures++;
        2'd3: if (dout4 !== din4[3]) failures++;
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
