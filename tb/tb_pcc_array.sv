// tb_pcc_array: sweeps the shared random number over all 1024 values for
// random inputs and checks (1) each output bit against r < x+512 for
// positive weights and r < 512-x for negative weights, (2) the ones count equals
// x+512 (positive) or 512-x (negative, the bipolar value -x), and (3) full
// positive correlation: the overlap of ones of any two outputs equals the
// smaller of their ones counts (SCC = +1).
module tb_pcc_array;
  localparam int K = 10, W = 10, Z = 4;
  localparam logic [Z-1:0] NEG = 4'b1010;
  logic [K-1:0] r;
  logic signed [W-1:0] x [Z];
  logic [Z-1:0] c;
  int checks = 0, failures = 0;

  pcc_array #(.Z(Z), .K(K), .W(W), .NEG(NEG)) dut (.r, .x, .c);

  initial begin : watchdog
    #100000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20; t++) begin
      int ones [Z];
      int both [Z][Z];
      int xv [Z];
      for (int i = 0; i < Z; i++) begin
        xv[i] = (t == 0) ? -512 + i * 341 : int'($urandom_range(1023)) - 512;
        x[i] = W'(xv[i]);
        ones[i] = 0;
        for (int j = 0; j < Z; j++) both[i][j] = 0;
      end
      for (int v = 0; v < (1 << K); v++) begin
        r = K'(v);
        #1;
        for (int i = 0; i < Z; i++) begin
          bit e;
          // positive weight: 1 when r < x+512; negative: 1 when r < 512-x
          e = NEG[i] ? (v < 512 - xv[i]) : (v < xv[i] + 512);
          checks++;
          if (c[i] != e) begin
            failures++;
            $display("FAIL r=%0d x=%0d neg=%0b c=%0b", v, xv[i], NEG[i], c[i]);
          end
          ones[i] += int'(c[i]);
          for (int j = 0; j < Z; j++) both[i][j] += int'(c[i] & c[j]);
        end
      end
      for (int i = 0; i < Z; i++) begin
        checks++;
        if (ones[i] != (NEG[i] ? 512 - xv[i] : xv[i] + 512)) begin
          failures++;
          $display("FAIL count i=%0d x=%0d ones=%0d", i, xv[i], ones[i]);
        end
        for (int j = 0; j < Z; j++) begin
          checks++;
          if (both[i][j] != ((ones[i] < ones[j]) ? ones[i] : ones[j])) begin
            failures++;
            $display("FAIL correlation %0d,%0d", i, j);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
