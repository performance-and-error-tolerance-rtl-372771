// tb_sng: for LFSR- and Sobol-based generators and a set of bipolar inputs,
// counts the ones over one 1024-cycle period. Because both sources visit
// every 10-bit value once per period, the count must equal the threshold
// (x + 512) exactly, i.e. the stream's bipolar value equals x.
module tb_sng;
  localparam int K = 10, W = 10;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, en = 1'b0;
  logic signed [W-1:0] x;
  logic s_l, s_s;
  int checks = 0, failures = 0;

  sng #(.KIND(sc_pkg::RNS_LFSR),  .K(K), .W(W), .SEED(10'h155)) u_l (.clk, .rst_n, .load, .en, .x, .s(s_l));
  sng #(.KIND(sc_pkg::RNS_SOBOL), .K(K), .W(W), .DIM(3))        u_s (.clk, .rst_n, .load, .en, .x, .s(s_s));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xs [12] = '{-512, -511, -300, -1, 0, 1, 77, 255, 256, 400, 510, 511};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 12 + 20; t++) begin
      int cl, cs, xv;
      xv = (t < 12) ? xs[t] : int'($urandom_range(1023)) - 512;
      x = W'(xv);
      @(negedge clk);
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      en = 1'b1;
      cl = 0;
      cs = 0;
      for (int i = 0; i < (1 << K); i++) begin
        cl += int'(s_l);
        cs += int'(s_s);
        @(negedge clk);
      end
      en = 1'b0;
      checks += 2;
      if (cl != xv + 512) begin failures++; $display("FAIL lfsr x=%0d ones=%0d", xv, cl); end
      if (cs != xv + 512) begin failures++; $display("FAIL sobol x=%0d ones=%0d", xv, cs); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
